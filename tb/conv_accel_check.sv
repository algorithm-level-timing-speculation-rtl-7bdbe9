// conv_accel_check: drives one conv_accelerator instance with random tiles
// and checks every output word against a direct evaluation of the
// convolution sum (modulo 2^WL). Also checks that the COMPUTE phase lasts
// exactly TM/UM * TN/UN * K*K * TR*TC cycles and that output back-pressure
// loses no beat. Used by tb_conv_accelerator for several configurations.
module conv_accel_check #(
  parameter int unsigned WL = 16,
  parameter int unsigned K  = 3,
  parameter int unsigned TM = 4,
  parameter int unsigned TN = 4,
  parameter int unsigned TR = 4,
  parameter int unsigned TC = 5,
  parameter int unsigned UM = 2,
  parameter int unsigned UN = 2,
  parameter int unsigned TILES = 2
) (
  input  logic clk,
  input  logic rst_n,
  output logic done,
  output int   checks,
  output int   failures,
  output int   stalls
);
  import conv_pkg::*;
  localparam int unsigned RI = TR + K - 1, CI = TC + K - 1;
  localparam int unsigned NWW = TM * TN * K * K, NXW = TN * RI * CI;
  localparam int unsigned BEATS = TM / UM * TR * TC;
  localparam int unsigned COMPUTE_CYCLES = TM / UM * TN / UN * K * K * TR * TC;

  logic [WL-1:0]    in_data;
  logic             in_valid, in_ready, out_valid, out_ready;
  logic [UM*WL-1:0] out_data;
  conv_phase_e      phase;

  conv_accelerator #(.WL(WL), .K(K), .TM(TM), .TN(TN), .TR(TR), .TC(TC), .UM(UM), .UN(UN)) dut (
    .clk, .rst_n, .in_data, .in_valid, .in_ready, .out_data, .out_valid, .out_ready, .phase);

  logic [WL-1:0] s [NWW + NXW];
  logic [WL-1:0] y [TM][TR][TC];
  int compute_cnt = 0;

  task automatic bump(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %m %s", what); end
  endtask

  always @(posedge clk) if (rst_n) begin
    if (phase == PH_COMPUTE) compute_cnt++;
    if (out_valid && !out_ready) stalls++;
  end

  always @(negedge clk) out_ready = ($urandom_range(0, 2) != 0);

  initial begin
    done = 0; checks = 0; failures = 0; stalls = 0;
    in_valid = 0; in_data = '0;
    @(posedge rst_n);
    for (int t = 0; t < TILES; t++) begin
      foreach (s[q]) s[q] = WL'($urandom);
      for (int m = 0; m < TM; m++)
        for (int r = 0; r < TR; r++)
          for (int c = 0; c < TC; c++) begin
            logic [WL-1:0] acc;
            acc = '0;
            for (int n = 0; n < TN; n++)
              for (int i = 0; i < K; i++)
                for (int j = 0; j < K; j++)
                  acc += WL'(s[((m * TN + n) * K + i) * K + j] * s[NWW + (n * RI + r + i) * CI + c + j]);
            y[m][r][c] = acc;
          end
      compute_cnt = 0;
      // stream the tile in, with random gaps
      for (int q = 0; q < NWW + NXW; q++) begin
        @(negedge clk);
        while ($urandom_range(0, 4) == 0) begin in_valid = 0; @(negedge clk); end
        in_valid = 1; in_data = s[q];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      @(negedge clk); in_valid = 0;
      // collect outputs
      for (int b = 0; b < BEATS; b++) begin
        int mb, r, c;
        @(posedge clk);
        while (!(out_valid && out_ready)) @(posedge clk);
        mb = b / (TR * TC); r = (b / TC) % TR; c = b % TC;
        for (int u = 0; u < UM; u++)
          bump(out_data[u*WL +: WL] == y[mb*UM + u][r][c], "output word");
      end
      bump(compute_cnt == COMPUTE_CYCLES, $sformatf("compute cycles %0d", compute_cnt));
      @(negedge clk);
      bump(!out_valid, "no extra beat");
    end
    bump(stalls > 0, "back-pressure happened");
    done = 1;
  end
endmodule
