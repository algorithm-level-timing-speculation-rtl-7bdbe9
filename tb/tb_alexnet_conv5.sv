// tb_alexnet_conv5: runs a whole convolution layer the size of AlexNet's
// fifth layer (N = 192 input maps, M = 128 output maps, 13 x 13 outputs,
// K = 3, unit stride, so 15 x 15 inputs) on the accelerator at its default
// size, with the accelerator clock overclocked to 125.0 MHz.
//
// The testbench acts as host and data mover. The layer is cut into
// (128/32) * (192/32) = 24 tiles, which are streamed back to back (the next
// tile is offered while the previous one computes). The 6 partial-sum tiles
// of each block of 32 output maps are added up here, as the host would.
// Checked: all 24 checksum verdicts are clean, the assembled layer output
// equals a direct evaluation of the convolution modulo 2^16 for every one
// of the 128*13*13 outputs, and the total COMPUTE time is 24 * 24336
// accelerator cycles. Random data use the full 16-bit range.
module tb_alexnet_conv5;
  import conv_pkg::*;
  localparam int unsigned WL = DEF_WL, K = DEF_K, TM = DEF_TM, TN = DEF_TN;
  localparam int unsigned TR = DEF_TR, TC = DEF_TC, UM = DEF_UM, UN = DEF_UN;
  localparam int unsigned N = 192, M = 128, R = 13, C = 13;
  localparam int unsigned RI = R + K - 1, CI = C + K - 1;
  localparam int unsigned MT = M / TM, NT = N / TN, TILES = MT * NT;
  localparam int unsigned BEATS = TM / UM * TR * TC;
  localparam int unsigned COMPUTE_CYCLES = TM / UM * TN / UN * K * K * TR * TC;

  logic clk_sys = 0, rst_sys_n = 1, rst_acc_n = 1;
  logic clk_acc, locked;
  logic [15:0] freq = 16'd1250;
  logic reprogram = 0;
  logic [WL-1:0] s_in_data;
  logic s_in_valid, s_in_ready, s_out_valid, s_out_ready, tile_done, tile_error;
  logic [UM*WL-1:0] s_out_data;
  conv_phase_e acc_phase;

  int checks = 0, failures = 0, verdicts = 0, errors = 0;
  longint compute_cnt = 0;

  always #5 clk_sys = ~clk_sys;
  clock_wizard_model u_wiz (.freq_100khz(freq), .reprogram, .clk_out(clk_acc), .locked);
  speculative_conv_system dut (.*);

  always @(posedge clk_acc) if (rst_acc_n && acc_phase == PH_COMPUTE) compute_cnt++;
  always @(posedge clk_sys) if (rst_sys_n && tile_done) begin
    verdicts++;
    if (tile_error) errors++;
  end
  always @(negedge clk_sys) s_out_ready = ($urandom_range(0, 7) != 0);

  logic [WL-1:0] x [N][RI][CI];
  logic [WL-1:0] w [M][N][K][K];
  logic [WL-1:0] y [M][R][C];      // assembled from the accelerator
  logic [WL-1:0] yref;

  task automatic send_tile(input int mt, input int nt);
    for (int m = 0; m < TM; m++)
      for (int n = 0; n < TN; n++)
        for (int i = 0; i < K; i++)
          for (int j = 0; j < K; j++) begin
            @(negedge clk_sys);
            s_in_valid = 1; s_in_data = w[mt*TM + m][nt*TN + n][i][j];
            @(posedge clk_sys);
            while (!s_in_ready) @(posedge clk_sys);
          end
    for (int n = 0; n < TN; n++)
      for (int a = 0; a < RI; a++)
        for (int b = 0; b < CI; b++) begin
          @(negedge clk_sys);
          s_in_valid = 1; s_in_data = x[nt*TN + n][a][b];
          @(posedge clk_sys);
          while (!s_in_ready) @(posedge clk_sys);
        end
    @(negedge clk_sys); s_in_valid = 0;
  endtask

  task automatic collect_tile(input int mt);
    for (int b = 0; b < BEATS; b++) begin
      int mb, r, c;
      @(posedge clk_sys);
      while (!(s_out_valid && s_out_ready)) @(posedge clk_sys);
      mb = b / (TR * TC); r = (b / TC) % TR; c = b % TC;
      for (int u = 0; u < UM; u++)
        y[mt*TM + mb*UM + u][r][c] += s_out_data[u*WL +: WL];
    end
  endtask

  initial begin
    s_in_valid = 0; s_in_data = '0;
    foreach (x[n, a, b]) x[n][a][b] = WL'($urandom);
    foreach (w[m, n, i, j]) w[m][n][i][j] = WL'($urandom);
    foreach (y[m, r, c]) y[m][r][c] = '0;
    #1 rst_sys_n = 0; rst_acc_n = 0;
    wait (locked);
    #100 rst_sys_n = 1; rst_acc_n = 1;

    fork
      for (int t = 0; t < TILES; t++) send_tile(t / NT, t % NT);
      for (int t = 0; t < TILES; t++) collect_tile(t / NT);
    join
    wait (verdicts == TILES);

    checks++;
    if (errors != 0) begin failures++; $display("FAIL %0d tiles flagged", errors); end
    checks++;
    if (compute_cnt != longint'(TILES) * COMPUTE_CYCLES) begin
      failures++; $display("FAIL compute cycles %0d", compute_cnt);
    end
    for (int m = 0; m < M; m++)
      for (int r = 0; r < R; r++)
        for (int c = 0; c < C; c++) begin
          yref = '0;
          for (int n = 0; n < N; n++)
            for (int i = 0; i < K; i++)
              for (int j = 0; j < K; j++)
                yref += WL'(w[m][n][i][j] * x[n][r+i][c+j]);
          checks++;
          if (y[m][r][c] != yref) begin
            failures++;
            if (failures < 10) $display("FAIL y[%0d][%0d][%0d]", m, r, c);
          end
        end
    $display("layer: %0d tiles, %0d verdicts, %0d compute cycles, finished at %0t",
             TILES, verdicts, compute_cnt, $time);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50ms;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
