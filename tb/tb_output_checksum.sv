// tb_output_checksum: self-checking test of output_checksum. Three tiles of
// random output vectors flow through the tap with random stalls on both
// sides. The stream must pass unchanged and sigma must equal the sum of all
// words of each tile modulo 2^WL, strobed once per tile, in the cycle after
// the tile's last beat.
module tb_output_checksum;
  localparam int unsigned WL = 16, TM = 4, TR = 3, TC = 5, UM = 2;
  localparam int unsigned BEATS = TM / UM * TR * TC;
  logic clk = 0, rst_n = 0;
  logic [UM*WL-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready, sigma_valid;
  logic [WL-1:0] sigma;
  int checks = 0, failures = 0, tiles = 0, beats = 0, last_beat_cyc = -10, cyc = 0;
  logic [WL-1:0] exp_sum [$];
  logic [WL-1:0] run = '0;
  bit stalled = 0;

  output_checksum #(.WL(WL), .TM(TM), .TR(TR), .TC(TC), .UM(UM)) dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic bump(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    while (beats < 3 * BEATS) begin
      @(negedge clk);
      if (!stalled) begin
        in_valid = ($urandom_range(0, 3) != 0);
        in_data  = {$urandom, $urandom};
      end
      out_ready = ($urandom_range(0, 3) != 0);
      #1;
      bump(out_data == in_data && out_valid == in_valid && in_ready == out_ready, "pass-through");
    end
    @(negedge clk); in_valid = 0;
    repeat (3) @(posedge clk);
    bump(tiles == 3, "three sigma strobes");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    stalled = in_valid && !in_ready;
    if (sigma_valid) begin
      tiles++;
      bump(exp_sum.size() > 0 && sigma == exp_sum[0], "sigma value");
      bump(cyc == last_beat_cyc + 1, "sigma timing");
      if (exp_sum.size() > 0) void'(exp_sum.pop_front());
    end
    if (in_valid && in_ready) begin
      for (int u = 0; u < UM; u++) run += in_data[u*WL +: WL];
      beats++;
      if (beats % BEATS == 0) begin
        exp_sum.push_back(run);
        run = '0;
        last_beat_cyc = cyc;
      end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
