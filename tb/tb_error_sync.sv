// tb_error_sync: self-checking test of error_sync. Verdicts are produced on
// a source clock and must arrive, one tile_done strobe each and with the
// right tile_error, on an unrelated destination clock (tried both faster
// and slower than the source).
module tb_error_sync;
  logic src_clk = 0, dst_clk = 0, src_rst_n = 0, dst_rst_n = 0;
  logic result_valid, error, tile_done, tile_error;
  int checks = 0, failures = 0, got = 0, sent = 0;
  bit exp_err [$];
  realtime sp = 3.3;

  error_sync dut (.*);
  always #(sp) src_clk = ~src_clk;
  always #5 dst_clk = ~dst_clk;

  initial begin
    result_valid = 0; error = 0;
    #40 src_rst_n = 1; dst_rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      if (t == 100) sp = 8.9;             // source clock becomes slower
      @(negedge src_clk);
      result_valid = 1;
      error = ($urandom_range(0, 1) == 1);
      exp_err.push_back(error);
      sent++;
      @(negedge src_clk);
      result_valid = 0;
      error = ~error;                      // only the strobed value counts
      repeat ($urandom_range(8, 20)) @(negedge src_clk);
    end
    #200;
    checks++;
    if (got != sent) begin failures++; $display("FAIL got %0d of %0d", got, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge dst_clk) if (dst_rst_n && tile_done) begin
    got++;
    checks++;
    if (exp_err.size() == 0 || tile_error != exp_err[0]) begin
      failures++; $display("FAIL verdict %0d", got);
    end
    if (exp_err.size() != 0) void'(exp_err.pop_front());
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
