// tb_checksum_compare: self-checking test of checksum_compare. Random tiles
// deliver rho and sigma in random order and with random gaps (including the
// same cycle); about a third of them disagree. Each pair must produce one
// result_valid strobe with error = (rho != sigma).
module tb_checksum_compare;
  localparam int unsigned WL = 16;
  logic clk = 0, rst_n = 0;
  logic rho_valid, sigma_valid, result_valid, error;
  logic [WL-1:0] rho, sigma;
  int checks = 0, failures = 0, results = 0, mismatches = 0;
  bit exp_err [$];

  checksum_compare dut (.*);
  always #5 clk = ~clk;

  initial begin
    rho_valid = 0; sigma_valid = 0; rho = '0; sigma = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 300; t++) begin
      logic [WL-1:0] r, s;
      int gap_r, gap_s;
      r = WL'($urandom);
      s = ($urandom_range(0, 2) == 0) ? r ^ WL'(1 << $urandom_range(0, WL - 1)) : r;
      exp_err.push_back(r != s);
      if (r != s) mismatches++;
      gap_r = $urandom_range(0, 4);
      gap_s = $urandom_range(0, 4);
      for (int c = 0; c <= 5; c++) begin
        @(negedge clk);
        rho_valid   = (c == gap_r);
        sigma_valid = (c == gap_s);
        rho   = (c == gap_r) ? r : WL'($urandom);
        sigma = (c == gap_s) ? s : WL'($urandom);
      end
      @(negedge clk); rho_valid = 0; sigma_valid = 0;
      @(negedge clk);
    end
    repeat (4) @(posedge clk);
    checks++;
    if (results != 300) begin failures++; $display("FAIL %0d results", results); end
    checks++;
    if (mismatches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && result_valid) begin
    results++;
    checks++;
    if (exp_err.size() == 0 || error != exp_err[0]) begin
      failures++; $display("FAIL verdict %0d", results);
    end
    if (exp_err.size() != 0) void'(exp_err.pop_front());
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
