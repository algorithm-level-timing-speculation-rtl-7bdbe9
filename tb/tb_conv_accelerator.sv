// tb_conv_accelerator: self-checking test of conv_accelerator in four
// configurations: a small power-of-two tile (two tiles back to back), a
// configuration with odd unroll factors and K = 2, one with UN = 1, and one
// with 8-bit words and UN = 16. See
// conv_accel_check for what is checked.
module tb_conv_accelerator;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;
  logic d0, d1, d2, d3;
  int c0, c1, c2, c3, f0, f1, f2, f3, s0, s1, s2, s3;

  conv_accel_check #(.K(3), .TM(4), .TN(4), .TR(4), .TC(5), .UM(2), .UN(2), .TILES(2))
    i0 (.clk, .rst_n, .done(d0), .checks(c0), .failures(f0), .stalls(s0));
  conv_accel_check #(.WL(12), .K(2), .TM(6), .TN(3), .TR(3), .TC(3), .UM(3), .UN(3), .TILES(2))
    i1 (.clk, .rst_n, .done(d1), .checks(c1), .failures(f1), .stalls(s1));
  conv_accel_check #(.K(3), .TM(2), .TN(3), .TR(2), .TC(3), .UM(1), .UN(1), .TILES(1))
    i2 (.clk, .rst_n, .done(d2), .checks(c2), .failures(f2), .stalls(s2));
  // 8-bit words and 16 multipliers per datapath, the shape of the larger
  // builds (UM x UN = 4 x 16 here, on a reduced tile).
  conv_accel_check #(.WL(8), .K(3), .TM(8), .TN(32), .TR(3), .TC(4), .UM(4), .UN(16), .TILES(2))
    i3 (.clk, .rst_n, .done(d3), .checks(c3), .failures(f3), .stalls(s3));

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    #2000000;
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
