// tb_input_checksum: self-checking test of input_checksum.
//
// Random tiles (weights, then inputs) are streamed through the tap with
// random stalls. For every tile the expected checksum is the sum of all
// outputs of the convolution, computed here by brute force (every output,
// every product) modulo 2^WL; rho must match it and must arrive a fixed
// number of cycles after the tile's last beat. Instance A uses a small,
// non-square tile (three tiles back to back), instance B the default
// 32 x 32 x 13 x 13 tile with K = 3 (one tile).
module tb_input_checksum;
  localparam int unsigned WL = 16;
  localparam int unsigned RHO_DELAY = 4;   // posedges from last beat to rho_valid sample
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic bump(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Instance A
  localparam int unsigned AK = 3, ATM = 3, ATN = 2, ATR = 4, ATC = 5;
  // Instance B: defaults
  localparam int unsigned BK = 3, BTM = 32, BTN = 32, BTR = 13, BTC = 13;

  logic [WL-1:0] a_in, a_out, b_in, b_out, a_rho, b_rho;
  logic a_iv, a_ir, a_ov, a_or, a_rv;
  logic b_iv, b_ir, b_ov, b_or, b_rv;

  input_checksum #(.WL(WL), .K(AK), .TM(ATM), .TN(ATN), .TR(ATR), .TC(ATC)) dut_a (
    .clk, .rst_n, .in_data(a_in), .in_valid(a_iv), .in_ready(a_ir),
    .out_data(a_out), .out_valid(a_ov), .out_ready(a_or), .rho_valid(a_rv), .rho(a_rho));
  input_checksum dut_b (
    .clk, .rst_n, .in_data(b_in), .in_valid(b_iv), .in_ready(b_ir),
    .out_data(b_out), .out_valid(b_ov), .out_ready(b_or), .rho_valid(b_rv), .rho(b_rho));

  // Brute-force sum of all outputs for a tile stored as flat stream words.
  function automatic logic [WL-1:0] out_sum(ref logic [WL-1:0] s [$], input int k, tm, tn, tr, tc);
    logic [WL-1:0] acc;
    int ri, ci, nw;
    ri = tr + k - 1; ci = tc + k - 1; nw = tm * tn * k * k;
    acc = '0;
    for (int m = 0; m < tm; m++)
      for (int n = 0; n < tn; n++)
        for (int i = 0; i < k; i++)
          for (int j = 0; j < k; j++) begin
            logic [WL-1:0] w;
            w = s[((m * tn + n) * k + i) * k + j];
            for (int r = 0; r < tr; r++)
              for (int c = 0; c < tc; c++)
                acc += WL'(w * s[nw + (n * ri + r + i) * ci + c + j]);
          end
    return acc;
  endfunction

  logic [WL-1:0] a_exp [$], b_exp [$];
  int a_last_cyc [$], b_last_cyc [$];
  int a_tiles = 0, b_tiles = 0;

  // Drive one stream with random gaps and random downstream stalls.
  task automatic drive_a(input int tiles);
    int words;
    words = ATM * ATN * AK * AK + ATN * (ATR + AK - 1) * (ATC + AK - 1);
    for (int t = 0; t < tiles; t++) begin
      logic [WL-1:0] s [$];
      for (int q = 0; q < words; q++) s.push_back(WL'($urandom));
      a_exp.push_back(out_sum(s, AK, ATM, ATN, ATR, ATC));
      for (int q = 0; q < words; q++) begin
        @(negedge clk);
        while ($urandom_range(0, 3) == 0) begin a_iv = 0; @(negedge clk); end
        a_iv = 1; a_in = s[q];
        @(posedge clk);
        while (!(a_iv && a_ir)) @(posedge clk);
        if (q == words - 1) a_last_cyc.push_back(cyc);
      end
      @(negedge clk); a_iv = 0;
    end
  endtask

  task automatic drive_b();
    int words;
    logic [WL-1:0] s [$];
    words = BTM * BTN * BK * BK + BTN * (BTR + BK - 1) * (BTC + BK - 1);
    for (int q = 0; q < words; q++) s.push_back(WL'($urandom));
    b_exp.push_back(out_sum(s, BK, BTM, BTN, BTR, BTC));
    for (int q = 0; q < words; q++) begin
      @(negedge clk);
      b_iv = 1; b_in = s[q];
      @(posedge clk);
      while (!(b_iv && b_ir)) @(posedge clk);
      if (q == words - 1) b_last_cyc.push_back(cyc);
    end
    @(negedge clk); b_iv = 0;
  endtask

  always @(negedge clk) begin
    a_or = ($urandom_range(0, 4) != 0);
    b_or = ($urandom_range(0, 9) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    if (a_rv) begin
      a_tiles++;
      bump(a_exp.size() > 0 && a_rho == a_exp[0], "rho A");
      bump(a_last_cyc.size() > 0 && cyc == a_last_cyc[0] + RHO_DELAY, "rho A timing");
      if (a_exp.size() > 0) begin void'(a_exp.pop_front()); void'(a_last_cyc.pop_front()); end
    end
    if (b_rv) begin
      b_tiles++;
      bump(b_exp.size() > 0 && b_rho == b_exp[0], "rho B");
      bump(b_last_cyc.size() > 0 && cyc == b_last_cyc[0] + RHO_DELAY, "rho B timing");
      if (b_exp.size() > 0) begin void'(b_exp.pop_front()); void'(b_last_cyc.pop_front()); end
    end
    if (a_iv) bump(a_out == a_in && a_ov && a_ir == a_or, "pass-through A");
  end

  initial begin
    a_iv = 0; b_iv = 0; a_in = '0; b_in = '0; a_or = 1; b_or = 1;
    repeat (2) @(posedge clk);
    rst_n = 1;
    fork
      drive_a(3);
      drive_b();
    join
    repeat (10) @(posedge clk);
    bump(a_tiles == 3 && b_tiles == 1, "number of checksums");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
