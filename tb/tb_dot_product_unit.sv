// tb_dot_product_unit: self-checking test of dot_product_unit. A stream of
// random operand vectors (with gaps) goes in; each sum must appear exactly
// LATENCY = 1 + log2(UN) cycles later and equal the sum of products modulo
// 2^WL. Runs with the default UN = 8 and with UN = 3 (unbalanced tree).
module tb_dot_product_unit;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  task automatic bump(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // ---- instance A: defaults (WL=16, UN=8) ----
  localparam int unsigned WA = 16, NA = 8, LA = 4;
  logic          va, ova;
  logic [WA-1:0] xa [NA], wa [NA];
  logic [WA-1:0] suma;
  dot_product_unit dut_a (.clk, .rst_n, .in_valid(va), .x(xa), .w(wa),
                          .out_valid(ova), .sum(suma));

  // ---- instance B: WL=12, UN=3 ----
  localparam int unsigned WB = 12, NB = 3, LB = 3;
  logic          vb, ovb;
  logic [WB-1:0] xb [NB], wb [NB];
  logic [WB-1:0] sumb;
  dot_product_unit #(.WL(WB), .UN(NB)) dut_b (.clk, .rst_n, .in_valid(vb), .x(xb), .w(wb),
                                              .out_valid(ovb), .sum(sumb));

  logic [WA-1:0] exp_a [$];
  logic [WB-1:0] exp_b [$];
  int            due_a [$], due_b [$];
  int            cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    va = 0; vb = 0;
    foreach (xa[k]) begin xa[k] = '0; wa[k] = '0; end
    foreach (xb[k]) begin xb[k] = '0; wb[k] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      va = ($urandom_range(0, 3) != 0);
      vb = ($urandom_range(0, 1) != 0);
      begin
        logic [WA-1:0] s;
        s = '0;
        foreach (xa[k]) begin xa[k] = WA'($urandom); wa[k] = WA'($urandom); s += WA'(xa[k] * wa[k]); end
        if (va) begin exp_a.push_back(s); due_a.push_back(cyc + LA); end
      end
      begin
        logic [WB-1:0] s;
        s = '0;
        foreach (xb[k]) begin xb[k] = WB'($urandom); wb[k] = WB'($urandom); s += WB'(xb[k] * wb[k]); end
        if (vb) begin exp_b.push_back(s); due_b.push_back(cyc + LB); end
      end
    end
    @(negedge clk); va = 0; vb = 0;
    repeat (10) @(posedge clk);
    bump(exp_a.size() == 0 && exp_b.size() == 0, "all results seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (ova) begin
      bump(exp_a.size() > 0 && suma == exp_a[0], "sum A");
      bump(due_a.size() > 0 && cyc == due_a[0], "latency A");
      if (exp_a.size() > 0) begin void'(exp_a.pop_front()); void'(due_a.pop_front()); end
    end
    if (ovb) begin
      bump(exp_b.size() > 0 && sumb == exp_b[0], "sum B");
      bump(due_b.size() > 0 && cyc == due_b[0], "latency B");
      if (exp_b.size() > 0) begin void'(exp_b.pop_front()); void'(due_b.pop_front()); end
    end
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
