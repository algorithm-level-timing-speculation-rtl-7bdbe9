// tb_sync_fifo: self-checking test of sync_fifo.
// Random pushes and pops against a queue model check order, data, the full
// flag at exactly DEPTH words and the empty flag.
module tb_sync_fifo;
  localparam int unsigned W = 12, D = 8;
  logic clk = 0, rst_n = 0;
  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int full_seen = 0;
  bit stalled = 0;   // word offered at the last edge was not taken

  sync_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      @(negedge clk);
      // Phases: fill, drain, then mixed traffic.
      // An offered word is held until it is taken.
      if (!stalled) begin
        if (cyc < 300)      in_valid = 1;
        else if (cyc < 600) in_valid = 0;
        else                in_valid = ($urandom_range(0, 3) != 0);
        in_data = W'($urandom);
      end
      if (cyc < 300)      out_ready = 0;
      else if (cyc < 600) out_ready = 1;
      else                out_ready = ($urandom_range(0, 2) != 0);
      check(in_ready == (model.size() < D), "full flag");
      check(out_valid == (model.size() > 0), "empty flag");
      if (model.size() == D) full_seen++;
      if (out_valid && model.size() > 0) check(out_data == model[0], "data order");
      @(posedge clk);
      #1;
    end
    check(full_seen > 0, "fifo became full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Model update on the same edge as the DUT.
  always @(posedge clk) if (rst_n) begin
    stalled = in_valid && !in_ready;
    if (out_valid && out_ready) void'(model.pop_front());
    if (in_valid && in_ready) model.push_back(in_data);
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
