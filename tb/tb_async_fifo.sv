// tb_async_fifo: self-checking test of async_fifo with unrelated write and
// read clocks. The write clock changes period part way (as when the
// accelerator clock is reprogrammed). Every word read must be the next word
// written, no word may be lost, and the FIFO must fill up at some point.
module tb_async_fifo;
  localparam int unsigned W = 16, D = 8;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic [W-1:0] in_data, out_data;
  logic in_valid, in_ready, out_valid, out_ready;
  int checks = 0, failures = 0;
  logic [W-1:0] model[$];
  int written = 0, read_cnt = 0, full_seen = 0;
  realtime wper = 4.0;

  async_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #(wper) wclk = ~wclk;
  always #5.3 rclk = ~rclk;

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    #50; wrst_n = 1; rrst_n = 1;
  end

  // writer
  always @(posedge wclk) if (wrst_n) begin
    if (in_valid && in_ready) begin model.push_back(in_data); written++; end
    if (!in_ready) full_seen++;
    if (!(in_valid && !in_ready)) begin
      in_valid <= (written < 2000) && ($urandom_range(0, 3) != 0);
      in_data  <= W'($urandom);
    end
  end

  // reader
  always @(posedge rclk) if (rrst_n) begin
    if (out_valid && out_ready) begin
      checks++;
      if (model.size() == 0 || out_data != model[0]) begin
        failures++; $display("FAIL word %0d", read_cnt);
      end
      if (model.size() != 0) void'(model.pop_front());
      read_cnt++;
    end
    out_ready <= (read_cnt < 300) ? ($urandom_range(0, 4) == 0) : ($urandom_range(0, 3) != 0);
  end

  initial begin
    #6000 wper = 7.1;   // write clock slows down
    wait (read_cnt == 2000);
    #200;
    checks++; if (model.size() != 0) begin failures++; $display("FAIL words left"); end
    checks++; if (full_seen == 0) begin failures++; $display("FAIL never full"); end
    checks++; if (out_valid) begin failures++; $display("FAIL valid when empty"); end
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
