// tb_tile_buffer: self-checking test of tile_buffer. Fills the memory with
// random words, reads them back in random order, checks the one-cycle read
// latency, that rd_data holds while rd_en is low, and read-before-write on a
// shared address.
module tb_tile_buffer;
  localparam int unsigned W = 16, D = 100;
  logic clk = 0;
  logic wr_en, rd_en;
  logic [$clog2(D)-1:0] wr_addr, rd_addr;
  logic [W-1:0] wr_data, rd_data;
  logic [W-1:0] model [D];
  int checks = 0, failures = 0;

  tile_buffer #(.WIDTH(W), .DEPTH(D)) dut (.*);
  always #5 clk = ~clk;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    wr_en = 0; rd_en = 0; wr_addr = '0; rd_addr = '0; wr_data = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = a[$clog2(D)-1:0]; wr_data = W'($urandom); model[a] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int t = 0; t < 400; t++) begin
      int a;
      logic [W-1:0] held;
      a = $urandom_range(0, D - 1);
      @(negedge clk); rd_en = 1; rd_addr = a[$clog2(D)-1:0];
      @(negedge clk); rd_en = 0;
      check(rd_data == model[a], "read data");
      held = rd_data;
      rd_addr = rd_addr + 1'b1;
      @(negedge clk);
      check(rd_data == held, "hold without rd_en");
    end
    // read and write the same address in one cycle: old word comes out
    @(negedge clk);
    wr_en = 1; rd_en = 1; wr_addr = 7; rd_addr = 7; wr_data = ~model[7];
    @(negedge clk);
    wr_en = 0;
    check(rd_data == model[7], "read-before-write");
    model[7] = ~model[7];
    @(negedge clk);
    @(negedge clk); rd_en = 1; rd_addr = 7;
    @(negedge clk); rd_en = 0;
    check(rd_data == model[7], "written word");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
