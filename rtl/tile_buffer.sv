// tile_buffer: one bank of on-chip tile memory (input, weight or output
// buffer of the convolution kernel).
//
// A simple dual-port RAM with one write port and one synchronous read port
// on the same clock. The read data register only loads when rd_en is high,
// so the last word read stays on rd_data; the kernel uses this to hold an
// output beat while the downstream FIFO is full. Reading and writing the same
// address in one cycle returns the old word. The document names the buffers
// and their role; the banking and port arrangement are this design's choice.
module tile_buffer #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [WIDTH-1:0]         rd_data
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wr_data;
    if (rd_en) rd_data <= mem[rd_addr];
  end
endmodule
