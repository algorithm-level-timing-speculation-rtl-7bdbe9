// sync_fifo: single-clock first-in first-out buffer with a valid/ready
// interface on both sides.
//
// It sits between each checksum unit and the convolution kernel and lets the
// kernel and the stream taps run decoupled. Storage is a circular array of
// DEPTH words addressed by read and write pointers that carry one extra
// wrap bit, so full and empty are told apart without a counter.
//
// Timing: a word written in cycle t is visible at the output in cycle t+1
// (the output is read combinationally from the array). One word can enter
// and one leave in every cycle. DEPTH must be a power of two. The depth is
// not given for this FIFO and is this design's choice.
module sync_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0]      wptr, rptr;
  logic             push, pop;

  assign in_ready  = (wptr[AW] == rptr[AW]) || (wptr[AW-1:0] != rptr[AW-1:0]);
  assign out_valid = (wptr != rptr);
  assign out_data  = mem[rptr[AW-1:0]];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;

  always_ff @(posedge clk) begin
    if (push) mem[wptr[AW-1:0]] <= in_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wptr <= '0;
      rptr <= '0;
    end else begin
      if (push) wptr <= wptr + 1'b1;
      if (pop)  rptr <= rptr + 1'b1;
    end
  end

  initial assert ((1 << AW) == DEPTH) else $error("sync_fifo: DEPTH must be a power of two");

  // The producer may not withdraw a word it has offered.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           in_valid && !in_ready |=> in_valid);
endmodule
