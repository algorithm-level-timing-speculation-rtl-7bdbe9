// error_sync: carries the per-tile checksum verdict from the accelerator
// clock domain to the system clock domain.
//
// On each result_valid strobe in the source domain the error bit is stored
// and a toggle flag is flipped. The destination domain passes the toggle
// through a two-flop synchronizer and, on each change it sees, emits a
// one-cycle tile_done strobe with tile_error taken from the stored bit, which
// has been stable for at least two destination cycles by then. Verdicts must
// be at least a few destination cycles apart, which holds by a wide margin
// since each one closes a whole tile.
//
// The document shows an error signal going from the accelerator to the data
// mover; how it crosses the clock boundary is this design's choice.
module error_sync (
  input  logic src_clk,
  input  logic src_rst_n,
  input  logic result_valid,
  input  logic error,
  input  logic dst_clk,
  input  logic dst_rst_n,
  output logic tile_done,
  output logic tile_error
);
  logic src_toggle, src_err;
  logic dst_s1, dst_s2, dst_s3;

  always_ff @(posedge src_clk or negedge src_rst_n) begin
    if (!src_rst_n) begin
      src_toggle <= 1'b0;
      src_err    <= 1'b0;
    end else if (result_valid) begin
      src_toggle <= ~src_toggle;
      src_err    <= error;
    end
  end

  always_ff @(posedge dst_clk or negedge dst_rst_n) begin
    if (!dst_rst_n) begin
      dst_s1     <= 1'b0;
      dst_s2     <= 1'b0;
      dst_s3     <= 1'b0;
      tile_done  <= 1'b0;
      tile_error <= 1'b0;
    end else begin
      dst_s1    <= src_toggle;
      dst_s2    <= dst_s1;
      dst_s3    <= dst_s2;
      tile_done <= dst_s2 ^ dst_s3;
      if (dst_s2 ^ dst_s3) tile_error <= src_err;
    end
  end
endmodule
