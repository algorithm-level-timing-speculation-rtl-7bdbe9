// async_fifo: dual-clock FIFO between the system clock domain (where the
// data mover runs at a safe frequency) and the overclocked accelerator
// clock domain.
//
// Data exchange across the two domains through asynchronous FIFOs is what
// lets the accelerator run on its own, speculatively raised clock while the
// transfers to and from memory stay error free. The implementation is the
// usual Gray-coded pointer scheme: each side keeps a binary pointer with one
// wrap bit, publishes it in Gray code, and the other side samples it through
// a two-flop synchronizer. Full is judged in the write domain and empty in
// the read domain, both conservatively, so no word is lost or read twice when
// either clock changes frequency.
//
// Timing: a written word reaches the read side after two to three read
// clock edges. Depth and synchronizer length are this design's choice.
// Each side has its own active-low reset, asserted together.
module async_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16
) (
  input  logic             wclk,
  input  logic             wrst_n,
  input  logic [WIDTH-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  input  logic             rclk,
  input  logic             rrst_n,
  output logic [WIDTH-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer seen in write domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer seen in read domain
  logic [AW:0] wbin_nxt, rbin_nxt;
  logic        push, pop;

  function automatic logic [AW:0] bin2gray(logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- write domain ----------------
  // Full when the write pointer is one lap ahead of the synchronized read
  // pointer: in Gray code the two top bits differ and the rest are equal.
  assign in_ready = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign push     = in_valid && in_ready;
  assign wbin_nxt = wbin + AW'(push);

  always_ff @(posedge wclk) begin
    if (push) mem[wbin[AW-1:0]] <= in_data;
  end

  always_ff @(posedge wclk or negedge wrst_n) begin
    if (!wrst_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      wbin     <= wbin_nxt;
      wgray    <= bin2gray(wbin_nxt);
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
    end
  end

  // ---------------- read domain ----------------
  assign out_valid = (rgray != wgray_r2);
  assign out_data  = mem[rbin[AW-1:0]];
  assign pop       = out_valid && out_ready;
  assign rbin_nxt  = rbin + AW'(pop);

  always_ff @(posedge rclk or negedge rrst_n) begin
    if (!rrst_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      rbin     <= rbin_nxt;
      rgray    <= bin2gray(rbin_nxt);
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
    end
  end

  initial assert ((1 << AW) == DEPTH && AW >= 2)
    else $error("async_fifo: DEPTH must be a power of two, at least 4");
endmodule
