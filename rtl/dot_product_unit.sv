// dot_product_unit: one replicated datapath of the convolution kernel.
//
// UN multipliers work in parallel (the unrolled inner loop over input
// feature maps) and feed a balanced adder tree that is registered at every
// level, so a new set of UN operand pairs can enter every cycle. The result
// is the sum of the UN products, modulo 2^WL: every value in the design has
// the same word length and arithmetic wraps, which keeps the sum exactly
// linear so the checksums of the tile agree bit for bit.
//
// Timing: in_valid/x/w in cycle t give out_valid/sum in cycle t + LATENCY,
// LATENCY = 1 + ceil(log2(UN)). There is no back-pressure. The multiplier and
// adder-tree structure follows the kernel figure of the document; the
// register placement is this design's choice.
module dot_product_unit #(
  parameter int unsigned WL = conv_pkg::DEF_WL,
  parameter int unsigned UN = conv_pkg::DEF_UN
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [WL-1:0] x [UN],
  input  logic [WL-1:0] w [UN],
  output logic          out_valid,
  output logic [WL-1:0] sum
);
  localparam int unsigned LV      = (UN > 1) ? $clog2(UN) : 0;
  localparam int unsigned NP      = 1 << LV;
  localparam int unsigned LATENCY = LV + 1;

  logic [WL-1:0] lvl [LV+1][NP];
  logic [LV:0]   vld;

  always_ff @(posedge clk) begin
    for (int k = 0; k < NP; k++)
      lvl[0][k] <= (k < UN) ? WL'(x[k] * w[k]) : '0;
    for (int l = 1; l <= LV; l++)
      for (int k = 0; k < (NP >> l); k++)
        lvl[l][k] <= lvl[l-1][2*k] + lvl[l-1][2*k+1];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) vld <= '0;
    else        vld <= LATENCY'({vld, in_valid});   // shift in at bit 0
  end

  assign sum       = lvl[LV][0];
  assign out_valid = vld[LV];
endmodule
