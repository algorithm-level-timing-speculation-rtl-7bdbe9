// output_checksum: sigma, the sum of every output of a tile (Eqn. 2 of the
// checksum scheme, restricted to the tile).
//
// The unit taps the output stream of the convolution kernel on its way to
// the asynchronous FIFO: data, valid and ready pass straight through, and
// every beat that is transferred (UM words, one per output feature map
// lane) is reduced by an adder tree and added to an accumulator. Sums wrap
// modulo 2^WL like the datapath. After the last beat of the tile
// (OUT_BEATS = TM/UM * TR * TC beats) sigma_valid pulses for one cycle with
// the tile's sum, and the accumulator restarts for the next tile.
//
// Timing: sigma_valid rises in the cycle after the last beat is transferred.
// It adds no latency and no stall to the stream. Accumulating the outputs,
// one word per lane in parallel, follows the document; counting beats to
// find the end of the tile is this design's choice.
module output_checksum #(
  parameter int unsigned WL = conv_pkg::DEF_WL,
  parameter int unsigned TM = conv_pkg::DEF_TM,
  parameter int unsigned TR = conv_pkg::DEF_TR,
  parameter int unsigned TC = conv_pkg::DEF_TC,
  parameter int unsigned UM = conv_pkg::DEF_UM
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [UM*WL-1:0] in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [UM*WL-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output logic             sigma_valid,
  output logic [WL-1:0]    sigma
);
  localparam int unsigned OUT_BEATS = conv_pkg::output_beats(TM, TR, TC, UM);
  localparam int unsigned BW        = $clog2(OUT_BEATS + 1);

  logic [BW-1:0] beat;
  logic [WL-1:0] acc, beat_sum;
  logic          fire;

  assign out_data  = in_data;
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign fire      = in_valid && out_ready;

  always_comb begin
    beat_sum = '0;
    for (int u = 0; u < UM; u++) beat_sum += in_data[u*WL +: WL];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat        <= '0;
      acc         <= '0;
      sigma       <= '0;
      sigma_valid <= 1'b0;
    end else begin
      sigma_valid <= 1'b0;
      if (fire) begin
        if (beat == BW'(OUT_BEATS - 1)) begin
          beat        <= '0;
          acc         <= '0;
          sigma       <= acc + beat_sum;
          sigma_valid <= 1'b1;
        end else begin
          beat <= beat + 1'b1;
          acc  <= acc + beat_sum;
        end
      end
    end
  end
endmodule
