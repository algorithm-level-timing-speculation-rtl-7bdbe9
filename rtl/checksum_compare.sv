// checksum_compare: end-of-tile check of the timing-speculative accelerator.
//
// The input-checksum unit (rho, from the inputs and weights) and the
// output-checksum unit (sigma, from the outputs) each deliver one value per
// tile, as a one-cycle strobe, in either order. This block holds whichever
// arrives first, and once both are present it raises result_valid for one
// cycle with error = (rho != sigma), then starts over for the next tile. A
// mismatch means a timing error corrupted the tile; the tile's output is
// then to be discarded and the tile recomputed at a safe clock frequency.
//
// Comparing the two checksums after each tile follows the document; the
// strobe interface and the holding registers are this design's choice.
module checksum_compare #(
  parameter int unsigned WL = conv_pkg::DEF_WL
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          rho_valid,
  input  logic [WL-1:0] rho,
  input  logic          sigma_valid,
  input  logic [WL-1:0] sigma,
  output logic          result_valid,
  output logic          error
);
  logic          have_rho, have_sigma;
  logic [WL-1:0] rho_q, sigma_q;
  logic          rho_now, sigma_now;
  logic [WL-1:0] rho_cur, sigma_cur;

  assign rho_now   = have_rho || rho_valid;
  assign sigma_now = have_sigma || sigma_valid;
  assign rho_cur   = have_rho ? rho_q : rho;
  assign sigma_cur = have_sigma ? sigma_q : sigma;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      have_rho     <= 1'b0;
      have_sigma   <= 1'b0;
      rho_q        <= '0;
      sigma_q      <= '0;
      result_valid <= 1'b0;
      error        <= 1'b0;
    end else begin
      result_valid <= 1'b0;
      if (rho_now && sigma_now) begin
        result_valid <= 1'b1;
        error        <= (rho_cur != sigma_cur);
        have_rho     <= 1'b0;
        have_sigma   <= 1'b0;
      end else begin
        if (rho_valid) begin
          have_rho <= 1'b1;
          rho_q    <= rho;
        end
        if (sigma_valid) begin
          have_sigma <= 1'b1;
          sigma_q    <= sigma;
        end
      end
    end
  end

  // A second checksum of the same kind must not arrive before the pair is
  // complete.
  a_no_double_rho: assert property (@(posedge clk) disable iff (!rst_n)
                                    !(have_rho && rho_valid));
  a_no_double_sigma: assert property (@(posedge clk) disable iff (!rst_n)
                                      !(have_sigma && sigma_valid));
endmodule
