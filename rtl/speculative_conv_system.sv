// speculative_conv_system: a convolution-layer accelerator that runs on a
// speculatively raised (overclocked) clock and checks every tile with two
// cheap checksums, so that a timing error in the datapath is detected
// instead of silently corrupting the layer's output.
//
// Structure (system clock on the left, accelerator clock inside):
//
//   s_in --> async_fifo --> input_checksum --> sync_fifo --> conv_accelerator
//                              | rho                             |
//                              v                                 v
//                       checksum_compare <-- sigma -- output_checksum <-- sync_fifo
//                              |                         |
//                         error_sync                 async_fifo --> s_out
//                              |
//                  tile_done / tile_error (system clock)
//
// The data mover on the system side streams one tile at a time into s_in:
// TM*TN*K*K weights in (m, n, i, j) order, then TN*(TR+K-1)*(TC+K-1) inputs
// in (n, row, column) order, one WL-bit word per beat. The tile's TM*TR*TC
// outputs come back on s_out, UM words per beat in (m-block, r, c) order. A
// few cycles after the last output beat, tile_done pulses with
// tile_error = 1 if the two checksums disagree. The system then discards
// that tile's output and, after slowing the accelerator clock to its safe
// frequency, sends the tile again. The recovery policy and the clock
// generator (programmed from software) are outside this module: clk_acc is
// an input.
//
// Only the accelerator clock domain is overclocked. The transfers through
// the asynchronous FIFOs and everything on clk_sys run at a safe frequency.
// Both resets are active low and asynchronous. Assert them together, and
// hold clk_acc stable while it is reprogrammed (between tiles).
//
// The partition into asynchronous FIFOs, checksum units, FIFOs, kernel and
// comparator follows the document's system figure. FIFO depths and the
// stream formats are this design's choices.
module speculative_conv_system
  import conv_pkg::*;
#(
  parameter int unsigned WL         = DEF_WL,
  parameter int unsigned K          = DEF_K,
  parameter int unsigned TM         = DEF_TM,
  parameter int unsigned TN         = DEF_TN,
  parameter int unsigned TR         = DEF_TR,
  parameter int unsigned TC         = DEF_TC,
  parameter int unsigned UM         = DEF_UM,
  parameter int unsigned UN         = DEF_UN,
  parameter int unsigned ASYNC_DEPTH = 16,
  parameter int unsigned SYNC_DEPTH  = 16
) (
  // system (safe) clock domain
  input  logic             clk_sys,
  input  logic             rst_sys_n,
  input  logic [WL-1:0]    s_in_data,
  input  logic             s_in_valid,
  output logic             s_in_ready,
  output logic [UM*WL-1:0] s_out_data,
  output logic             s_out_valid,
  input  logic             s_out_ready,
  output logic             tile_done,
  output logic             tile_error,
  // accelerator (speculative) clock domain
  input  logic             clk_acc,
  input  logic             rst_acc_n,
  output conv_phase_e      acc_phase
);
  // input path
  logic [WL-1:0]    a_in_data, k_in_data, f_in_data;
  logic             a_in_valid, a_in_ready, k_in_valid, k_in_ready, f_in_valid, f_in_ready;
  // output path
  logic [UM*WL-1:0] k_out_data, f_out_data, c_out_data;
  logic             k_out_valid, k_out_ready, f_out_valid, f_out_ready, c_out_valid, c_out_ready;
  // checksums
  logic             rho_valid, sigma_valid, result_valid, result_error;
  logic [WL-1:0]    rho, sigma;

  async_fifo #(.WIDTH(WL), .DEPTH(ASYNC_DEPTH)) u_in_afifo (
    .wclk (clk_sys), .wrst_n (rst_sys_n),
    .in_data (s_in_data), .in_valid (s_in_valid), .in_ready (s_in_ready),
    .rclk (clk_acc), .rrst_n (rst_acc_n),
    .out_data (a_in_data), .out_valid (a_in_valid), .out_ready (a_in_ready)
  );

  input_checksum #(.WL(WL), .K(K), .TM(TM), .TN(TN), .TR(TR), .TC(TC)) u_in_cks (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .in_data (a_in_data), .in_valid (a_in_valid), .in_ready (a_in_ready),
    .out_data (k_in_data), .out_valid (k_in_valid), .out_ready (k_in_ready),
    .rho_valid (rho_valid), .rho (rho)
  );

  sync_fifo #(.WIDTH(WL), .DEPTH(SYNC_DEPTH)) u_in_fifo (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .in_data (k_in_data), .in_valid (k_in_valid), .in_ready (k_in_ready),
    .out_data (f_in_data), .out_valid (f_in_valid), .out_ready (f_in_ready)
  );

  conv_accelerator #(.WL(WL), .K(K), .TM(TM), .TN(TN), .TR(TR), .TC(TC),
                     .UM(UM), .UN(UN)) u_conv (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .in_data (f_in_data), .in_valid (f_in_valid), .in_ready (f_in_ready),
    .out_data (k_out_data), .out_valid (k_out_valid), .out_ready (k_out_ready),
    .phase (acc_phase)
  );

  sync_fifo #(.WIDTH(UM*WL), .DEPTH(SYNC_DEPTH)) u_out_fifo (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .in_data (k_out_data), .in_valid (k_out_valid), .in_ready (k_out_ready),
    .out_data (f_out_data), .out_valid (f_out_valid), .out_ready (f_out_ready)
  );

  output_checksum #(.WL(WL), .TM(TM), .TR(TR), .TC(TC), .UM(UM)) u_out_cks (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .in_data (f_out_data), .in_valid (f_out_valid), .in_ready (f_out_ready),
    .out_data (c_out_data), .out_valid (c_out_valid), .out_ready (c_out_ready),
    .sigma_valid (sigma_valid), .sigma (sigma)
  );

  async_fifo #(.WIDTH(UM*WL), .DEPTH(ASYNC_DEPTH)) u_out_afifo (
    .wclk (clk_acc), .wrst_n (rst_acc_n),
    .in_data (c_out_data), .in_valid (c_out_valid), .in_ready (c_out_ready),
    .rclk (clk_sys), .rrst_n (rst_sys_n),
    .out_data (s_out_data), .out_valid (s_out_valid), .out_ready (s_out_ready)
  );

  checksum_compare #(.WL(WL)) u_cmp (
    .clk (clk_acc), .rst_n (rst_acc_n),
    .rho_valid (rho_valid), .rho (rho),
    .sigma_valid (sigma_valid), .sigma (sigma),
    .result_valid (result_valid), .error (result_error)
  );

  error_sync u_err_sync (
    .src_clk (clk_acc), .src_rst_n (rst_acc_n),
    .result_valid (result_valid), .error (result_error),
    .dst_clk (clk_sys), .dst_rst_n (rst_sys_n),
    .tile_done (tile_done), .tile_error (tile_error)
  );
endmodule
