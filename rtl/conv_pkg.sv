// conv_pkg: default sizes shared by the timing-speculative convolution
// accelerator and its checksum units.
//
// The defaults describe the Zybo build of the accelerator for the fifth
// convolution layer of AlexNet: 16-bit words, 3x3 kernels, tiles of
// Tm x Tn x Tr x Tc = 32 x 32 x 13 x 13 and an 8 x 8 array of multipliers
// (UM replicated datapaths, each UN multipliers wide). The helper functions
// give the derived sizes of the tile buffers and streams so every module
// computes them the same way.
package conv_pkg;

  localparam int unsigned DEF_WL = 16;  // word length of every value
  localparam int unsigned DEF_K  = 3;   // kernel height and width
  localparam int unsigned DEF_TM = 32;  // output feature maps per tile
  localparam int unsigned DEF_TN = 32;  // input feature maps per tile
  localparam int unsigned DEF_TR = 13;  // output rows per tile
  localparam int unsigned DEF_TC = 13;  // output columns per tile
  localparam int unsigned DEF_UM = 8;   // replicated datapaths
  localparam int unsigned DEF_UN = 8;   // multipliers per datapath

  // Phase of the convolution kernel's tile sequence.
  typedef enum logic [2:0] {
    PH_LOAD_W  = 3'd0,  // weights arriving on the input stream
    PH_LOAD_X  = 3'd1,  // input feature maps arriving on the input stream
    PH_COMPUTE = 3'd2,  // datapaths running over the tile
    PH_DRAIN   = 3'd3,  // last results leaving the pipeline
    PH_STORE   = 3'd4   // output buffer streamed out
  } conv_phase_e;

  // Input tile rows/columns for unit stride.
  function automatic int unsigned in_rows(int unsigned tr, int unsigned k);
    return tr + k - 1;
  endfunction

  // Number of words in the input stream of one tile: all weights, then all
  // inputs.
  function automatic int unsigned weight_words(int unsigned tm, int unsigned tn,
                                               int unsigned k);
    return tm * tn * k * k;
  endfunction

  function automatic int unsigned input_words(int unsigned tn, int unsigned tr,
                                              int unsigned tc, int unsigned k);
    return tn * (tr + k - 1) * (tc + k - 1);
  endfunction

  // Number of output beats (UM words each) of one tile.
  function automatic int unsigned output_beats(int unsigned tm, int unsigned tr,
                                               int unsigned tc, int unsigned um);
    return (tm / um) * tr * tc;
  endfunction

endpackage
