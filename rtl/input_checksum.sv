// input_checksum: rho, the checksum of a tile computed directly from its
// inputs and weights, without performing the convolution.
//
// For a tile with TN input maps, TM output maps, a K x K kernel, unit stride
// and a TR x TC output, the sum of all outputs equals
//
//     rho = sum_{n,i,j} X[n,i,j] * Wsum[n,i,j]
//     Wsum[n,i,j] = sum_m w[m,n,i,j]
//     X[n,i,j]    = sum_{r<TR, c<TC} x[n, r+i, c+j]
//
// so only TN*K*K multiplications are needed instead of TR*TC times as many.
// X is built with reuse in both directions. Along a row a, the K window sums
// S_a[j] = sum_{c<TC} x[n,a,c+j] come from one full sum and then one add and
// one subtract per step: S_a[j] = S_a[j-1] + x[n,a,TC-1+j] - x[n,a,j-1].
// Down the columns, X[n,0,j] = sum_{a<TR} S_a[j], and then
// X[n,i,j] = X[n,i-1,j] + S_{TR-1+i}[j] - S_{i-1}[j].
//
// The unit taps the input stream between the asynchronous FIFO and the
// kernel's FIFO (data, valid and ready pass straight through). A tile's
// stream is TM*TN*K*K weights in (m, n, i, j) order followed by
// TN*(TR+K-1)*(TC+K-1) inputs in (n, row, column) order. Weights are summed
// over m into a TN*K*K-word table. Inputs go through three registered
// stages: row window sums (at most one S per beat), column update (at most
// one X per beat, in (n, i, j) order), and a single multiplier and
// accumulator. rho_valid is set by the third clock edge after the edge
// that accepts the tile's last beat, and stays high for one cycle.
// All arithmetic wraps modulo 2^WL, matching the datapath.
//
// The checksum formula, the factorization, the row/column reuse and the
// single multiplier follow the document. The stream order, the register
// stages and counting beats to find the tile boundary are this design's
// choices. Only unit stride is supported.
module input_checksum #(
  parameter int unsigned WL = conv_pkg::DEF_WL,
  parameter int unsigned K  = conv_pkg::DEF_K,
  parameter int unsigned TM = conv_pkg::DEF_TM,
  parameter int unsigned TN = conv_pkg::DEF_TN,
  parameter int unsigned TR = conv_pkg::DEF_TR,
  parameter int unsigned TC = conv_pkg::DEF_TC
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [WL-1:0] in_data,
  input  logic          in_valid,
  output logic          in_ready,
  output logic [WL-1:0] out_data,
  output logic          out_valid,
  input  logic          out_ready,
  output logic          rho_valid,
  output logic [WL-1:0] rho
);
  localparam int unsigned RI  = TR + K - 1;           // input rows
  localparam int unsigned CI  = TC + K - 1;           // input columns
  localparam int unsigned WS  = TN * K * K;           // weight-sum table size
  localparam int unsigned KH  = (K > 1) ? K - 1 : 1;  // stored head/rows
  localparam int unsigned WSW = $clog2(WS + 1);
  localparam int unsigned MW  = $clog2(TM + 1);
  localparam int unsigned NW  = $clog2(TN + 1);
  localparam int unsigned RW  = $clog2(RI + 1);
  localparam int unsigned CW  = $clog2(CI + 1);
  localparam int unsigned JW  = $clog2(K + 1);

  // ---------------- stream tap ----------------
  logic fire;
  assign out_data  = in_data;
  assign out_valid = in_valid;
  assign in_ready  = out_ready;
  assign fire      = in_valid && out_ready;

  // ---------------- stream position ----------------
  logic           loading_x;           // 0: weights, 1: inputs
  logic [WSW-1:0] widx;                // (n,i,j) index of a weight
  logic [MW-1:0]  wm;                  // output map of a weight
  logic [NW-1:0]  xn;
  logic [RW-1:0]  xa;
  logic [CW-1:0]  xb;
  logic           x_last;

  assign x_last = (xn == NW'(TN - 1)) && (xa == RW'(RI - 1)) && (xb == CW'(CI - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      loading_x <= 1'b0;
      widx <= '0; wm <= '0;
      xn <= '0; xa <= '0; xb <= '0;
    end else if (fire) begin
      if (!loading_x) begin
        if (widx == WSW'(WS - 1)) begin
          widx <= '0;
          if (wm == MW'(TM - 1)) begin
            wm        <= '0;
            loading_x <= 1'b1;
          end else begin
            wm <= wm + 1'b1;
          end
        end else begin
          widx <= widx + 1'b1;
        end
      end else begin
        if (xb == CW'(CI - 1)) begin
          xb <= '0;
          if (xa == RW'(RI - 1)) begin
            xa <= '0;
            if (xn == NW'(TN - 1)) begin
              xn        <= '0;
              loading_x <= 1'b0;
            end else begin
              xn <= xn + 1'b1;
            end
          end else begin
            xa <= xa + 1'b1;
          end
        end else begin
          xb <= xb + 1'b1;
        end
      end
    end
  end

  // ---------------- weight sums over m ----------------
  logic [WL-1:0]  wsum [WS];
  logic [WSW-1:0] eidx;                // (n,i,j) index of the X being used

  always_ff @(posedge clk) begin
    if (fire && !loading_x)
      wsum[widx] <= ((wm == '0) ? '0 : wsum[widx]) + in_data;
  end

  // ---------------- stage A: row window sums ----------------
  logic [WL-1:0] head [KH];            // first K-1 inputs of the row
  logic [WL-1:0] sreg;                 // running / window sum of the row
  logic [WL-1:0] s_next;
  logic          a_valid, a_last;
  logic [RW-1:0] a_row;
  logic [JW-1:0] a_j;

  always_comb begin
    if (xb < CW'(TC))
      s_next = ((xb == '0) ? '0 : sreg) + in_data;
    else
      s_next = sreg + in_data - head[(K > 1) ? int'(xb) - int'(TC) : 0];
  end

  always_ff @(posedge clk) begin
    if (fire && loading_x) begin
      sreg <= s_next;
      if (int'(xb) < int'(K) - 1) head[(K > 1) ? int'(xb) : 0] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_valid <= 1'b0;
      a_last  <= 1'b0;
      a_row   <= '0;
      a_j     <= '0;
    end else begin
      a_valid <= fire && loading_x && (xb >= CW'(TC - 1));
      a_last  <= fire && loading_x && x_last;
      a_row   <= xa;
      a_j     <= JW'(int'(xb) - int'(TC) + 1);
    end
  end

  // ---------------- stage B: column reuse ----------------
  logic [WL-1:0] srow [KH][K];         // S of the first K-1 rows
  logic [WL-1:0] xcol [K];             // X[n, i, j] of the current i
  logic [WL-1:0] x_new;
  logic          b_valid, b_last;
  logic [WL-1:0] b_x;

  always_comb begin
    if (a_row < RW'(TR))
      x_new = ((a_row == '0) ? '0 : xcol[a_j]) + sreg;
    else
      x_new = xcol[a_j] + sreg - srow[(K > 1) ? int'(a_row) - int'(TR) : 0][a_j];
  end

  always_ff @(posedge clk) begin
    if (a_valid) begin
      xcol[a_j] <= x_new;
      if (int'(a_row) < int'(K) - 1) srow[(K > 1) ? int'(a_row) : 0][a_j] <= sreg;
    end
    b_x <= x_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      b_valid <= 1'b0;
      b_last  <= 1'b0;
    end else begin
      b_valid <= a_valid && (a_row >= RW'(TR - 1));
      b_last  <= a_valid && a_last;
    end
  end

  // ---------------- stage C/D: one multiplier and accumulator ----------------
  logic          c_valid, c_last;
  logic [WL-1:0] c_prod, acc;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      eidx      <= '0;
      c_valid   <= 1'b0;
      c_last    <= 1'b0;
      c_prod    <= '0;
      acc       <= '0;
      rho       <= '0;
      rho_valid <= 1'b0;
    end else begin
      c_valid <= b_valid;
      c_last  <= b_last;
      if (b_valid) begin
        c_prod <= WL'(b_x * wsum[eidx]);
        eidx   <= (eidx == WSW'(WS - 1)) ? '0 : eidx + 1'b1;
      end
      rho_valid <= 1'b0;
      if (c_valid) begin
        if (c_last) begin
          rho       <= acc + c_prod;
          rho_valid <= 1'b1;
          acc       <= '0;
        end else begin
          acc <= acc + c_prod;
        end
      end
    end
  end

  initial assert (TN * K * K > 2 && K >= 1)
    else $error("input_checksum: TN*K*K must exceed 2");
endmodule
