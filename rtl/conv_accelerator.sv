// conv_accelerator: the tiled convolution kernel that runs on the
// overclocked clock.
//
// One tile computes, for TM output maps, TR x TC output positions and TN
// input maps,
//     y[m][r][c] = sum_{n<TN} sum_{i<K} sum_{j<K} w[m][n][i][j] * x[n][r+i][c+j]
// (unit stride). Results are partial sums over the tile's TN input maps,
// and adding up the partial sums of several tiles is left to the system.
// The kernel has three sources of parallelism. Each of the UM
// dot_product_unit datapaths multiplies UN input maps at once (unrolling).
// The datapaths are pipelined, so a new position enters every cycle. The
// UM datapaths are replicas that apply different kernels to the same inputs.
//
// A tile goes through five phases (conv_pkg::conv_phase_e):
//   LOAD_W   TM*TN*K*K weights arrive on the input stream in (m, n, i, j)
//            order and go to UM*UN weight banks, bank (m%UM, n%UN).
//   LOAD_X   TN*(TR+K-1)*(TC+K-1) inputs arrive in (n, row, column) order
//            and go to UN input banks, bank n%UN.
//   COMPUTE  loops (m-block, n-block, i, j, r, c), one iteration per cycle,
//            TM/UM * TN/UN * K*K * TR*TC cycles. Each iteration reads UN
//            inputs and UM*UN weights, and each datapath's sum is added to
//            its output bank (bank m%UM). The first (n-block 0, i=0, j=0)
//            contribution overwrites the bank instead.
//   DRAIN    waits until the last sums are written.
//   STORE    TM/UM*TR*TC beats of UM words leave on the output stream in
//            (m-block, r, c) order, word u of a beat being map m-block*UM+u.
// Then the next tile starts at LOAD_W.
//
// Accumulation in the output banks is read-modify-write: the read is issued
// one cycle before the datapath result arrives and the write follows. The
// same address comes back TR*TC cycles later, so no forwarding is needed
// when TR*TC >= 2. All arithmetic wraps modulo 2^WL, because the design uses
// one word length for every value.
//
// Streams use valid/ready. in_ready is high only in the two load phases. In
// STORE the output banks' read registers act as the output register, so
// back-pressure stalls without losing a beat.
//
// The tiling, the unroll and replication factors, the buffers for weights,
// inputs and outputs and the tile-level loop nest follow the document and
// the design it builds on. The stream order, the banking, the phases
// running one after another (no double buffering inside the kernel) and the
// pipeline depth are this design's choices.
module conv_accelerator
  import conv_pkg::*;
#(
  parameter int unsigned WL = DEF_WL,
  parameter int unsigned K  = DEF_K,
  parameter int unsigned TM = DEF_TM,
  parameter int unsigned TN = DEF_TN,
  parameter int unsigned TR = DEF_TR,
  parameter int unsigned TC = DEF_TC,
  parameter int unsigned UM = DEF_UM,
  parameter int unsigned UN = DEF_UN
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [WL-1:0]    in_data,
  input  logic             in_valid,
  output logic             in_ready,
  output logic [UM*WL-1:0] out_data,
  output logic             out_valid,
  input  logic             out_ready,
  output conv_phase_e      phase
);
  localparam int unsigned MB   = TM / UM;               // m-blocks
  localparam int unsigned NB   = TN / UN;               // n-blocks
  localparam int unsigned RI   = TR + K - 1;
  localparam int unsigned CI   = TC + K - 1;
  localparam int unsigned WD   = MB * NB * K * K;       // weight bank depth
  localparam int unsigned XD   = NB * RI * CI;          // input bank depth
  localparam int unsigned OD   = MB * TR * TC;          // output bank depth
  localparam int unsigned DLAT = ((UN > 1) ? $clog2(UN) : 0) + 1;  // datapath latency
  localparam int unsigned WA   = $clog2(WD);
  localparam int unsigned XA   = $clog2(XD);
  localparam int unsigned OA   = $clog2(OD);
  localparam int unsigned MBW  = $clog2(MB + 1);
  localparam int unsigned NBW  = $clog2(NB + 1);
  localparam int unsigned UMW  = $clog2(UM + 1);
  localparam int unsigned UNW  = $clog2(UN + 1);
  localparam int unsigned KW   = $clog2(K + 1);
  localparam int unsigned RW   = $clog2(RI + 1);
  localparam int unsigned CW   = $clog2(CI + 1);

  conv_phase_e st;
  assign phase = st;

  logic in_fire;
  assign in_ready = (st == PH_LOAD_W) || (st == PH_LOAD_X);
  assign in_fire  = in_valid && in_ready;

  // ------------------------------------------------------------------
  // Load counters. Weight order (m, n, i, j) = (mb, mu, nb, nu, i, j);
  // input order (n, row, col) = (nb, nu, row, col).
  // ------------------------------------------------------------------
  logic [MBW-1:0] ld_mb;
  logic [UMW-1:0] ld_mu;
  logic [NBW-1:0] ld_nb;
  logic [UNW-1:0] ld_nu;
  logic [KW-1:0]  ld_i, ld_j;
  logic [RW-1:0]  ld_row;
  logic [CW-1:0]  ld_col;
  logic           ld_w_last, ld_x_last;

  assign ld_w_last = (ld_mb == MBW'(MB-1)) && (ld_mu == UMW'(UM-1)) && (ld_nb == NBW'(NB-1)) &&
                     (ld_nu == UNW'(UN-1)) && (ld_i == KW'(K-1)) && (ld_j == KW'(K-1));
  assign ld_x_last = (ld_nb == NBW'(NB-1)) && (ld_nu == UNW'(UN-1)) &&
                     (ld_row == RW'(RI-1)) && (ld_col == CW'(CI-1));

  // Weight bank address ((mb*NB + nb)*K + i)*K + j; input bank address
  // (nb*RI + row)*CI + col.
  logic [WA-1:0] ld_waddr;
  logic [XA-1:0] ld_xaddr;
  assign ld_waddr = WA'(((int'(ld_mb) * NB + int'(ld_nb)) * K + int'(ld_i)) * K + int'(ld_j));
  assign ld_xaddr = XA'((int'(ld_nb) * RI + int'(ld_row)) * CI + int'(ld_col));

  // ------------------------------------------------------------------
  // Compute counters: (mb, nb, i, j, r, c), c innermost.
  // ------------------------------------------------------------------
  logic [MBW-1:0] cp_mb;
  logic [NBW-1:0] cp_nb;
  logic [KW-1:0]  cp_i, cp_j;
  logic [RW-1:0]  cp_r;
  logic [CW-1:0]  cp_c;
  logic           cp_last, cp_issue;
  logic [XA-1:0]  cp_xaddr;
  logic [WA-1:0]  cp_waddr;
  logic [OA-1:0]  cp_oaddr;

  assign cp_issue = (st == PH_COMPUTE);
  assign cp_last  = (cp_mb == MBW'(MB-1)) && (cp_nb == NBW'(NB-1)) && (cp_i == KW'(K-1)) &&
                    (cp_j == KW'(K-1)) && (cp_r == RW'(TR-1)) && (cp_c == CW'(TC-1));
  assign cp_xaddr = XA'((int'(cp_nb) * RI + int'(cp_r) + int'(cp_i)) * CI + int'(cp_c) + int'(cp_j));
  assign cp_waddr = WA'(((int'(cp_mb) * NB + int'(cp_nb)) * K + int'(cp_i)) * K + int'(cp_j));
  assign cp_oaddr = OA'((int'(cp_mb) * TR + int'(cp_r)) * TC + int'(cp_c));

  // Tag travelling alongside the datapath: tag[k] belongs to the iteration
  // issued k+1 cycles ago. tag[0] is aligned with the buffer read data (the
  // datapath inputs), tag[DLAT] with the datapath result.
  typedef struct packed {
    logic          valid;
    logic          first;
    logic [OA-1:0] oaddr;
  } tag_t;
  tag_t tag [DLAT+1];

  // ------------------------------------------------------------------
  // Store counters and drain timer.
  // ------------------------------------------------------------------
  logic [OA-1:0]            st_addr;       // next beat to read
  logic                     st_all_read;
  logic                     st_issue;
  logic [$clog2(DLAT+4)-1:0] drain_cnt;

  assign st_issue = (st == PH_STORE) && !st_all_read && (!out_valid || out_ready);

  // ------------------------------------------------------------------
  // Buffers.
  // ------------------------------------------------------------------
  logic [WL-1:0] xb_q [UN];
  logic [WL-1:0] wb_q [UM][UN];
  logic [WL-1:0] ob_q [UM];
  logic [WL-1:0] dp_sum [UM];
  logic          dp_valid [UM];

  for (genvar nu = 0; nu < UN; nu++) begin : g_xbank
    tile_buffer #(.WIDTH(WL), .DEPTH(XD)) u_bank (
      .clk     (clk),
      .wr_en   (in_fire && st == PH_LOAD_X && ld_nu == UNW'(nu)),
      .wr_addr (ld_xaddr),
      .wr_data (in_data),
      .rd_en   (cp_issue),
      .rd_addr (cp_xaddr),
      .rd_data (xb_q[nu])
    );
  end

  for (genvar mu = 0; mu < UM; mu++) begin : g_lane
    for (genvar nu = 0; nu < UN; nu++) begin : g_wbank
      tile_buffer #(.WIDTH(WL), .DEPTH(WD)) u_bank (
        .clk     (clk),
        .wr_en   (in_fire && st == PH_LOAD_W && ld_mu == UMW'(mu) && ld_nu == UNW'(nu)),
        .wr_addr (ld_waddr),
        .wr_data (in_data),
        .rd_en   (cp_issue),
        .rd_addr (cp_waddr),
        .rd_data (wb_q[mu][nu])
      );
    end

    dot_product_unit #(.WL(WL), .UN(UN)) u_dp (
      .clk       (clk),
      .rst_n     (rst_n),
      .in_valid  (tag[0].valid),
      .x         (xb_q),
      .w         (wb_q[mu]),
      .out_valid (dp_valid[mu]),
      .sum       (dp_sum[mu])
    );

    // Output bank: read-modify-write while computing, streamed in STORE.
    tile_buffer #(.WIDTH(WL), .DEPTH(OD)) u_obank (
      .clk     (clk),
      .wr_en   (tag[DLAT].valid),
      .wr_addr (tag[DLAT].oaddr),
      .wr_data ((tag[DLAT].first ? '0 : ob_q[mu]) + dp_sum[mu]),
      .rd_en   (tag[DLAT-1].valid || st_issue),
      .rd_addr ((st == PH_STORE) ? st_addr : tag[DLAT-1].oaddr),
      .rd_data (ob_q[mu])
    );

    assign out_data[mu*WL +: WL] = ob_q[mu];
  end

  // ------------------------------------------------------------------
  // Control.
  // ------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag <= '{default: '0};
    end else begin
      tag[0] <= '{valid: cp_issue, first: (cp_nb == '0 && cp_i == '0 && cp_j == '0),
                  oaddr: cp_oaddr};
      for (int k = 1; k <= DLAT; k++) tag[k] <= tag[k-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= PH_LOAD_W;
      ld_mb <= '0; ld_mu <= '0; ld_nb <= '0; ld_nu <= '0; ld_i <= '0; ld_j <= '0;
      ld_row <= '0; ld_col <= '0;
      cp_mb <= '0; cp_nb <= '0; cp_i <= '0; cp_j <= '0; cp_r <= '0; cp_c <= '0;
      st_addr <= '0; st_all_read <= 1'b0; out_valid <= 1'b0;
      drain_cnt <= '0;
    end else begin
      unique case (st)
        PH_LOAD_W: if (in_fire) begin
          // (mb, mu, nb, nu, i, j) odometer, j fastest
          if (ld_j != KW'(K-1)) ld_j <= ld_j + 1'b1;
          else begin
            ld_j <= '0;
            if (ld_i != KW'(K-1)) ld_i <= ld_i + 1'b1;
            else begin
              ld_i <= '0;
              if (ld_nu != UNW'(UN-1)) ld_nu <= ld_nu + 1'b1;
              else begin
                ld_nu <= '0;
                if (ld_nb != NBW'(NB-1)) ld_nb <= ld_nb + 1'b1;
                else begin
                  ld_nb <= '0;
                  if (ld_mu != UMW'(UM-1)) ld_mu <= ld_mu + 1'b1;
                  else begin
                    ld_mu <= '0;
                    if (ld_mb != MBW'(MB-1)) ld_mb <= ld_mb + 1'b1;
                    else ld_mb <= '0;
                  end
                end
              end
            end
          end
          if (ld_w_last) st <= PH_LOAD_X;
        end

        PH_LOAD_X: if (in_fire) begin
          // (nb, nu, row, col) odometer, col fastest
          if (ld_col != CW'(CI-1)) ld_col <= ld_col + 1'b1;
          else begin
            ld_col <= '0;
            if (ld_row != RW'(RI-1)) ld_row <= ld_row + 1'b1;
            else begin
              ld_row <= '0;
              if (ld_nu != UNW'(UN-1)) ld_nu <= ld_nu + 1'b1;
              else begin
                ld_nu <= '0;
                if (ld_nb != NBW'(NB-1)) ld_nb <= ld_nb + 1'b1;
                else ld_nb <= '0;
              end
            end
          end
          if (ld_x_last) st <= PH_COMPUTE;
        end

        PH_COMPUTE: begin
          // (mb, nb, i, j, r, c) odometer, c fastest
          if (cp_c != CW'(TC-1)) cp_c <= cp_c + 1'b1;
          else begin
            cp_c <= '0;
            if (cp_r != RW'(TR-1)) cp_r <= cp_r + 1'b1;
            else begin
              cp_r <= '0;
              if (cp_j != KW'(K-1)) cp_j <= cp_j + 1'b1;
              else begin
                cp_j <= '0;
                if (cp_i != KW'(K-1)) cp_i <= cp_i + 1'b1;
                else begin
                  cp_i <= '0;
                  if (cp_nb != NBW'(NB-1)) cp_nb <= cp_nb + 1'b1;
                  else begin
                    cp_nb <= '0;
                    if (cp_mb != MBW'(MB-1)) cp_mb <= cp_mb + 1'b1;
                    else cp_mb <= '0;
                  end
                end
              end
            end
          end
          if (cp_last) begin
            st        <= PH_DRAIN;
            drain_cnt <= '0;
          end
        end

        PH_DRAIN: begin
          drain_cnt <= drain_cnt + 1'b1;
          if (int'(drain_cnt) == DLAT + 2) begin
            st          <= PH_STORE;
            st_addr     <= '0;
            st_all_read <= 1'b0;
          end
        end

        PH_STORE: begin
          if (st_issue) begin
            out_valid <= 1'b1;
            if (st_addr == OA'(OD-1)) st_all_read <= 1'b1;
            else                      st_addr     <= st_addr + 1'b1;
          end else if (!out_valid || out_ready) begin
            out_valid <= 1'b0;
            if (st_all_read) st <= PH_LOAD_W;
          end
        end

        default: st <= PH_LOAD_W;
      endcase
    end
  end

  initial assert (TM % UM == 0 && TN % UN == 0 && TR * TC >= 2 && K >= 1)
    else $error("conv_accelerator: UM must divide TM, UN must divide TN, TR*TC >= 2");

  // The datapath result and the tag must stay aligned.
  a_align: assert property (@(posedge clk) disable iff (!rst_n)
                            dp_valid[0] == tag[DLAT].valid);
  a_out_hold: assert property (@(posedge clk) disable iff (!rst_n)
                               out_valid && !out_ready |=> out_valid && $stable(out_data));
endmodule
