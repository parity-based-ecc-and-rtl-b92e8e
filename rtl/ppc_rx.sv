// ppc_rx: PPC receiving terminal (RFF-w-P, T-FIFO, PACK. PAR + Reg,
// controller, Mask).
//
// Every arriving flit passes an RFF-w-P first, which mends a transient upset
// or asks the previous stage for the flit again, and reports SEU_F. The M data
// flits are pushed into an (N+1)-bit transposable FIFO and every flit,
// F_P included, is XORed into PACK. PAR, whose register then holds SEU_P.
// SEU_F of each flit is kept in seuf_q (bit M for F_P). Then the controller
// decides, once per packet and again after every retransmission:
//   - no flit and no bit index failed: deliver the packet as it is;
//   - adaptive F_P mode: F_P is expected only if some flit failed, since
//     the RFF-w-P that gave up on it (here, fp_req, or at a node) asks the
//     TX for it; deliver at once if no flit failed (the FB_FP_REQ message is
//     kept as a fallback should the decision find F_P missing);
//   - go-back mode (cfg_go_back) and any error: full ARQ, receive again;
//   - exactly one failing flit and one failing bit index: deliver through the
//     Mask, which flips that bit;
//   - two or more failing bit indexes: row ARQ with SEU_P as the list; the
//     column flits that come back are written into the T-FIFO by column;
//   - otherwise: flit-index ARQ with SEU_F as the list; the flits that come
//     back are written by row.
// A replaced row or column updates SEU_F and SEU_P in place. After MAX_RETRY
// rounds the packet is delivered anyway, with out_err = 1 unless the error
// left is a single one. When a packet is delivered the TX gets FB_ACK.
//
// Output: out_valid/out_ready handshake, M words per packet, out_last on the
// last, out_err for the whole packet. No flit is taken while delivering.
// The decision order, the retry limit and the in-place update are this
// design's own reading of the decoding algorithm; message layout as in ppc_tx.
module ppc_rx
  import ppc_pkg::*;
#(
  parameter int unsigned N         = 32,
  parameter int unsigned M         = 4,
  parameter int unsigned MAX_RETRY = 2,
  parameter bit          SHADOW    = 1'b1   // 0: front end without shadow
) (
  input  logic           clk,
  input  logic           s_clk,
  input  logic           rst_n,
  input  logic           cfg_adaptive_fp,
  input  logic           cfg_go_back,
  // channel
  input  logic           rx_valid,
  input  logic           rx_seu,
  input  logic [N:0]     rx_flit,
  output logic           rx_ready,
  output logic           rx_arq,
  output logic           fp_req,        // RX front end gave up on a flit
  // feedback to the sending terminal
  output logic           fb_valid,
  output fb_kind_e       fb_kind,
  output logic [N:0]     fb_mask,
  // delivered data
  output logic           out_valid,
  output logic [N-1:0]   out_data,
  output logic           out_last,
  output logic           out_err,
  input  logic           out_ready
);
  localparam int unsigned IW = $clog2(N+1);
  localparam int unsigned RW = $clog2(M);
  localparam int unsigned CW = $clog2(M+1);
  typedef enum logic [2:0] {S_RECV, S_DECIDE, S_COLS, S_ROWS, S_OUT} state_e;

  state_e        state_q;
  logic [CW-1:0] cnt_q;            // flits received / words delivered
  logic [M:0]    seuf_q;           // SEU_F per flit, bit M = F_P
  logic [N:0]    fp_q;             // received parity flit
  logic          fp_rcvd_q;
  logic [N:0]    pend_q;           // retransmitted items still expected
  logic [$clog2(MAX_RETRY+1)-1:0] retry_q;
  logic          mask_en_q, err_q;
  logic          fb_valid_q;
  fb_kind_e      fb_kind_q;
  logic [N:0]    fb_mask_q;

  // front end
  logic          f_valid, f_seu, take;
  logic [N:0]    f_flit;
  logic          recv_state;

  assign recv_state = (state_q == S_RECV) || (state_q == S_COLS) || (state_q == S_ROWS);

  ppc_rff_w_p #(.W(N+1), .SHADOW(SHADOW)) u_rff (
    .clk, .s_clk, .rst_n,
    .in_valid (rx_valid),
    .in_seu   (rx_seu),
    .din      (rx_flit),
    .in_ready (rx_ready),
    .arq      (rx_arq),
    .out_valid(f_valid),
    .dout     (f_flit),
    .seu_f    (f_seu),
    .out_ready(recv_state),
    .fp_req   (fp_req)
  );
  assign take = f_valid && recv_state;

  // lowest expected retransmitted item
  logic [IW-1:0] cur;
  always_comb begin
    cur = '0;
    for (int i = N; i >= 0; i--) if (pend_q[i]) cur = IW'(i);
  end

  // T-FIFO
  logic [N:0]   tf_head, row_old;
  logic [M-1:0] col_old;
  logic         tf_push, tf_pop, tf_row_wr, tf_col_wr, tf_clear;

  assign tf_push   = take && state_q == S_RECV && int'(cnt_q) < M;
  assign tf_row_wr = take && state_q == S_ROWS && int'(cur) < M;
  assign tf_col_wr = take && state_q == S_COLS;
  assign tf_pop    = (state_q == S_OUT) && out_ready;

  ppc_tfifo #(.W(N+1), .DEPTH(M)) u_tfifo (
    .clk, .rst_n,
    .clear      (tf_clear),
    .push       (tf_push),
    .push_data  (f_flit),
    .pop        (tf_pop),
    .head       (tf_head),
    .count      (),
    .full       (),
    .empty      (),
    .row_rd_addr(RW'(cur)),
    .row_rd_data(row_old),
    .row_wr     (tf_row_wr),
    .row_wr_addr(RW'(cur)),
    .row_wr_data(f_flit),
    .col_rd_addr(IW'(cur)),
    .col_rd_data(col_old),
    .col_wr     (tf_col_wr),
    .col_wr_addr(IW'(cur)),
    .col_wr_data(f_flit[M-1:0])
  );

  // SEU_P register and its in-place update
  logic [N:0] seu_p, upd_mask;
  logic       pp_acc, pp_upd, pp_clear;
  logic       col_par_new;

  assign col_par_new = ^f_flit[M:0];      // new SEU_P bit of the column
  always_comb begin
    upd_mask = '0;
    pp_upd   = 1'b0;
    if (tf_col_wr) begin
      pp_upd        = 1'b1;
      upd_mask[cur] = seu_p[cur] ^ col_par_new;
    end else if (take && state_q == S_ROWS) begin
      pp_upd   = 1'b1;
      upd_mask = (int'(cur) < M) ? (row_old ^ f_flit) : (fp_q ^ f_flit);
    end
  end
  assign pp_acc = take && state_q == S_RECV;

  ppc_pack_par #(.W(N+1)) u_pack_par (
    .clk, .rst_n,
    .clear   (pp_clear),
    .acc_en  (pp_acc),
    .flit_in (f_flit),
    .upd_en  (pp_upd),
    .upd_mask(upd_mask),
    .acc_q   (seu_p)
  );

  // decision
  int unsigned pf, pp;
  logic        single, clean, retry_left;
  assign pf         = $countones(seuf_q);
  assign pp         = $countones(seu_p);
  assign single     = fp_rcvd_q && pf == 1 && pp == 1;
  assign clean      = pf == 0 && (pp == 0 || !fp_rcvd_q);
  assign retry_left = int'(retry_q) < MAX_RETRY;

  ppc_mask #(.N(N), .M(M)) u_mask (
    .en     (mask_en_q),
    .row_idx(RW'(cnt_q)),
    .row    (tf_head),
    .seu_p  (seu_p),
    .seu_f  (seuf_q),
    .dout   (out_data)
  );

  assign out_valid = (state_q == S_OUT);
  assign out_last  = out_valid && int'(cnt_q) == M-1;
  assign out_err   = err_q;
  assign fb_valid  = fb_valid_q;
  assign fb_kind   = fb_kind_q;
  assign fb_mask   = fb_mask_q;

  // start over (new packet, or full retransmission)
  assign tf_clear = (state_q == S_DECIDE && !clean && retry_left && cfg_go_back && fp_rcvd_q)
                    || (state_q == S_OUT && out_ready && int'(cnt_q) == M-1);
  assign pp_clear = tf_clear;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_RECV;
      cnt_q      <= '0;
      seuf_q     <= '0;
      fp_q       <= '0;
      fp_rcvd_q  <= 1'b0;
      pend_q     <= '0;
      retry_q    <= '0;
      mask_en_q  <= 1'b0;
      err_q      <= 1'b0;
      fb_valid_q <= 1'b0;
      fb_kind_q  <= FB_NONE;
      fb_mask_q  <= '0;
    end else begin
      fb_valid_q <= 1'b0;
      unique case (state_q)
        S_RECV: if (take) begin
          if (int'(cnt_q) < M) begin
            seuf_q[cnt_q] <= f_seu;
            cnt_q <= cnt_q + 1'b1;
            if (int'(cnt_q) == M-1 && cfg_adaptive_fp && !fp_rcvd_q) begin
              // a flit failed: the stage that gave up on it has asked the TX
              // for F_P, so wait for it; otherwise the packet is complete
              if (!f_seu && seuf_q[M-1:0] == '0) state_q <= S_DECIDE;
            end
          end else begin
            seuf_q[M] <= f_seu;
            fp_q      <= f_flit;
            fp_rcvd_q <= 1'b1;
            state_q   <= S_DECIDE;
          end
        end
        S_DECIDE: begin
          fb_valid_q <= 1'b1;
          fb_mask_q  <= '0;
          if (clean) begin
            fb_kind_q <= FB_ACK;
            mask_en_q <= 1'b0;
            err_q     <= 1'b0;
            cnt_q     <= '0;
            state_q   <= S_OUT;
          end else if (!fp_rcvd_q) begin
            fb_kind_q <= FB_FP_REQ;
            state_q   <= S_RECV;
          end else if ((single && !cfg_go_back) || !retry_left) begin
            fb_kind_q <= FB_ACK;
            mask_en_q <= single;
            err_q     <= !single;
            cnt_q     <= '0;
            state_q   <= S_OUT;
          end else begin
            retry_q <= retry_q + 1'b1;
            if (cfg_go_back) begin
              fb_kind_q <= FB_FULL_ARQ;
              cnt_q     <= '0;
              seuf_q    <= '0;
              fp_rcvd_q <= 1'b0;
              state_q   <= S_RECV;
            end else if (pp >= 2 || pf == 0) begin
              fb_kind_q <= FB_ROW_ARQ;
              fb_mask_q <= seu_p;
              pend_q    <= seu_p;
              state_q   <= S_COLS;
            end else begin
              fb_kind_q <= FB_FLIT_ARQ;
              fb_mask_q <= '0;
              fb_mask_q[M:0] <= seuf_q;
              pend_q    <= '0;
              pend_q[M:0] <= seuf_q;
              state_q   <= S_ROWS;
            end
          end
        end
        S_COLS: if (take) begin
          seuf_q[M-1:0] <= seuf_q[M-1:0] ^ col_old ^ f_flit[M-1:0];
          seuf_q[M]     <= seuf_q[M] ^ fp_q[cur] ^ f_flit[M];
          fp_q[cur]     <= f_flit[M];
          pend_q[cur]   <= 1'b0;
          if (pend_q == (N+1)'(1) << cur) state_q <= S_DECIDE;
        end
        S_ROWS: if (take) begin
          if (int'(cur) < M) seuf_q[CW'(cur)] <= f_seu;
          else begin
            seuf_q[M] <= f_seu;
            fp_q      <= f_flit;
          end
          pend_q[cur] <= 1'b0;
          if (pend_q == (N+1)'(1) << cur) state_q <= S_DECIDE;
        end
        S_OUT: if (out_ready) begin
          cnt_q <= cnt_q + 1'b1;
          if (int'(cnt_q) == M-1) begin
            cnt_q     <= '0;
            seuf_q    <= '0;
            fp_rcvd_q <= 1'b0;
            retry_q   <= '0;
            err_q     <= 1'b0;
            mask_en_q <= 1'b0;
            state_q   <= S_RECV;
          end
        end
        default: state_q <= S_RECV;
      endcase
    end
  end

  a_no_take_while_out: assert property (@(posedge clk) disable iff (!rst_n)
                                        state_q == S_OUT |-> !take);
endmodule
