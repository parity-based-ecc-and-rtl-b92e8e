// ppc_tx: PPC sending terminal (T-FIFO, FLIT PAR, PACK. PAR + Reg, controller).
//
// Collects M data words of N bits in a transposable FIFO. When it is full the
// packet is sent: each word as a flit {p, data} with its parity bit p from
// FLIT PAR, then the parity flit F_P = XOR of the M flits from PACK. PAR and
// its register. In adaptive mode (cfg_adaptive_fp) F_P is left out unless a
// node or the receiver asks for it: fp_req (from the RFF-w-P stage that gave
// up on a flit of this packet) adds F_P at the end of the packet, and so does
// the feedback FB_FP_REQ.
//
// The packet stays in the T-FIFO until the receiver answers with feedback
// (fb_valid, fb_kind, fb_mask; see ppc_pkg):
//   FB_ACK       release the packet and start filling the next one
//   FB_FP_REQ    send F_P
//   FB_FLIT_ARQ  resend the flits whose bit is set in fb_mask[M:0] (bit M = F_P)
//   FB_ROW_ARQ   for every set bit b of fb_mask[N:0] send a column flit: the
//                M bits of bit index b in flit order in bits M-1..0, bit b of
//                F_P in bit M, zeros above, and its own parity bit N
//   FB_FULL_ARQ  resend the whole packet (go-back M)
// Items of a request are sent in ascending index order, one per cycle while
// tx_ready is 1.
//
// Hop-level ARQ: tx_arq in a cycle means the flit sent in the cycle before was
// rejected by the next stage's RFF-w-P; it is sent again and the flit offered
// in the arq cycle counts as not sent.
//
// The acknowledge, the column-flit layout and the request encoding are this
// design's own; the document describes what is resent, not the message format.
// The p column (bit index N) is kept in a register of the sent parity bits,
// since the T-FIFO holds only the N data bits.
module ppc_tx
  import ppc_pkg::*;
#(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           cfg_adaptive_fp,
  // data source
  input  logic           in_valid,
  input  logic [N-1:0]   in_data,
  output logic           in_ready,
  // channel
  output logic           tx_valid,
  output logic [N:0]     tx_flit,
  input  logic           tx_ready,
  input  logic           tx_arq,
  input  logic           fp_req,        // a node gave up on a flit: send F_P
  // feedback from the receiving terminal
  input  logic           fb_valid,
  input  fb_kind_e       fb_kind,
  input  logic [N:0]     fb_mask,
  output logic           busy
);
  localparam int unsigned IW = $clog2(N+1);
  typedef enum logic [1:0] {S_FILL, S_SEND, S_WAIT} state_e;

  state_e        state_q;
  logic          cols_q;                 // sending columns (row ARQ)
  logic [N:0]    pend_q;                 // items still to send
  logic [IW-1:0] last_q;                 // item sent in the previous cycle
  logic [M-1:0]  acc_done_q;             // rows already in F_P
  logic [M-1:0]  pcol_q;                 // parity bits of the sent rows
  logic          fp_sent_q;              // F_P already sent for this packet
  logic          fp_add;

  logic [IW-1:0] cur;
  logic [N-1:0]  row_data, data_sel;
  logic [M-1:0]  col_data, col_sel;
  logic [N:0]    fp;
  logic          p_bit, fire, acc_en;
  logic          tf_full;

  // lowest pending item
  always_comb begin
    cur = '0;
    for (int i = N; i >= 0; i--) if (pend_q[i]) cur = IW'(i);
  end

  ppc_tfifo #(.W(N), .DEPTH(M)) u_tfifo (
    .clk, .rst_n,
    .clear      (state_q == S_WAIT && fb_valid && fb_kind == FB_ACK),
    .push       (in_valid && in_ready),
    .push_data  (in_data),
    .pop        (1'b0),
    .head       (),
    .count      (),
    .full       (tf_full),
    .empty      (),
    .row_rd_addr($clog2(M)'(cur)),
    .row_rd_data(row_data),
    .row_wr     (1'b0),
    .row_wr_addr('0),
    .row_wr_data('0),
    .col_rd_addr($clog2(N)'(cur)),
    .col_rd_data(col_data),
    .col_wr     (1'b0),
    .col_wr_addr('0),
    .col_wr_data('0)
  );

  // column flit: bit index cur of the M flits, then bit cur of F_P
  assign col_sel = (int'(cur) == N) ? pcol_q : col_data;
  always_comb begin
    data_sel = '0;
    if (cols_q) begin
      data_sel[M-1:0] = col_sel;
      data_sel[M]     = fp[cur];
    end else begin
      data_sel = row_data;
    end
  end

  ppc_flit_par #(.W(N)) u_flit_par (.din(data_sel), .par(p_bit));

  assign tx_valid = (state_q == S_SEND) && (pend_q != '0);
  assign tx_flit  = (!cols_q && int'(cur) == M) ? fp : {p_bit, data_sel};
  assign fire     = tx_valid && tx_ready && !tx_arq;
  assign acc_en   = tx_valid && tx_ready && !cols_q && int'(cur) < M
                    && !acc_done_q[$clog2(M)'(cur)];

  ppc_pack_par #(.W(N+1)) u_pack_par (
    .clk, .rst_n,
    .clear   (state_q == S_FILL),
    .acc_en  (acc_en),
    .flit_in ({p_bit, data_sel}),
    .upd_en  (1'b0),
    .upd_mask('0),
    .acc_q   (fp)
  );

  // adaptive mode: add F_P to the packet on a node's request
  assign fp_add = cfg_adaptive_fp && fp_req && !fp_sent_q && !pend_q[M]
                  && (state_q == S_WAIT || (state_q == S_SEND && !cols_q));

  assign in_ready = (state_q == S_FILL) && !tf_full;
  assign busy     = (state_q != S_FILL);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_FILL;
      cols_q     <= 1'b0;
      pend_q     <= '0;
      last_q     <= '0;
      acc_done_q <= '0;
      pcol_q     <= '0;
      fp_sent_q  <= 1'b0;
    end else begin
      if (tx_valid && tx_ready && !cols_q && int'(cur) == M) fp_sent_q <= 1'b1;
      if (acc_en) begin
        acc_done_q[$clog2(M)'(cur)] <= 1'b1;
        pcol_q[$clog2(M)'(cur)]     <= p_bit;
      end
      unique case (state_q)
        S_FILL: begin
          acc_done_q <= '0;
          fp_sent_q  <= 1'b0;
              if (tf_full) begin
            state_q   <= S_SEND;
            cols_q    <= 1'b0;
            pend_q    <= '0;
            pend_q[M-1:0] <= '1;
            pend_q[M] <= !cfg_adaptive_fp;
          end
        end
        S_SEND: begin
          if (tx_arq) begin
            pend_q[last_q] <= 1'b1;
          end else if (fire) begin
            pend_q[cur] <= 1'b0;
            last_q      <= cur;
          end else if (pend_q == '0 && !fp_add) begin
            state_q <= S_WAIT;       // last flit was not rejected
          end
          if (fp_add) pend_q[M] <= 1'b1;
        end
        S_WAIT: begin
          if (fp_add) begin
            cols_q    <= 1'b0;
            pend_q[M] <= 1'b1;
            state_q   <= S_SEND;
          end else if (fb_valid) begin
            cols_q <= 1'b0;
            pend_q <= '0;
            unique case (fb_kind)
              FB_ACK:      state_q <= S_FILL;
              FB_FP_REQ: begin
                pend_q[M] <= 1'b1;
                state_q   <= S_SEND;
              end
              FB_FLIT_ARQ: begin
                pend_q[M:0] <= fb_mask[M:0];
                state_q     <= S_SEND;
              end
              FB_FULL_ARQ: begin
                pend_q[M-1:0] <= '1;
                pend_q[M]     <= !cfg_adaptive_fp;
                state_q       <= S_SEND;
              end
              FB_ROW_ARQ: begin
                pend_q  <= fb_mask;
                cols_q  <= 1'b1;
                state_q <= S_SEND;
              end
              default: ;
            endcase
          end
        end
        default: state_q <= S_FILL;
      endcase
    end
  end

  a_fb_only_when_waiting: assert property (@(posedge clk) disable iff (!rst_n)
                                           fb_valid |-> state_q == S_WAIT);
  a_m_fits_column: assert property (@(posedge clk) M < N);
endmodule
