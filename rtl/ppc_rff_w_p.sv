// ppc_rff_w_p: Razor register with parity check (RFF-w-P).
//
// A pipeline register for one W-bit flit (data plus its parity bit) that can
// mend a transient upset without a retransmission. The main register samples
// din on clk; a shadow register samples the same wire on s_clk, a copy of clk
// delayed by a small amount. Each copy has its own parity check (PAR). If the
// main copy fails and the shadow copy passes, the shadow copy is forwarded
// (mux input 1); otherwise the main copy is forwarded (mux input 0).
// SEU_F (seu_f) is 1 when both copies fail.
//
// When both copies fail the stage raises arq for one cycle instead of
// forwarding: the sender must go back one flit, and the flit that arrives in
// the arq cycle is discarded. If the resent flit fails both checks again, the
// sender's own copy is taken to be corrupt: the flit is forwarded with
// seu_f = 1 and no second arq, leaving the correction to the receiving
// terminal. A flit that arrives already flagged (in_seu) is forwarded the same
// way. fp_req pulses when this stage forwards a flit it has given up on, so
// that in adaptive F_P mode the sending terminal adds the parity flit to the
// packet. The one-cycle arq timing and the discard rule are this design's own.
//
// With SHADOW = 0 the stage is a plain register with a parity check, the
// variant without RFF-w-P: no shadow register, and any parity failure is
// answered with arq (then forwarded flagged if the retry fails too).
//
// Handshake: a flit moves when valid and ready are both 1 at a clk edge. The
// stage holds one flit; in_ready = empty, or the flit leaves this cycle, or
// the flit is being rejected with arq.
//
// Timing: the shadow register loads only if the main register loaded at the
// preceding clk edge, so the two always hold the same flit, including while
// the stage is stalled. din must stay stable from the clk edge until the s_clk
// edge (the usual Razor hold constraint: the wire delay exceeds the s_clk
// delay). Outputs are valid from the s_clk edge to the next clk edge.
module ppc_rff_w_p #(
  parameter int unsigned W      = 33,
  parameter bit          SHADOW = 1'b1   // 0: plain parity register, no shadow
) (
  input  logic         clk,
  input  logic         s_clk,
  input  logic         rst_n,
  // upstream
  input  logic         in_valid,
  input  logic         in_seu,
  input  logic [W-1:0] din,
  output logic         in_ready,
  output logic         arq,
  // downstream
  output logic         out_valid,
  output logic [W-1:0] dout,
  output logic         seu_f,
  input  logic         out_ready,
  // this stage gives up on a flit: request the parity flit (adaptive F_P)
  output logic         fp_req
);
  logic [W-1:0] main_q, shadow_q;
  logic         v_q, seu_in_q, retried_q, pend_q, cap_q;
  logic         fail_main, fail_shadow, fail_both, capture;

  ppc_flit_par #(.W(W)) u_par_main   (.din(main_q),   .par(fail_main));

  assign fail_both = fail_main && fail_shadow;
  // First double failure of a fresh flit: ask for it again.
  assign arq       = v_q && fail_both && !seu_in_q && !retried_q;
  assign out_valid = v_q && !arq;
  assign dout      = fail_main ? shadow_q : main_q;
  assign seu_f     = fail_both;
  assign fp_req    = out_valid && out_ready && fail_both && !seu_in_q;
  assign in_ready  = !v_q || arq || out_ready;
  assign capture   = in_valid && in_ready && !arq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q       <= 1'b0;
      seu_in_q  <= 1'b0;
      retried_q <= 1'b0;
      pend_q    <= 1'b0;
      cap_q     <= 1'b0;
      main_q    <= '0;
    end else begin
      cap_q <= capture;
      if (arq) begin
        v_q    <= 1'b0;          // reject, and discard what arrives now
        pend_q <= 1'b1;
      end else if (in_ready) begin
        v_q <= in_valid;
        if (in_valid) begin
          main_q    <= din;
          seu_in_q  <= in_seu;
          retried_q <= pend_q;
          pend_q    <= 1'b0;
        end
      end
    end
  end

  if (SHADOW) begin : g_shadow
    ppc_flit_par #(.W(W)) u_par_shadow (.din(shadow_q), .par(fail_shadow));

    always_ff @(posedge s_clk or negedge rst_n) begin
      if (!rst_n)     shadow_q <= '0;
      else if (cap_q) shadow_q <= din;
    end
  end else begin : g_no_shadow
    // without the shadow copy every parity failure counts as a double one
    assign shadow_q    = main_q;
    assign fail_shadow = 1'b1;
  end

  // A flit may only be rejected once.
  a_single_arq: assert property (@(posedge clk) disable iff (!rst_n) arq |=> !arq);
endmodule
