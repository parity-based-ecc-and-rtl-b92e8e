// ppc_hop: intermediate node of the PPC link (e.g. one router port).
//
// DIN -> RFF-w-P -> 4-slot FIFO -> DOUT. The RFF-w-P checks the parity of
// every flit arriving from the channel, mends a transient upset from its
// shadow register, or sends arq back to the upstream sender (in_arq); a flit
// that fails again is forwarded with its SEU_F flag set. The FIFO buffers the
// flits (flit plus flag) for the next channel segment and resends the previous
// flit when the downstream stage raises out_arq. All handshakes are
// valid/ready on the rising clk edge. fp_req tells the sending terminal that
// this node gave up on a flit, so the packet needs its parity flit F_P in
// adaptive F_P mode. SHADOW = 0 leaves out the shadow register.
module ppc_hop #(
  parameter int unsigned N     = 32,
  parameter int unsigned DEPTH = 4,
  parameter bit          SHADOW = 1'b1   // 0: parity register without shadow
) (
  input  logic       clk,
  input  logic       s_clk,
  input  logic       rst_n,
  // upstream channel
  input  logic       in_valid,
  input  logic       in_seu,
  input  logic [N:0] in_flit,
  output logic       in_ready,
  output logic       in_arq,
  // downstream channel
  output logic       out_valid,
  output logic       out_seu,
  output logic [N:0] out_flit,
  input  logic       out_ready,
  input  logic       out_arq,
  // to the sending terminal: send F_P for the current packet
  output logic       fp_req
);
  logic       r_valid, r_seu, f_ready;
  logic [N:0] r_flit;

  ppc_rff_w_p #(.W(N+1), .SHADOW(SHADOW)) u_rff (
    .clk, .s_clk, .rst_n,
    .in_valid (in_valid),
    .in_seu   (in_seu),
    .din      (in_flit),
    .in_ready (in_ready),
    .arq      (in_arq),
    .out_valid(r_valid),
    .dout     (r_flit),
    .seu_f    (r_seu),
    .out_ready(f_ready),
    .fp_req   (fp_req)
  );

  ppc_link_fifo #(.W(N+2), .DEPTH(DEPTH)) u_fifo (
    .clk, .rst_n,
    .in_valid (r_valid),
    .in_data  ({r_seu, r_flit}),
    .in_ready (f_ready),
    .out_valid(out_valid),
    .out_data ({out_seu, out_flit}),
    .out_ready(out_ready),
    .arq      (out_arq)
  );
endmodule
