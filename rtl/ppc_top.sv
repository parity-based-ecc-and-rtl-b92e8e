// ppc_top: PPC-protected on-chip link: sending terminal, one intermediate
// node and receiving terminal.
//
// Data words enter at in_*, are packed by ppc_tx into packets of M flits plus
// the parity flit F_P, cross two channel segments (TX -> node, node -> RX)
// and leave ppc_rx at out_*, corrected or flagged (out_err). The channel
// wires themselves are not part of the RTL: each segment's driving end
// (ch0_tx_*, ch1_tx_*) and receiving end (ch0_rx_*, ch1_rx_*) are ports, to
// be connected by wires (or by a fault-injecting channel model in
// simulation). The ready and arq signals of a segment run back from its
// receiving to its driving end inside this module. The feedback from RX to TX
// (acknowledge and ARQ requests) is a direct connection, and so are the
// parity-flit requests of the node and of the RX front end (adaptive F_P).
//
// s_clk is the delayed clock of the RFF-w-P shadow registers; it comes from a
// delay cell outside this module. cfg_adaptive_fp enables the optional parity
// flit, cfg_go_back full retransmission instead of correction. SHADOW = 0
// builds the link with plain parity registers instead of RFF-w-P (no shadow
// copies, every parity failure costs a hop-level retransmission).
module ppc_top #(
  parameter int unsigned N         = 32,
  parameter int unsigned M         = 4,
  parameter int unsigned DEPTH     = 4,
  parameter int unsigned MAX_RETRY = 2,
  parameter bit          SHADOW    = 1'b1   // 0: parity registers without shadow
) (
  input  logic         clk,
  input  logic         s_clk,
  input  logic         rst_n,
  input  logic         cfg_adaptive_fp,
  input  logic         cfg_go_back,
  // data in
  input  logic         in_valid,
  input  logic [N-1:0] in_data,
  output logic         in_ready,
  // channel segment 0: TX -> node
  output logic         ch0_tx_valid,
  output logic [N:0]   ch0_tx_flit,
  input  logic         ch0_rx_valid,
  input  logic [N:0]   ch0_rx_flit,
  // channel segment 1: node -> RX
  output logic         ch1_tx_valid,
  output logic         ch1_tx_seu,
  output logic [N:0]   ch1_tx_flit,
  input  logic         ch1_rx_valid,
  input  logic         ch1_rx_seu,
  input  logic [N:0]   ch1_rx_flit,
  // data out
  output logic         out_valid,
  output logic [N-1:0] out_data,
  output logic         out_last,
  output logic         out_err,
  input  logic         out_ready,
  output logic         tx_busy
);
  import ppc_pkg::*;

  logic       ch0_ready, ch0_arq, ch1_ready, ch1_arq;
  logic       fb_valid;
  fb_kind_e   fb_kind;
  logic [N:0] fb_mask;
  logic       fp_req_hop, fp_req_rx;

  ppc_tx #(.N(N), .M(M)) u_tx (
    .clk, .rst_n, .cfg_adaptive_fp,
    .in_valid, .in_data, .in_ready,
    .tx_valid(ch0_tx_valid), .tx_flit(ch0_tx_flit),
    .tx_ready(ch0_ready),    .tx_arq(ch0_arq),
    .fp_req  (fp_req_hop || fp_req_rx),
    .fb_valid, .fb_kind, .fb_mask,
    .busy(tx_busy)
  );

  ppc_hop #(.N(N), .DEPTH(DEPTH), .SHADOW(SHADOW)) u_hop (
    .clk, .s_clk, .rst_n,
    .in_valid (ch0_rx_valid), .in_seu(1'b0), .in_flit(ch0_rx_flit),
    .in_ready (ch0_ready),    .in_arq(ch0_arq),
    .out_valid(ch1_tx_valid), .out_seu(ch1_tx_seu), .out_flit(ch1_tx_flit),
    .out_ready(ch1_ready),    .out_arq(ch1_arq),
    .fp_req   (fp_req_hop)
  );

  ppc_rx #(.N(N), .M(M), .MAX_RETRY(MAX_RETRY), .SHADOW(SHADOW)) u_rx (
    .clk, .s_clk, .rst_n, .cfg_adaptive_fp, .cfg_go_back,
    .rx_valid(ch1_rx_valid), .rx_seu(ch1_rx_seu), .rx_flit(ch1_rx_flit),
    .rx_ready(ch1_ready),    .rx_arq(ch1_arq), .fp_req(fp_req_rx),
    .fb_valid, .fb_kind, .fb_mask,
    .out_valid, .out_data, .out_last, .out_err, .out_ready
  );
endmodule
