// ppc_pack_par: packet parity encoder (PACK. PAR with its Reg).
//
// A W-bit register that XORs in every flit of a packet. At the sending terminal
// the result after the M data flits is the parity flit F_P; at the receiving
// terminal, after the M flits and F_P, it is SEU_P, whose set bits are the bit
// indexes with an odd number of flipped bits.
//
// clear empties the register for a new packet and has priority. acc_en XORs
// flit_in in; upd_en XORs upd_mask in, which the receiver uses to keep SEU_P
// current when a retransmitted row or column replaces stored bits (this update
// port is this design's own). Both may be used in the same cycle. Result is
// visible on acc_q one cycle after the clock edge that takes the flit.
module ppc_pack_par #(
  parameter int unsigned W = 33
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  input  logic         acc_en,
  input  logic [W-1:0] flit_in,
  input  logic         upd_en,
  input  logic [W-1:0] upd_mask,
  output logic [W-1:0] acc_q
);
  logic [W-1:0] nxt;

  always_comb begin
    nxt = acc_q;
    if (acc_en) nxt ^= flit_in;
    if (upd_en) nxt ^= upd_mask;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     acc_q <= '0;
    else if (clear) acc_q <= '0;
    else            acc_q <= nxt;
  end
endmodule
