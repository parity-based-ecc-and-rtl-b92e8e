// ppc_flit_par: flit parity (FLIT PAR / PAR).
//
// Combinational XOR reduction of a W-bit vector. At the sender it produces the
// even-parity bit p appended to a flit of data bits (p = b0 ^ ... ^ bN-1); at a
// receiver, applied to the whole flit including p, it produces the check
// SEU_F, which is 1 when an odd number of bits were flipped. No clock, no
// latency.
module ppc_flit_par #(
  parameter int unsigned W = 33
) (
  input  logic [W-1:0] din,
  output logic         par
);
  assign par = ^din;
endmodule
