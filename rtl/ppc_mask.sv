// ppc_mask: single-error correction at the receiver's read port (Mask).
//
// A single flipped bit in a packet shows up as exactly one set bit in SEU_F
// (the flit) and one in SEU_P (the bit index); the bit at that crossing is
// inverted while the flit is read out of the receive FIFO. Implemented as
// dout = row ^ (seu_f[row_idx] ? seu_p : 0), restricted to the N data bits
// (the parity bit N is dropped). en is set by the controller only when the
// error pattern is a single error. row[N], seu_p[N] (the parity column) and
// seu_f[M] are inputs for completeness and do not reach dout. seu_f bit M belongs to the parity flit,
// which is never read out, so an error there changes no data. Combinational.
module ppc_mask #(
  parameter int unsigned N = 32,
  parameter int unsigned M = 4
) (
  input  logic                 en,
  input  logic [$clog2(M)-1:0] row_idx,
  input  logic [N:0]           row,
  input  logic [N:0]           seu_p,
  input  logic [M:0]           seu_f,
  output logic [N-1:0]         dout
);
  logic [M-1:0] seu_f_rows;
  logic         flip_row;
  assign seu_f_rows = seu_f[M-1:0];
  assign flip_row   = en && seu_f_rows[row_idx];
  assign dout     = row[N-1:0] ^ (flip_row ? seu_p[N-1:0] : '0);
endmodule
