// ppc_link_fifo: flit buffer of an intermediate node, with go-back-one replay.
//
// A DEPTH-entry FIFO of W-bit entries (a flit plus its SEU_F side-band bit)
// between the node's RFF-w-P and the next channel segment. The next stage's
// RFF-w-P may reject the flit it received one cycle earlier (arq); the buffer
// then resends that flit, and the flit it offered in the arq cycle counts as
// not sent. To make this possible an entry is freed only at the clock edge
// after the one where it was sent, if no arq came in between.
//
// Ports: in_valid/in_ready push (in_ready while fewer than DEPTH entries are
// held, sent-but-unconfirmed ones included); out_valid/out_ready send the
// oldest unsent entry; arq asks for the previous entry again. Both sides move
// on the rising clk edge when valid and ready are 1. The replay mechanism is
// this design's own; the 4-slot 33-bit default is the node FIFO of the design.
module ppc_link_fifo #(
  parameter int unsigned W     = 34,
  parameter int unsigned DEPTH = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         in_ready,
  output logic         out_valid,
  output logic [W-1:0] out_data,
  input  logic         out_ready,
  input  logic         arq
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH+1);
  typedef logic [AW-1:0] ptr_t;

  logic [W-1:0] mem [DEPTH];
  ptr_t         wr_q, rd_q, last_q;
  logic         last_v_q;            // an entry was sent in the previous cycle
  logic [CW-1:0] held_q;             // entries not yet freed
  logic [CW-1:0] unsent_q;           // entries not yet sent
  logic          push, send, commit;

  function automatic ptr_t inc(input ptr_t p);
    return (int'(p) == DEPTH-1) ? '0 : p + 1'b1;
  endfunction

  assign in_ready  = (held_q < CW'(DEPTH));
  assign out_valid = (unsent_q != '0);
  assign out_data  = mem[rd_q];
  assign push      = in_valid && in_ready;
  assign send      = out_valid && out_ready && !arq;
  assign commit    = last_v_q && !arq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_q     <= '0;
      rd_q     <= '0;
      last_q   <= '0;
      last_v_q <= 1'b0;
      held_q   <= '0;
      unsent_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else begin
      if (push) begin
        mem[wr_q] <= in_data;
        wr_q      <= inc(wr_q);
      end
      if (arq) begin
        rd_q     <= last_q;        // go back one entry
        last_v_q <= 1'b0;
      end else if (send) begin
        rd_q     <= inc(rd_q);
        last_q   <= rd_q;
        last_v_q <= 1'b1;
      end else begin
        last_v_q <= 1'b0;
      end
      held_q   <= held_q + CW'(push) - CW'(commit);
      unsent_q <= unsent_q + CW'(push) - CW'(send) + CW'(arq);
    end
  end

  a_arq_after_send: assert property (@(posedge clk) disable iff (!rst_n) arq |-> last_v_q);
endmodule
