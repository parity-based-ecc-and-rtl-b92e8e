// ppc_tfifo: DFF-based transposable FIFO (T-FIFO).
//
// A FIFO of DEPTH rows of W bits that can also be read and written as a
// matrix, by row (flit index) and by column (bit index). The PPC sender uses
// the column read to resend one bit index of every flit of a packet (row ARQ);
// the receiver uses the column write to put such a retransmitted bit index
// back in place, and the row write for a retransmitted flit.
//
// Normal FIFO port: push writes push_data at the tail, pop drops the head,
// head shows the row at the head; count/full/empty as usual; clear empties it.
// Matrix ports: row and column addresses count from the head, so row i is the
// i-th oldest row and bit i of a column is taken from row i. Reads are
// combinational; writes take effect at the clock edge. Only one of push,
// row_wr and col_wr may be active in a cycle; pop may go with any of them and
// then the write addresses refer to the rows before the pop.
// The addressing relative to the head is this design's own choice.
module ppc_tfifo #(
  parameter int unsigned W     = 33,
  parameter int unsigned DEPTH = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  // FIFO port
  input  logic                     push,
  input  logic [W-1:0]             push_data,
  input  logic                     pop,
  output logic [W-1:0]             head,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     full,
  output logic                     empty,
  // row port
  input  logic [$clog2(DEPTH)-1:0] row_rd_addr,
  output logic [W-1:0]             row_rd_data,
  input  logic                     row_wr,
  input  logic [$clog2(DEPTH)-1:0] row_wr_addr,
  input  logic [W-1:0]             row_wr_data,
  // column port
  input  logic [$clog2(W)-1:0]     col_rd_addr,
  output logic [DEPTH-1:0]         col_rd_data,
  input  logic                     col_wr,
  input  logic [$clog2(W)-1:0]     col_wr_addr,
  input  logic [DEPTH-1:0]         col_wr_data
);
  localparam int unsigned AW = $clog2(DEPTH);
  typedef logic [AW-1:0] ptr_t;

  logic [W-1:0] mem [DEPTH];
  ptr_t         hd_q, tl_q;
  logic [$clog2(DEPTH+1)-1:0] cnt_q;

  // physical slot of logical row i
  function automatic ptr_t slot(input ptr_t base, input int unsigned i);
    return ptr_t'((int'(base) + i) % DEPTH);
  endfunction

  assign count = cnt_q;
  assign full  = (cnt_q == ($clog2(DEPTH+1))'(DEPTH));
  assign empty = (cnt_q == '0);
  assign head  = mem[hd_q];
  assign row_rd_data = mem[slot(hd_q, int'(row_rd_addr))];

  always_comb begin
    for (int i = 0; i < DEPTH; i++) col_rd_data[i] = mem[slot(hd_q, i)][col_rd_addr];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hd_q  <= '0;
      tl_q  <= '0;
      cnt_q <= '0;
      for (int i = 0; i < DEPTH; i++) mem[i] <= '0;
    end else if (clear) begin
      hd_q  <= '0;
      tl_q  <= '0;
      cnt_q <= '0;
    end else begin
      if (push && !full) begin
        mem[tl_q] <= push_data;
        tl_q      <= slot(tl_q, 1);
      end
      if (row_wr) mem[slot(hd_q, int'(row_wr_addr))] <= row_wr_data;
      if (col_wr)
        for (int i = 0; i < DEPTH; i++) mem[slot(hd_q, i)][col_wr_addr] <= col_wr_data[i];
      if (pop && !empty) hd_q <= slot(hd_q, 1);
      case ({push && !full, pop && !empty})
        2'b10:   cnt_q <= cnt_q + 1'b1;
        2'b01:   cnt_q <= cnt_q - 1'b1;
        default: cnt_q <= cnt_q;
      endcase
    end
  end

  a_one_write: assert property (@(posedge clk) disable iff (!rst_n)
                                $onehot0({push, row_wr, col_wr}));
endmodule
