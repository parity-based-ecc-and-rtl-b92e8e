// tb_ppc_tx: PPC sending terminal.
//
// Words are fed in, and the flits that leave are collected by a sink model
// with a random ready that also rejects some flits with a hop-level arq (in
// the cycle after taking them), which the TX must answer by going back one
// flit. The kept flits are compared with flits built in the testbench from
// the words: M data flits with even parity and the parity flit F_P; then the
// answers to every feedback kind: flit ARQ (selected flits and F_P), row ARQ
// (column flits, including the parity column), full ARQ, acknowledge, and in
// adaptive mode a packet without F_P followed by an F_P request, and a packet
// during which a node raises fp_req (F_P must follow the data flits once, even
// if fp_req comes twice).
module tb_ppc_tx;
  import ppc_pkg::*;
  localparam int N = 32, M = 4;
  logic clk = 0, rst_n = 0, cfg_adaptive_fp = 0;
  logic in_valid = 0, in_ready;
  logic [N-1:0] in_data = '0;
  logic tx_valid, tx_ready = 0, tx_arq = 0;
  logic [N:0] tx_flit;
  logic fb_valid = 0, fp_req = 0;
  fb_kind_e fb_kind = FB_NONE;
  logic [N:0] fb_mask = '0;
  logic busy;
  int checks = 0, failures = 0, n_arq = 0;
  logic [N:0] got[$];
  logic tent_v = 0;
  logic [N:0] tent;

  always #5 clk = ~clk;

  ppc_tx #(.N(N), .M(M)) dut (.*);

  // sink with hop-level arq
  always @(negedge clk) begin
    tx_ready = ($urandom_range(0, 3) != 0);
    tx_arq   = tent_v && ($urandom_range(0, 4) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (tx_arq) begin tent_v <= 0; n_arq <= n_arq + 1; end
    else begin
      if (tent_v) got.push_back(tent);
      tent_v <= tx_valid && tx_ready;
      tent   <= tx_flit;
    end
  end

  logic [N:0] rows[M];
  logic [N:0] fp;

  function automatic logic [N:0] mk(input logic [N-1:0] d);
    return {^d, d};
  endfunction

  task automatic fill();
    fp = '0;
    for (int i = 0; i < M; i++) begin
      logic [N-1:0] w;
      w = $urandom();
      rows[i] = mk(w);
      fp ^= rows[i];
      @(negedge clk);
      in_valid = 1; in_data = w;
      while (!in_ready) @(negedge clk);
      @(negedge clk);
      in_valid = 0;
    end
  endtask

  task automatic expect_flits(input logic [N:0] e[$], input string what);
    int t;
    t = 0;
    while (got.size() < e.size() && t < 500) begin @(posedge clk); t++; end
    repeat (5) @(posedge clk);
    checks++;
    if (got.size() != e.size()) begin
      failures++; $display("%s: %0d flits, expected %0d", what, got.size(), e.size());
    end
    for (int i = 0; i < e.size() && i < got.size(); i++) begin
      checks++;
      if (got[i] !== e[i]) begin failures++; $display("%s flit %0d: got %h expected %h", what, i, got[i], e[i]); end
    end
    got.delete();
  endtask

  task automatic feedback(input fb_kind_e k, input logic [N:0] m);
    @(negedge clk);
    fb_valid = 1; fb_kind = k; fb_mask = m;
    @(negedge clk);
    fb_valid = 0;
  endtask

  initial begin
    logic [N:0] e[$];
    #12 rst_n = 1;
    for (int rep = 0; rep < 4; rep++) begin
      cfg_adaptive_fp = 0;
      fill();
      e.delete(); for (int i = 0; i < M; i++) e.push_back(rows[i]); e.push_back(fp);
      expect_flits(e, "packet");
      checks++; if (!busy || in_ready) begin failures++; $display("TX should hold the packet"); end
      // flit ARQ: flit 2 and F_P
      feedback(FB_FLIT_ARQ, (N+1)'('b10100));
      e.delete(); e.push_back(rows[2]); e.push_back(fp);
      expect_flits(e, "flit ARQ");
      // row ARQ: bit indexes 0, 13, 31, 32
      feedback(FB_ROW_ARQ, (N+1)'(1) | ((N+1)'(1) << 13) | ((N+1)'(1) << 31) | ((N+1)'(1) << 32));
      e.delete();
      for (int j = 0; j < 4; j++) begin
        int b;
        logic [N-1:0] d;
        b = (j == 0) ? 0 : (j == 1) ? 13 : (j == 2) ? 31 : 32;
        d = '0;
        for (int i = 0; i < M; i++) d[i] = rows[i][b];
        d[M] = fp[b];
        e.push_back(mk(d));
      end
      expect_flits(e, "row ARQ");
      // full ARQ
      feedback(FB_FULL_ARQ, '0);
      e.delete(); for (int i = 0; i < M; i++) e.push_back(rows[i]); e.push_back(fp);
      expect_flits(e, "full ARQ");
      feedback(FB_ACK, '0);
      // adaptive F_P
      cfg_adaptive_fp = 1;
      fill();
      e.delete(); for (int i = 0; i < M; i++) e.push_back(rows[i]);
      expect_flits(e, "adaptive packet");
      feedback(FB_FP_REQ, '0);
      e.delete(); e.push_back(fp);
      expect_flits(e, "F_P request");
      feedback(FB_ACK, '0);
      // adaptive F_P on a node's fp_req, while sending (even reps) or after
      fill();
      if (rep % 2 == 0) begin
        while (got.size() < 2) @(posedge clk);
      end else begin
        while (got.size() < M) @(posedge clk);
        repeat (3) @(posedge clk);
      end
      @(negedge clk); fp_req = 1; @(negedge clk); fp_req = 0;
      repeat (3) @(negedge clk);
      fp_req = 1; @(negedge clk); fp_req = 0;
      e.delete(); for (int i = 0; i < M; i++) e.push_back(rows[i]); e.push_back(fp);
      expect_flits(e, "fp_req");
      feedback(FB_ACK, '0);
    end
    checks++;
    if (n_arq == 0) begin failures++; $display("no hop-level arq exercised"); end
    $display("arq=%0d", n_arq);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #500000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
