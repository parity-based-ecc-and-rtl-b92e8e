// tb_ppc_rx: PPC receiving terminal.
//
// The testbench plays the sending terminal: it builds packets (M flits with
// parity and F_P), sends them over a wire with 6 units of delay (s_clk is clk
// delayed by 4 units, period 20), goes back one flit when the RX front end
// raises rx_arq, and answers every feedback message the way the TX does.
// Faults are written into the flits themselves, so both RFF-w-P copies see
// them. Scenarios: clean; one flipped bit (Mask correction); two flips in one
// flit (row ARQ, column flits written back); the same bit flipped in two
// flits (flit ARQ); adaptive F_P mode clean (no F_P sent) and with one flip
// (fp_req from the front end, F_P sent, then Mask); go-back mode (full ARQ); and a fault that comes
// back with every retransmission (delivered with out_err after the retry
// limit). The feedback sequence, the delivered words and out_err are checked.
module tb_ppc_rx;
  import ppc_pkg::*;
  localparam int N = 32, M = 4;
  logic clk = 0, s_clk = 0, rst_n = 0;
  logic cfg_adaptive_fp = 0, cfg_go_back = 0;
  logic rx_valid = 0, rx_seu = 0, rx_ready, rx_arq;
  logic [N:0] rx_flit = '0;
  logic fb_valid, fp_req;
  int n_fp_req = 0;
  fb_kind_e fb_kind;
  logic [N:0] fb_mask;
  logic out_valid, out_last, out_err, out_ready = 0;
  logic [N-1:0] out_data;
  int checks = 0, failures = 0, cyc = 0;

  always #10 clk = ~clk;
  always @(clk) s_clk <= #4 clk;

  ppc_rx #(.N(N), .M(M), .MAX_RETRY(2)) dut (.*);

  fb_kind_e fbq[$];
  logic [N:0] fbm[$];
  logic [N-1:0] outq[$];
  logic errq[$];
  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    out_ready <= ($urandom_range(0, 3) != 0);
    if (fp_req) n_fp_req <= n_fp_req + 1;
    if (fb_valid) begin fbq.push_back(fb_kind); fbm.push_back(fb_mask); end
    if (out_valid && out_ready) begin outq.push_back(out_data); errq.push_back(out_err); end
  end

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  function automatic logic [N:0] mk(input logic [N-1:0] d);
    return {^d, d};
  endfunction

  // send a list of flits, going back one flit on rx_arq
  task automatic send(input logic [N:0] fl[$]);
    int idx, hist;
    bit a, taken;
    idx = 0; hist = 0; a = 0; taken = 0;
    forever begin
      @(posedge clk);
      if (a) idx = hist;
      else if (taken) begin hist = idx; idx++; end
      if (idx >= fl.size()) begin
        // nothing left to send; the last flit may still be rejected
        #6 rx_valid = 1'b0;
        #12 a = rx_arq;
        if (!a) break;
        continue;
      end
      #6;
      rx_valid = 1'b1;
      rx_flit  = fl[idx];
      #12;
      a = rx_arq;
      taken = rx_ready && !a;
    end
    #6 rx_valid = 1'b0;
  endtask

  logic [N:0] rows[M], fp;

  // one packet: errs[i] is XORed into flit i (i = M: F_P) on the first
  // transmission, and on retransmissions too if sticky
  task automatic packet(input string name, input logic [N:0] errs[M+1], input bit sticky,
                        input fb_kind_e exp_fb[$], input bit exp_err);
    logic [N:0] fl[$];
    int t;
    fp = '0;
    for (int i = 0; i < M; i++) begin rows[i] = mk($urandom()); fp ^= rows[i]; end
    fbq.delete(); fbm.delete(); outq.delete(); errq.delete();
    fl.delete();
    for (int i = 0; i < M; i++) fl.push_back(rows[i] ^ errs[i]);
    if (!cfg_adaptive_fp) fl.push_back(fp ^ errs[M]);
    t = n_fp_req;
    send(fl);
    if (cfg_adaptive_fp) begin
      // the RX front end asks for F_P when it gives up on a flit
      repeat (2) @(posedge clk);
      if (n_fp_req != t) begin fl.delete(); fl.push_back(fp ^ errs[M]); send(fl); end
    end
    forever begin
      fb_kind_e k;
      logic [N:0] m;
      t = 0;
      while (fbq.size() == 0 && t < 300) begin @(posedge clk); t++; end
      if (fbq.size() == 0) begin chk(0, {name, ": no feedback"}); break; end
      k = fbq[0]; m = fbm[0];
      if (k == FB_ACK) break;
      fbq.delete(); fbm.delete();
      exp_fb.push_front(FB_NONE);     // placeholder keeps the count
      chk(exp_fb.size() > 1 && exp_fb[1] == k, $sformatf("%s: feedback %s unexpected", name, k.name()));
      void'(exp_fb.pop_front()); void'(exp_fb.pop_front());
      fl.delete();
      case (k)
        FB_FP_REQ:   fl.push_back(fp ^ (sticky ? errs[M] : '0));
        FB_FULL_ARQ: begin
          for (int i = 0; i < M; i++) fl.push_back(rows[i] ^ (sticky ? errs[i] : '0));
          if (!cfg_adaptive_fp) fl.push_back(fp ^ (sticky ? errs[M] : '0));
        end
        FB_FLIT_ARQ: for (int i = 0; i <= M; i++) if (m[i])
                       fl.push_back(((i < M) ? rows[i] : fp) ^ (sticky ? errs[i] : '0));
        FB_ROW_ARQ: for (int b = 0; b <= N; b++) if (m[b]) begin
          logic [N-1:0] d;
          d = '0;
          for (int i = 0; i < M; i++) d[i] = rows[i][b] ^ (sticky ? errs[i][b] : 1'b0);
          d[M] = fp[b];
          fl.push_back(mk(d));
        end
        default: ;
      endcase
      send(fl);
    end
    chk(exp_fb.size() == 1 && exp_fb[0] == FB_ACK, {name, ": feedback sequence did not end with the expected acknowledge"});
    t = 0;
    while (outq.size() < M && t < 300) begin @(posedge clk); t++; end
    chk(outq.size() == M, {name, ": word count"});
    for (int i = 0; i < M && i < outq.size(); i++) begin
      if (!exp_err) chk(outq[i] == rows[i][N-1:0], $sformatf("%s: word %0d %h expected %h", name, i, outq[i], rows[i][N-1:0]));
      chk(errq[i] == exp_err, $sformatf("%s: out_err %b", name, errq[i]));
    end
    repeat (3) @(posedge clk);
  endtask

  function automatic logic [N:0] bm(input int b);
    return (N+1)'(1) << b;
  endfunction

  initial begin
    logic [N:0] e[M+1];
    int nf;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int rep = 0; rep < 3; rep++) begin
      cfg_adaptive_fp = 0; cfg_go_back = 0;
      e = '{default: '0};
      packet("clean", e, 0, '{FB_ACK}, 0);
      e = '{default: '0}; e[1] = bm(7);
      packet("single", e, 0, '{FB_ACK}, 0);
      e = '{default: '0}; e[3] = bm(32);
      packet("single in p", e, 0, '{FB_ACK}, 0);
      e = '{default: '0}; e[2] = bm(4) | bm(9);
      packet("two in a flit", e, 0, '{FB_ROW_ARQ, FB_ACK}, 0);
      e = '{default: '0}; e[0] = bm(12); e[3] = bm(12);
      packet("same index twice", e, 0, '{FB_FLIT_ARQ, FB_ACK}, 0);
      e = '{default: '0}; e[1] = bm(3) | bm(30);
      packet("sticky", e, 1, '{FB_ROW_ARQ, FB_ROW_ARQ, FB_ACK}, 1);
      cfg_adaptive_fp = 1;
      e = '{default: '0};
      packet("adaptive clean", e, 0, '{FB_ACK}, 0);
      e = '{default: '0}; e[2] = bm(21);
      nf = n_fp_req;
      packet("adaptive single", e, 0, '{FB_ACK}, 0);
      chk(n_fp_req == nf + 1, $sformatf("adaptive single: %0d fp_req pulses, expected 1", n_fp_req - nf));
      cfg_adaptive_fp = 0; cfg_go_back = 1;
      e = '{default: '0}; e[0] = bm(5);
      packet("go-back", e, 0, '{FB_FULL_ARQ, FB_ACK}, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
