// tb_ppc_top: end-to-end test of the PPC link at its default size
// (N = 32 data bits, M = 4 flits per packet, 4-slot node FIFO).
//
// The testbench supplies the two channel segments: each is a wire delay of 6 time units
// followed by an XOR fault injector, and s_clk is clk delayed by 4 units (period 20), so the
// RFF-w-P shadow registers sample the same flit 4 units after the main ones. A
// fault window that covers only the clk edge is a transient seen by the main
// register alone; one that also covers the s_clk edge hits both copies.
//
// Packets of random words are sent with a random stall pattern on out_ready.
// Per packet a fault scenario is applied: none, transient (shadow repair),
// double-sample fault (hop-level ARQ), a flit corrupt on both attempts
// (forwarded with SEU_F, fixed by the Mask), two flips in one flit (row
// ARQ), two corrupt flits in the same bit index (flit-index ARQ), the same
// on the second segment, then adaptive F_P mode (F_P skipped, then
// requested) and go-back mode (full ARQ). Every delivered word is compared
// with the word sent and out_err must stay 0; each mechanism must occur.
module tb_ppc_top;
  import ppc_pkg::*;
  localparam int N = 32, M = 4;
  localparam int NPKT = 14;

  logic clk = 1'b0, s_clk = 1'b0, rst_n = 1'b0;
  logic cfg_adaptive_fp = 1'b0, cfg_go_back = 1'b0;
  logic in_valid = 1'b0, in_ready;
  logic [N-1:0] in_data = '0;
  logic ch0_tx_valid, ch0_rx_valid, ch1_tx_valid, ch1_tx_seu, ch1_rx_valid, ch1_rx_seu;
  logic [N:0] ch0_tx_flit, ch0_rx_flit, ch1_tx_flit, ch1_rx_flit;
  logic ch0_d_valid, ch1_d_valid, ch1_d_seu;
  logic [N:0] ch0_d_flit, ch1_d_flit;
  logic [N:0] err0 = '0, err1 = '0;
  logic out_valid, out_last, out_err, tx_busy;
  logic out_ready = 1'b0;
  logic [N-1:0] out_data;

  int checks = 0, failures = 0, cycles = 0;

  always #10 clk = ~clk;               // 20-unit period
  always @(clk) s_clk <= #4 clk;       // shadow clock, 4 units later

  // channel segments: wire delay, then faults
  assign #6 ch0_d_valid = ch0_tx_valid;
  assign #6 ch0_d_flit  = ch0_tx_flit;
  assign #6 ch1_d_valid = ch1_tx_valid;
  assign #6 ch1_d_seu   = ch1_tx_seu;
  assign #6 ch1_d_flit  = ch1_tx_flit;
  assign ch0_rx_valid = ch0_d_valid;
  assign ch0_rx_flit  = ch0_d_flit ^ err0;
  assign ch1_rx_valid = ch1_d_valid;
  assign ch1_rx_seu   = ch1_d_seu;
  assign ch1_rx_flit  = ch1_d_flit ^ err1;

  ppc_top dut (
    .clk, .s_clk, .rst_n, .cfg_adaptive_fp, .cfg_go_back,
    .in_valid, .in_data, .in_ready,
    .ch0_tx_valid, .ch0_tx_flit, .ch0_rx_valid, .ch0_rx_flit,
    .ch1_tx_valid, .ch1_tx_seu, .ch1_tx_flit, .ch1_rx_valid, .ch1_rx_seu, .ch1_rx_flit,
    .out_valid, .out_data, .out_last, .out_err, .out_ready, .tx_busy
  );

  // ---------------- mechanism counters ----------------
  int n_shadow_hop = 0, n_shadow_rx = 0, n_arq_hop = 0, n_arq_rx = 0, n_seu_fwd = 0;
  int n_mask = 0, n_row_arq = 0, n_flit_arq = 0, n_full_arq = 0, n_fp_req = 0;
  int n_fp_skipped = 0, n_stall = 0, n_ack = 0;

  always @(posedge clk) if (rst_n) begin
    cycles <= cycles + 1;
    if (dut.u_hop.u_rff.v_q && dut.u_hop.u_rff.fail_main && !dut.u_hop.u_rff.fail_shadow) n_shadow_hop <= n_shadow_hop + 1;
    if (dut.u_rx.u_rff.v_q && dut.u_rx.u_rff.fail_main && !dut.u_rx.u_rff.fail_shadow) n_shadow_rx <= n_shadow_rx + 1;
    if (dut.u_hop.in_arq) n_arq_hop <= n_arq_hop + 1;
    if (dut.u_rx.rx_arq)  n_arq_rx  <= n_arq_rx + 1;
    if (dut.u_hop.u_rff.out_valid && dut.u_hop.u_rff.seu_f && dut.u_hop.u_rff.out_ready) n_seu_fwd <= n_seu_fwd + 1;
    if (out_valid && out_ready && out_last && dut.u_rx.mask_en_q) n_mask <= n_mask + 1;
    if (out_valid && out_ready && out_last && !dut.u_rx.fp_rcvd_q) n_fp_skipped <= n_fp_skipped + 1;
    if ((dut.u_hop.r_valid && !dut.u_hop.f_ready)) n_stall <= n_stall + 1;
    if (dut.u_tx.fp_add) n_fp_req <= n_fp_req + 1;
    if (dut.u_rx.fb_valid) begin
      case (dut.u_rx.fb_kind)
        FB_ROW_ARQ:  n_row_arq  <= n_row_arq + 1;
        FB_FLIT_ARQ: n_flit_arq <= n_flit_arq + 1;
        FB_FULL_ARQ: n_full_arq <= n_full_arq + 1;
        FB_ACK:      n_ack      <= n_ack + 1;
        default: ;
      endcase
    end
  end

  // ---------------- scoreboard ----------------
  logic [N-1:0] expq[$];
  int words_out = 0;

  always @(posedge clk) if (rst_n) begin
    out_ready <= ($urandom_range(0, 3) != 0);
    if (out_valid && out_ready) begin
      checks <= checks + 1;
      words_out <= words_out + 1;
      if (expq.size() == 0) begin
        failures <= failures + 1;
        $display("unexpected word %h", out_data);
      end else begin
        if (out_data !== expq[0] || out_err) begin
          failures <= failures + 1;
          $display("t=%0t word %0d: got %h err=%b, expected %h", $time, words_out, out_data, out_err, expq[0]);
        end
        void'(expq.pop_front());
      end
    end
  end

  // ---------------- fault injection ----------------
  // Wait for the next cycle in which segment seg delivers a flit that its
  // receiver takes, then apply mask around that clk edge (and, if both, also
  // around the s_clk edge).
  task automatic wait_capture(input int seg);
    forever begin
      @(posedge clk); #8;
      if (seg == 0 ? (ch0_rx_valid && dut.u_hop.in_ready) : (ch1_rx_valid && dut.u_rx.rx_ready)) break;
    end
  endtask

  task automatic pulse(input int seg, input logic [N:0] mask, input bit both);
    // called 2 units before a clk edge
    if (seg == 0) err0 = mask; else err1 = mask;
    #4;                       // clk edge passed, s_clk edge not yet
    if (both) #3;             // past the s_clk edge, before the next flit
    if (seg == 0) err0 = '0; else err1 = '0;
  endtask

  task automatic fault(input int seg, input logic [N:0] mask, input bit both, input int skip);
    for (int i = 0; i <= skip; i++) wait_capture(seg);
    #10;
    pulse(seg, mask, both);
  endtask

  // corrupt one flit on the first attempt and on its replay
  task automatic corrupt(input int seg, input logic [N:0] mask, input int skip);
    fault(seg, mask, 1'b1, skip);
    // replay is captured two clk edges later
    @(posedge clk); #18;
    pulse(seg, mask, 1'b1);
  endtask

  function automatic logic [N:0] bitm(input int b);
    return (N+1)'(1) << b;
  endfunction

  // ---------------- packets ----------------
  task automatic send_packet();
    for (int i = 0; i < M; i++) begin
      logic [N-1:0] w;
      w = $urandom();
      @(negedge clk);
      in_valid = 1'b1;
      in_data  = w;
      expq.push_back(w);
      while (!in_ready) @(negedge clk);
      @(posedge clk);
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic drain();
    int t;
    t = 0;
    while ((expq.size() != 0 || tx_busy) && t < 2000) begin
      @(posedge clk);
      t++;
    end
  endtask

  task automatic run_packet(input int scen);
    fork
      send_packet();
      begin
        // wait until the packet starts crossing the channel
        @(posedge clk iff ch0_tx_valid);
        case (scen)
          1: fault(0, bitm(5), 1'b0, 1);                       // transient at node
          2: fault(0, bitm(17), 1'b1, 2);                      // both copies, once
          3: corrupt(0, bitm(9), 0);                           // sender-side corruption
          4: fault(0, bitm(3) | bitm(20), 1'b1, 1);            // two flips, one flit
          5: begin corrupt(1, bitm(11), 0); corrupt(1, bitm(11), 0); end // same index, two flits
          6: fault(1, bitm(30), 1'b0, 2);                      // transient at RX
          7: fault(1, bitm(1), 1'b1, 0);                       // RX asks the node again
          8: corrupt(1, bitm(32), 1);                          // parity bit itself
          default: ;
        endcase
      end
    join
    drain();
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    for (int s = 0; s <= 8; s++) run_packet(s);
    // adaptive parity flit
    cfg_adaptive_fp <= 1'b1;
    @(posedge clk);
    run_packet(0);
    run_packet(0);
    run_packet(3);
    // go-back M
    cfg_adaptive_fp <= 1'b0;
    cfg_go_back     <= 1'b1;
    @(posedge clk);
    run_packet(3);
    run_packet(4);
    cfg_go_back <= 1'b0;
    @(posedge clk);
    // back-to-back packets without faults
    for (int p = 0; p < 6; p++) send_packet();
    drain();
    repeat (10) @(posedge clk);

    checks += 1;
    if (expq.size() != 0) begin failures += 1; $display("%0d words never delivered", expq.size()); end
    begin
      int cnt[14];
      string nm[14];
      cnt = '{n_shadow_hop, n_shadow_rx, n_arq_hop, n_arq_rx, n_seu_fwd, n_mask, n_row_arq,
              n_flit_arq, n_full_arq, n_fp_req, n_fp_skipped, n_stall, n_ack, words_out};
      nm  = '{"shadow repair (node)", "shadow repair (RX)", "ARQ node->TX", "ARQ RX->node",
              "SEU_F forwarded", "mask correction", "row ARQ", "flit ARQ", "full ARQ",
              "F_P request", "F_P skipped", "node FIFO stall", "acknowledge", "words"};
      for (int i = 0; i < 14; i++) begin
        $display("  %-22s %0d", nm[i], cnt[i]);
        checks += 1;
        if (cnt[i] == 0) begin failures += 1; $display("mechanism never happened: %s", nm[i]); end
      end
    end
    $display("cycles=%0d", cycles);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
