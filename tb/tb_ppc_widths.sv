// tb_ppc_widths: the whole link (ppc_top) at 16 and at 64 data bits, and at
// 32 bits built with plain parity registers (SHADOW = 0) instead of RFF-w-P.
//
// The parts of the link are sized for 16, 32 and 64 data bits; tb_ppc_top
// covers 32 bits, this testbench the two other widths, all with M = 4 flits
// per packet. Without the shadow registers every fault must be repaired by a
// hop-level retransmission or at the receiver. Each configuration has its own
// ppc_top instance, channel
// model (wire delay 6 units, s_clk = clk delayed by 4, period 20) and
// stimulus in a generate block. Random words are streamed in; on each channel
// segment, random single-bit faults are applied around a clk edge, either to
// the main sample only (repaired by the shadow register) or to both samples
// (hop-level ARQ; if the retry is hit again, the flit goes on flagged and is
// corrected at the receiver). Shadow repairs at the node must occur with the
// shadow registers and never without them. Every word delivered is compared with the word
// sent, out_err must stay 0, and each width must see both kinds of fault.
module tb_ppc_widths;
  localparam int M = 4, NPKT = 40;
  logic clk = 1'b0, s_clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  int done = 0;

  always #10 clk = ~clk;
  always @(clk) s_clk <= #4 clk;

  for (genvar g = 0; g < 3; g++) begin : g_w
    localparam int N = (g == 0) ? 16 : (g == 1) ? 64 : 32;
    localparam bit SH = (g != 2);
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
    logic [N-1:0] expq[$];
    int n_out = 0, n_shadow = 0, n_both = 0, n_repair = 0;

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

    ppc_top #(.N(N), .M(M), .SHADOW(SH)) dut (
      .clk, .s_clk, .rst_n, .cfg_adaptive_fp(1'b0), .cfg_go_back(1'b0),
      .in_valid, .in_data, .in_ready,
      .ch0_tx_valid, .ch0_tx_flit, .ch0_rx_valid, .ch0_rx_flit,
      .ch1_tx_valid, .ch1_tx_seu, .ch1_tx_flit, .ch1_rx_valid, .ch1_rx_seu, .ch1_rx_flit,
      .out_valid, .out_data, .out_last, .out_err, .out_ready, .tx_busy
    );

    // stimulus: NPKT packets of random words
    initial begin
      @(posedge rst_n);
      for (int i = 0; i < NPKT * M; i++) begin
        logic [N-1:0] w;
        w = N'({$urandom(), $urandom()});
        @(negedge clk);
        in_valid = 1'b1; in_data = w;
        @(posedge clk);
        while (!in_ready) @(posedge clk);
        expq.push_back(w);
        #1 in_valid = 1'b0;
      end
    end

    // scoreboard
    always @(posedge clk) if (rst_n) begin
      if (dut.u_hop.u_rff.v_q && dut.u_hop.u_rff.fail_main && !dut.u_hop.u_rff.fail_shadow)
        n_repair <= n_repair + 1;
      out_ready <= ($urandom_range(0, 3) != 0);
      if (out_valid && out_ready) begin
        checks = checks + 1;
        n_out <= n_out + 1;
        if (expq.size() == 0 || out_data !== expq[0] || out_err) begin
          failures = failures + 1;
          $display("N=%0d word %0d: got %h err=%b", N, n_out, out_data, out_err);
        end
        if (expq.size() != 0) void'(expq.pop_front());
        if (n_out + 1 == NPKT * M) done = done + 1;
      end
    end

    // faults: every other cycle, on each segment, a single flipped bit with
    // probability 1/25 on the main sample only or 1/25 on both samples
    for (genvar s = 0; s < 2; s++) begin : g_seg
      initial begin
        @(posedge rst_n);
        forever begin
          int r;
          logic [N:0] e;
          @(posedge clk); #18;      // 2 units before the next clk edge
          r = $urandom_range(0, 24);
          e = (N+1)'(1) << $urandom_range(0, N);
          if (r < 2) begin
            if (s == 0) err0 = e; else err1 = e;
            #4;                     // past the clk edge
            if (r == 1) #3;         // and past the s_clk edge
            if (s == 0) err0 = '0; else err1 = '0;
            if (r == 0) n_shadow++; else n_both++;
          end
        end
      end
    end

  end

  task automatic end_check(input int n, input int n_out, input int n_shadow, input int n_both,
                           input int left);
    checks++;
    if (n_out != NPKT * M || left != 0) begin
      failures++; $display("N=%0d: %0d words delivered, %0d sent", n, n_out, NPKT * M);
    end
    checks++;
    if (n_shadow == 0 || n_both == 0) begin failures++; $display("N=%0d: a fault kind was never applied", n); end
    $display("N=%0d: words=%0d main-only faults=%0d both-sample faults=%0d", n, n_out, n_shadow, n_both);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done == 3);
    repeat (20) @(posedge clk);
    // shadow repairs at the node must happen exactly when the shadow exists
    checks += 3;
    if (g_w[0].n_repair == 0 || g_w[1].n_repair == 0 || g_w[2].n_repair != 0) begin
      failures++;
      $display("node shadow repairs: %0d %0d %0d", g_w[0].n_repair, g_w[1].n_repair, g_w[2].n_repair);
    end
    end_check(16, g_w[0].n_out, g_w[0].n_shadow, g_w[0].n_both, g_w[0].expq.size());
    end_check(64, g_w[1].n_out, g_w[1].n_shadow, g_w[1].n_both, g_w[1].expq.size());
    end_check(32, g_w[2].n_out, g_w[2].n_shadow, g_w[2].n_both, g_w[2].expq.size());
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
