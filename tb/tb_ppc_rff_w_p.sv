// tb_ppc_rff_w_p: Razor register with parity.
//
// A sender model feeds 40 flits with correct parity; it goes back one flit
// when arq is raised, as the stage expects. The wire into the stage is
// delayed 6 units and s_clk is clk delayed 4 units (period 20), so a fault
// window around the clk edge only hits the main register, and a wider one
// hits both registers. Per flit: none, transient (must be repaired from the
// shadow with no extra cycle), both copies once (one arq, then correct),
// both copies on every attempt (one arq, then forwarded with seu_f = 1), or
// arriving flagged in_seu and corrupt (forwarded at once, no arq). The
// second half runs with random downstream stalls. Every forwarded flit,
// its flag, the arq count and the one-cycle latency are checked.
module tb_ppc_rff_w_p;
  localparam int W = 33, NF = 40;
  logic clk = 0, s_clk = 0, rst_n = 0;
  logic in_valid = 0, in_seu = 0, out_ready = 1;
  logic [W-1:0] din_w = '0, din, err = '0;
  logic in_ready, arq, out_valid, seu_f;
  logic [W-1:0] dout;
  int checks = 0, failures = 0, cyc = 0;

  always #10 clk = ~clk;
  always @(clk) s_clk <= #4 clk;
  assign din = din_w ^ err;

  ppc_rff_w_p #(.W(W)) dut (.clk, .s_clk, .rst_n, .in_valid, .in_seu, .din, .in_ready, .arq,
                            .out_valid, .dout, .seu_f, .out_ready);

  logic [W-1:0] flits[NF];
  int kind[NF];                 // 0 none, 1 transient, 2 both once, 3 both always, 4 flagged
  logic [W-1:0] fmask[NF];
  int attempts[NF], t_first[NF];
  int idx = 0, hist = 0, n_arq = 0, n_out = 0;
  logic [W-1:0] got[$];
  logic got_seu[$];
  int got_t[$];

  always @(posedge clk) cyc <= cyc + 1;

  // receiver side
  always @(posedge clk) if (rst_n) begin
    if (out_valid && out_ready) begin
      got.push_back(dout); got_seu.push_back(seu_f); got_t.push_back(cyc);
    end
    if (arq) n_arq <= n_arq + 1;
    if (cyc > NF) out_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin
    for (int i = 0; i < NF; i++) begin
      logic [W-2:0] d;
      d = {$urandom(), $urandom()};
      flits[i] = {^d, d};
      kind[i] = 0;
      fmask[i] = (W)'(1) << $urandom_range(0, W-1);
      attempts[i] = 0;
    end
    kind[3] = 1; kind[7] = 2; kind[11] = 3; kind[15] = 4;
    kind[25] = 1; kind[29] = 2; kind[33] = 3; kind[37] = 4;
    repeat (2) @(posedge clk);
    rst_n = 1;
    begin
      bit a, taken;
      a = 0; taken = 0;
      forever begin
        @(posedge clk);
        // the edge has passed: move the sender
        if (a) idx = hist;
        else if (taken) begin hist = idx; idx++; end
        if (idx >= NF) break;
        // 6 units after the edge: drive the wire
        #6;
        in_valid = 1'b1;
        din_w    = flits[idx];
        in_seu   = (kind[idx] == 4);
        // 2 units before the next edge: decide and inject
        #12;
        a = arq;
        taken = in_ready && !a;
        if (in_ready) begin
          int k;
          k = kind[idx];
          attempts[idx]++;
          if (attempts[idx] == 1) t_first[idx] = cyc;
          if (k == 1 || (k == 2 && attempts[idx] == 1) || k == 3 || k == 4) begin
            err = fmask[idx];
            fork
              begin
                #4;
                if (k != 1) #3;
                err = '0;
              end
            join_none
          end
        end
      end
      #6 in_valid = 0;
      repeat (40) @(posedge clk);
    end
    // compare
    checks++;
    if (got.size() != NF) begin failures++; $display("received %0d flits, expected %0d", got.size(), NF); end
    for (int i = 0; i < NF && i < got.size(); i++) begin
      logic [W-1:0] e;
      logic es;
      es = (kind[i] >= 3);
      e  = es ? flits[i] ^ fmask[i] : flits[i];
      checks++;
      if (got[i] !== e || got_seu[i] !== es) begin
        failures++;
        $display("flit %0d kind %0d: got %h seu=%b, expected %h seu=%b", i, kind[i], got[i], got_seu[i], e, es);
      end
      if (i > 0 && i < 20 && kind[i] <= 1 && kind[i-1] != 2 && kind[i-1] != 3) begin
        checks++;
        if (got_t[i] - t_first[i] != 1) begin
          failures++;
          $display("flit %0d: latency %0d cycles, expected 1", i, got_t[i] - t_first[i]);
        end
      end
    end
    checks++;
    if (n_arq != 4) begin failures++; $display("arq raised %0d times, expected 4", n_arq); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
