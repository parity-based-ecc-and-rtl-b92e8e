// tb_ppc_hop: intermediate node (RFF-w-P followed by the 4-slot FIFO).
//
// A sender model pushes 200 flits into the node over a wire with 6 units of
// delay (s_clk = clk delayed by 4, period 20) and goes back one flit on
// in_arq. Some flits get a transient fault (repaired by the shadow
// register), a fault on both samples once (in_arq, then clean), or a fault on
// every attempt (forwarded with out_seu). The downstream model stalls at
// random and rejects random flits with out_arq, which the FIFO must replay.
// The kept flits and their flags must match the sent ones in order.
module tb_ppc_hop;
  localparam int N = 32, NF = 200;
  logic clk = 0, s_clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, in_arq;
  logic [N:0] in_w = '0, in_flit, err = '0;
  logic out_valid, out_seu, out_ready = 0, out_arq = 0;
  logic [N:0] out_flit;
  int checks = 0, failures = 0, cyc = 0, n_in_arq = 0, n_out_arq = 0, n_stall = 0;

  always #10 clk = ~clk;
  always @(clk) s_clk <= #4 clk;
  assign in_flit = in_w ^ err;

  ppc_hop #(.N(N), .DEPTH(4)) dut (.clk, .s_clk, .rst_n, .in_valid, .in_seu(1'b0), .in_flit,
                                   .in_ready, .in_arq, .out_valid, .out_seu, .out_flit,
                                   .out_ready, .out_arq);

  logic [N:0] flits[NF], fmask[NF];
  int kind[NF], attempts[NF];
  logic [N:0] got[$];
  logic got_seu[$];
  logic tent_v = 0, tent_s;
  logic [N:0] tent;

  // downstream model: samples after the s_clk edge, answers before the clk edge
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) n_stall <= n_stall + 1;
    if (in_arq) n_in_arq <= n_in_arq + 1;
    if (out_arq) begin tent_v <= 0; n_out_arq <= n_out_arq + 1; end
    else begin
      if (tent_v) begin got.push_back(tent); got_seu.push_back(tent_s); end
      tent_v <= out_valid && out_ready;
      tent   <= out_flit;
      tent_s <= out_seu;
    end
  end
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 2) != 0);
    out_arq   = tent_v && ($urandom_range(0, 5) == 0);
  end

  initial begin
    int idx, hist;
    bit a, taken;
    for (int i = 0; i < NF; i++) begin
      logic [N-1:0] d;
      d = $urandom();
      flits[i] = {^d, d};
      fmask[i] = (N+1)'(1) << $urandom_range(0, N);
      kind[i]  = ($urandom_range(0, 9) < 3) ? $urandom_range(1, 3) : 0;
      attempts[i] = 0;
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    idx = 0; hist = 0; a = 0; taken = 0;
    forever begin
      @(posedge clk);
      if (a) idx = hist;
      else if (taken) begin hist = idx; idx++; end
      if (idx >= NF) begin
        // nothing left to send; the last flit may still be rejected
        #6 in_valid = 1'b0;
        #12 a = in_arq;
        if (!a) break;
        continue;
      end
      #6;
      in_valid = 1'b1;
      in_w     = flits[idx];
      #12;
      a = in_arq;
      taken = in_ready && !a;
      if (in_ready) begin
        int k;
        k = kind[idx];
        attempts[idx]++;
        if (k == 1 || (k == 2 && attempts[idx] == 1) || k == 3) begin
          err = fmask[idx];
          fork begin #4; if (k != 1) #3; err = '0; end join_none
        end
      end
    end
    #6 in_valid = 0;
    repeat (100) @(posedge clk);
    checks++;
    if (got.size() != NF) begin failures++; $display("kept %0d flits, expected %0d", got.size(), NF); end
    for (int i = 0; i < NF && i < got.size(); i++) begin
      logic es;
      es = (kind[i] == 3);
      checks++;
      if (got[i] !== (es ? flits[i] ^ fmask[i] : flits[i]) || got_seu[i] !== es) begin
        failures++;
        if (failures < 10) $display("flit %0d kind %0d: got %h/%b", i, kind[i], got[i], got_seu[i]);
      end
    end
    checks++;
    if (n_in_arq == 0 || n_out_arq == 0 || n_stall == 0) begin
      failures++; $display("not exercised: in_arq %0d out_arq %0d stall %0d", n_in_arq, n_out_arq, n_stall);
    end
    $display("in_arq=%0d out_arq=%0d stall=%0d", n_in_arq, n_out_arq, n_stall);
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
