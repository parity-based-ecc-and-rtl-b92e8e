// tb_ppc_link_fifo: node FIFO with go-back-one replay.
//
// Random pushes on the input; the downstream model takes entries with a
// random ready and, in the cycle after a take, randomly rejects it with arq
// (and ignores whatever is offered in that cycle), as an RFF-w-P does. The
// entries the model finally keeps must be exactly the pushed entries in
// order, and the FIFO must never accept more than DEPTH unfreed entries.
module tb_ppc_link_fifo;
  localparam int W = 34, D = 4, NW = 600;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_ready = 0, arq = 0;
  logic [W-1:0] in_data = '0, out_data;
  logic in_ready, out_valid;
  int checks = 0, failures = 0, n_arq = 0, n_full = 0;
  logic [W-1:0] sent[$], got[$];
  logic tent_v = 0;
  logic [W-1:0] tent;

  always #5 clk = ~clk;

  ppc_link_fifo #(.W(W), .DEPTH(D)) dut (.*);

  // source
  initial begin
    #12 rst_n = 1;
    for (int i = 0; i < NW; i++) begin
      logic [W-1:0] w;
      w = {$urandom(), $urandom()};
      @(negedge clk);
      while ($urandom_range(0, 3) == 0) @(negedge clk);
      in_valid = 1; in_data = w;
      while (!in_ready) begin
        @(negedge clk);
      end
      sent.push_back(w);
      @(negedge clk);
      in_valid = 0;
    end
  end

  // sink
  always @(negedge clk) begin
    out_ready = ($urandom_range(0, 2) != 0);
    arq       = tent_v && ($urandom_range(0, 3) == 0);
  end
  always @(posedge clk) if (rst_n) begin
    if (!in_ready) n_full <= n_full + 1;
    if (arq) begin
      tent_v <= 0;
      n_arq  <= n_arq + 1;
    end else begin
      if (tent_v) got.push_back(tent);
      tent_v <= out_valid && out_ready;
      tent   <= out_data;
    end
  end

  initial begin
    wait (sent.size() == NW);
    repeat (60) @(posedge clk);
    checks++;
    if (got.size() != NW) begin failures++; $display("kept %0d entries, expected %0d", got.size(), NW); end
    for (int i = 0; i < NW && i < got.size(); i++) begin
      checks++;
      if (got[i] !== sent[i]) begin
        failures++;
        if (failures < 10) $display("entry %0d: got %h expected %h", i, got[i], sent[i]);
      end
    end
    checks++;
    if (n_arq == 0 || n_full == 0) begin failures++; $display("arq %0d full %0d: not exercised", n_arq, n_full); end
    $display("arq=%0d full-cycles=%0d", n_arq, n_full);
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
