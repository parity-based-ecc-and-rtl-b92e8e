// tb_ppc_pack_par: accumulates random packets of flits and compares the
// register with an XOR computed in the testbench; also checks clear and the
// in-place update port.
module tb_ppc_pack_par;
  localparam int W = 33;
  logic clk = 0, rst_n = 0, clear = 0, acc_en = 0, upd_en = 0;
  logic [W-1:0] flit_in = '0, upd_mask = '0, acc_q, model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  ppc_pack_par #(.W(W)) dut (.clk, .rst_n, .clear, .acc_en, .flit_in, .upd_en, .upd_mask, .acc_q);

  task automatic step(input bit c, input bit a, input logic [W-1:0] f, input bit u, input logic [W-1:0] um);
    @(negedge clk);
    clear = c; acc_en = a; flit_in = f; upd_en = u; upd_mask = um;
    @(posedge clk); #1;
    if (c) model = '0;
    else begin
      if (a) model ^= f;
      if (u) model ^= um;
    end
    checks++;
    if (acc_q !== model) begin
      failures++;
      $display("acc_q=%h expected %h", acc_q, model);
    end
  endtask

  initial begin
    model = '0;
    #12 rst_n = 1;
    for (int p = 0; p < 50; p++) begin
      step(1'b1, 1'b1, {$urandom(), $urandom()}, 1'b0, '0);   // clear wins
      for (int i = 0; i < 5; i++)
        step(1'b0, $urandom_range(0, 3) != 0, {$urandom(), $urandom()},
             $urandom_range(0, 3) == 0, {$urandom(), $urandom()});
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
