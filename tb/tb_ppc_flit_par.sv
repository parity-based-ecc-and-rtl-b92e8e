// tb_ppc_flit_par: checks the flit parity tree against a bit-by-bit count of
// ones for random and corner-case 33-bit vectors.
module tb_ppc_flit_par;
  localparam int W = 33;
  logic [W-1:0] din;
  logic         par;
  int checks = 0, failures = 0;

  ppc_flit_par #(.W(W)) dut (.din, .par);

  task automatic check_one(input logic [W-1:0] v);
    int ones;
    din = v;
    #1;
    ones = 0;
    for (int i = 0; i < W; i++) if (v[i]) ones++;
    checks++;
    if (par !== logic'(ones % 2)) begin
      failures++;
      $display("din=%h par=%b expected %0d", v, par, ones % 2);
    end
  endtask

  initial begin
    check_one('0);
    check_one('1);
    for (int b = 0; b < W; b++) check_one((W)'(1) << b);
    for (int i = 0; i < 500; i++) check_one({$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
