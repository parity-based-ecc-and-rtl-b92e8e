// tb_ppc_mask: random stored flits with a single flipped bit at a random
// (flit, bit) crossing; the mask must restore the original data word when
// enabled, leave every other flit alone, and pass data unchanged when
// disabled.
module tb_ppc_mask;
  localparam int N = 32, M = 4;
  logic en;
  logic [1:0] row_idx;
  logic [N:0] row, seu_p;
  logic [M:0] seu_f;
  logic [N-1:0] dout;
  int checks = 0, failures = 0;

  ppc_mask #(.N(N), .M(M)) dut (.en, .row_idx, .row, .seu_p, .seu_f, .dout);

  initial begin
    for (int t = 0; t < 400; t++) begin
      logic [N:0] orig;
      int fb, bb, r;
      orig = {$urandom(), $urandom()};
      fb = $urandom_range(0, M);        // flit holding the flip (M = parity flit)
      bb = $urandom_range(0, N);        // bit index of the flip
      r  = $urandom_range(0, M-1);      // flit being read
      seu_f = '0; seu_f[fb] = 1'b1;
      seu_p = '0; seu_p[bb] = 1'b1;
      row_idx = 2'(r);
      row = (r == fb) ? orig ^ seu_p : orig;
      en = 1'b1;
      #1;
      checks++;
      if (dout !== orig[N-1:0]) begin
        failures++;
        $display("en=1 fb=%0d bb=%0d r=%0d dout=%h expected %h", fb, bb, r, dout, orig[N-1:0]);
      end
      en = 1'b0;
      #1;
      checks++;
      if (dout !== row[N-1:0]) begin
        failures++;
        $display("en=0 dout=%h expected %h", dout, row[N-1:0]);
      end
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
