// tb_ppc_tfifo: runs random FIFO traffic (push, pop, row and column writes,
// clear) against a queue model and checks head, count, full/empty and random
// row and column reads every cycle.
module tb_ppc_tfifo;
  localparam int W = 33, D = 4;
  logic clk = 0, rst_n = 0;
  logic clear = 0, push = 0, pop = 0, row_wr = 0, col_wr = 0;
  logic [W-1:0] push_data = '0, head, row_rd_data, row_wr_data = '0;
  logic [2:0] count;
  logic full, empty;
  logic [1:0] row_rd_addr = '0, row_wr_addr = '0;
  logic [5:0] col_rd_addr = '0, col_wr_addr = '0;
  logic [D-1:0] col_rd_data, col_wr_data = '0;
  int checks = 0, failures = 0;
  logic [W-1:0] q[$];

  always #5 clk = ~clk;

  ppc_tfifo #(.W(W), .DEPTH(D)) dut (.*);

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("t=%0t %s", $time, what); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      int op;
      @(negedge clk);
      // check reads against the model
      row_rd_addr = 2'($urandom_range(0, D-1));
      col_rd_addr = 6'($urandom_range(0, W-1));
      #1;
      chk(count == 3'(q.size()), "count");
      chk(full == (q.size() == D) && empty == (q.size() == 0), "full/empty");
      if (q.size() > 0) chk(head == q[0], "head");
      if (int'(row_rd_addr) < q.size()) chk(row_rd_data == q[row_rd_addr], "row read");
      for (int i = 0; i < q.size(); i++) chk(col_rd_data[i] == q[i][col_rd_addr], "column read");
      // next operation
      push = 0; pop = 0; row_wr = 0; col_wr = 0; clear = 0;
      op = $urandom_range(0, 9);
      if (op < 4 && q.size() < D) begin
        push = 1; push_data = {$urandom(), $urandom()};
      end else if (op < 6 && q.size() > 0) begin
        row_wr = 1; row_wr_addr = 2'($urandom_range(0, q.size()-1)); row_wr_data = {$urandom(), $urandom()};
      end else if (op < 8 && q.size() > 0) begin
        col_wr = 1; col_wr_addr = 6'($urandom_range(0, W-1)); col_wr_data = 4'($urandom());
      end else if (op == 9 && $urandom_range(0, 9) == 0) begin
        clear = 1;
      end
      if (!clear && q.size() > 0 && $urandom_range(0, 3) == 0) pop = 1;
      @(posedge clk);
      // model update (writes use the rows before the pop)
      if (clear) q.delete();
      else begin
        if (row_wr) q[row_wr_addr] = row_wr_data;
        if (col_wr) for (int i = 0; i < q.size(); i++) begin
          logic [W-1:0] r;
          r = q[i];
          r[col_wr_addr] = col_wr_data[i];
          q[i] = r;
        end
        if (push) q.push_back(push_data);
        if (pop) void'(q.pop_front());
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
