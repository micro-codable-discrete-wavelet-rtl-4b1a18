// tb_data_fifo -- random push/pop traffic against a queue model: order,
// first-word-fall-through head, count, empty/full flags and clear.
module tb_data_fifo;
  localparam int W = 16, D = 16;
  logic clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  logic clear = 0, push = 0, pop = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  logic [$clog2(D+1)-1:0] count;

  data_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [W-1:0] q[$];
  int n_full = 0;

  task automatic chk(bit c, string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL: %s", s); end
  endtask

  initial begin
    #(20 * 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      chk(int'(count) == q.size(), "count");
      chk(empty == (q.size() == 0), "empty");
      chk(full == (q.size() == D), "full");
      if (q.size() > 0) chk(rd_data == q[0], "head");
      if (full) n_full++;
      // bias towards filling in the first half, draining in the second
      push = !full && ($urandom_range(9) < ((t % 600) < 300 ? 8 : 3));
      pop  = !empty && ($urandom_range(9) < ((t % 600) < 300 ? 3 : 8));
      wr_data = W'($urandom);
      @(posedge clk);
      if (pop) void'(q.pop_front());
      if (push) q.push_back(wr_data);
    end
    @(negedge clk) begin push = 0; pop = 0; clear = 1; end
    @(negedge clk) clear = 0;
    q.delete();
    chk(empty && count == 0, "clear");
    chk(n_full > 0, "reached full");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
