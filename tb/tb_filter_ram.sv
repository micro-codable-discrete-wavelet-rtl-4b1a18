// tb_filter_ram -- writes every word of every bank with distinct values and
// reads rows back: all banks of a row come out together one cycle after
// the address; rewriting one bank changes only that bank.
module tb_filter_ram;
  localparam int B = 4, D = 88, W = 18;
  logic clk = 0;
  always #10 clk = ~clk;
  logic we = 0;
  logic [1:0] wr_bank = '0;
  logic [$clog2(D)-1:0] wr_addr = '0, rd_addr = '0;
  logic [W-1:0] wr_data = '0;
  logic [B-1:0][W-1:0] rd_data;

  filter_ram #(.BANKS(B), .DEPTH(D), .WIDTH(W)) dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [W-1:0] val(int b, int a, int salt);
    return W'(a * 977 + b * 131 + salt * 7919 + 5);
  endfunction

  initial begin
    #(20 * 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int a = 0; a < D; a++)
      for (int b = 0; b < B; b++) begin
        @(negedge clk);
        we = 1; wr_bank = 2'(b); wr_addr = 7'(a); wr_data = val(b, a, 0);
      end
    @(negedge clk) we = 0;
    for (int a = D - 1; a >= 0; a--) begin
      @(negedge clk) rd_addr = 7'(a);
      @(negedge clk);
      for (int b = 0; b < B; b++) begin
        checks++;
        if (rd_data[b] != val(b, a, 0)) begin
          failures++;
          if (failures < 10) $display("FAIL bank %0d addr %0d: %h", b, a, rd_data[b]);
        end
      end
    end
    @(negedge clk);
    we = 1; wr_bank = 2; wr_addr = 7'(10); wr_data = val(2, 10, 1);
    @(negedge clk) begin we = 0; rd_addr = 7'(10); end
    @(negedge clk);
    for (int b = 0; b < B; b++) begin
      checks++;
      if (rd_data[b] != val(b, 10, b == 2 ? 1 : 0)) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
