// tb_picture_ram -- test of the double-pumped dual-port picture RAM.
//
// Every cycle both ports write (random enables) and both ports read, with a
// bias toward reading addresses written in the same cycle.  A model array
// updated with the writes of cycle t must give the data seen on ra_data /
// rb_data in cycle t+1 (writes happen in the high half before the reads in
// the low half).  Inputs change just after the sys_clk edge, as they
// would from registers.  Counts cycles with two writes and two reads.
module tb_picture_ram;
  localparam int W = 16, WORDS = 256, AW = 8;
  logic sys_clk = 0, ram_clk = 0;
  always #10 sys_clk = ~sys_clk;
  initial begin
    #15;
    forever begin ram_clk = 1; #5; ram_clk = 0; #5; end
  end

  logic wa_en = 0, wb_en = 0;
  logic [AW-1:0] wa_addr = '0, wb_addr = '0, ra_addr = '0, rb_addr = '0;
  logic [W-1:0] wa_data = '0, wb_data = '0, ra_data, rb_data;

  picture_ram #(.WIDTH(W), .WORDS(WORDS)) dut (.*);

  int checks = 0, failures = 0, n_quad = 0;
  logic [W-1:0] model [WORDS];
  logic [W-1:0] exp_a, exp_b;

  initial begin
    #(20 * 100000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    // initialise memory through both ports
    for (int a = 0; a < WORDS; a += 2) begin
      @(posedge sys_clk); #1;
      wa_en = 1; wb_en = 1; wa_addr = AW'(a); wb_addr = AW'(a + 1);
      wa_data = W'(a * 3); wb_data = W'((a + 1) * 3);
      model[a] = W'(a * 3); model[a + 1] = W'((a + 1) * 3);
    end
    for (int t = 0; t < 2000; t++) begin
      @(posedge sys_clk); #1;
      wa_en = ($urandom_range(3) != 0);
      wb_en = ($urandom_range(3) != 0);
      wa_addr = AW'($urandom);
      wb_addr = AW'($urandom);
      if (wb_addr == wa_addr) wb_addr = wa_addr + 1'b1;
      wa_data = W'($urandom);
      wb_data = W'($urandom);
      ra_addr = ($urandom_range(1) == 1) ? wa_addr : AW'($urandom);
      rb_addr = ($urandom_range(1) == 1) ? wb_addr : AW'($urandom);
      if (wa_en) model[wa_addr] = wa_data;
      if (wb_en) model[wb_addr] = wb_data;
      if (wa_en && wb_en) n_quad++;
      exp_a = model[ra_addr];
      exp_b = model[rb_addr];
      @(posedge sys_clk); #1;
      wa_en = 0; wb_en = 0;
      checks += 2;
      if (ra_data != exp_a) begin failures++; if (failures < 10) $display("FAIL A t=%0d %h exp %h", t, ra_data, exp_a); end
      if (rb_data != exp_b) begin failures++; if (failures < 10) $display("FAIL B t=%0d %h exp %h", t, rb_data, exp_b); end
    end
    checks++;
    if (n_quad == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
