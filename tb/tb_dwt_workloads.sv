// tb_dwt_workloads -- runs the transform unit on the picture sizes and
// filters of the published performance tables, one after the other:
// 176 x 144, 352 x 288 and 720 x 560 with the 4-4 polynomial filter and
// 352 x 288 with the 2-2 filter.  Each run must transform bit-exactly
// against the reference model, stay within a mean error of 1 of the exact
// transform, reconstruct its picture and stay within the
// cycle bound of this implementation and within 5% of the cycle count
// published for the original hardware; both counts are printed.  The 8-8 filter is left out: its
// extrapolating boundary rows have weights near 16, beyond the range of an
// 18-bit coefficient with 14 fraction bits.
module tb_dwt_workloads;
  logic clk = 0, ram_clk = 0, rst_n = 0;
  always #10 clk = ~clk;
  initial begin
    #15;
    forever begin ram_clk = 1; #5; ram_clk = 0; #5; end
  end

  localparam int NW = 4;
  logic [NW-1:0] go = '0, fin;
  int ck[NW], fl[NW];
  longint cy[NW];

  dwt_workload_run #(.W(176), .H(144), .NP(4), .NU(4), .PAPER_CYCLES(46000)) u_qcif (
    .clk, .ram_clk, .rst_n, .go(go[0]), .finished(fin[0]), .checks(ck[0]), .failures(fl[0]), .fw_cycles(cy[0]));
  dwt_workload_run #(.W(352), .H(288), .NP(2), .NU(2), .PAPER_CYCLES(152000)) u_cif22 (
    .clk, .ram_clk, .rst_n, .go(go[1]), .finished(fin[1]), .checks(ck[1]), .failures(fl[1]), .fw_cycles(cy[1]));
  dwt_workload_run #(.W(352), .H(288), .NP(4), .NU(4), .PAPER_CYCLES(160000)) u_cif44 (
    .clk, .ram_clk, .rst_n, .go(go[2]), .finished(fin[2]), .checks(ck[2]), .failures(fl[2]), .fw_cycles(cy[2]));
  dwt_workload_run #(.W(720), .H(560), .NP(4), .NU(4), .PAPER_CYCLES(586000)) u_720 (
    .clk, .ram_clk, .rst_n, .go(go[3]), .finished(fin[3]), .checks(ck[3]), .failures(fl[3]), .fw_cycles(cy[3]));

  int checks = 0, failures = 0;

  initial begin
    #(20 * 8000000);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < NW; i++) begin
      go[i] = 1;
      wait (fin[i]);
    end
    for (int i = 0; i < NW; i++) begin
      checks += ck[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
