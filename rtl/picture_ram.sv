// picture_ram -- dual-port picture memory accessed twice per system cycle.
//
// A true dual-port RAM (ports A and B) is clocked by ram_clk, which runs at
// twice the system clock, so each port can be used once in every half of a
// system cycle: four accesses per cycle in total.  The address and
// write-enable multiplexers in front of each port are steered by the system
// clock level itself:
//   * high half of sys_clk: the port's write request (wa_* / wb_*) is applied;
//     the memory is written only if its enable is set;
//   * low half of sys_clk:  the port's read address (ra_addr / rb_addr) is
//     applied and the word is registered at the RAM output; the next
//     rising edge of sys_clk copies it into ra_data / rb_data, so the
//     system logic sees it for one whole cycle.
// Port A carries the lambda read and the predict-output write, port B the
// gamma read and the update-output write.
//
// Timing seen from sys_clk: requests change right after a rising sys_clk
// edge.  A write presented in cycle t is performed in the high half of t;
// a read address presented in cycle t is read in the low half of t and its
// data is on ra_data / rb_data throughout cycle t+1 (one-cycle latency).
// A read in the same cycle as a write to the same address returns the new
// data.  The data outputs only change on read edges (no-change mode), so
// they hold through the following write half.  ram_clk must have a rising
// edge inside each half of sys_clk, as in a 2x clock whose rising edges sit
// mid-way through each half.  The data-path width, the write-first
// ordering inside a cycle, the no-change output and the output register on
// sys_clk are this design's choices; the double-pumped use of the two ports is as described.
module picture_ram #(
  parameter int WIDTH = 16,
  parameter int WORDS = 64 * 32,
  localparam int AW   = $clog2(WORDS)
) (
  input  logic             sys_clk,
  input  logic             ram_clk,
  // write requests, applied in the high half of sys_clk
  input  logic             wa_en,
  input  logic [AW-1:0]    wa_addr,
  input  logic [WIDTH-1:0] wa_data,
  input  logic             wb_en,
  input  logic [AW-1:0]    wb_addr,
  input  logic [WIDTH-1:0] wb_data,
  // read addresses, applied in the low half of sys_clk
  input  logic [AW-1:0]    ra_addr,
  input  logic [AW-1:0]    rb_addr,
  output logic [WIDTH-1:0] ra_data,
  output logic [WIDTH-1:0] rb_data
);
  logic [WIDTH-1:0] mem [WORDS];

  // Per-port address multiplexer and write strobe (picture RAM control logic).
  logic [AW-1:0] addr_a, addr_b;
  logic          we_a, we_b;
  always_comb begin
    addr_a = sys_clk ? wa_addr : ra_addr;
    addr_b = sys_clk ? wb_addr : rb_addr;
    we_a   = sys_clk & wa_en;
    we_b   = sys_clk & wb_en;
  end

  logic [WIDTH-1:0] dout_a, dout_b;

  always_ff @(posedge ram_clk) begin
    if (we_a) mem[addr_a] <= wa_data;
    if (we_b) mem[addr_b] <= wb_data;
    if (!sys_clk) begin
      dout_a <= mem[addr_a];
      dout_b <= mem[addr_b];
    end
  end

  always_ff @(posedge sys_clk) begin
    ra_data <= dout_a;
    rb_data <= dout_b;
  end
endmodule
