// filter_ram -- banked coefficient RAM for the predict filter or the update
// (lifting) filter.
//
// Each of the BANKS banks feeds one multiplier, so the BANKS coefficients of
// one filter row come out together in one cycle from a single row address.
// The RAM is written one word at a time (bank, address, data) by whoever
// loads the filters, normally once after power-up; filters can be replaced
// between transforms.  Reads are synchronous: rd_data holds the row addressed
// in the previous cycle.  Written with behavioural arrays, it maps onto block
// RAM or distributed RAM.
module filter_ram #(
  parameter int BANKS = 4,
  parameter int DEPTH = 3,
  parameter int WIDTH = 18
) (
  input  logic                           clk,
  input  logic                           we,
  input  logic [$clog2(BANKS)-1:0]       wr_bank,
  input  logic [$clog2(DEPTH)-1:0]       wr_addr,
  input  logic [WIDTH-1:0]               wr_data,
  input  logic [$clog2(DEPTH)-1:0]       rd_addr,
  output logic [BANKS-1:0][WIDTH-1:0]    rd_data
);
  for (genvar b = 0; b < BANKS; b++) begin : g_bank
    logic [WIDTH-1:0] mem [DEPTH];
    always_ff @(posedge clk) begin
      if (we && wr_bank == b) mem[wr_addr] <= wr_data;
      rd_data[b] <= mem[rd_addr];
    end
  end
endmodule
