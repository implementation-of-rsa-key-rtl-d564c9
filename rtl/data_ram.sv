// data_ram: dual-port synchronous word memory, used for Data RAM1..3 and for Table1.
//
// Each LDST unit has an independent data RAM, and the LUT unit keeps its pre-computed
// constants in Table1; the processor description gives neither their size nor their ports.
// This design uses one memory module for all four: port A belongs to the function unit,
// port B to the host, which loads operands and constants and reads results while the program
// is stopped. Both ports read synchronously: the word at the address given in cycle t is on
// the port's rdata after the clock edge ending t, and it stays there until the next read of
// that port. A write does not change rdata. The depth (1024 words) is this design's choice.
module data_ram
  import tta_pkg::*;
#(
  parameter int unsigned DEPTH = 1024,
  parameter int unsigned AW    = $clog2(DEPTH)
) (
  input  logic          clk,
  // port A: function unit
  input  logic          a_en,
  input  logic          a_we,
  input  logic [AW-1:0] a_addr,
  input  word_t         a_wdata,
  output word_t         a_rdata,
  // port B: host
  input  logic          b_en,
  input  logic          b_we,
  input  logic [AW-1:0] b_addr,
  input  word_t         b_wdata,
  output word_t         b_rdata
);

  word_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (a_en) begin
      if (a_we) mem[a_addr] <= a_wdata;
      else      a_rdata     <= mem[a_addr];
    end
    if (b_en) begin
      if (b_we) mem[b_addr] <= b_wdata;
      else      b_rdata     <= mem[b_addr];
    end
  end

endmodule
