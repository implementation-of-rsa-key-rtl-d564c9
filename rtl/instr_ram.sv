// instr_ram: program memory of the processor.
//
// One INSTRW-bit instruction (NBUS move slots) per address. The fetch unit reads it
// synchronously: the word at the address given in cycle t is on rdata after the clock edge
// ending t and stays until the next read. A separate write port lets the host load a program.
// The processor description names the instruction RAM only; its depth (2^PCW) and ports are
// this design's choice.
module instr_ram
  import tta_pkg::*;
#(
  parameter int unsigned DEPTH = 1 << PCW
) (
  input  logic                     clk,
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output logic [INSTRW-1:0]        rdata,
  input  logic                     wr_en,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  logic [INSTRW-1:0]        wdata
);

  logic [INSTRW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_addr] <= wdata;
    if (rd_en) rdata <= mem[rd_addr];
  end

endmodule
