// fetch: instruction fetch and PC control.
//
// Holds the program counter and drives the instruction RAM, which reads synchronously. A
// start pulse begins a program at address 0. Each cycle the word at PC is read and, one cycle
// later, executed; PC then steps by one, or takes the target of a jump request from a JMP
// unit (the lowest-numbered requesting unit wins). Because the next word is already being
// read when a jump executes, the instruction after a jump (the delay slot) still executes. A
// halt request stops the program at once: its delay slot is dropped and done is raised until
// the next start. The pipeline shape and the start/done handshake are this design's choice;
// the processor description only names the fetch and PC control units.
//
// Timing: start in cycle t; the instruction at 0 executes in cycle t+2.
module fetch
  import tta_pkg::*;
(
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [NJMP-1:0]           jump,
  input  logic [NJMP-1:0][PCW-1:0]  target,
  input  logic [NJMP-1:0]           halt,
  output logic [PCW-1:0]            imem_addr,
  output logic                      imem_en,
  output logic                      ir_valid,   // the instruction RAM output is to execute
  output logic                      busy,
  output logic                      done
);

  logic [PCW-1:0] pc;
  logic           running;
  logic           any_halt;
  logic           take;
  logic [PCW-1:0] tgt;

  always_comb begin
    any_halt = ir_valid && (|halt);
    take     = 1'b0;
    tgt      = '0;
    for (int u = NJMP - 1; u >= 0; u--)
      if (ir_valid && jump[u]) begin take = 1'b1; tgt = target[u]; end
  end

  assign imem_addr = pc;
  assign imem_en   = running;
  assign busy      = running || ir_valid;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pc <= '0; running <= 1'b0; ir_valid <= 1'b0; done <= 1'b0;
    end else if (start) begin
      pc <= '0; running <= 1'b1; ir_valid <= 1'b0; done <= 1'b0;
    end else if (any_halt) begin
      running <= 1'b0; ir_valid <= 1'b0; done <= 1'b1;
    end else begin
      ir_valid <= running;
      if (running) pc <= take ? tgt : pc + 1'b1;
    end

endmodule
