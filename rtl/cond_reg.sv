// cond_reg: the one-bit condition register that guards branches.
//
// A move to D_COND sets the flag to 1 when the moved value is non-zero and to 0 otherwise,
// so an ALU compare result (0 or 1), a shifted-out exponent bit or a whole word can be tested.
// The flag feeds the JMP units' conditional branches and is also a bus source (0 or 1). The
// processor description only names the Cond Reg; this behaviour is this design's choice.
//
// Timing: a value moved in cycle t is seen by a branch triggered in cycle t+1 or later.
module cond_reg
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_COND
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mv_valid_t mv_valid,
  input  mv_dst_t   mv_dst,
  input  bus_t      bus,
  output logic      cond
);

  logic [NBUS-1:0] h;
  always_comb h = sock_hit(mv_valid, mv_dst, BASE);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  cond <= 1'b0;
    else if (|h) cond <= |sock_val(h, bus);

endmodule
