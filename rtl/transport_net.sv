// transport_net: the NBUS 32-bit transport buses.
//
// Each bus carries one value per cycle from a source socket (a result register of a function
// unit, an RF register, the Cond Reg) or from its slot's long immediate to the destination
// sockets that decode the move. Four buses of 32 bits follow the processor description, which
// sizes them to keep the four MMACs busy; the source numbering is this design's own (tta_pkg).
// A source id with no socket drives 0.
//
// Timing: combinational; destination sockets latch the bus at the end of the cycle.
module transport_net
  import tta_pkg::*;
(
  input  word_t [NSRC-1:0]           src_val,   // value of every source socket, by id
  input  logic  [NBUS-1:0]           mv_imm,
  input  logic  [NBUS-1:0][SRCW-1:0] mv_src,
  input  bus_t                       mv_immval,
  output bus_t                       bus
);

  always_comb
    for (int j = 0; j < NBUS; j++)
      if (mv_imm[j])                   bus[j] = mv_immval[j];
      else if (mv_src[j] < SRCW'(NSRC)) bus[j] = src_val[mv_src[j]];
      else                             bus[j] = '0;

endmodule
