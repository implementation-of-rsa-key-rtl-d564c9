// decoder: splits a TTA instruction into its per-bus moves.
//
// A TTA instruction holds no opcodes, only one move slot per bus (slot j in bits
// [j*SLOTW +: SLOTW]). The decoder gates every slot with the fetch unit's valid, passes each
// move's destination id to the function units, and for each bus gives the transport network
// either the slot's long immediate or its source id. It also flags programs that break the
// move rules: two moves to the same destination in one cycle, or a source id that no socket
// has. The slot format is this design's own (see tta_pkg).
//
// Timing: combinational.
module decoder
  import tta_pkg::*;
(
  input  logic [INSTRW-1:0]          instr,
  input  logic                       ir_valid,
  output mv_valid_t                  mv_valid,
  output mv_dst_t                    mv_dst,
  output logic [NBUS-1:0]            mv_imm,
  output logic [NBUS-1:0][SRCW-1:0]  mv_src,
  output bus_t                       mv_immval,
  output logic                       err_dst_clash,
  output logic                       err_bad_src
);

  slot_t [NBUS-1:0] s;

  always_comb begin
    s             = instr;
    err_dst_clash = 1'b0;
    err_bad_src   = 1'b0;
    for (int j = 0; j < NBUS; j++) begin
      mv_valid[j]  = ir_valid && s[j].valid;
      mv_dst[j]    = s[j].dst;
      mv_imm[j]    = s[j].imm;
      mv_src[j]    = s[j].imm ? '0 : s[j].src[SRCW-1:0];
      mv_immval[j] = s[j].imm ? s[j].src : '0;
      if (mv_valid[j] && !s[j].imm && s[j].src >= W'(NSRC)) err_bad_src = 1'b1;
    end
    for (int j = 0; j < NBUS; j++)
      for (int k = j + 1; k < NBUS; k++)
        if (mv_valid[j] && mv_valid[k] && mv_dst[j] == mv_dst[k]) err_dst_clash = 1'b1;
  end

endmodule
