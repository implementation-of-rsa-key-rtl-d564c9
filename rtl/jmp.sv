// jmp: jump, branch and loop function unit (JMP1..JMP3).
//
// The program counter is changed only by these units, as in the processor description, which
// gives them jump, branch and loop operations. Each unit has its own loop counter, so three
// loops can be nested without spending registers. The trigger's bus value is the target
// address. Opcodes and the loop semantics are this design's choice:
//   JMP  always jump;  BT jump if cond = 1;  BF jump if cond = 0;
//   LOOP count <= count - 1, jump if the new count is not zero (a body run count times ends
//        with LOOP, after the counter was loaded with count);
//   HALT stop the program.
// Sockets (offsets in the unit's window at BASE): +0 loop counter, +1 JMP, +2 BT, +3 BF,
// +4 LOOP, +5 HALT.
//
// Timing: the request is combinational in the trigger cycle and the fetch unit takes it at
// the end of that cycle, so one instruction (the delay slot) still executes before the
// target. A counter moved in the same cycle as LOOP is used by it.
module jmp
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_JMP   // socket window (0x08 ids)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  mv_valid_t      mv_valid,
  input  mv_dst_t        mv_dst,
  input  bus_t           bus,
  input  logic           cond,
  output logic           jump,     // take target at the end of this cycle
  output logic [PCW-1:0] target,
  output logic           halt
);

  logic [NBUS-1:0] h_c;
  word_t cnt_q, cnt_n, cnt_dec;
  trig_t trg;

  always_comb begin
    h_c     = sock_hit(mv_valid, mv_dst, BASE + DSTW'(JP_CNT));
    cnt_n   = (|h_c) ? sock_val(h_c, bus) : cnt_q;
    trg     = trig_dec(mv_valid, mv_dst, BASE + DSTW'(JP_JMP), 5);
    target  = PCW'(bus[trg.bus]);
    cnt_dec = cnt_n - 1'b1;
    jump    = 1'b0;
    halt    = 1'b0;
    if (trg.hit)
      unique case (int'(trg.off) + JP_JMP)
        JP_JMP:  jump = 1'b1;
        JP_BT:   jump = cond;
        JP_BF:   jump = !cond;
        JP_LOOP: jump = (cnt_dec != '0);
        JP_HALT: halt = 1'b1;
        default: ;
      endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) cnt_q <= '0;
    else if (trg.hit && int'(trg.off) + JP_JMP == JP_LOOP) cnt_q <= cnt_dec;
    else cnt_q <= cnt_n;

endmodule
