// tta_asm_pkg: tiny assembler for testbench programs of the TTA processor.
//
// Builds move slots and instructions in the format of tta_pkg: mv() moves a source socket to a
// destination socket, im() moves a 32-bit long immediate, and ins() packs up to four slots
// into one instruction (slot 0 = bus 0). Socket-id helpers name the sockets of each unit.
// tta_sched is a small list scheduler for straight-line programs: a caller adds a group of
// moves at fixed cycle offsets, each optionally claiming a function unit's trigger, and the
// scheduler places the group at the earliest start cycle where every move finds a free bus,
// no destination is written twice and no unit is triggered twice in one cycle. Keeping
// values alive between groups (a result that must not be overwritten) is the caller's job.
package tta_asm_pkg;
  import tta_pkg::*;

  localparam slot_t NOP = '0;

  function automatic slot_t mv(input logic [DSTW-1:0] dst, input logic [SRCW-1:0] src);
    slot_t s;
    s = '0; s.valid = 1'b1; s.dst = dst; s.src = W'(src);
    return s;
  endfunction

  function automatic slot_t im(input logic [DSTW-1:0] dst, input word_t val);
    slot_t s;
    s = '0; s.valid = 1'b1; s.imm = 1'b1; s.dst = dst; s.src = val;
    return s;
  endfunction

  function automatic logic [INSTRW-1:0] ins(input slot_t s0 = NOP, input slot_t s1 = NOP,
                                            input slot_t s2 = NOP, input slot_t s3 = NOP);
    return {s3, s2, s1, s0};
  endfunction

  // destination sockets
  function automatic logic [DSTW-1:0] d_rf(input int r);   return D_RF + DSTW'(r); endfunction
  function automatic logic [DSTW-1:0] d_mm(input int n, input int sock);
    return D_MMAC + DSTW'(n * 'h40 + sock);
  endfunction
  function automatic logic [DSTW-1:0] d_mm_trg(input int n, input mmac_op_e op,
                                               input int asel = 0, input bit bsel = 0);
    return D_MMAC + DSTW'(n * 'h40 + MM_TRG + asel * 8 + int'(bsel) * 4 + int'(op));
  endfunction
  function automatic logic [DSTW-1:0] d_al(input int n, input int sock);
    return D_ALU + DSTW'(n * 'h20 + sock);
  endfunction
  function automatic logic [DSTW-1:0] d_al_trg(input int n, input alu_op_e op);
    return D_ALU + DSTW'(n * 'h20 + AL_TRG + int'(op));
  endfunction
  function automatic logic [DSTW-1:0] d_ls(input int n, input int sock);
    return D_LDST + DSTW'(n * 'h08 + sock);
  endfunction
  function automatic logic [DSTW-1:0] d_lu(input int sock); return D_LUT + DSTW'(sock); endfunction
  function automatic logic [DSTW-1:0] d_jp(input int n, input int sock);
    return D_JMP + DSTW'(n * 'h08 + sock);
  endfunction

  // source sockets
  function automatic logic [SRCW-1:0] s_rf(input int r);   return S_RF + SRCW'(r);   endfunction
  function automatic logic [SRCW-1:0] s_mm(input int n);   return S_MMAC + SRCW'(n); endfunction
  function automatic logic [SRCW-1:0] s_al(input int n);   return S_ALU + SRCW'(n);  endfunction
  function automatic logic [SRCW-1:0] s_ls(input int n);   return S_LDST + SRCW'(n); endfunction

  // ------------------------------------------------------------------ list scheduler
  // Places groups of moves with fixed relative cycle offsets (one operation chain of a
  // program) at the earliest start cycle where every move finds a free bus and every function
  // unit it triggers is not triggered by another move in that cycle. Units are numbered
  // U_LDST+n, U_LUT, U_MMAC+n, U_ALU+n, U_JMP; -1 marks a move that triggers nothing.
  localparam int U_LDST = 0, U_LUT = 3, U_MMAC = 4, U_ALU = 8, U_JMP = 10, NUNIT = 11;
  localparam int MAXI = 1 << PCW;

  typedef struct {
    int    off;
    slot_t s;
    int    unit;
  } mv_t;

  class tta_sched;
    logic [INSTRW-1:0] prog [MAXI];
    int                nbus [MAXI];
    bit [NUNIT-1:0]    used [MAXI];
    mv_t               grp  [$];
    int                last;          // last cycle holding a move

    function new();
      for (int c = 0; c < MAXI; c++) begin prog[c] = '0; nbus[c] = 0; used[c] = '0; end
      last = -1;
    endfunction

    function void add(int off, slot_t s, int unit = -1);
      mv_t m;
      m.off = off; m.s = s; m.unit = unit;
      grp.push_back(m);
    endfunction

    function bit fits(int t);
      int nb [int];
      bit [NUNIT-1:0] u [int];
      foreach (grp[k]) begin
        int c;
        c = t + grp[k].off;
        if (c < 0 || c >= MAXI) return 0;
        if (!nb.exists(c)) begin nb[c] = nbus[c]; u[c] = used[c]; end
        if (nb[c] >= NBUS) return 0;
        for (int j = 0; j < nbus[c]; j++) begin
          slot_t o;
          o = prog[c][j * SLOTW +: SLOTW];
          if (o.dst == grp[k].s.dst) return 0;
        end
        if (grp[k].unit >= 0) begin
          if (u[c][grp[k].unit]) return 0;
          u[c][grp[k].unit] = 1'b1;
        end
        nb[c]++;
      end
      return 1;
    endfunction

    // Commits the current group at the earliest start >= t0 that fits; returns that start.
    function int place(int t0);
      int t;
      t = t0;
      while (!fits(t)) begin
        t++;
        if (t >= MAXI) begin
          $display("scheduler: program does not fit in %0d instructions", MAXI);
          return -1;
        end
      end
      foreach (grp[k]) begin
        int c;
        c = t + grp[k].off;
        prog[c][nbus[c] * SLOTW +: SLOTW] = grp[k].s;
        nbus[c]++;
        if (grp[k].unit >= 0) used[c][grp[k].unit] = 1'b1;
        if (c > last) last = c;
      end
      grp.delete();
      return t;
    endfunction
  endclass

endpackage
