// alu: arithmetic and control function unit (ALU1, ALU2).
//
// Does the modular addition and subtraction of residues, logical and arithmetic right shifts,
// and a case-select, the operations the processor description gives its two ALUs; it also
// carries the plain add/subtract with carry, left shift, bitwise logic and compares that
// multi-word binary arithmetic (the modular inverse, the sieve step) and the branch
// conditions need. Those extra operations, the opcodes and the carry flag are this design's
// choice.
//
// Sockets (offsets in the unit's window at BASE): +0 operand a, +1 operand m (modulus for
// MADD/MSUB, select flag for SEL), +16..+31 trigger, offset-16 = alu_op_e, bus value = b.
// An operand moved in the same cycle as the trigger is used by it. MADD and MSUB expect
// a, b < m.
//
// Timing: one trigger per cycle; the result is readable by a move in the next cycle and
// stays until the next trigger.
module alu
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_ALU   // socket window (0x20 ids)
) (
  input  logic      clk,
  input  logic      rst_n,
  input  mv_valid_t mv_valid,
  input  mv_dst_t   mv_dst,
  input  bus_t      bus,
  output word_t     result
);

  logic [NBUS-1:0] h_a, h_m;
  word_t a_q, m_q, a_n, m_n, b;
  trig_t trg;
  alu_op_e op;
  logic cy_q, cy_n;
  word_t r;
  logic [W:0] s, d;

  always_comb begin
    h_a = sock_hit(mv_valid, mv_dst, BASE + DSTW'(AL_A));
    h_m = sock_hit(mv_valid, mv_dst, BASE + DSTW'(AL_M));
    a_n = (|h_a) ? sock_val(h_a, bus) : a_q;
    m_n = (|h_m) ? sock_val(h_m, bus) : m_q;
    trg = trig_dec(mv_valid, mv_dst, BASE + DSTW'(AL_TRG), 16);
    op  = alu_op_e'(trg.off[3:0]);
    b   = bus[trg.bus];
  end

  always_comb begin
    r    = '0;
    cy_n = cy_q;
    s    = '0;
    d    = '0;
    unique case (op)
      AL_ADD:  begin s = {1'b0, a_n} + {1'b0, b};         r = s[W-1:0]; cy_n = s[W]; end
      AL_ADDC: begin s = {1'b0, a_n} + {1'b0, b} + (W+1)'(cy_q);
                     r = s[W-1:0]; cy_n = s[W]; end
      AL_SUB:  begin d = {1'b0, a_n} - {1'b0, b};         r = d[W-1:0]; cy_n = d[W]; end
      AL_SUBB: begin d = {1'b0, a_n} - {1'b0, b} - (W+1)'(cy_q);
                     r = d[W-1:0]; cy_n = d[W]; end
      AL_MADD: begin
        s = {1'b0, a_n} + {1'b0, b};
        r = (s >= {1'b0, m_n}) ? W'(s - {1'b0, m_n}) : s[W-1:0];
      end
      AL_MSUB: begin
        d = {1'b0, a_n} - {1'b0, b};
        r = d[W] ? d[W-1:0] + m_n : d[W-1:0];
      end
      AL_SHR:  r = a_n >> b[4:0];
      AL_SAR:  r = W'($signed(a_n) >>> b[4:0]);
      AL_SHL:  r = a_n << b[4:0];
      AL_AND:  r = a_n & b;
      AL_OR:   r = a_n | b;
      AL_XOR:  r = a_n ^ b;
      AL_EQ:   r = W'(a_n == b);
      AL_LTU:  r = W'(a_n < b);
      AL_SEL:  r = m_n[0] ? a_n : b;
      AL_CRY:  r = W'(cy_q);
    endcase
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_q <= '0; m_q <= '0; cy_q <= 1'b0; result <= '0;
    end else begin
      a_q <= a_n;
      m_q <= m_n;
      if (trg.hit) begin
        result <= r;
        cy_q   <= cy_n;
      end
    end

endmodule
