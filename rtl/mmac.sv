// mmac: modular multiply / multiply-accumulate function unit (one of MMAC1..MMAC4).
//
// Computes one 32 x 32-bit modular product per cycle for one residue channel of the RNS
// Montgomery multiplication: a*b mod m, (a*b + c) mod m, and a running sum of products
// acc = (acc + a*b) mod m, which is what the base extension and the q*N accumulation need.
// Four of these units run side by side on the four buses; that much, and the two operation
// kinds, follow the processor description. How the reduction is done is this design's choice:
// the RNS moduli are taken to be pseudo-Mersenne, m = 2^32 - cm with cm < 2^CMW, so a 64-bit
// product folds as hi*2^32 + lo == hi*cm + lo (mod m) and no divider is needed. Any 32-bit a,
// b and c are reduced correctly; the unit asserts that the modulus is of the allowed form.
//
// Sockets (offsets in the unit's window at BASE): +0 operand a, +1 addend c, +2 modulus m,
// +32..+63 trigger. The trigger's bus value is b; the trigger offset-32 is
// {asel[1:0], bsel, op[1:0]}: asel 0 takes a from the a socket, 1..3 from the load result of
// LDST1..3 over the direct path; bsel 1 takes b from the LUT read result over the direct path
// instead of the bus. An operand moved in the same cycle as the trigger is used by it.
//
// Timing: fully pipelined, one trigger per cycle. A trigger moved in cycle t gives a result
// that a move in cycle t+3 can read; the result stays until the next result arrives.
module mmac
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_MMAC,  // socket window (0x40 ids)
  parameter int unsigned     CMW  = 16       // width of cm = 2^32 - m
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  mv_valid_t             mv_valid,
  input  mv_dst_t               mv_dst,
  input  bus_t                  bus,
  input  word_t [NLDST-1:0]     ldst_dir,   // direct paths from LDST1..3 load results
  input  word_t                 lut_dir,    // direct path from the LUT read result
  output word_t                 result
);

  // ---------------------------------------------------------------- operand sockets
  logic [NBUS-1:0] h_a, h_c, h_m;
  word_t a_q, c_q, m_q, a_n, c_n, m_n;
  trig_t trg;

  always_comb begin
    h_a = sock_hit(mv_valid, mv_dst, BASE + DSTW'(MM_A));
    h_c = sock_hit(mv_valid, mv_dst, BASE + DSTW'(MM_C));
    h_m = sock_hit(mv_valid, mv_dst, BASE + DSTW'(MM_M));
    a_n = (|h_a) ? sock_val(h_a, bus) : a_q;
    c_n = (|h_c) ? sock_val(h_c, bus) : c_q;
    m_n = (|h_m) ? sock_val(h_m, bus) : m_q;
    trg = trig_dec(mv_valid, mv_dst, BASE + DSTW'(MM_TRG), 32);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      a_q <= '0; c_q <= '0; m_q <= '1;
    end else begin
      a_q <= a_n; c_q <= c_n; m_q <= m_n;
    end

  // ---------------------------------------------------------------- stage 1: capture
  logic [1:0]  asel;
  logic        bsel;
  mmac_op_e    op;
  word_t       a_e, b_e;

  always_comb begin
    asel = trg.off[4:3];
    bsel = trg.off[2];
    op   = mmac_op_e'(trg.off[1:0]);
    a_e  = (asel == 2'd0) ? a_n : ldst_dir[asel - 2'd1];
    b_e  = bsel ? lut_dir : bus[trg.bus];
  end

  logic          s1_v, s2_v;
  mmac_op_e      s1_op, s2_op;
  word_t         s1_a, s1_b, s1_c, s1_m, s2_m;
  logic [33:0]   s2_f;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s1_v <= 1'b0; s1_op <= MM_MUL;
      s1_a <= '0; s1_b <= '0; s1_c <= '0; s1_m <= '1;
    end else begin
      s1_v  <= trg.hit;
      s1_op <= op;
      if (trg.hit) begin
        s1_a <= a_e;
        s1_b <= b_e;
        s1_c <= (op == MM_MADD) ? c_n : '0;
        s1_m <= m_n;
      end
    end

  // ------------------------------------------------- stage 2: multiply and fold twice
  logic [63:0]   prod;
  logic [CMW-1:0] s1_cm;
  logic [48:0]   f1;
  logic [33:0]   f2;

  always_comb begin
    s1_cm = CMW'(W'(0) - s1_m);
    prod  = 64'(s1_a) * 64'(s1_b) + 64'(s1_c);
    f1    = 49'(prod[63:32]) * 49'(s1_cm) + 49'(prod[31:0]);
    f2    = 34'(f1[48:32]) * 34'(s1_cm) + 34'(f1[31:0]);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      s2_v <= 1'b0; s2_op <= MM_MUL; s2_f <= '0; s2_m <= '1;
    end else begin
      s2_v  <= s1_v;
      s2_op <= s1_op;
      if (s1_v) begin
        s2_f <= f2;
        s2_m <= s1_m;
      end
    end

  // --------------------------------------- stage 3: last fold, correction, accumulate
  logic [CMW-1:0] s2_cm;
  logic [32:0]    f3, sacc;
  word_t          acc_q, r_mod, r_acc;

  always_comb begin
    s2_cm = CMW'(W'(0) - s2_m);
    f3    = 33'(s2_f[33:32]) * 33'(s2_cm) + 33'(s2_f[31:0]);
    r_mod = (f3 >= {1'b0, s2_m}) ? W'(f3 - {1'b0, s2_m}) : f3[W-1:0];
    sacc  = {1'b0, r_mod} + {1'b0, acc_q};
    r_acc = (sacc >= {1'b0, s2_m}) ? W'(sacc - {1'b0, s2_m}) : sacc[W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      result <= '0; acc_q <= '0;
    end else if (s2_v) begin
      unique case (s2_op)
        MM_MUL, MM_MADD: result <= r_mod;
        MM_MACC: begin result <= r_acc; acc_q <= r_acc; end
        MM_MINI: begin result <= r_mod; acc_q <= r_mod; end
      endcase
    end

  // The modulus must be pseudo-Mersenne: 2^32 - 2^CMW <= m <= 2^32 - 1.
  a_modulus : assert property (@(posedge clk) disable iff (!rst_n)
                               trg.hit |-> (W'(0) - m_n) < (W'(1) << CMW) && m_n != '0)
    else $error("mmac: modulus %h is not of the form 2^32 - cm, cm < 2^%0d", m_n, CMW);

endmodule
