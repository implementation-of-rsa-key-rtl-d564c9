// tb_mmac: self-checking test of the MMAC unit.
//
// Drives moves straight onto the unit's sockets: random operands with pseudo-Mersenne moduli
// through all four operations, both direct paths, back-to-back triggers (one per cycle) and
// long accumulations. Expected values come from plain 64-bit % arithmetic in the testbench.
// Checks the three-cycle latency by sampling the result exactly three cycles after a trigger.
module tb_mmac;
  import tta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  word_t [NLDST-1:0] ldst_dir;
  word_t     lut_dir, result;
  int checks = 0, failures = 0;

  localparam logic [DSTW-1:0] B = D_MMAC + 10'h40;  // unit MMAC2

  mmac #(.BASE(B)) dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .ldst_dir, .lut_dir, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic word_t mulmod(word_t a, word_t b, word_t c, word_t m);
    return word_t'(((64'(a) * 64'(b)) % 64'(m) + 64'(c) % 64'(m)) % 64'(m));
  endfunction

  task automatic idle();
    mv_valid = '0; mv_dst = '0; bus = '0;
  endtask

  // expected results, indexed by the cycle they become readable
  word_t exp_q[$];
  int    exp_t[$];
  int    cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (exp_t.size() > 0 && exp_t[0] == cyc) begin
    word_t e;
    e = exp_q.pop_front();
    void'(exp_t.pop_front());
    checks++;
    if (result !== e) begin
      failures++;
      $display("mismatch at cycle %0d: got %h expected %h", cyc, result, e);
    end
  end

  word_t m, a, b, c, acc, l0, l1, l2, lt;
  int sel;

  initial begin
    idle();
    ldst_dir = '0; lut_dir = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 4000; it++) begin
      @(negedge clk);
      // new modulus each 50 triggers; moved in the same cycle as the trigger sometimes
      if (it % 50 == 0) m = 32'hFFFF_FFFF - ($urandom % 32'h0001_0000);
      m = m | 32'h1;
      a = $urandom; b = $urandom; c = $urandom;
      l0 = $urandom; l1 = $urandom; l2 = $urandom; lt = $urandom;
      if (it % 7 == 0) begin a = m - 1; b = m - 1; c = m - 1; end
      ldst_dir = {l2, l1, l0}; lut_dir = lt;
      sel = $urandom % 4;
      idle();
      mv_valid = 4'b1111;
      mv_dst[0] = B + DSTW'(MM_A);   bus[0] = a;
      mv_dst[1] = B + DSTW'(MM_C);   bus[1] = c;
      mv_dst[2] = B + DSTW'(MM_M);   bus[2] = m;
      begin
        logic [1:0] asel; logic bsel; logic [1:0] op; word_t ea, eb, r;
        asel = 2'($urandom % 4); bsel = 1'($urandom % 2);
        op = (it % 13 == 0 || it % 50 == 0) ? 2'd3 : 2'(sel);  // a new modulus restarts acc
        ea = (asel == 0) ? a : (asel == 1) ? l0 : (asel == 2) ? l1 : l2;
        eb = bsel ? lt : b;
        mv_dst[3] = B + DSTW'(MM_TRG) + DSTW'({asel, bsel, op}); bus[3] = b;
        unique case (op)
          2'd0: r = mulmod(ea, eb, 0, m);
          2'd1: r = mulmod(ea, eb, c, m);
          2'd2: begin r = mulmod(ea, eb, acc, m); acc = r; end
          2'd3: begin r = mulmod(ea, eb, 0, m);   acc = r; end
        endcase
        exp_q.push_back(r); exp_t.push_back(cyc + 3);
      end
    end
    @(negedge clk); idle();
    repeat (6) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
