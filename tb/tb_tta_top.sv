// tb_tta_top: end-to-end test of the whole processor at its default sizes.
//
// Loads a program that computes, in four RNS channels at once, r_n = (x_n * K_n)^e mod m_n
// for n = 0..3 by left-to-right square-and-multiply over the 32 exponent bits, plus
// (r_0 + x_0*K_0) mod m_0 on an ALU. The moduli m_n and constants K_n sit in Table1, the
// bases x_n in Data RAM1, the exponent e in Data RAM2; results go to Data RAM3. The first
// product x_n * K_n takes x_n over the LDST1 direct path and K_n over the LUT direct path.
// The loop runs on JMP1's counter, a conditional branch on the Cond Reg skips the multiply
// for zero exponent bits, and JMP2 halts. Expected values come from 64-bit % arithmetic in
// the testbench. Each run uses new random moduli (pseudo-Mersenne), bases and exponents.
// The testbench counts how often each mechanism happened and fails if one never did.
module tb_tta_top;
  import tta_pkg::*;
  import tta_asm_pkg::*;

  localparam int RUNS = 12;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic busy, done, err;
  logic imem_we = 1'b0;
  logic [PCW-1:0] imem_addr = '0;
  logic [INSTRW-1:0] imem_wdata = '0;
  logic host_en = 1'b0, host_we = 1'b0;
  logic [1:0] host_sel = '0;
  logic [9:0] host_addr = '0;
  word_t host_wdata = '0, host_rdata;
  int checks = 0, failures = 0;

  tta_top dut (.clk, .rst_n, .start, .busy, .done, .err, .imem_we, .imem_addr, .imem_wdata,
               .host_en, .host_we, .host_sel, .host_addr, .host_wdata, .host_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int n_taken_br = 0, n_fall_br = 0, n_loop_back = 0, n_ldst_dir = 0, n_lut_dir = 0;
  int n_full_bus = 0, n_mmac_par = 0, n_halt = 0, n_cycles = 0;

  always @(posedge clk) if (rst_n) begin
    int par;
    if (dut.ir_valid) n_cycles++;
    if (dut.ir_valid && dut.g_jmp[0].u_jmp.trg.hit &&
        int'(dut.g_jmp[0].u_jmp.trg.off) + JP_JMP == JP_BF) begin
      if (dut.j_jump[0]) n_taken_br++; else n_fall_br++;
    end
    if (dut.ir_valid && dut.g_jmp[0].u_jmp.trg.hit &&
        int'(dut.g_jmp[0].u_jmp.trg.off) + JP_JMP == JP_LOOP && dut.j_jump[0]) n_loop_back++;
    if (&dut.mv_valid) n_full_bus++;
    par = int'(dut.g_mmac[0].u_mmac.trg.hit) + int'(dut.g_mmac[1].u_mmac.trg.hit) +
          int'(dut.g_mmac[2].u_mmac.trg.hit) + int'(dut.g_mmac[3].u_mmac.trg.hit);
    if (par == NMMAC) n_mmac_par++;
    if (dut.g_mmac[0].u_mmac.trg.hit && dut.g_mmac[0].u_mmac.asel != 0) n_ldst_dir++;
    if (dut.g_mmac[0].u_mmac.trg.hit && dut.g_mmac[0].u_mmac.bsel) n_lut_dir++;
    if (dut.ir_valid && |dut.j_halt) n_halt++;
  end

  // ---------------------------------------------------------------- program
  logic [INSTRW-1:0] prog [$];
  int loop_pc, skip_pc;

  task automatic build();
    prog.delete();
    // init: moduli m_n and the exponent
    prog.push_back(ins(im(d_lu(LU_RD), 0), im(d_ls(1, LS_LD), 0), im(d_jp(0, JP_CNT), 32)));
    prog.push_back(ins(im(d_lu(LU_RD), 1)));
    prog.push_back(ins(im(d_lu(LU_RD), 2), mv(d_mm(0, MM_M), S_LUT), mv(d_rf(8), s_ls(1)),
                       mv(d_rf(9), S_LUT)));
    prog.push_back(ins(im(d_lu(LU_RD), 3), mv(d_mm(1, MM_M), S_LUT)));
    // K_n and x_n, read together so both reach MMACn over the direct paths
    prog.push_back(ins(im(d_lu(LU_RD), 4), im(d_ls(0, LS_LD), 0), mv(d_mm(2, MM_M), S_LUT)));
    prog.push_back(ins(im(d_lu(LU_RD), 5), im(d_ls(0, LS_LD), 1), mv(d_mm(3, MM_M), S_LUT)));
    prog.push_back(ins(im(d_lu(LU_RD), 6), im(d_ls(0, LS_LD), 2), im(d_mm_trg(0, MM_MUL, 1, 1), 0)));
    prog.push_back(ins(im(d_lu(LU_RD), 7), im(d_ls(0, LS_LD), 3), im(d_mm_trg(1, MM_MUL, 1, 1), 0)));
    prog.push_back(ins(im(d_mm_trg(2, MM_MUL, 1, 1), 0)));
    prog.push_back(ins(im(d_mm_trg(3, MM_MUL, 1, 1), 0), mv(d_rf(0), s_mm(0))));
    prog.push_back(ins(mv(d_rf(1), s_mm(1))));
    prog.push_back(ins(mv(d_rf(2), s_mm(2))));
    prog.push_back(ins(mv(d_rf(3), s_mm(3))));
    // r_n = 1
    prog.push_back(ins(im(d_mm(0, MM_A), 1), im(d_mm(1, MM_A), 1), im(d_mm(2, MM_A), 1),
                       im(d_mm(3, MM_A), 1)));
    prog.push_back(ins(im(d_mm_trg(0, MM_MUL), 1), im(d_mm_trg(1, MM_MUL), 1),
                       im(d_mm_trg(2, MM_MUL), 1), im(d_mm_trg(3, MM_MUL), 1)));
    prog.push_back(ins());
    prog.push_back(ins());
    // loop body, 32 times: r = r*r; if (top bit of e) r = r*y; e <<= 1
    loop_pc = prog.size();
    skip_pc = loop_pc + 7;
    prog.push_back(ins(mv(d_mm(0, MM_A), s_mm(0)), mv(d_mm(1, MM_A), s_mm(1)),
                       mv(d_mm(2, MM_A), s_mm(2)), mv(d_mm(3, MM_A), s_mm(3))));
    prog.push_back(ins(mv(d_mm_trg(0, MM_MUL), s_mm(0)), mv(d_mm_trg(1, MM_MUL), s_mm(1)),
                       mv(d_mm_trg(2, MM_MUL), s_mm(2)), mv(d_mm_trg(3, MM_MUL), s_mm(3))));
    prog.push_back(ins(mv(d_al(0, AL_A), s_rf(8)), im(d_al_trg(0, AL_SHR), 31),
                       mv(d_al(1, AL_A), s_rf(8)), im(d_al_trg(1, AL_SHL), 1)));
    prog.push_back(ins(mv(D_COND, s_al(0)), mv(d_rf(8), s_al(1))));
    prog.push_back(ins(im(d_jp(0, JP_BF), skip_pc)));
    prog.push_back(ins(mv(d_mm(0, MM_A), s_mm(0)), mv(d_mm(1, MM_A), s_mm(1)),   // delay slot
                       mv(d_mm(2, MM_A), s_mm(2)), mv(d_mm(3, MM_A), s_mm(3))));
    prog.push_back(ins(mv(d_mm_trg(0, MM_MUL), s_rf(0)), mv(d_mm_trg(1, MM_MUL), s_rf(1)),
                       mv(d_mm_trg(2, MM_MUL), s_rf(2)), mv(d_mm_trg(3, MM_MUL), s_rf(3))));
    prog.push_back(ins(im(d_jp(0, JP_LOOP), loop_pc)));                          // skip_pc
    prog.push_back(ins());                                                       // delay slot
    // store r_n and (r_0 + y_0) mod m_0
    prog.push_back(ins(mv(d_ls(2, LS_DATA), s_mm(0)), im(d_ls(2, LS_ST), 0),
                       mv(d_rf(4), s_mm(0)), mv(d_rf(5), s_mm(2))));
    prog.push_back(ins(mv(d_ls(2, LS_DATA), s_mm(1)), im(d_ls(2, LS_ST), 1),
                       mv(d_rf(6), s_mm(3))));
    prog.push_back(ins(mv(d_ls(2, LS_DATA), s_rf(5)), im(d_ls(2, LS_ST), 2),
                       mv(d_al(1, AL_A), s_rf(0)), mv(d_al(1, AL_M), s_rf(9))));
    prog.push_back(ins(mv(d_ls(2, LS_DATA), s_rf(6)), im(d_ls(2, LS_ST), 3),
                       mv(d_al_trg(1, AL_MADD), s_rf(4))));
    prog.push_back(ins(mv(d_ls(2, LS_DATA), s_al(1)), im(d_ls(2, LS_ST), 4)));
    prog.push_back(ins(im(d_jp(1, JP_HALT), 0)));
  endtask

  // ---------------------------------------------------------------- host helpers
  task automatic host_write(input logic [1:0] sel, input int addr, input word_t v);
    @(negedge clk);
    host_en = 1; host_we = 1; host_sel = sel; host_addr = 10'(addr); host_wdata = v;
    @(negedge clk);
    host_en = 0; host_we = 0;
  endtask

  task automatic host_read(input logic [1:0] sel, input int addr, output word_t v);
    @(negedge clk);
    host_en = 1; host_we = 0; host_sel = sel; host_addr = 10'(addr);
    @(negedge clk);
    host_en = 0;
    v = host_rdata;
  endtask

  function automatic word_t mulmod(word_t a, word_t b, word_t m);
    return word_t'((64'(a) * 64'(b)) % 64'(m));
  endfunction

  function automatic word_t powmod(word_t x, word_t e, word_t m);
    word_t r;
    r = 1;
    for (int i = 31; i >= 0; i--) begin
      r = mulmod(r, r, m);
      if (e[i]) r = mulmod(r, x, m);
    end
    return r;
  endfunction

  word_t m [4], k [4], x [4], y [4], exp_r [5], got;
  word_t e;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    build();
    foreach (prog[i]) begin
      @(negedge clk); imem_we = 1; imem_addr = PCW'(i); imem_wdata = prog[i];
    end
    @(negedge clk); imem_we = 0;

    for (int run = 0; run < RUNS; run++) begin
      int cyc0, t_run;
      e = $urandom;
      e[31] = 1'b1; e[0] = 1'b0;
      if (run == 0) e = 32'd65537;          // the usual RSA public exponent
      for (int n = 0; n < 4; n++) begin
        m[n] = (32'hFFFF_FFFF - ($urandom % 32'h1_0000)) | 32'h1;
        k[n] = $urandom;
        x[n] = $urandom;
        host_write(2'd3, n, m[n]);
        host_write(2'd3, 4 + n, k[n]);
        host_write(2'd0, n, x[n]);
        y[n] = mulmod(x[n], k[n], m[n]);
        exp_r[n] = powmod(y[n], e, m[n]);
      end
      exp_r[4] = word_t'((64'(exp_r[0]) + 64'(y[0])) % 64'(m[0]));
      host_write(2'd1, 0, e);
      @(negedge clk); start = 1;
      cyc0 = n_cycles;
      @(negedge clk); start = 0;
      fork
        wait (done);
        begin repeat (5000) @(posedge clk); end
      join_any
      disable fork;
      t_run = n_cycles - cyc0;
      checks++;
      if (!done || err) begin
        failures++; $display("run %0d: done %b err %b", run, done, err);
      end
      // instruction count: init + 32 loop passes (8, or 9 for a one bit) + 6 in the tail
      begin
        int ones, exp_cyc;
        ones = $countones(e);
        exp_cyc = loop_pc + 32 * 8 + ones + 6;
        checks++;
        if (t_run != exp_cyc) begin
          failures++; $display("run %0d: %0d instructions, expected %0d", run, t_run, exp_cyc);
        end
      end
      for (int n = 0; n < 5; n++) begin
        host_read(2'd2, n, got);
        checks++;
        if (got !== exp_r[n]) begin
          failures++;
          $display("run %0d result %0d: got %h expected %h", run, n, got, exp_r[n]);
        end
      end
    end

    $display("mechanisms: taken branch %0d, untaken branch %0d, loop back %0d, LDST direct %0d, LUT direct %0d, 4-bus instructions %0d, 4 MMACs in one cycle %0d, halts %0d",
             n_taken_br, n_fall_br, n_loop_back, n_ldst_dir, n_lut_dir, n_full_bus, n_mmac_par, n_halt);
    checks++; if (n_taken_br == 0)  begin failures++; $display("no taken branch");   end
    checks++; if (n_fall_br == 0)   begin failures++; $display("no untaken branch"); end
    checks++; if (n_loop_back == 0) begin failures++; $display("no loop back edge"); end
    checks++; if (n_ldst_dir == 0)  begin failures++; $display("no LDST direct path"); end
    checks++; if (n_lut_dir == 0)   begin failures++; $display("no LUT direct path"); end
    checks++; if (n_full_bus == 0)  begin failures++; $display("never all four buses"); end
    checks++; if (n_mmac_par == 0)  begin failures++; $display("never four MMACs at once"); end
    checks++; if (n_halt != RUNS)   begin failures++; $display("halt count %0d", n_halt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
