// tb_rns_montmul: RNS Montgomery multiplication run as a program on the processor.
//
// Workload test at the size used for 1024-bit RSA key generation: the primes are 512 bits,
// and K = 17 residues of 32 bits per RNS base cover them with room to spare. The testbench
// picks two bases a_1..a_K and b_1..b_K of pairwise coprime pseudo-Mersenne moduli (2^32 - c),
// a random odd modulus N < A/16, B/16 and random X, Y < 2N, stores X and Y as residues in the
// data RAMs and all N- and base-dependent constants in Table1, and runs a program that
// computes r = X*Y*A^-1 mod N (r < 3N) entirely in residues:
//   base a:  l_i = ((x_i*y_i) * |-N^-1|_ai) * |A_i^-1|_ai             (q_i times |A_i^-1|)
//   base b:  q_j = sum_i l_i*|A_i|_bj - w1*|A|_bj,  w1 = floor(sum_i l_i / 2^32)
//            r_j = (x_j*y_j + q_j*N) * |A^-1|_bj,  l'_j = r_j * |B_j^-1|_bj
//   base a:  r_i = sum_j l'_j*|B_j|_ai - w2*|B|_ai,  w2 = floor(1/2 + sum_j l'_j / 2^32)
// The two base extensions estimate w from the top 26 bits of each l, summed on the ALUs.
// Each step of their multiply-accumulate streams is two moves: the LDST2 or LDST3 load of a
// matrix word, which reaches the MMAC over the direct path, and the trigger, which carries
// l (kept in the RF) over a bus; so two channels can stream at once on the four buses. The
// program is straight-line code, 920 instructions, placed by a list scheduler (tta_asm_pkg)
// over the buses, MMACs and memory ports; it is built once, before reset is released.
// The result is checked by CRT reconstruction in the testbench: base-b residues give R,
// which must match the base-a residues, satisfy R*A = X*Y (mod N) and R < 3N. The run
// also counts the stream steps over the direct paths and cycles with two streams.
// Then, as the primality-test workload, one Miller-Rabin round with base 3 runs on the
// Mersenne prime 2^521 - 1 and on the composite (2^521 - 1)(2^13 - 1): a left-to-right
// exponentiation in the Montgomery domain, one processor run per multiplication, with the
// host copying result residues back into the operand areas between runs (the loop control
// a key generation program would do). The result must equal 3^d mod N from wide arithmetic
// in the testbench, and the verdict must be right. The processor cycles are reported.
// Bases, memory layout, the 26-bit estimate and the program are this testbench's choices;
// the algorithm steps follow the RNS Montgomery multiplication with base extension of the
// document.
module tb_rns_montmul;
  import tta_pkg::*;
  import tta_asm_pkg::*;

  localparam int K     = 17;             // residues per base
  localparam int NBITS = 32 * K - 5;     // modulus size (539 bits, holds a 512-bit prime)
  localparam int WW    = 64 * K + 96;    // width of wide testbench arithmetic
  localparam int RUNS  = 4;
  localparam int SH    = 6;              // l >> SH is summed for the base-extension estimate

  // memory layout
  // Data RAM1: x, the results, one constant vector and the l' vector written by the program
  localparam int XA = 0, XB = 32, RA = 64, RB = 96, D_AINVB = 128, LB = 160;
  // Data RAM2: y and two constant vectors
  localparam int YA = 0, YB = 32, D_NB = 96, D_BJINV = 128;
  // Data RAM2 and RAM3 (same copy in both): the base-extension matrices. Row j of MA is
  // |-A|_bj, |A_1|_bj .. |A_K|_bj; row i of MB is |-B|_ai, |B_1|_ai .. |B_K|_ai.
  localparam int M_A = 256, M_B = 256 + K * (K + 1);
  // Table1: the per-residue constants of the first step
  localparam int T_NNINV = 0, T_AIINV = 32;
  // RF: r1 = w1, r2 = w2, r3.. = l_1..l_K (later l'_1..l'_K)
  localparam int R_L = 3;

  typedef logic [WW-1:0] wide_t;

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
    repeat (6000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- 64-bit helpers
  function automatic longint unsigned mulmod(longint unsigned a, longint unsigned b,
                                             longint unsigned m);
    return (a * b) % m;
  endfunction

  function automatic longint unsigned gcd(longint unsigned a, longint unsigned b);
    while (b != 0) begin longint unsigned t; t = a % b; a = b; b = t; end
    return a;
  endfunction

  function automatic longint unsigned inv(longint unsigned a, longint unsigned m);
    longint r0, r1, t0, t1, q, tmp;
    r0 = longint'(m); r1 = longint'(a % m); t0 = 0; t1 = 1;
    while (r1 != 0) begin
      q = r0 / r1;
      tmp = r0 - q * r1; r0 = r1; r1 = tmp;
      tmp = t0 - q * t1; t0 = t1; t1 = tmp;
    end
    if (t0 < 0) t0 += longint'(m);
    return longint'(t0);
  endfunction

  function automatic longint unsigned wmod(wide_t x, longint unsigned m);
    longint unsigned r;
    r = 0;
    for (int w = WW / 32 - 1; w >= 0; w--) r = ((r << 32) + 64'(x[w * 32 +: 32])) % m;
    return r;
  endfunction

  function automatic wide_t wrand(int bits);
    wide_t v;
    v = '0;
    for (int w = 0; w < WW / 32; w++) v[w * 32 +: 32] = $urandom;
    return v & ((wide_t'(1) << bits) - 1);
  endfunction

  // ---------------------------------------------------------------- bases
  longint unsigned a [K], b [K];

  task automatic pick_bases();
    longint unsigned chosen [$];
    longint unsigned c;
    c = 1;
    while (chosen.size() < 2 * K) begin
      longint unsigned m;
      bit ok;
      m = 64'h1_0000_0000 - c;
      ok = 1;
      foreach (chosen[q]) if (gcd(m, chosen[q]) != 1) ok = 0;
      if (ok) chosen.push_back(m);
      c += 2;
    end
    for (int i = 0; i < K; i++) begin a[i] = chosen[i]; b[i] = chosen[K + i]; end
  endtask

  // ---------------------------------------------------------------- program
  tta_sched s;
  int mm_free [NMMAC];

  // Places one channel: its head (operand loads and the multiply-accumulate stream) as one
  // block at fixed offsets, on the first MMAC free for it and, for the streams, with the
  // matrix row read through LDST3 or LDST2; then each tail step as its own block at the
  // earliest cycle after the result it reads. The MMAC stays reserved until the channel's
  // last read of its result, so its result register holds between tail steps.
  function automatic int place_chan(int kind, int x, int t0);
    for (int t = t0; t < MAXI; t++)
      for (int n = 0; n < NMMAC; n++)
        for (int ls = 2; ls >= (kind == 1 ? 2 : 1); ls--)
          if (mm_free[n] <= t) begin
            s.grp.delete();
            build_head(kind, x, n, ls);
            if (s.fits(t)) begin
              void'(s.place(t));
              mm_free[n] = place_tail(kind, x, n, t) + 1;
              return t;
            end
          end
    s.grp.delete();
    $display("scheduler: no room for channel %0d of phase %0d", x, kind);
    return MAXI;
  endfunction

  // One stream step is two moves: the matrix word is loaded through LDST ls and reaches the
  // MMAC over its direct path (a), the residue comes from the RF on the trigger move (b).
  function automatic void build_head(int kind, int x, int n, int ls);
    if (kind == 1) begin                       // base a, channel i = x
      s.add(0, im(d_ls(0, LS_LD), XA + x), U_LDST + 0);
      s.add(0, im(d_ls(1, LS_LD), YA + x), U_LDST + 1);
      s.add(2, im(d_mm(n, MM_M), word_t'(a[x])));
      s.add(2, mv(d_mm_trg(n, MM_MUL, 1, 0), s_ls(1)), U_MMAC + n);
      s.add(3, im(d_lu(LU_RD), T_NNINV + x), U_LUT);
      s.add(5, mv(d_mm(n, MM_A), s_mm(n)));
      s.add(5, im(d_mm_trg(n, MM_MUL, 0, 1), 0), U_MMAC + n);
      s.add(6, im(d_lu(LU_RD), T_AIINV + x), U_LUT);
      s.add(8, mv(d_mm(n, MM_A), s_mm(n)));
      s.add(8, im(d_mm_trg(n, MM_MUL, 0, 1), 0), U_MMAC + n);
    end else if (kind == 2) begin              // base b, channel j = x
      s.add(0, im(d_ls(0, LS_LD), XB + x), U_LDST + 0);
      s.add(0, im(d_ls(1, LS_LD), YB + x), U_LDST + 1);
      s.add(1, im(d_mm(n, MM_M), word_t'(b[x])));
      s.add(2, mv(d_mm_trg(n, MM_MUL, 1, 0), s_ls(1)), U_MMAC + n);
      s.add(7, mv(d_mm(n, MM_C), s_mm(n)));                 // c = x_j*y_j
      // w1*|-A|_bj, then l_i*|A_i|_bj for i = 1..K
      for (int k = 0; k <= K; k++) begin
        s.add(3 + k, im(d_ls(ls, LS_LD), M_A + x * (K + 1) + k), U_LDST + ls);
        s.add(5 + k, mv(d_mm_trg(n, k == 0 ? MM_MINI : MM_MACC, ls + 1, 0),
                        s_rf(k == 0 ? 1 : R_L - 1 + k)), U_MMAC + n);
      end
    end else begin                             // base a again, channel i = x
      // w2*|-B|_ai, then l'_j*|B_j|_ai for j = 1..K
      s.add(0, im(d_mm(n, MM_M), word_t'(a[x])));
      for (int k = 0; k <= K; k++) begin
        s.add(1 + k, im(d_ls(ls, LS_LD), M_B + x * (K + 1) + k), U_LDST + ls);
        s.add(3 + k, mv(d_mm_trg(n, k == 0 ? MM_MINI : MM_MACC, ls + 1, 0),
                        s_rf(k == 0 ? 2 : R_L - 1 + k)), U_MMAC + n);
      end
    end
  endfunction

  // One tail multiply on MMAC n: loads the constant at address addr through LDST ls into
  // the a socket (not before cycle a_min, after the previous trigger has used the socket),
  // then triggers op with the current result (readable from cycle r) as b, a single move.
  // Returns the first cycle the new result is readable.
  function automatic int tail_mul(int n, int addr, int ls, mmac_op_e op, int r, int a_min);
    int ta, tt;
    s.add(0, im(d_ls(ls, LS_LD), addr), U_LDST + ls);
    s.add(2, mv(d_mm(n, MM_A), s_ls(ls)));
    ta = s.place(a_min) + 2;
    s.add(0, mv(d_mm_trg(n, op, 0, 0), s_mm(n)), U_MMAC + n);
    tt = s.place(r > ta ? r : ta);
    return tt + LAT_MMAC;
  endfunction

  // Sum += result >> SH on ALU1/ALU0, from cycle r on.
  function automatic int tail_sum(int n, int r);
    s.add(0, mv(d_al(1, AL_A), s_mm(n)));
    s.add(0, im(d_al_trg(1, AL_SHR), SH), U_ALU + 1);
    s.add(1, mv(d_al(0, AL_A), s_al(0)));
    s.add(1, mv(d_al_trg(0, AL_ADD), s_al(1)), U_ALU + 0);
    return s.place(r);
  endfunction

  // Returns the last cycle that reads the MMAC result.
  function automatic int place_tail(int kind, int x, int n, int t);
    int r, u;                                  // r: first cycle the result is readable
    if (kind == 1) begin
      r = t + 11;                              // l_i
      s.add(0, mv(d_rf(R_L + x), s_mm(n)));
      u = s.place(r);
      r = tail_sum(n, r);
      return r > u ? r : u;
    end else if (kind == 2) begin
      r = t + 8 + K;                           // q_j
      r = tail_mul(n, D_NB + x, 1, MM_MADD, r, t + 6);       // x_j*y_j + q_j*N_j
      r = tail_mul(n, D_AINVB + x, 0, MM_MUL, r, r - 3);     // r_j
      s.add(0, mv(d_ls(0, LS_DATA), s_mm(n)));
      s.add(0, im(d_ls(0, LS_ST), RB + x), U_LDST + 0);
      r = s.place(r);
      r = tail_mul(n, D_BJINV + x, 1, MM_MUL, r, r - 3);     // l'_j
      s.add(0, mv(d_ls(0, LS_DATA), s_mm(n)));
      s.add(0, im(d_ls(0, LS_ST), LB + x), U_LDST + 0);
      u = s.place(r);
      r = tail_sum(n, r);
      return r > u ? r : u;
    end else begin
      r = t + 6 + K;                           // r_i
      s.add(0, mv(d_ls(0, LS_DATA), s_mm(n)));
      s.add(0, im(d_ls(0, LS_ST), RA + x), U_LDST + 0);
      return s.place(r);
    end
  endfunction

  int prog_len, p1_end, p2_end;

  task automatic build_program();
    int t;
    s = new();
    foreach (mm_free[n]) mm_free[n] = 0;
    // ALU1 result (the running sum) = 0
    s.add(0, im(d_al(0, AL_A), 0));
    s.add(0, im(d_al_trg(0, AL_ADD), 0), U_ALU + 0);
    void'(s.place(0));
    t = 0;
    for (int i = 0; i < K; i++) t = place_chan(1, i, t);
    // w1 = sum >> (32 - SH) to RF r1; clear the sum
    s.add(0, mv(d_al(0, AL_A), s_al(0)));
    s.add(0, im(d_al_trg(0, AL_SHR), 32 - SH), U_ALU + 0);
    s.add(1, mv(d_rf(1), s_al(0)));
    s.add(1, im(d_al(0, AL_A), 0));
    s.add(1, im(d_al_trg(0, AL_ADD), 0), U_ALU + 0);
    t = s.place(s.last + 1) + 2;
    foreach (mm_free[n]) if (mm_free[n] < t) mm_free[n] = t;
    p1_end = t;
    for (int j = 0; j < K; j++) t = place_chan(2, j, t);
    // w2 = (2^(31-SH) + sum) >> (32 - SH) to RF r2, i.e. alpha = 1/2
    s.add(0, mv(d_al(0, AL_A), s_al(0)));
    s.add(0, im(d_al_trg(0, AL_ADD), word_t'(1) << (31 - SH)), U_ALU + 0);
    s.add(1, mv(d_al(0, AL_A), s_al(0)));
    s.add(1, im(d_al_trg(0, AL_SHR), 32 - SH), U_ALU + 0);
    s.add(2, mv(d_rf(2), s_al(0)));
    t = s.place(s.last + 1);
    p2_end = t;
    // l'_j from Data RAM1 into the RF
    for (int j = 0; j < K; j++) begin
      s.add(0, im(d_ls(0, LS_LD), LB + j), U_LDST + 0);
      s.add(2, mv(d_rf(R_L + j), s_ls(0)));
      void'(s.place(t));
    end
    t = s.last + 1;
    foreach (mm_free[n]) if (mm_free[n] < t) mm_free[n] = t;
    for (int i = 0; i < K; i++) t = place_chan(3, i, t);
    s.add(0, im(d_jp(1, JP_HALT), 0), U_JMP);
    prog_len = s.place(s.last + 2) + 1;
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

  // ---------------------------------------------------------------- mechanism counters
  // stream steps: MACC with a over an LDST direct path (LDST2 or LDST3)
  function automatic int strm(logic hit, logic [1:0] asel, mmac_op_e op);
    return int'(hit && asel >= 2'd2 && op == MM_MACC);
  endfunction
  int n_stream = 0, n_two = 0, n_full = 0, cyc = 0;
  always @(posedge clk) if (rst_n) begin
    int k;
    if (busy) cyc++;
    k = strm(dut.g_mmac[0].u_mmac.trg.hit, dut.g_mmac[0].u_mmac.asel, dut.g_mmac[0].u_mmac.op)
      + strm(dut.g_mmac[1].u_mmac.trg.hit, dut.g_mmac[1].u_mmac.asel, dut.g_mmac[1].u_mmac.op)
      + strm(dut.g_mmac[2].u_mmac.trg.hit, dut.g_mmac[2].u_mmac.asel, dut.g_mmac[2].u_mmac.op)
      + strm(dut.g_mmac[3].u_mmac.trg.hit, dut.g_mmac[3].u_mmac.asel, dut.g_mmac[3].u_mmac.op);
    n_stream += k;
    if (k >= 2) n_two++;
    if (&dut.mv_valid) n_full++;
  end

  // ---------------------------------------------------------------- exponentiation steps
  // The host drives the loop: between multiplications it copies the result residues back into
  // the x (and y) operand areas, as a control program would.
  word_t base_a [K], base_b [K];
  int cyc_total = 0;

  task automatic load_n(input wide_t n);
    for (int i = 0; i < K; i++) begin
      host_write(2'd3, T_NNINV + i, word_t'((a[i] - inv(wmod(n, a[i]), a[i])) % a[i]));
      host_write(2'd1, D_NB + i, word_t'(wmod(n, b[i])));
    end
  endtask

  task automatic write_x_base();
    for (int i = 0; i < K; i++) begin host_write(2'd0, XA + i, base_a[i]); host_write(2'd0, XB + i, base_b[i]); end
  endtask

  task automatic write_y_base();
    for (int i = 0; i < K; i++) begin host_write(2'd1, YA + i, base_a[i]); host_write(2'd1, YB + i, base_b[i]); end
  endtask

  task automatic write_y_one();
    for (int i = 0; i < K; i++) begin host_write(2'd1, YA + i, 1); host_write(2'd1, YB + i, 1); end
  endtask

  // the result area starts out as the base
  task automatic copy_r_first();
    for (int i = 0; i < K; i++) begin host_write(2'd0, RA + i, base_a[i]); host_write(2'd0, RB + i, base_b[i]); end
  endtask

  task automatic copy_r(input bit to_x, input bit to_y);
    word_t v;
    for (int i = 0; i < K; i++) begin
      host_read(2'd0, RA + i, v);
      if (to_x) host_write(2'd0, XA + i, v);
      if (to_y) host_write(2'd1, YA + i, v);
      host_read(2'd0, RB + i, v);
      if (to_x) host_write(2'd0, XB + i, v);
      if (to_y) host_write(2'd1, YB + i, v);
    end
  endtask

  task automatic mul_hw();
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    fork
      wait (done);
      begin repeat (20000) @(posedge clk); end
    join_any
    disable fork;
    if (!done || err) begin failures++; $display("multiplication did not finish cleanly"); end
  endtask

  // R from the base-b residues by CRT, checked against the base-a residues
  task automatic read_r(output wide_t r);
    word_t v;
    r = 0;
    for (int j = 0; j < K; j++) begin
      longint unsigned p;
      wide_t Bj;
      host_read(2'd0, RB + j, v);
      p = 1; Bj = 1;
      for (int l = 0; l < K; l++) if (l != j) begin p = mulmod(p, b[l], b[j]); Bj = Bj * wide_t'(b[l]); end
      r = (r + Bj * wide_t'(mulmod(64'(v), inv(p, b[j]), b[j]))) % B;
    end
    for (int i = 0; i < K; i++) begin
      host_read(2'd0, RA + i, v);
      checks++;
      if (64'(v) != wmod(r, a[i])) begin failures++; $display("base-a residue %0d wrong", i); end
    end
  endtask

  function automatic wide_t modexp(input wide_t x, input wide_t e, input wide_t m);
    wide_t r;
    r = 1;
    for (int k = $clog2(e + 1) - 1; k >= 0; k--) begin
      r = (r * r) % m;
      if (e[k]) r = (r * x) % m;
    end
    return r;
  endfunction

  always @(posedge clk) if (busy) cyc_total++;

  // ---------------------------------------------------------------- test
  wide_t A, B, N, X, Y, R, XY, t1;
  longint unsigned Aj, Bi;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    pick_bases();
    build_program();
    $display("program: %0d instructions for K = %0d (steps end at %0d, %0d, %0d)",
             prog_len, K, p1_end, p2_end, prog_len);
    checks++;
    if (prog_len <= 0 || prog_len > MAXI) begin
      failures++;
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
    for (int c = 0; c < prog_len; c++) begin
      @(negedge clk); imem_we = 1; imem_addr = PCW'(c); imem_wdata = s.prog[c];
    end
    @(negedge clk); imem_we = 0;

    A = 1; B = 1;
    for (int i = 0; i < K; i++) begin A = A * wide_t'(a[i]); B = B * wide_t'(b[i]); end

    // constants that depend on the bases only; the matrices go to Data RAM2 and RAM3
    for (int i = 0; i < K; i++) begin
      longint unsigned p;
      p = 1;
      for (int l = 0; l < K; l++) if (l != i) p = mulmod(p, a[l], a[i]);
      host_write(2'd3, T_AIINV + i, word_t'(inv(p, a[i])));
      p = 1;
      for (int l = 0; l < K; l++) if (l != i) p = mulmod(p, b[l], b[i]);
      host_write(2'd1, D_BJINV + i, word_t'(inv(p, b[i])));
      host_write(2'd0, D_AINVB + i, word_t'(inv(wmod(A, b[i]), b[i])));
      for (int sel = 1; sel <= 2; sel++) begin
        host_write(2'(sel), M_A + i * (K + 1), word_t'((b[i] - wmod(A, b[i])) % b[i]));
        host_write(2'(sel), M_B + i * (K + 1), word_t'((a[i] - wmod(B, a[i])) % a[i]));
      end
    end
    for (int j = 0; j < K; j++)
      for (int i = 0; i < K; i++) begin
        longint unsigned pa, pb;
        pa = 1; pb = 1;
        for (int l = 0; l < K; l++) if (l != i) begin
          pa = mulmod(pa, a[l], b[j]);                       // |A_i| mod b_j
          pb = mulmod(pb, b[l], a[j]);                       // |B_i| mod a_j
        end
        for (int sel = 1; sel <= 2; sel++) begin
          host_write(2'(sel), M_A + j * (K + 1) + 1 + i, word_t'(pa));
          host_write(2'(sel), M_B + j * (K + 1) + 1 + i, word_t'(pb));
        end
      end

    for (int run = 0; run < RUNS; run++) begin
      word_t v;
      // N must be coprime to A, as a prime candidate is
      do begin
        bit ok;
        N = wrand(NBITS) | (wide_t'(1) << (NBITS - 1)) | 1;
        ok = 1;
        for (int i = 0; i < K; i++) if (gcd(wmod(N, a[i]), a[i]) != 1) ok = 0;
        if (ok) break;
      end while (1);
      X = wrand(NBITS + 1) % (N << 1);
      Y = wrand(NBITS + 1) % (N << 1);
      if (run == 1) begin X = (N << 1) - 1; Y = (N << 1) - 1; end   // largest inputs
      for (int i = 0; i < K; i++) begin
        host_write(2'd3, T_NNINV + i, word_t'((a[i] - inv(wmod(N, a[i]), a[i])) % a[i]));
        host_write(2'd1, D_NB + i, word_t'(wmod(N, b[i])));
        host_write(2'd0, XA + i, word_t'(wmod(X, a[i])));
        host_write(2'd0, XB + i, word_t'(wmod(X, b[i])));
        host_write(2'd1, YA + i, word_t'(wmod(Y, a[i])));
        host_write(2'd1, YB + i, word_t'(wmod(Y, b[i])));
      end
      @(negedge clk); start = 1;
      cyc = 0;
      @(negedge clk); start = 0;
      fork
        wait (done);
        begin repeat (20000) @(posedge clk); end
      join_any
      disable fork;
      checks++;
      if (!done || err) begin failures++; $display("run %0d: done %b err %b", run, done, err); end
      $display("run %0d: one RNS Montgomery multiplication took %0d cycles", run, cyc);
      // R from the base-b residues by CRT
      R = 0;
      for (int j = 0; j < K; j++) begin
        longint unsigned p, rj;
        wide_t Bj;
        host_read(2'd0, RB + j, v);
        rj = 64'(v);
        p = 1; Bj = 1;
        for (int l = 0; l < K; l++) if (l != j) begin p = mulmod(p, b[l], b[j]); Bj = Bj * wide_t'(b[l]); end
        R = (R + Bj * wide_t'(mulmod(rj, inv(p, b[j]), b[j]))) % B;
      end
      for (int i = 0; i < K; i++) begin
        host_read(2'd0, RA + i, v);
        checks++;
        if (64'(v) != wmod(R, a[i])) begin
          failures++; $display("run %0d: base-a residue %0d wrong", run, i);
        end
      end
      XY = (X * Y) % N;
      t1 = (R * A) % N;
      checks++;
      if (t1 != XY) begin failures++; $display("run %0d: R*A != X*Y mod N", run); end
      checks++;
      if (R >= 3 * N) begin failures++; $display("run %0d: R >= 3N", run); end
      $display("run %0d: R %s 2N", run, (R < (N << 1)) ? "<" : ">=");
    end
    checks++;
    if (n_stream != RUNS * 2 * K * K || n_two == 0) begin
      failures++; $display("stream steps %0d, expected %0d", n_stream, RUNS * 2 * K * K);
    end
    $display("stream MACCs over the LDST direct paths: %0d; cycles with two streams: %0d; instructions using all four buses: %0d",
             n_stream, n_two, n_full);

    // Miller-Rabin round, base 3, on the Mersenne prime 2^521 - 1 and on a composite
    for (int c = 0; c < 2; c++) begin
      wide_t m, d, xm, expx;
      int s2, nmul, cyc0;
      bit probable;
      string kind, verdict;
      m = (wide_t'(1) << 521) - 1;
      if (c == 1) m = m * 8191;                    // (2^521 - 1)(2^13 - 1), 534 bits
      for (int i = 0; i < K; i++) if (gcd(wmod(m, a[i]), a[i]) != 1) $display("modulus not coprime to A");
      d = m - 1; s2 = 0;
      while (!d[0]) begin d >>= 1; s2++; end
      load_n(m);
      // base in the Montgomery domain, 3*A mod m
      xm = (wide_t'(3) * A) % m;
      for (int i = 0; i < K; i++) begin base_a[i] = word_t'(wmod(xm, a[i])); base_b[i] = word_t'(wmod(xm, b[i])); end
      write_x_base(); write_y_base();
      nmul = 0; cyc0 = cyc_total;
      // left-to-right: the top bit of d gives acc = base
      copy_r_first();
      for (int bit_i = $clog2(d + 1) - 2; bit_i >= 0; bit_i--) begin
        copy_r(1'b1, 1'b1); mul_hw(); nmul++;        // acc = acc^2
        if (d[bit_i]) begin copy_r(1'b1, 1'b0); write_y_base(); mul_hw(); nmul++; end
      end
      // out of the Montgomery domain: acc * 1
      copy_r(1'b1, 1'b0); write_y_one(); mul_hw(); nmul++;
      read_r(R);
      expx = modexp(3, d, m);
      checks++;
      if (R % m != expx) begin failures++; $display("Miller-Rabin %0d: 3^d mod N wrong", c); end
      probable = (R % m == 1) || (R % m == m - 1);
      checks++;
      if (probable != (c == 0)) begin failures++; $display("Miller-Rabin %0d: wrong verdict", c); end
      kind = (c == 0) ? "prime" : "composite";
      verdict = probable ? "probable prime" : "composite";
      $display("Miller-Rabin base 3 on a %0d-bit %s: %0d multiplications, %0d processor cycles, verdict %s",
               $clog2(m), kind, nmul, cyc_total - cyc0, verdict);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
