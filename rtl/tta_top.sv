// tta_top: TTA-like cipher processor for RSA key pair generation.
//
// A transport-triggered processor: the program only moves 32-bit words between sockets over
// four buses, and a move into a trigger socket starts an operation. Its function units are
// the ones the RSA key generation flow needs for RNS Montgomery multiplication: four
// modular multiply-accumulate units (MMAC1..4), two ALUs for modular add/subtract, shifts and
// select, three load-store units each with its own data RAM, a LUT unit with Table1 for
// pre-computed constants, a register file, a condition register, and three JMP units that
// steer the program counter. Besides the buses, every MMAC has direct inputs from the three
// LDST load results and the LUT read result. This structure (unit kinds and counts, bus count
// and width, direct paths) follows the processor description; the instruction format, socket
// map, latencies and memory sizes are this design's own (see tta_pkg).
//
// Host interface: while the processor is idle the host writes programs into the instruction
// RAM (imem_we/imem_addr/imem_wdata) and reads or writes the data RAMs and Table1 through one
// port (host_sel 0..2 = Data RAM1..3, 3 = Table1; read data one cycle after host_en). start
// runs the program from address 0; done rises when a JMP unit executes HALT. err flags a
// move-rule violation seen by the decoder (sticky until start).
module tta_top
  import tta_pkg::*;
#(
  parameter int unsigned DRAM_DEPTH = 1024,
  parameter int unsigned TAB_DEPTH  = 1024,
  parameter int unsigned IMEM_DEPTH = 1 << PCW
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            start,
  output logic                            busy,
  output logic                            done,
  output logic                            err,
  // program load
  input  logic                            imem_we,
  input  logic [$clog2(IMEM_DEPTH)-1:0]   imem_addr,
  input  logic [INSTRW-1:0]               imem_wdata,
  // host access to the data RAMs and Table1
  input  logic                            host_en,
  input  logic                            host_we,
  input  logic [1:0]                      host_sel,
  input  logic [9:0]                      host_addr,
  input  word_t                           host_wdata,
  output word_t                           host_rdata
);

  localparam int unsigned DAW = $clog2(DRAM_DEPTH);
  localparam int unsigned TAW = $clog2(TAB_DEPTH);

  // ------------------------------------------------------------ fetch and decode
  logic [PCW-1:0]           pc;
  logic                     pc_en, ir_valid;
  logic [INSTRW-1:0]        ir;
  logic [NJMP-1:0]          j_jump, j_halt;
  logic [NJMP-1:0][PCW-1:0] j_target;
  mv_valid_t                mv_valid;
  mv_dst_t                  mv_dst;
  logic [NBUS-1:0]          mv_imm;
  logic [NBUS-1:0][SRCW-1:0] mv_src;
  bus_t                     mv_immval, bus;
  logic                     e_clash, e_src;
  word_t [NSRC-1:0]         src_val;

  fetch u_fetch (
    .clk, .rst_n, .start, .jump(j_jump), .target(j_target), .halt(j_halt),
    .imem_addr(pc), .imem_en(pc_en), .ir_valid, .busy, .done
  );

  instr_ram #(.DEPTH(IMEM_DEPTH)) u_imem (
    .clk, .rd_en(pc_en), .rd_addr($clog2(IMEM_DEPTH)'(pc)), .rdata(ir),
    .wr_en(imem_we), .wr_addr(imem_addr), .wdata(imem_wdata)
  );

  decoder u_dec (
    .instr(ir), .ir_valid, .mv_valid, .mv_dst, .mv_imm, .mv_src, .mv_immval,
    .err_dst_clash(e_clash), .err_bad_src(e_src)
  );

  transport_net u_net (.src_val, .mv_imm, .mv_src, .mv_immval, .bus);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)                  err <= 1'b0;
    else if (start)              err <= 1'b0;
    else if (e_clash || e_src)   err <= 1'b1;

  // ------------------------------------------------------------ function units
  word_t [RF_N-1:0]  rf_regs;
  word_t [NMMAC-1:0] mm_res;
  word_t [NALU-1:0]  al_res;
  word_t [NLDST-1:0] ls_res;
  word_t             lut_res;
  logic              cond;

  rf u_rf (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .regs(rf_regs));

  cond_reg u_cond (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .cond);

  for (genvar n = 0; n < NMMAC; n++) begin : g_mmac
    mmac #(.BASE(D_MMAC + DSTW'(n * 'h40))) u_mmac (
      .clk, .rst_n, .mv_valid, .mv_dst, .bus,
      .ldst_dir(ls_res), .lut_dir(lut_res), .result(mm_res[n])
    );
  end

  for (genvar n = 0; n < NALU; n++) begin : g_alu
    alu #(.BASE(D_ALU + DSTW'(n * 'h20))) u_alu (
      .clk, .rst_n, .mv_valid, .mv_dst, .bus, .result(al_res[n])
    );
  end

  for (genvar n = 0; n < NJMP; n++) begin : g_jmp
    jmp #(.BASE(D_JMP + DSTW'(n * 'h08))) u_jmp (
      .clk, .rst_n, .mv_valid, .mv_dst, .bus, .cond,
      .jump(j_jump[n]), .target(j_target[n]), .halt(j_halt[n])
    );
  end

  // LDST units with their data RAMs; host port B of each RAM.
  word_t [NLDST:0] host_rd;

  for (genvar n = 0; n < NLDST; n++) begin : g_ldst
    logic           en, we;
    logic [DAW-1:0] addr;
    word_t          wdata, rdata;

    ldst #(.BASE(D_LDST + DSTW'(n * 'h08)), .AW(DAW)) u_ldst (
      .clk, .rst_n, .mv_valid, .mv_dst, .bus, .result(ls_res[n]),
      .ram_en(en), .ram_we(we), .ram_addr(addr), .ram_wdata(wdata), .ram_rdata(rdata)
    );

    data_ram #(.DEPTH(DRAM_DEPTH)) u_dram (
      .clk, .a_en(en), .a_we(we), .a_addr(addr), .a_wdata(wdata), .a_rdata(rdata),
      .b_en(host_en && host_sel == 2'(n)), .b_we(host_we), .b_addr(DAW'(host_addr)),
      .b_wdata(host_wdata), .b_rdata(host_rd[n])
    );
  end

  logic           t_en, t_we;
  logic [TAW-1:0] t_addr;
  word_t          t_wdata, t_rdata;

  lut #(.BASE(D_LUT), .AW(TAW)) u_lut (
    .clk, .rst_n, .mv_valid, .mv_dst, .bus, .result(lut_res),
    .tab_en(t_en), .tab_we(t_we), .tab_addr(t_addr), .tab_wdata(t_wdata), .tab_rdata(t_rdata)
  );

  data_ram #(.DEPTH(TAB_DEPTH)) u_table1 (
    .clk, .a_en(t_en), .a_we(t_we), .a_addr(t_addr), .a_wdata(t_wdata), .a_rdata(t_rdata),
    .b_en(host_en && host_sel == 2'd3), .b_we(host_we), .b_addr(TAW'(host_addr)),
    .b_wdata(host_wdata), .b_rdata(host_rd[NLDST])
  );

  logic [1:0] host_sel_q;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)       host_sel_q <= '0;
    else if (host_en) host_sel_q <= host_sel;
  assign host_rdata = host_rd[host_sel_q];

  // ------------------------------------------------------------ source sockets by id
  always_comb begin
    src_val = '0;
    for (int r = 0; r < RF_N; r++)  src_val[int'(S_RF) + r]   = rf_regs[r];
    for (int n = 0; n < NMMAC; n++) src_val[int'(S_MMAC) + n] = mm_res[n];
    for (int n = 0; n < NALU; n++)  src_val[int'(S_ALU) + n]  = al_res[n];
    for (int n = 0; n < NLDST; n++) src_val[int'(S_LDST) + n] = ls_res[n];
    src_val[S_LUT]  = lut_res;
    src_val[S_COND] = W'(cond);
  end

endmodule
