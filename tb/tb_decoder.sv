// tb_decoder: self-checking test of the instruction decoder.
//
// Builds random instructions slot by slot from independently chosen fields and checks every
// per-bus output, the gating by ir_valid, and both error flags (two moves to one destination,
// a source id that no socket has) against flags worked out in the testbench.
module tb_decoder;
  import tta_pkg::*;

  logic [INSTRW-1:0] instr;
  logic ir_valid;
  mv_valid_t mv_valid;
  mv_dst_t mv_dst;
  logic [NBUS-1:0] mv_imm;
  logic [NBUS-1:0][SRCW-1:0] mv_src;
  bus_t mv_immval;
  logic err_dst_clash, err_bad_src;
  int checks = 0, failures = 0;

  decoder dut (.instr, .ir_valid, .mv_valid, .mv_dst, .mv_imm, .mv_src, .mv_immval,
               .err_dst_clash, .err_bad_src);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 5000; it++) begin
      logic v [NBUS];
      logic im [NBUS];
      logic [DSTW-1:0] d [NBUS];
      logic [W-1:0] s [NBUS];
      logic e_clash, e_src, irv;
      irv = ($urandom % 8) != 0;
      for (int j = 0; j < NBUS; j++) begin
        v[j]  = 1'($urandom);
        im[j] = 1'($urandom);
        d[j]  = (it % 3 == 0) ? DSTW'($urandom % 4) : DSTW'($urandom);
        s[j]  = (im[j] || it % 2 == 0) ? $urandom : word_t'($urandom % 64);
        instr[j * SLOTW +: SLOTW] = {v[j], im[j], d[j], s[j]};
      end
      ir_valid = irv;
      e_clash = 0; e_src = 0;
      for (int j = 0; j < NBUS; j++) begin
        if (irv && v[j] && !im[j] && s[j] >= NSRC) e_src = 1;
        for (int k = j + 1; k < NBUS; k++)
          if (irv && v[j] && v[k] && d[j] == d[k]) e_clash = 1;
      end
      #1;
      for (int j = 0; j < NBUS; j++) begin
        checks++;
        if (mv_valid[j] !== (irv && v[j]) || mv_dst[j] !== d[j] || mv_imm[j] !== im[j] ||
            (im[j] && mv_immval[j] !== s[j]) ||
            (!im[j] && mv_src[j] !== s[j][SRCW-1:0])) begin
          failures++;
          $display("it %0d slot %0d decoded wrongly", it, j);
        end
      end
      checks++;
      if (err_dst_clash !== e_clash || err_bad_src !== e_src) begin
        failures++;
        $display("it %0d: flags %b%b expected %b%b", it, err_dst_clash, err_bad_src, e_clash, e_src);
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
