// tb_cond_reg: self-checking test of the condition register.
//
// Moves random words (often zero, often a single bit) on random buses to the Cond Reg and
// checks in the next cycle that the flag is 1 exactly when the word was non-zero, and that the
// flag holds when no move targets it.
module tb_cond_reg;
  import tta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  logic      cond, ref_cond;
  int checks = 0, failures = 0;

  cond_reg dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .cond);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv_valid = '0; mv_dst = '0; bus = '0; ref_cond = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 2000; it++) begin
      int unsigned j, k, v;
      @(negedge clk);
      checks++;
      if (cond !== ref_cond) begin
        failures++;
        $display("it %0d: cond %b expected %b", it, cond, ref_cond);
      end
      mv_valid = '0;
      k = $urandom % 4;
      j = $urandom % NBUS;
      bus = '0;
      if (k != 0) begin
        mv_valid[j] = 1'b1;
        mv_dst[j]   = D_COND;
        v = $urandom % 3;
        unique case (v)
          0: bus[j] = '0;
          1: bus[j] = word_t'(1) << ($urandom % 32);
          default: bus[j] = $urandom;
        endcase
        ref_cond = |bus[j];
      end else begin
        // a move elsewhere with a non-zero value must not touch the flag
        mv_valid[j] = 1'b1; mv_dst[j] = D_COND + 1'b1; bus[j] = ref_cond ? '0 : '1;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
