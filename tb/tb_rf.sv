// tb_rf: self-checking test of the register file.
//
// Each cycle up to four buses write four different random registers; the testbench keeps a
// copy and compares all registers every cycle, so a write must be visible in the next cycle
// and no other register may change. Moves to sockets outside the RF must not write it.
module tb_rf;
  import tta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  word_t [RF_N-1:0] regs, ref_regs;
  int checks = 0, failures = 0;

  rf dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .regs);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mv_valid = '0; mv_dst = '0; bus = '0; ref_regs = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 3000; it++) begin
      int unsigned base;
      @(negedge clk);
      checks++;
      if (regs !== ref_regs) begin
        failures++;
        $display("cycle %0d: register file differs", it);
      end
      base = $urandom % RF_N;
      for (int j = 0; j < NBUS; j++) begin
        int unsigned r;
        mv_valid[j] = 1'($urandom);
        r = (base + j * 5) % RF_N;                 // four distinct registers
        bus[j] = $urandom;
        if (it % 9 == 0) mv_dst[j] = D_MMAC + DSTW'(r);   // not an RF socket
        else             mv_dst[j] = D_RF + DSTW'(r);
        if (mv_valid[j] && it % 9 != 0) ref_regs[r] = bus[j];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
