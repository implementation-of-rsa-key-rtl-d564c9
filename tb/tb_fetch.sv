// tb_fetch: self-checking test of instruction fetch and PC control.
//
// A behavioural instruction memory returns the address as data, so the testbench sees which
// address executes each cycle. It checks: start makes address 0 execute two cycles later;
// straight-line stepping; a jump executes its delay slot and then the target; the lowest JMP
// unit wins when several request; halt stops at once, drops the delay slot and raises done.
module tb_fetch;
  import tta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, start;
  logic [NJMP-1:0] jump, halt;
  logic [NJMP-1:0][PCW-1:0] target;
  logic [PCW-1:0] imem_addr, ir;
  logic imem_en, ir_valid, busy, done;
  int checks = 0, failures = 0;

  fetch dut (.clk, .rst_n, .start, .jump, .target, .halt, .imem_addr, .imem_en, .ir_valid,
             .busy, .done);

  // instruction word = its own address
  always_ff @(posedge clk) if (imem_en) ir <= imem_addr;

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_exec(logic v, logic [PCW-1:0] a, string what);
    checks++;
    if (ir_valid !== v || (v && ir !== a)) begin
      failures++;
      $display("%s: valid %b addr %0d, expected %b %0d", what, ir_valid, ir, v, a);
    end
  endtask

  initial begin
    start = 0; jump = '0; halt = '0; target = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 50; run++) begin
      logic [PCW-1:0] t, exp_a;
      int unsigned steps, u;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      expect_exec(1'b0, 0, "after start");
      @(negedge clk);
      expect_exec(1'b1, 0, "first instruction");
      exp_a = 0;
      steps = 1 + $urandom % 5;
      for (int s = 0; s < steps; s++) begin
        @(negedge clk); exp_a++;
        expect_exec(1'b1, exp_a, "step");
      end
      // jump from exp_a; maybe several units request, the lowest wins
      t = PCW'($urandom);
      u = $urandom % NJMP;
      jump = '0;
      for (int k = 0; k < NJMP; k++) begin
        target[k] = PCW'($urandom);
        if (k > u) jump[k] = 1'($urandom);
      end
      jump[u] = 1'b1; target[u] = t;
      @(negedge clk); jump = '0;
      expect_exec(1'b1, exp_a + 1'b1, "delay slot");
      @(negedge clk);
      expect_exec(1'b1, t, "jump target");
      @(negedge clk);
      expect_exec(1'b1, t + 1'b1, "after target");
      // halt
      halt[$urandom % NJMP] = 1'b1;
      @(negedge clk); halt = '0;
      expect_exec(1'b0, 0, "delay slot of halt dropped");
      checks++;
      if (!done || busy) begin failures++; $display("done %b busy %b after halt", done, busy); end
      repeat (3) @(negedge clk);
      expect_exec(1'b0, 0, "stays halted");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
