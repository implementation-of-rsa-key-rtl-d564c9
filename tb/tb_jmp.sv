// tb_jmp: self-checking test of a JMP unit.
//
// Triggers every operation with random targets and condition values and checks the
// combinational jump/target/halt outputs in the same cycle, including loop counting: a counter
// loaded with n must give n-1 taken LOOP branches followed by one fall-through.
module tb_jmp;
  import tta_pkg::*;

  localparam logic [DSTW-1:0] B = D_JMP + 10'h08;   // JMP2

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  logic      cond, jump, halt;
  logic [PCW-1:0] target;
  int checks = 0, failures = 0;

  jmp #(.BASE(B)) dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .cond, .jump, .target, .halt);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(logic ej, logic eh, logic [PCW-1:0] et, string what);
    #1;
    checks++;
    if (jump !== ej || halt !== eh || (ej && target !== et)) begin
      failures++;
      $display("%s: jump %b halt %b target %0d, expected %b %b %0d", what, jump, halt, target,
               ej, eh, et);
    end
  endtask

  task automatic trig(int unsigned op, logic [PCW-1:0] t);
    int unsigned j;
    j = $urandom % NBUS;
    mv_valid = '0;
    mv_valid[j] = 1'b1; mv_dst[j] = B + DSTW'(op); bus[j] = word_t'(t);
  endtask

  initial begin
    mv_valid = '0; mv_dst = '0; bus = '0; cond = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 500; it++) begin
      logic [PCW-1:0] t;
      int unsigned n;
      t = PCW'($urandom);
      cond = 1'($urandom);
      @(negedge clk); trig(JP_JMP, t);  chk(1'b1, 1'b0, t, "JMP");
      @(negedge clk); trig(JP_BT, t);   chk(cond, 1'b0, t, "BT");
      @(negedge clk); trig(JP_BF, t);   chk(!cond, 1'b0, t, "BF");
      @(negedge clk); mv_valid = '0;    chk(1'b0, 1'b0, t, "idle");
      // loop: count moved in the same cycle as the first LOOP for odd it, a cycle earlier else
      n = 1 + $urandom % 6;
      @(negedge clk);
      if (it % 2 == 0) begin
        mv_valid = 4'b0001; mv_dst[0] = B + DSTW'(JP_CNT); bus[0] = word_t'(n);
        @(negedge clk);
        trig(JP_LOOP, t);
        if (mv_valid[0]) begin mv_valid = 4'b1000; mv_dst[3] = B + DSTW'(JP_LOOP); bus[3] = word_t'(t); end
      end else begin
        trig(JP_LOOP, t);
        if (mv_valid[0]) begin mv_valid = 4'b1000; mv_dst[3] = B + DSTW'(JP_LOOP); bus[3] = word_t'(t); end
        mv_valid[0] = 1'b1; mv_dst[0] = B + DSTW'(JP_CNT); bus[0] = word_t'(n);
      end
      chk(n > 1, 1'b0, t, "LOOP first");
      for (int k = 2; k <= n; k++) begin
        @(negedge clk); trig(JP_LOOP, t); chk(k < n, 1'b0, t, "LOOP");
      end
      @(negedge clk); trig(JP_HALT, t); chk(1'b0, 1'b1, t, "HALT");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
