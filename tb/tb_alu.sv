// tb_alu: self-checking test of the ALU unit.
//
// Random operands through every opcode, including chained add/subtract with carry and the
// modular add/subtract with random moduli; the expected value is recomputed in the testbench
// with plain wide arithmetic. Checks the one-cycle latency: each result is sampled in the cycle
// right after its trigger, while a new trigger is issued every cycle.
module tb_alu;
  import tta_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  word_t     result;
  int checks = 0, failures = 0;

  localparam logic [DSTW-1:0] B = D_ALU + 10'h20;  // ALU2

  alu #(.BASE(B)) dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .result);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t a, b, m, e, prev_e;
  logic  cy, have_prev;
  logic [32:0] t;
  alu_op_e op;

  initial begin
    mv_valid = '0; mv_dst = '0; bus = '0;
    cy = 1'b0; have_prev = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 5000; it++) begin
      @(negedge clk);
      if (have_prev) begin
        checks++;
        if (result !== prev_e) begin
          failures++;
          $display("it %0d: got %h expected %h", it, result, prev_e);
        end
      end
      op = alu_op_e'($urandom % 16);
      a = $urandom; b = $urandom; m = $urandom | 32'h8000_0000;
      if (op == AL_MADD || op == AL_MSUB) begin a = a % m; b = b % m; end
      if (it % 11 == 0) b = a;
      unique case (op)
        AL_ADD:  begin t = 33'(a) + 33'(b);                 e = t[31:0]; cy = t[32]; end
        AL_ADDC: begin t = 33'(a) + 33'(b) + 33'(cy);       e = t[31:0]; cy = t[32]; end
        AL_SUB:  begin t = 33'(a) - 33'(b);                 e = t[31:0]; cy = t[32]; end
        AL_SUBB: begin t = 33'(a) - 33'(b) - 33'(cy);       e = t[31:0]; cy = t[32]; end
        AL_MADD: e = word_t'((64'(a) + 64'(b)) % 64'(m));
        AL_MSUB: e = word_t'((64'(a) + 64'(m) - 64'(b)) % 64'(m));
        AL_SHR:  e = a >> (b % 32);
        AL_SAR:  e = word_t'($signed(a) >>> (b % 32));
        AL_SHL:  e = a << (b % 32);
        AL_AND:  e = a & b;
        AL_OR:   e = a | b;
        AL_XOR:  e = a ^ b;
        AL_EQ:   e = (a == b) ? 1 : 0;
        AL_LTU:  e = (a < b) ? 1 : 0;
        AL_SEL:  e = m[0] ? a : b;
        AL_CRY:  e = word_t'(cy);
      endcase
      mv_valid = 4'b0111;
      mv_dst[2] = B + DSTW'(AL_A);                 bus[2] = a;
      mv_dst[0] = B + DSTW'(AL_M);                 bus[0] = m;
      mv_dst[1] = B + DSTW'(AL_TRG) + DSTW'(op);   bus[1] = b;
      prev_e = e; have_prev = 1'b1;
    end
    @(negedge clk);
    mv_valid = '0;
    checks++;
    if (result !== prev_e) failures++;
    // the result holds while nothing triggers
    repeat (3) @(negedge clk);
    checks++;
    if (result !== prev_e) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
