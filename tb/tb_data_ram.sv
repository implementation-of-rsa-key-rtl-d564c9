// tb_data_ram: self-checking test of the dual-port data RAM.
//
// Fills the memory through both ports with random words, reads every address back through
// both ports against a testbench copy, checks that read data holds when a port is idle or
// writing, and that a read sees its data exactly one cycle after the address.
module tb_data_ram;
  import tta_pkg::*;

  localparam int unsigned DEPTH = 256;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0;
  logic a_en, a_we, b_en, b_we;
  logic [AW-1:0] a_addr, b_addr;
  word_t a_wdata, b_wdata, a_rdata, b_rdata;
  int checks = 0, failures = 0;
  word_t ref_mem [DEPTH];

  data_ram #(.DEPTH(DEPTH)) dut (.clk, .a_en, .a_we, .a_addr, .a_wdata, .a_rdata,
                                 .b_en, .b_we, .b_addr, .b_wdata, .b_rdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(word_t got, word_t exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    a_en = 0; a_we = 0; b_en = 0; b_we = 0; a_addr = '0; b_addr = '0; a_wdata = '0; b_wdata = '0;
    // port A writes even addresses, port B odd ones, in the same cycles
    for (int i = 0; i < DEPTH; i += 2) begin
      @(negedge clk);
      a_en = 1; a_we = 1; a_addr = AW'(i);     a_wdata = $urandom; ref_mem[i]     = a_wdata;
      b_en = 1; b_we = 1; b_addr = AW'(i + 1); b_wdata = $urandom; ref_mem[i + 1] = b_wdata;
    end
    // read back: A ascending, B descending
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      a_en = 1; a_we = 0; a_addr = AW'(i);
      b_en = 1; b_we = 0; b_addr = AW'(DEPTH - 1 - i);
      @(negedge clk);
      chk(a_rdata, ref_mem[i], "port A read");
      chk(b_rdata, ref_mem[DEPTH - 1 - i], "port B read");
      // idle cycle and a write on A: both outputs hold
      a_en = 1; a_we = 1; a_addr = AW'(i); a_wdata = ~ref_mem[i]; ref_mem[i] = a_wdata;
      b_en = 0;
      @(negedge clk);
      a_en = 0;
      chk(a_rdata, ~ref_mem[i], "port A holds over a write");
      chk(b_rdata, ref_mem[DEPTH - 1 - i], "port B holds when idle");
    end
    // cross check: what A wrote, B reads
    for (int i = 0; i < DEPTH; i += 7) begin
      @(negedge clk);
      b_en = 1; b_we = 0; b_addr = AW'(i);
      @(negedge clk);
      b_en = 0;
      chk(b_rdata, ref_mem[i], "port B reads port A's write");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
