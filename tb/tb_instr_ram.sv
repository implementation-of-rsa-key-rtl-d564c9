// tb_instr_ram: self-checking test of the instruction RAM.
//
// Writes random INSTRW-bit words to every address, reads them back through the fetch port
// one cycle after each address, and checks that the read data holds while rd_en is low and
// that a write and a read in the same cycle to different addresses do not disturb each other.
module tb_instr_ram;
  import tta_pkg::*;

  localparam int unsigned DEPTH = 128;
  localparam int unsigned AW = $clog2(DEPTH);

  logic clk = 1'b0, rd_en, wr_en;
  logic [AW-1:0] rd_addr, wr_addr;
  logic [INSTRW-1:0] rdata, wdata;
  logic [INSTRW-1:0] ref_mem [DEPTH];
  int checks = 0, failures = 0;

  instr_ram #(.DEPTH(DEPTH)) dut (.clk, .rd_en, .rd_addr, .rdata, .wr_en, .wr_addr, .wdata);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [INSTRW-1:0] rnd();
    logic [INSTRW-1:0] v;
    for (int i = 0; i < INSTRW; i += 32) v[i +: 32] = $urandom;
    return v;
  endfunction

  initial begin
    rd_en = 0; wr_en = 0; rd_addr = '0; wr_addr = '0; wdata = '0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      wr_en = 1; wr_addr = AW'(i); wdata = rnd(); ref_mem[i] = wdata;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      rd_en = 1; rd_addr = AW'(i);
      // rewrite the previous address at the same time
      wr_en = (i > 0); wr_addr = AW'(i - 1); wdata = rnd();
      if (i > 0) ref_mem[i - 1] = wdata;
      @(negedge clk);
      rd_en = 0; wr_en = 0;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("addr %0d mismatch", i); end
      @(negedge clk);
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("addr %0d not held", i); end
    end
    for (int i = 0; i < DEPTH; i += 5) begin
      @(negedge clk); rd_en = 1; rd_addr = AW'(i);
      @(negedge clk); rd_en = 0;
      checks++;
      if (rdata !== ref_mem[i]) begin failures++; $display("addr %0d rewrite mismatch", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
