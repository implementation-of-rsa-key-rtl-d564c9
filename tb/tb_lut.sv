// tb_lut: self-checking test of the LUT unit with Table1 behind it.
//
// Writes random constants at random addresses through moves (write data in the same cycle as the
// write trigger, and in an earlier cycle), then reads them back, one read per cycle, and
// checks each read result exactly two cycles after its trigger against a testbench copy.
module tb_lut;
  import tta_pkg::*;

  localparam int unsigned AW = 8;
  localparam logic [DSTW-1:0] B = D_LUT;

  logic clk = 1'b0, rst_n = 1'b0;
  mv_valid_t mv_valid;
  mv_dst_t   mv_dst;
  bus_t      bus;
  word_t     result, ram_wdata, ram_rdata, unused_b;
  logic      ram_en, ram_we;
  logic [AW-1:0] ram_addr;
  int checks = 0, failures = 0;
  word_t ref_mem [1 << AW];

  lut #(.BASE(B), .AW(AW)) dut (.clk, .rst_n, .mv_valid, .mv_dst, .bus, .result,
                                 .tab_en(ram_en), .tab_we(ram_we), .tab_addr(ram_addr), .tab_wdata(ram_wdata), .tab_rdata(ram_rdata));
  data_ram #(.DEPTH(1 << AW)) u_ram (.clk, .a_en(ram_en), .a_we(ram_we), .a_addr(ram_addr),
                                     .a_wdata(ram_wdata), .a_rdata(ram_rdata),
                                     .b_en(1'b0), .b_we(1'b0), .b_addr('0), .b_wdata('0),
                                     .b_rdata(unused_b));

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  word_t exp_q[$];

  initial begin
    mv_valid = '0; mv_dst = '0; bus = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < (1 << AW); i++) begin
      @(negedge clk);
      mv_valid = 4'b1001;
      ref_mem[i] = $urandom;
      mv_dst[3] = B + DSTW'(LU_DATA); bus[3] = ref_mem[i];
      mv_dst[0] = B + DSTW'(LU_WR);   bus[0] = word_t'(i);
    end
    // store data moved one cycle ahead of its trigger
    @(negedge clk);
    mv_valid = 4'b0100; mv_dst[2] = B + DSTW'(LU_DATA); bus[2] = 32'hCAFE_F00D;
    @(negedge clk);
    mv_valid = 4'b0010; mv_dst[1] = B + DSTW'(LU_WR);   bus[1] = 32'd5;
    ref_mem[5] = 32'hCAFE_F00D;
    // loads, one per cycle, result checked two cycles after the trigger
    for (int i = 0; i < 600; i++) begin
      int unsigned a;
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (result !== exp_q[0]) begin
          failures++;
          $display("load %0d: got %h expected %h", i - 2, result, exp_q[0]);
        end
        void'(exp_q.pop_front());
      end
      a = (i == 0) ? 5 : $urandom % (1 << AW);
      mv_valid = 4'b0001 << (i % 4);
      mv_dst[i % 4] = B + DSTW'(LU_RD); bus[i % 4] = word_t'(a);
      exp_q.push_back(ref_mem[a]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
