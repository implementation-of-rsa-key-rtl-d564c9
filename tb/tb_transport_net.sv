// tb_transport_net: self-checking test of the transport buses.
//
// Gives every source socket a distinct random value, then drives random source ids, random
// immediates and out-of-range ids on all buses and checks each bus value.
module tb_transport_net;
  import tta_pkg::*;

  word_t [NSRC-1:0] src_val;
  logic [NBUS-1:0] mv_imm;
  logic [NBUS-1:0][SRCW-1:0] mv_src;
  bus_t mv_immval, bus;
  int checks = 0, failures = 0;

  transport_net dut (.src_val, .mv_imm, .mv_src, .mv_immval, .bus);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int it = 0; it < 3000; it++) begin
      word_t e;
      for (int s = 0; s < NSRC; s++) src_val[s] = $urandom;
      for (int j = 0; j < NBUS; j++) begin
        mv_imm[j] = ($urandom % 4) == 0;
        mv_src[j] = (it % 10 == 0) ? SRCW'($urandom) : SRCW'($urandom % NSRC);
        mv_immval[j] = $urandom;
      end
      #1;
      for (int j = 0; j < NBUS; j++) begin
        if (mv_imm[j])               e = mv_immval[j];
        else if (mv_src[j] < NSRC)   e = src_val[mv_src[j]];
        else                         e = '0;
        checks++;
        if (bus[j] !== e) begin
          failures++;
          $display("it %0d bus %0d: got %h expected %h", it, j, bus[j], e);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
