// rf: general register file on the transport buses.
//
// RF_N 32-bit registers. Any bus can write any register in a cycle (a move to destination
// D_RF + r), and every register is a bus source (source S_RF + r), so the RF has one write and
// one read port per bus. The processor description shows the RF on the buses but gives
// neither its size nor its ports: both are this design's choice.
//
// Timing: a write moved in cycle t is readable from cycle t+1. If two buses write the same
// register in one cycle, the lowest-numbered bus wins and an assertion reports it.
module rf
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_RF
) (
  input  logic               clk,
  input  logic               rst_n,
  input  mv_valid_t          mv_valid,
  input  mv_dst_t            mv_dst,
  input  bus_t               bus,
  output word_t [RF_N-1:0]   regs      // every register, to the source multiplexers
);

  logic [RF_N-1:0][NBUS-1:0] hit;

  always_comb
    for (int r = 0; r < RF_N; r++) hit[r] = sock_hit(mv_valid, mv_dst, BASE + DSTW'(r));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) regs <= '0;
    else
      for (int r = 0; r < RF_N; r++)
        if (|hit[r]) regs[r] <= sock_val(hit[r], bus);

  for (genvar r = 0; r < RF_N; r++) begin : g_chk
    a_one_writer : assert property (@(posedge clk) disable iff (!rst_n) $onehot0(hit[r]))
      else $error("rf: two buses write register %0d in one cycle", r);
  end

endmodule
