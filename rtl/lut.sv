// lut: look-up table function unit in front of Table1, the store of pre-computed constants.
//
// The RNS Montgomery multiplication needs many constants that depend only on the two RNS
// bases and on the modulus N (such as |A_i^-1| mod a_i, |A_i| mod b_j, |-N^-1| mod a_i);
// the processor description keeps them in a table read through a LUT unit whose output is
// wired straight to the group of MMACs. Here Table1 is writable, so a program or the host can
// refill it when N changes. A read moves the constant to the LUT result, which is a bus source
// and the MMACs' direct b input. The socket layout and the latency are this design's choice.
//
// Sockets (offsets in the unit's window at BASE): +0 write data, +1 read trigger (bus =
// address), +2 write trigger (bus = address). A write-data move in the same cycle as the write
// trigger is used by it.
//
// Timing: a read triggered in cycle t is readable by a move, or usable by an MMAC trigger over
// the direct path, in cycle t+2; it stays until the next read. One request per cycle.
module lut
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_LUT,  // socket window (0x08 ids)
  parameter int unsigned     AW   = 10      // Table1 address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mv_valid_t     mv_valid,
  input  mv_dst_t       mv_dst,
  input  bus_t          bus,
  output word_t         result,     // read result, bus source and direct path to the MMACs
  // Table1 port
  output logic          tab_en,
  output logic          tab_we,
  output logic [AW-1:0] tab_addr,
  output word_t         tab_wdata,
  input  word_t         tab_rdata
);

  logic [NBUS-1:0] h_d, h_rd, h_wr;
  word_t d_q, d_n;

  always_comb begin
    h_d  = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LU_DATA));
    h_rd = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LU_RD));
    h_wr = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LU_WR));
    d_n  = (|h_d) ? sock_val(h_d, bus) : d_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_q <= '0; tab_en <= 1'b0; tab_we <= 1'b0; tab_addr <= '0; tab_wdata <= '0;
    end else begin
      d_q    <= d_n;
      tab_en <= (|h_rd) || (|h_wr);
      tab_we <= |h_wr;
      if (|h_wr) begin
        tab_addr  <= AW'(sock_val(h_wr, bus));
        tab_wdata <= d_n;
      end else if (|h_rd) begin
        tab_addr  <= AW'(sock_val(h_rd, bus));
      end
    end

  assign result = tab_rdata;

  a_one_req : assert property (@(posedge clk) disable iff (!rst_n) !((|h_rd) && (|h_wr)))
    else $error("lut: read and write triggered in the same cycle");

endmodule
