// ldst: load-store function unit (LDST1..LDST3), each tied to its own data RAM.
//
// A move to the load trigger reads the word at the bus address from the unit's data RAM; a
// move to the store trigger writes the store-data operand there. The loaded word is a source
// on the buses and is also wired straight to every MMAC (the direct LDST-to-MMAC path of the
// processor description), so an MMAC can multiply a loaded residue without a bus move. The
// socket layout and the two-cycle load latency are this design's choice.
//
// Sockets (offsets in the unit's window at BASE): +0 store data, +1 load trigger (bus =
// address), +2 store trigger (bus = address). A store-data move in the same cycle as the store
// trigger is used by it.
//
// Timing: the request is registered at the end of the trigger cycle t and the RAM is accessed
// in t+1, so a load's data is readable by a move in cycle t+2 and stays until the next load.
// One request per cycle.
module ldst
  import tta_pkg::*;
#(
  parameter logic [DSTW-1:0] BASE = D_LDST,  // socket window (0x08 ids)
  parameter int unsigned     AW   = 10       // data RAM address width
) (
  input  logic          clk,
  input  logic          rst_n,
  input  mv_valid_t     mv_valid,
  input  mv_dst_t       mv_dst,
  input  bus_t          bus,
  output word_t         result,     // load result, bus source and direct path to the MMACs
  // data RAM port
  output logic          ram_en,
  output logic          ram_we,
  output logic [AW-1:0] ram_addr,
  output word_t         ram_wdata,
  input  word_t         ram_rdata
);

  logic [NBUS-1:0] h_d, h_ld, h_st;
  word_t d_q, d_n;

  always_comb begin
    h_d  = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LS_DATA));
    h_ld = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LS_LD));
    h_st = sock_hit(mv_valid, mv_dst, BASE + DSTW'(LS_ST));
    d_n  = (|h_d) ? sock_val(h_d, bus) : d_q;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      d_q <= '0; ram_en <= 1'b0; ram_we <= 1'b0; ram_addr <= '0; ram_wdata <= '0;
    end else begin
      d_q    <= d_n;
      ram_en <= (|h_ld) || (|h_st);
      ram_we <= |h_st;
      if (|h_st) begin
        ram_addr  <= AW'(sock_val(h_st, bus));
        ram_wdata <= d_n;
      end else if (|h_ld) begin
        ram_addr  <= AW'(sock_val(h_ld, bus));
      end
    end

  assign result = ram_rdata;

  a_one_req : assert property (@(posedge clk) disable iff (!rst_n) !((|h_ld) && (|h_st)))
    else $error("ldst: load and store triggered in the same cycle");

endmodule
