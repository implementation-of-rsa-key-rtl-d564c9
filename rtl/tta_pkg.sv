// tta_pkg: shared widths, unit counts, move-slot format and the socket address map of the
// TTA-like RSA key generation processor.
//
// The processor is programmed with moves only: every instruction holds one move slot per bus,
// and a slot says which source drives its bus and which destination socket latches the bus
// value at the end of the cycle. Writing a trigger socket starts an operation in a function
// unit (FU); writing an operand socket only stores a value. The counts of buses and units and
// the 32-bit word follow the processor description (four buses, four MMACs, two ALUs, three
// LDSTs, one LUT, three JMP units). The slot encoding, the address map and the opcodes below
// are this design's own, because the description does not define an instruction encoding.
package tta_pkg;

  localparam int unsigned W       = 32;  // bus and residue width (one RNS base word)
  localparam int unsigned NBUS    = 4;   // transport buses
  localparam int unsigned NMMAC   = 4;
  localparam int unsigned NALU    = 2;
  localparam int unsigned NLDST   = 3;
  localparam int unsigned NJMP    = 3;
  localparam int unsigned RF_N    = 32;  // registers in the RF
  localparam int unsigned DSTW    = 10;  // destination socket id width
  localparam int unsigned SRCW    = 8;   // source socket id width (low bits of the src field)
  localparam int unsigned PCW     = 10;  // instruction address width

  typedef logic [W-1:0] word_t;

  // One move slot. When imm is set the 32-bit src field is the value put on the bus
  // (long immediate); otherwise its low SRCW bits select a source socket.
  typedef struct packed {
    logic             valid;
    logic             imm;
    logic [DSTW-1:0]  dst;
    logic [W-1:0]     src;
  } slot_t;

  localparam int unsigned SLOTW  = $bits(slot_t);   // 44
  localparam int unsigned INSTRW = NBUS * SLOTW;    // 176, slot 0 in the low bits

  // ---------------------------------------------------------------- source socket ids
  localparam logic [SRCW-1:0] S_RF    = 8'h00;  // 0x00..0x1F: RF r0..r31
  localparam logic [SRCW-1:0] S_MMAC  = 8'h20;  // 0x20..0x23: MMAC1..4 result
  localparam logic [SRCW-1:0] S_ALU   = 8'h24;  // 0x24..0x25: ALU1..2 result
  localparam logic [SRCW-1:0] S_LDST  = 8'h26;  // 0x26..0x28: LDST1..3 load result
  localparam logic [SRCW-1:0] S_LUT   = 8'h29;  // LUT read result
  localparam logic [SRCW-1:0] S_COND  = 8'h2A;  // Cond Reg (0 or 1)
  localparam int unsigned     NSRC    = 43;     // ids 0..0x2A

  // ---------------------------------------------------------- destination socket ids
  localparam logic [DSTW-1:0] D_RF    = 10'h000; // 0x000..0x01F: RF write
  localparam logic [DSTW-1:0] D_MMAC  = 10'h100; // + n*0x40, n = 0..3
  localparam logic [DSTW-1:0] D_ALU   = 10'h200; // + n*0x20, n = 0..1
  localparam logic [DSTW-1:0] D_LDST  = 10'h280; // + n*0x08, n = 0..2
  localparam logic [DSTW-1:0] D_LUT   = 10'h2A0;
  localparam logic [DSTW-1:0] D_COND  = 10'h2B0;
  localparam logic [DSTW-1:0] D_JMP   = 10'h2C0; // + n*0x08, n = 0..2

  // MMAC sockets (offsets inside its 0x40 window)
  localparam int unsigned MM_A   = 0;   // operand a
  localparam int unsigned MM_C   = 1;   // addend c
  localparam int unsigned MM_M   = 2;   // modulus m
  localparam int unsigned MM_TRG = 32;  // 32..63: trigger, offset-32 = {asel[1:0], bsel, op[1:0]}

  typedef enum logic [1:0] {
    MM_MUL  = 2'd0,   // r   = a*b mod m
    MM_MADD = 2'd1,   // r   = (a*b + c) mod m
    MM_MACC = 2'd2,   // acc = (a*b + acc) mod m, r = acc
    MM_MINI = 2'd3    // acc = a*b mod m,          r = acc  (starts an accumulation)
  } mmac_op_e;

  // ALU sockets (offsets inside its 0x20 window)
  localparam int unsigned AL_A   = 0;   // operand a (the trigger value is b)
  localparam int unsigned AL_M   = 1;   // modulus m for MADD/MSUB, select flag for SEL
  localparam int unsigned AL_TRG = 16;  // 16..31: trigger, offset-16 = opcode

  typedef enum logic [3:0] {
    AL_ADD  = 4'd0,   // r = a + b,           carry out kept
    AL_ADDC = 4'd1,   // r = a + b + carry,   carry out kept
    AL_SUB  = 4'd2,   // r = a - b,           borrow out kept
    AL_SUBB = 4'd3,   // r = a - b - borrow,  borrow out kept
    AL_MADD = 4'd4,   // r = (a + b) mod m   (a, b < m)
    AL_MSUB = 4'd5,   // r = (a - b) mod m   (a, b < m)
    AL_SHR  = 4'd6,   // r = a >> b[4:0]     logical
    AL_SAR  = 4'd7,   // r = a >>> b[4:0]    arithmetic
    AL_SHL  = 4'd8,   // r = a << b[4:0]
    AL_AND  = 4'd9,
    AL_OR   = 4'd10,
    AL_XOR  = 4'd11,
    AL_EQ   = 4'd12,  // r = (a == b)
    AL_LTU  = 4'd13,  // r = (a <  b) unsigned
    AL_SEL  = 4'd14,  // r = m[0] ? a : b   (case-select)
    AL_CRY  = 4'd15   // r = carry/borrow flag of the last ADD/ADDC/SUB/SUBB
  } alu_op_e;

  // LDST sockets
  localparam int unsigned LS_DATA = 0;  // store data operand
  localparam int unsigned LS_LD   = 1;  // trigger: load, bus = address
  localparam int unsigned LS_ST   = 2;  // trigger: store data operand, bus = address

  // LUT sockets
  localparam int unsigned LU_DATA = 0;  // write data operand
  localparam int unsigned LU_RD   = 1;  // trigger: read, bus = address
  localparam int unsigned LU_WR   = 2;  // trigger: write, bus = address

  // JMP sockets
  localparam int unsigned JP_CNT  = 0;  // loop counter operand
  localparam int unsigned JP_JMP  = 1;  // trigger: jump to bus
  localparam int unsigned JP_BT   = 2;  // trigger: branch to bus if cond = 1
  localparam int unsigned JP_BF   = 3;  // trigger: branch to bus if cond = 0
  localparam int unsigned JP_LOOP = 4;  // trigger: count-1, branch to bus if the new count != 0
  localparam int unsigned JP_HALT = 5;  // trigger: stop the program

  // Latencies, in cycles from the trigger move to the first move that may read the result.
  localparam int unsigned LAT_MMAC = 3;
  localparam int unsigned LAT_ALU  = 1;
  localparam int unsigned LAT_LD   = 2;

  // ------------------------------------------------------------ socket helpers
  // Bus view shared by every FU: which slots move this cycle, to where, and the bus values.
  typedef logic [NBUS-1:0]           mv_valid_t;
  typedef logic [NBUS-1:0][DSTW-1:0] mv_dst_t;
  typedef logic [NBUS-1:0][W-1:0]    bus_t;

  // Buses whose move targets socket a this cycle.
  function automatic logic [NBUS-1:0] sock_hit(input mv_valid_t v, input mv_dst_t d,
                                               input logic [DSTW-1:0] a);
    logic [NBUS-1:0] h;
    for (int j = 0; j < NBUS; j++) h[j] = v[j] && (d[j] == a);
    return h;
  endfunction

  // Value of the lowest-numbered hit bus (a program moves at most one value per socket).
  function automatic word_t sock_val(input logic [NBUS-1:0] h, input bus_t b);
    word_t r;
    r = '0;
    for (int j = NBUS - 1; j >= 0; j--) if (h[j]) r = b[j];
    return r;
  endfunction

  // Trigger decode: the lowest bus whose move targets one of the n sockets starting at
  // first, and the offset of that socket from first.
  typedef struct packed {
    logic            hit;
    logic [DSTW-1:0] off;
    logic [1:0]      bus;
  } trig_t;

  function automatic trig_t trig_dec(input mv_valid_t v, input mv_dst_t d,
                                     input logic [DSTW-1:0] first, input int unsigned n);
    trig_t t;
    t = '0;
    for (int j = NBUS - 1; j >= 0; j--)
      if (v[j] && d[j] >= first && d[j] < first + DSTW'(n)) begin
        t.hit = 1'b1; t.off = d[j] - first; t.bus = 2'(j);
      end
    return t;
  endfunction

endpackage
