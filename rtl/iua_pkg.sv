// iua_pkg: types and constants shared by the low-level (CAAPP) and
// intermediate-level (ICAP) blocks of the Image Understanding Architecture
// slice.
//
// The CAAPP is a SIMD array: every cycle one broadcast instruction
// (pe_instr_t) reaches all bit-serial processing elements.  The instruction
// format is this design's own: the processing element is known to have five
// one-bit registers, an ALU, 320 bits of RAM and a set of Coterie network
// switches, but its instruction set is not published.  The ALU is a
// truth-table unit: the result bit is tt[{s1,s2,c,d}] where s1 and s2 are two
// selected source bits, c the carry register and d the current value of the
// destination; a second table ttc[{s1,s2,c}] updates the carry.  The TT_* and
// TC_* constants below combine with bitwise operators into any such function
// (for example TT_S1 & TT_S2 is AND).
//
// The Coterie switch names (N, S, E, W, NE, NW, H, V) follow the labels of
// the three-by-three Coterie network drawing.
package iua_pkg;

  // ---------------------------------------------------------------- CAAPP
  localparam int unsigned PE_MEM_BITS   = 320;    // RAM bits per PE
  localparam int unsigned PE_ADDR_W     = 9;      // addresses 0..319
  localparam int unsigned BS_BITS       = 32768;  // backing store bits per PE
  localparam int unsigned BS_ADDR_W     = 15;
  localparam int unsigned CHIP_PES      = 64;     // PEs on one CAAPP chip
  localparam int unsigned CHIP_SIDE     = 8;      // chip tile is 8 x 8 PEs

  // PE signals that span the whole array are kept in one flat vector in
  // chip-major order: the 64 PEs of chip 0 (row-major inside its 8 x 8
  // tile), then chip 1, chips numbered row-major over the array.  Chip k
  // then owns entries k*64 .. k*64+63.
  function automatic int unsigned pe_idx(int unsigned r, int unsigned c,
                                         int unsigned cols);
    return ((r / CHIP_SIDE) * (cols / CHIP_SIDE) + c / CHIP_SIDE) * CHIP_PES
           + (r % CHIP_SIDE) * CHIP_SIDE + (c % CHIP_SIDE);
  endfunction

  typedef enum logic [2:0] {
    OP_NOP     = 3'd0,  // nothing
    OP_ALU     = 3'd1,  // dst <= tt[...] (and carry if c_en)
    OP_COT     = 3'd2,  // place s1 (active cells only) on the Coterie network, wait until settled
    OP_SWLOAD  = 3'd3,  // switch register <= mem[addr +: 8]
    OP_SWSTORE = 3'd4,  // mem[addr +: 8] <= switch register
    OP_BSRD    = 3'd5,  // read backing store bit plane bsaddr (data usable next instruction as SRC_BS)
    OP_BSWR    = 3'd6,  // backing store bit plane bsaddr <= s1 (active cells only)
    OP_CNT     = 3'd7   // latch the per-chip count of responders (R & A)
  } pe_op_e;

  typedef enum logic [3:0] {
    SRC_ZERO = 4'd0,
    SRC_ONE  = 4'd1,
    SRC_MEM  = 4'd2,   // mem[addr]
    SRC_X    = 4'd3,
    SRC_Y    = 4'd4,
    SRC_R    = 4'd5,   // response register
    SRC_A    = 4'd6,   // activity register
    SRC_C    = 4'd7,
    SRC_NB1  = 4'd8,   // first SEWN neighbour's X (direction nb1)
    SRC_NB2  = 4'd9,   // second SEWN neighbour's X (direction nb2)
    SRC_COT  = 4'd10,  // value the Coterie network settled to at this PE
    SRC_BS   = 4'd11,  // last backing store bit read
    SRC_SW   = 4'd12   // switch bit selected by addr[2:0]
  } pe_src_e;

  typedef enum logic [2:0] {
    DST_NONE = 3'd0,
    DST_X    = 3'd1,
    DST_Y    = 3'd2,
    DST_R    = 3'd3,
    DST_A    = 3'd4,
    DST_MEM  = 3'd5,   // mem[addr]
    DST_SW   = 3'd6    // switch bit addr[2:0]
  } pe_dst_e;

  typedef enum logic [1:0] {
    DIR_N = 2'd0,
    DIR_E = 2'd1,
    DIR_S = 2'd2,
    DIR_W = 2'd3
  } dir_e;

  // Switch bit indices inside coterie_sw_t (used as addr[2:0] of DST_SW)
  localparam int unsigned SW_N  = 0;
  localparam int unsigned SW_E  = 1;
  localparam int unsigned SW_S  = 2;
  localparam int unsigned SW_W  = 3;
  localparam int unsigned SW_NE = 4;
  localparam int unsigned SW_NW = 5;
  localparam int unsigned SW_H  = 6;
  localparam int unsigned SW_V  = 7;

  // One PE's Coterie switches; a set bit means the switch is closed.
  typedef struct packed {
    logic v;   // PE to the node's vertical bus
    logic h;   // PE to the node's horizontal bus
    logic nw;  // diagonal bypass: west link to north link
    logic ne;  // diagonal bypass: north link to east link
    logic w;   // horizontal bus to west link
    logic s;   // vertical bus to south link
    logic e;   // horizontal bus to east link
    logic n;   // vertical bus to north link
  } coterie_sw_t;

  typedef struct packed {
    pe_op_e                 op;
    pe_src_e                s1;
    pe_src_e                s2;
    dir_e                   nb1;
    dir_e                   nb2;
    pe_dst_e                dst;
    logic [15:0]            tt;        // result table, index {s1,s2,c,d}
    logic [7:0]             ttc;       // carry table, index {s1,s2,c}
    logic                   c_en;      // update carry
    logic                   unmasked;  // execute in inactive cells too
    logic [PE_ADDR_W-1:0]   addr;
    logic [BS_ADDR_W-1:0]   bsaddr;
  } pe_instr_t;

  localparam logic [15:0] TT_S1 = 16'hFF00;
  localparam logic [15:0] TT_S2 = 16'hF0F0;
  localparam logic [15:0] TT_C  = 16'hCCCC;
  localparam logic [15:0] TT_D  = 16'hAAAA;
  localparam logic [7:0]  TC_S1 = 8'hF0;
  localparam logic [7:0]  TC_S2 = 8'hCC;
  localparam logic [7:0]  TC_C  = 8'hAA;

  // Instruction builders, for controllers and testbenches.
  function automatic pe_instr_t i_nop();
    pe_instr_t i;
    i = '0;
    i.op = OP_NOP;
    return i;
  endfunction

  function automatic pe_instr_t i_alu(pe_dst_e dst, pe_src_e s1, pe_src_e s2,
                                      logic [15:0] tt, logic unmasked,
                                      logic [PE_ADDR_W-1:0] addr);
    pe_instr_t i;
    i = '0;
    i.op = OP_ALU; i.dst = dst; i.s1 = s1; i.s2 = s2; i.tt = tt;
    i.unmasked = unmasked; i.addr = addr;
    return i;
  endfunction

  function automatic pe_instr_t i_cot(pe_src_e s1);
    pe_instr_t i;
    i = '0;
    i.op = OP_COT; i.s1 = s1;
    return i;
  endfunction

  function automatic pe_instr_t i_bsrd(logic [BS_ADDR_W-1:0] a);
    pe_instr_t i;
    i = '0;
    i.op = OP_BSRD; i.bsaddr = a;
    return i;
  endfunction

  function automatic pe_instr_t i_bswr(pe_src_e s1, logic [BS_ADDR_W-1:0] a,
                                       logic [PE_ADDR_W-1:0] addr);
    pe_instr_t i;
    i = '0;
    i.op = OP_BSWR; i.s1 = s1; i.bsaddr = a; i.addr = addr;
    return i;
  endfunction

  function automatic pe_instr_t i_sw(pe_op_e op, logic unmasked,
                                     logic [PE_ADDR_W-1:0] addr);
    pe_instr_t i;
    i = '0;
    i.op = op; i.unmasked = unmasked; i.addr = addr;
    return i;
  endfunction

  // ----------------------------------------------------------------- ICAP
  localparam int unsigned PARCOS_N     = 32;  // ports per PARCOS chip
  localparam int unsigned PARCOS_WORDS = 32;  // control words in the CPC
  localparam int unsigned PARCOS_SEL_W = 5;   // bits per output selector

  // Commands of the 64 x 64 network's configuration bus.
  typedef enum logic [1:0] {
    NET_NONE     = 2'd0,
    NET_SET_ROW  = 2'd1,  // every chip's Row Select Register <= row
    NET_LINK     = 2'd2,  // in the selected control word: output port <- input port
    NET_RESWITCH = 2'd3   // every chip: RSR <= row and CPR <= CPC[row]
  } net_cmd_e;

endpackage
