// caapp_chip: one CAAPP chip, an 8 x 8 tile of 64 bit-serial processing
// elements, with the chip's local responder counter.
//
// Each PE holds what the architecture gives it: five one-bit registers, an
// ALU and a 320-bit RAM used as an explicitly managed cache, plus the eight
// Coterie network switches of its node, which it can save to and restore
// from RAM with one instruction.  The registers are named here X (the bit
// its SEWN neighbours read), Y, C (carry), R (response, the bit Some/None and
// the counter look at) and A (activity, which masks execution).  The names
// other than response and activity, the instruction format (iua_pkg) and the
// truth-table ALU are this design's choices.  RAM is addressed by bit;
// OP_SWLOAD/OP_SWSTORE use the byte holding that bit (addr[8:3]).
//
// The 64 PEs are the 64 iterations of one generate loop, PE number
// k = 8*row + col inside the tile; every PE runs the same logic.
//
// Interface: `instr` is broadcast and `exec` is high in the cycle it is
// executed.  nb1/nb2 are the X bits of the neighbours the instruction names
// (from the array's SEWN mesh), cot_in the level the Coterie network settled
// to at each PE, bs_rdata the last backing store bit read.  Every
// instruction takes effect at the clock edge ending its exec cycle; on
// OP_CNT, count registers the number of PEs with R = 1 and A = 1.  cot_drive,
// resp, x_out and the backing store write bits are combinational.  Writes
// happen only in active PEs (A = 1) unless the instruction is unmasked.
// After reset every PE is active, all switches are open and RAM is zero.
module caapp_chip
  import iua_pkg::*;
#(
  parameter int unsigned MEM_BITS = PE_MEM_BITS,
  localparam int unsigned NPE     = CHIP_PES,
  localparam int unsigned BYTES   = MEM_BITS / 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  pe_instr_t   instr,
  input  logic        exec,
  input  logic        nb1       [NPE],
  input  logic        nb2       [NPE],
  input  logic        cot_in    [NPE],
  input  logic        bs_rdata  [NPE],
  output logic        x_out     [NPE],
  output logic        resp      [NPE],
  output logic        cot_drive [NPE],
  output coterie_sw_t sw        [NPE],
  output logic        bs_we     [NPE],
  output logic        bs_wdata  [NPE],
  output logic [6:0]  count
);

  logic [5:0] byte_a;
  logic [2:0] bit_a;
  logic       addr_ok;
  logic [NPE-1:0] resp_v;
  assign byte_a  = instr.addr[8:3];
  assign bit_a   = instr.addr[2:0];
  assign addr_ok = int'(byte_a) < BYTES;

  function automatic logic src_val(pe_src_e s, logic m, logic x, logic y, logic r,
                                   logic a, logic c, logic n1, logic n2,
                                   logic ct, logic bs, logic swb);
    unique case (s)
      SRC_ZERO: return 1'b0;
      SRC_ONE:  return 1'b1;
      SRC_MEM:  return m;
      SRC_X:    return x;
      SRC_Y:    return y;
      SRC_R:    return r;
      SRC_A:    return a;
      SRC_C:    return c;
      SRC_NB1:  return n1;
      SRC_NB2:  return n2;
      SRC_COT:  return ct;
      SRC_BS:   return bs;
      SRC_SW:   return swb;
      default:  return 1'b0;
    endcase
  endfunction

  for (genvar k = 0; k < NPE; k++) begin : g_pe
    logic [BYTES-1:0][7:0] mem_q;
    logic        x_q, y_q, c_q, r_q, a_q;
    coterie_sw_t sw_q;
    logic        m, dv, swb, s1v, s2v, res, cout, en;

    assign m   = addr_ok ? mem_q[byte_a][bit_a] : 1'b0;
    assign swb = sw_q[bit_a];
    assign s1v = src_val(instr.s1, m, x_q, y_q, r_q, a_q, c_q, nb1[k], nb2[k],
                         cot_in[k], bs_rdata[k], swb);
    assign s2v = src_val(instr.s2, m, x_q, y_q, r_q, a_q, c_q, nb1[k], nb2[k],
                         cot_in[k], bs_rdata[k], swb);

    always_comb begin
      unique case (instr.dst)
        DST_X:   dv = x_q;
        DST_Y:   dv = y_q;
        DST_R:   dv = r_q;
        DST_A:   dv = a_q;
        DST_MEM: dv = m;
        DST_SW:  dv = swb;
        default: dv = 1'b0;
      endcase
    end

    assign res  = instr.tt[{s1v, s2v, c_q, dv}];
    assign cout = instr.ttc[{s1v, s2v, c_q}];
    assign en   = exec && (a_q || instr.unmasked);

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        x_q <= 1'b0; y_q <= 1'b0; c_q <= 1'b0; r_q <= 1'b0; a_q <= 1'b1;
        sw_q <= '0; mem_q <= '0;
      end else if (en) begin
        unique case (instr.op)
          OP_ALU: begin
            unique case (instr.dst)
              DST_X:   x_q <= res;
              DST_Y:   y_q <= res;
              DST_R:   r_q <= res;
              DST_A:   a_q <= res;
              DST_MEM: if (addr_ok) mem_q[byte_a][bit_a] <= res;
              DST_SW:  sw_q[bit_a] <= res;
              default: ;
            endcase
            if (instr.c_en) c_q <= cout;
          end
          OP_SWLOAD:  if (addr_ok) sw_q <= coterie_sw_t'(mem_q[byte_a]);
          OP_SWSTORE: if (addr_ok) mem_q[byte_a] <= sw_q;
          default: ;
        endcase
      end
    end

    assign x_out[k]     = x_q;
    assign resp[k]      = r_q & a_q;
    assign resp_v[k]    = r_q & a_q;
    assign cot_drive[k] = s1v & a_q;
    assign sw[k]        = sw_q;
    assign bs_we[k]     = exec && (instr.op == OP_BSWR) && (a_q || instr.unmasked);
    assign bs_wdata[k]  = s1v;
  end

  // Local count of responders (the chip's share of the count hardware)
  logic [6:0] cnt_d;
  always_comb begin
    cnt_d = '0;
    for (int k = 0; k < NPE; k++) cnt_d += 7'(resp_v[k]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           count <= '0;
    else if (exec && instr.op == OP_CNT)  count <= cnt_d;
  end

endmodule
