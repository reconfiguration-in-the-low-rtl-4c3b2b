// backing_store: the backing store of one CAAPP chip, dual-ported between
// the chip's PEs and the ICAP processor that sits above the chip.
//
// Every PE has 32K bits of backing store.  The store is organised in bit
// planes: plane p holds bit p of all PES PEs of the chip, so one broadcast
// PE instruction reads or writes the same plane in every PE at once (port
// A), with a per-PE write mask from the PEs' activity bits.  The ICAP side
// (port B) sees IW-bit words: word address {p, q} holds bit p of PEs
// q*IW .. q*IW+IW-1, bit i of the word belonging to PE q*IW+i.  Converting
// between this bit-plane layout and per-PE values is left to ICAP software.
// The plane layout, word mapping and port priority are this design's
// choices; the store size and the dual porting follow the architecture.
//
// Timing: both ports are synchronous.  A read returns data at the clock
// edge after the request and the data holds until the next read on that
// port.  A write lands at the clock edge.  If both ports write the same bit
// in one cycle, port A (the PEs) wins.
module backing_store #(
  parameter int unsigned PES   = 64,
  parameter int unsigned DEPTH = 32768,  // bits per PE
  parameter int unsigned IW    = 16,     // ICAP word width
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned QW   = $clog2(PES / IW),
  localparam int unsigned BW   = AW + QW
) (
  input  logic          clk,
  // port A: the CAAPP chip
  input  logic [AW-1:0] a_addr,
  input  logic          a_rd,
  input  logic          a_wr,
  input  logic          a_wmask [PES],
  input  logic          a_wdata [PES],
  output logic          a_rdata [PES],
  // port B: the ICAP processor
  input  logic [BW-1:0] b_addr,
  input  logic          b_rd,
  input  logic          b_wr,
  input  logic [IW-1:0] b_wdata,
  output logic [IW-1:0] b_rdata
);

  logic [PES-1:0] mem [DEPTH];
  logic [PES-1:0] a_rq;
  logic [AW-1:0]  b_plane;
  logic [QW-1:0]  b_part;

  assign b_plane = b_addr[BW-1:QW];
  assign b_part  = b_addr[QW-1:0];

  always_ff @(posedge clk) begin
    if (b_wr) mem[b_plane][b_part*IW +: IW] <= b_wdata;
    if (a_wr)
      for (int k = 0; k < PES; k++)
        if (a_wmask[k]) mem[a_addr][k] <= a_wdata[k];
  end

  always_ff @(posedge clk) begin
    if (a_rd) a_rq    <= mem[a_addr];
    if (b_rd) b_rdata <= mem[b_plane][b_part*IW +: IW];
  end

  always_comb
    for (int k = 0; k < PES; k++) a_rdata[k] = a_rq[k];

endmodule
