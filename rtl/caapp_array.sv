// caapp_array: the CAAPP, a square array of bit-serial PEs working in SIMD or
// multiassociative mode.
//
// All PEs receive the same instruction.  They reach one another through the
// SEWN nearest-neighbour mesh and through the Coterie network, whose switch
// settings each PE holds and which lets every isolated group of PEs run its
// own broadcast and Some/None test at the same time.  Two kinds of summary
// feedback go back to the controller: the array-wide Some/None (OR of all
// responders, a responder being a PE with R = 1 and A = 1) and, on OP_CNT,
// the number of responders on every chip (chips are 8 x 8 tiles of 64 PEs,
// numbered row-major).  The backing store is outside; this block drives its
// PE-side port: one bit plane address for all PEs, one write bit and mask
// bit per PE.
//
// Timing: an instruction is taken in a cycle with instr_valid and
// instr_ready high and completes in that cycle, except OP_COT, after which
// instr_ready stays low until the Coterie network has settled.  OP_BSRD
// issues a read; the bit is usable as SRC_BS from the next instruction on.
// The OR/count tree is combinational; counts register on OP_CNT.
// The array geometry follows the architecture (512 x 512 PEs, 64 per chip);
// the 8 x 8 chip tile, the handshake and the instruction set are this
// design's choices.
module caapp_array
  import iua_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned MEM_BITS = PE_MEM_BITS,
  localparam int unsigned CR      = ROWS / CHIP_SIDE,
  localparam int unsigned CC      = COLS / CHIP_SIDE,
  localparam int unsigned NCHIP   = CR * CC
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pe_instr_t            instr,
  input  logic                 instr_valid,
  output logic                 instr_ready,
  output logic                 some,
  output logic [6:0]           chip_count [NCHIP],
  output logic                 cot_busy,
  output logic                 cot_done,
  output logic [BS_ADDR_W-1:0] bs_addr,
  output logic                 bs_rd,
  output logic                 bs_wr,
  output logic                 bs_wmask [ROWS*COLS],
  output logic                 bs_wdata [ROWS*COLS],
  input  logic                 bs_rdata [ROWS*COLS]
);

  localparam int unsigned N = ROWS * COLS;

  logic        exec;
  logic        x    [N];
  logic        nb1  [N];
  logic        nb2  [N];
  logic        resp [N];
  logic        drv  [N];
  logic        cval [N];
  coterie_sw_t sw   [N];

  assign instr_ready = !cot_busy;
  assign exec        = instr_valid && instr_ready;

  for (genvar k = 0; k < NCHIP; k++) begin : g_chip
    caapp_chip #(.MEM_BITS(MEM_BITS)) u_chip (
      .clk      (clk),
      .rst_n    (rst_n),
      .instr    (instr),
      .exec     (exec),
      .nb1      (nb1[k*CHIP_PES +: CHIP_PES]),
      .nb2      (nb2[k*CHIP_PES +: CHIP_PES]),
      .cot_in   (cval[k*CHIP_PES +: CHIP_PES]),
      .bs_rdata (bs_rdata[k*CHIP_PES +: CHIP_PES]),
      .x_out    (x[k*CHIP_PES +: CHIP_PES]),
      .resp     (resp[k*CHIP_PES +: CHIP_PES]),
      .cot_drive(drv[k*CHIP_PES +: CHIP_PES]),
      .sw       (sw[k*CHIP_PES +: CHIP_PES]),
      .bs_we    (bs_wmask[k*CHIP_PES +: CHIP_PES]),
      .bs_wdata (bs_wdata[k*CHIP_PES +: CHIP_PES]),
      .count    (chip_count[k])
    );
  end

  sewn_mesh #(.ROWS(ROWS), .COLS(COLS)) u_mesh (
    .x   (x),
    .dir1(instr.nb1),
    .dir2(instr.nb2),
    .nb1 (nb1),
    .nb2 (nb2)
  );

  coterie_network #(.ROWS(ROWS), .COLS(COLS)) u_cot (
    .clk  (clk),
    .rst_n(rst_n),
    .start(exec && instr.op == OP_COT),
    .drive(drv),
    .sw   (sw),
    .busy (cot_busy),
    .done (cot_done),
    .value(cval)
  );

  assign bs_addr = instr.bsaddr;
  assign bs_rd   = exec && instr.op == OP_BSRD;
  assign bs_wr   = exec && instr.op == OP_BSWR;

  // Array-wide Some/None
  logic [N-1:0] resp_v;
  for (genvar k = 0; k < N; k++) begin : g_resp
    assign resp_v[k] = resp[k];
  end
  assign some = |resp_v;

  // The network result is only defined once the evaluation has finished.
  always_ff @(posedge clk)
    a_no_exec_while_busy: assert (!(cot_busy && exec))
      else $error("caapp_array: instruction executed during a Coterie evaluation");

endmodule
