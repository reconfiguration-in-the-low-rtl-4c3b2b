// iua_top: a 1/64 slice of the Image Understanding Architecture: the
// low-level CAAPP array and the intermediate-level ICAP communication
// hardware, coupled through dual-ported backing store.
//
// The slice holds 64 x 64 CAAPP PEs (64 chips of 8 x 8) and serves 64 ICAP
// processors, one per CAAPP chip, which is the prototype's configuration.
// Inside: caapp_array (PEs, SEWN mesh, Coterie network, Some/None, per-chip
// counts); one backing_store per chip, port A on the PEs' side and port B on
// the ICAP processor's side; icap_network, the 64 x 64 PARCOS crossbar that
// links the processors' serial output ports to their serial input ports;
// icap_barrier, which synchronises the processors and reswitches the network
// between stages; icap_global_feedback, the three global OR lines and the
// global sum.
//
// Outside (brought out as ports): the array control unit, which broadcasts
// CAAPP instructions and configures the network; the 64 ICAP digital signal
// processors, with their backing store buses, serial links, barrier lines,
// flags and sum values.  The higher, symbolic level is not part of the
// slice.
//
// Timing: see the blocks.  CAAPP instructions use a valid/ready handshake;
// network commands are one per cycle, and a reswitch issued by the barrier
// unit takes precedence over a controller command in the same cycle (the
// controller's command is then dropped; net_cmd_taken tells it).
// The slice's make-up (64 ICAP processors, one per CAAPP chip, the 64 x 64
// crossbar, the dual-ported backing store) follows the architecture; the
// command priority and the port grouping are this design's choices.  The
// array's cot_done pulse is left unconnected: the controller sees the end
// of a Coterie evaluation as instr_ready rising.
module iua_top
  import iua_pkg::*;
#(
  parameter int unsigned ROWS     = 64,
  parameter int unsigned COLS     = 64,
  parameter int unsigned BS_DEPTH = BS_BITS,
  localparam int unsigned NCHIP   = (ROWS / CHIP_SIDE) * (COLS / CHIP_SIDE),
  localparam int unsigned NICAP   = 2 * PARCOS_N,
  localparam int unsigned BAW     = $clog2(BS_DEPTH) + 2
) (
  input  logic             clk,
  input  logic             rst_n,
  // array control unit: CAAPP instruction stream
  input  pe_instr_t        instr,
  input  logic             instr_valid,
  output logic             instr_ready,
  output logic             some,
  output logic [6:0]       chip_count [NCHIP],
  output logic             cot_busy,
  // array control unit: network configuration
  input  net_cmd_e         net_cmd,
  input  logic [5:0]       net_out,
  input  logic [5:0]       net_in,
  input  logic [4:0]       net_row,
  output logic             net_cmd_taken,
  // ICAP processors: backing store buses (processor k <-> CAAPP chip k)
  input  logic [BAW-1:0]   icap_bs_addr  [NCHIP],
  input  logic             icap_bs_rd    [NCHIP],
  input  logic             icap_bs_wr    [NCHIP],
  input  logic [15:0]      icap_bs_wdata [NCHIP],
  output logic [15:0]      icap_bs_rdata [NCHIP],
  // ICAP processors: serial ports
  input  logic [NICAP-1:0] icap_tx,
  output logic [NICAP-1:0] icap_rx,
  // ICAP processors: barrier
  input  logic [NICAP-1:0] arrive,
  input  logic             reconf_en,
  input  logic [4:0]       reconf_row,
  output logic             all_arrived,
  output logic             release_o,
  output logic [15:0]      barriers,
  // ICAP processors: global feedback
  input  logic [NICAP-1:0] flags [3],
  output logic [2:0]       global_or,
  input  logic [7:0]       sum_value [NICAP],
  input  logic             sum_start,
  output logic             sum_busy,
  output logic             sum_valid,
  output logic [13:0]      sum
);

  localparam int unsigned N = ROWS * COLS;

  logic [BS_ADDR_W-1:0] bs_addr;
  logic                 bs_rd, bs_wr;
  logic                 bs_wmask [N];
  logic                 bs_wdata [N];
  logic                 bs_rdata [N];

  caapp_array #(.ROWS(ROWS), .COLS(COLS)) u_caapp (
    .clk        (clk),
    .rst_n      (rst_n),
    .instr      (instr),
    .instr_valid(instr_valid),
    .instr_ready(instr_ready),
    .some       (some),
    .chip_count (chip_count),
    .cot_busy   (cot_busy),
    .cot_done   (),
    .bs_addr    (bs_addr),
    .bs_rd      (bs_rd),
    .bs_wr      (bs_wr),
    .bs_wmask   (bs_wmask),
    .bs_wdata   (bs_wdata),
    .bs_rdata   (bs_rdata)
  );

  for (genvar k = 0; k < NCHIP; k++) begin : g_bs
    backing_store #(.PES(CHIP_PES), .DEPTH(BS_DEPTH), .IW(16)) u_bs (
      .clk    (clk),
      .a_addr ($clog2(BS_DEPTH)'(bs_addr)),
      .a_rd   (bs_rd),
      .a_wr   (bs_wr),
      .a_wmask(bs_wmask[k*CHIP_PES +: CHIP_PES]),
      .a_wdata(bs_wdata[k*CHIP_PES +: CHIP_PES]),
      .a_rdata(bs_rdata[k*CHIP_PES +: CHIP_PES]),
      .b_addr (icap_bs_addr[k]),
      .b_rd   (icap_bs_rd[k]),
      .b_wr   (icap_bs_wr[k]),
      .b_wdata(icap_bs_wdata[k]),
      .b_rdata(icap_bs_rdata[k])
    );
  end

  net_cmd_e   bar_cmd;
  logic [4:0] bar_row;
  net_cmd_e   cmd_mux;
  logic [4:0] row_mux;

  icap_barrier #(.NPROC(NICAP)) u_barrier (
    .clk        (clk),
    .rst_n      (rst_n),
    .arrive     (arrive),
    .reconf_en  (reconf_en),
    .reconf_row (reconf_row),
    .all_arrived(all_arrived),
    .release_o  (release_o),
    .net_cmd    (bar_cmd),
    .net_row    (bar_row),
    .barriers   (barriers)
  );

  always_comb begin
    if (bar_cmd != NET_NONE) begin
      cmd_mux       = bar_cmd;
      row_mux       = bar_row;
      net_cmd_taken = 1'b0;
    end else begin
      cmd_mux       = net_cmd;
      row_mux       = net_row;
      net_cmd_taken = net_cmd != NET_NONE;
    end
  end

  icap_network u_net (
    .clk    (clk),
    .rst_n  (rst_n),
    .cmd    (cmd_mux),
    .cmd_out(net_out),
    .cmd_in (net_in),
    .cmd_row(row_mux),
    .sin    (icap_tx),
    .sout   (icap_rx)
  );

  icap_global_feedback #(.NPROC(NICAP), .NOR(3), .W(8)) u_fb (
    .clk      (clk),
    .rst_n    (rst_n),
    .flags    (flags),
    .global_or(global_or),
    .value    (sum_value),
    .sum_start(sum_start),
    .sum_busy (sum_busy),
    .sum_valid(sum_valid),
    .sum      (sum)
  );

endmodule
