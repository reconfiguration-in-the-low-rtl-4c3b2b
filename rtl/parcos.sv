// parcos: the PARallel COMmunication Switch, an N x N bit-serial crossbar
// with broadcast and an on-chip cache of connection patterns.
//
// Communication matrix: N tree multiplexers (parcos_tree_mux), one per
// output, each fed by all N inputs, so any number of outputs may listen to
// the same input.  The selectors come from the Control Pattern Register
// (CPR): N 5-bit bytes, byte j naming the input that drives output j.
// Connection Pattern Cache (CPC): WORDS control words, each one complete
// pattern of N bytes.  The Row Select Register (RSR) picks the control word
// that bus writes go to.  Because the matrix runs from the CPR, a control
// word can be rewritten while another pattern is live, and switching to a
// stored pattern is one bus write.
//
// Bus (the pin names of the chip drawing; their encoding is this design's):
//   wr1 & addr < 32  : CPC[RSR][addr] <= data   (output addr <- input data)
//   wr1 & addr >= 32 : RSR <= data
//   wr2              : RSR <= data and CPR <= CPC[data]   (reswitch)
//   pr               : CPR <= CPC[RSR]
//   rd               : data_out <= addr < 32 ? CPC[RSR][addr] : RSR
// All bus operations take effect at the clock edge; data_out is registered.
// At most one of wr1, wr2 and pr may be high in a cycle.  After reset the
// RSR is 0 and the CPR holds the identity pattern (output j <- input j);
// the CPC, an SRAM, is not reset.  The matrix itself is combinational from
// sin to sout.
module parcos
  import iua_pkg::*;
#(
  parameter int unsigned N     = PARCOS_N,
  parameter int unsigned WORDS = PARCOS_WORDS,
  localparam int unsigned SW   = $clog2(N),
  localparam int unsigned RW   = $clog2(WORDS),
  localparam int unsigned AW   = SW + 1,
  localparam int unsigned DW   = (SW > RW) ? SW : RW
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] data_in,
  input  logic          wr1,
  input  logic          wr2,
  input  logic          rd,
  input  logic          pr,
  output logic [DW-1:0] data_out,
  input  logic [N-1:0]  sin,
  output logic [N-1:0]  sout
);

  logic [N-1:0][SW-1:0] cpc [WORDS];
  logic [N-1:0][SW-1:0] cpr;
  logic [RW-1:0]        rsr;
  logic                 sel_rsr;
  logic [SW-1:0]        port;

  assign sel_rsr = addr[AW-1];
  assign port    = addr[SW-1:0];

  always_ff @(posedge clk) begin
    if (wr1 && !sel_rsr) cpc[rsr][port] <= SW'(data_in);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rsr <= '0;
      for (int j = 0; j < N; j++) cpr[j] <= SW'(j);
    end else begin
      if (wr1 && sel_rsr) rsr <= RW'(data_in);
      if (wr2) begin
        rsr <= RW'(data_in);
        cpr <= cpc[RW'(data_in)];
      end else if (pr) begin
        cpr <= cpc[rsr];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  data_out <= '0;
    else if (rd) data_out <= sel_rsr ? DW'(rsr) : DW'(cpc[rsr][port]);
  end

  for (genvar j = 0; j < N; j++) begin : g_out
    parcos_tree_mux #(.N(N)) u_mux (
      .in (sin),
      .sel(cpr[j]),
      .out(sout[j])
    );
  end

  // bus rule: one write-type strobe per cycle
  always_ff @(posedge clk)
    a_one_write: assert (!((wr1 && wr2) || (wr1 && pr) || (wr2 && pr)))
      else $error("parcos: more than one of wr1, wr2, pr in one cycle");

endmodule
