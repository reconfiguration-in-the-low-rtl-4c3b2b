// icap_barrier: barrier synchronisation of the ICAP processors in
// synchronous-MIMD mode, with reconfiguration of the connection network
// between two stages.
//
// Each processor raises its arrive line when it reaches the barrier and
// waits.  When every processor has arrived, the unit (if reconf_en is set)
// issues one NET_RESWITCH command that makes control word reconf_row of the
// network live, then pulses release for one cycle.  It then waits until all
// arrive lines are low again before it arms for the next barrier, so a
// processor that is slow to lower its line is not released twice.  The
// sequence (reswitch, then release) follows the architecture; the handshake
// lines and their timing are this design's.
//
// Timing: all_arrived is combinational.  Counting from the first cycle in
// which all lines are high, the reswitch command is in cycle 1 and release
// in cycle 2 with reconf_en, release in cycle 1 without it.  `barriers`
// counts completed barriers.
module icap_barrier
  import iua_pkg::*;
#(
  parameter int unsigned NPROC = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] arrive,
  input  logic             reconf_en,
  input  logic [4:0]       reconf_row,
  output logic             all_arrived,
  output logic             release_o,
  output net_cmd_e         net_cmd,
  output logic [4:0]       net_row,
  output logic [15:0]      barriers
);

  typedef enum logic [1:0] {S_WAIT, S_RESW, S_REL, S_DROP} state_e;
  state_e state_q;

  assign all_arrived = &arrive;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q  <= S_WAIT;
      barriers <= '0;
    end else begin
      unique case (state_q)
        S_WAIT: if (all_arrived) state_q <= reconf_en ? S_RESW : S_REL;
        S_RESW: state_q <= S_REL;
        S_REL: begin
          state_q  <= S_DROP;
          barriers <= barriers + 16'd1;
        end
        S_DROP: if (arrive == '0) state_q <= S_WAIT;
        default: state_q <= S_WAIT;
      endcase
    end
  end

  assign release_o = state_q == S_REL;
  assign net_cmd   = (state_q == S_RESW) ? NET_RESWITCH : NET_NONE;
  assign net_row   = reconf_row;

endmodule
