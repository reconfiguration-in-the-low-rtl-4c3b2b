// coterie_network: the reconfigurable mesh of the CAAPP.
//
// Every PE node has two bus segments that cross without touching, one
// horizontal and one vertical, and eight switches (the labels of the
// three-by-three drawing): W and E join the horizontal segment to the links
// towards the west and east neighbours, N and S join the vertical segment to
// the links towards the north and south neighbours, H and V join the PE to
// the horizontal and vertical segment, and the diagonal bypasses NW and NE
// join the west link to the north link and the north link to the east link
// without touching the node.  Closing switches merges links and segments
// into electrically connected groups (coteries).  Every PE that places a 1
// on its group makes the whole group read 1: a wired-OR, which gives both a
// broadcast from one selected cell and a Some/None test within each group,
// for all groups at once.
//
// In silicon the wired-OR settles at electrical speed through precharged
// logic.  Here it is computed by synchronous relaxation, this design's own
// choice: `start` clears every net (the precharge) and samples the drives;
// then every clock each net ORs in the nets it is switched to, and the
// evaluation ends in the first cycle in which no net changes.  Because the
// nets only ever rise, that cycle is a fixed point and every net then holds
// the OR of the drives in its group.  An evaluation lasts one cycle for
// every net on the longest switched path from a driving PE (its own PE
// terminal included) plus one cycle that sees no change.
//
// Interface: start (pulse, ignored while busy), drive and sw per PE;
// busy is high from the cycle after start until the result is valid; done
// pulses in the cycle busy falls.  value is the level seen by each PE and
// holds until the next start.  Per-PE ports use the chip-major order of
// iua_pkg::pe_idx, so ROWS and COLS are multiples of 8.  Switch settings must not change
// while busy.
module coterie_network
  import iua_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic        drive [ROWS*COLS],
  input  coterie_sw_t sw    [ROWS*COLS],
  output logic        busy,
  output logic        done,
  output logic        value [ROWS*COLS]
);

  localparam int unsigned NL = ROWS * COLS;

  // Nets, all registered (the flops sit in the per-node blocks below).  hw[r][c] is the link west of node (r,c) (column
  // COLS is the east edge), vw[r][c] the link north of it (row ROWS is the
  // south edge); hn, vn and pn are the node's horizontal segment, vertical
  // segment and PE terminal.
  logic hw [ROWS][COLS+1];
  logic vw [ROWS+1][COLS];
  logic hn [ROWS][COLS];
  logic vn [ROWS][COLS];
  logic pn [ROWS][COLS];

  // One change flag per net owner; the evaluation ends when all are 0.
  logic [NL-1:0]   chg_node;
  logic [ROWS-1:0] chg_east;
  logic [COLS-1:0] chg_south;
  logic            changed;
  logic            clear;
  logic            step;

  assign clear   = !busy && start;
  assign step    = busy;
  assign changed = |chg_node || |chg_east || |chg_south;

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      localparam int unsigned K = pe_idx(r, c, COLS);
      coterie_sw_t s;
      logic dq, pd, hd, vd, hwd, vwd;
      logic pq, hq, vq, hwq, vwq;
      assign pn[r][c] = pq;
      assign hn[r][c] = hq;
      assign vn[r][c] = vq;
      assign hw[r][c] = hwq;
      assign vw[r][c] = vwq;
      assign s = sw[K];
      assign pd = pn[r][c] | dq | (s.h & hn[r][c]) | (s.v & vn[r][c]);
      assign hd = hn[r][c] | (s.h & pn[r][c]) | (s.w & hw[r][c]) | (s.e & hw[r][c+1]);
      assign vd = vn[r][c] | (s.v & pn[r][c]) | (s.n & vw[r][c]) | (s.s & vw[r+1][c]);
      // west link: this node's W and NW, plus the west neighbour's E and NE
      if (c > 0) begin : g_wl
        assign hwd = hw[r][c] | (s.w & hn[r][c]) | (s.nw & vw[r][c])
                   | (sw[pe_idx(r, c-1, COLS)].e & hn[r][c-1])
                   | (sw[pe_idx(r, c-1, COLS)].ne & vw[r][c-1]);
      end else begin : g_we
        assign hwd = hw[r][c] | (s.w & hn[r][c]) | (s.nw & vw[r][c]);
      end
      // north link: this node's N, NW and NE, plus the north neighbour's S
      if (r > 0) begin : g_nl
        assign vwd = vw[r][c] | (s.n & vn[r][c]) | (s.nw & hw[r][c]) | (s.ne & hw[r][c+1])
                   | (sw[pe_idx(r-1, c, COLS)].s & vn[r-1][c]);
      end else begin : g_ne
        assign vwd = vw[r][c] | (s.n & vn[r][c]) | (s.nw & hw[r][c]) | (s.ne & hw[r][c+1]);
      end
      assign chg_node[K] = (pd ^ pn[r][c]) | (hd ^ hn[r][c]) | (vd ^ vn[r][c])
                         | (hwd ^ hw[r][c]) | (vwd ^ vw[r][c]);
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          dq <= 1'b0; pq <= 1'b0; hq <= 1'b0; vq <= 1'b0; hwq <= 1'b0; vwq <= 1'b0;
        end else if (clear) begin
          dq <= drive[K]; pq <= 1'b0; hq <= 1'b0; vq <= 1'b0; hwq <= 1'b0; vwq <= 1'b0;
        end else if (step) begin
          pq <= pd; hq <= hd; vq <= vd; hwq <= hwd; vwq <= vwd;
        end
      end
      assign value[K] = pn[r][c];
    end
  end

  // East edge links, touched only by the last column's E and NE switches
  for (genvar r = 0; r < ROWS; r++) begin : g_east
    logic d, q;
    assign hw[r][COLS] = q;
    assign d = hw[r][COLS] | (sw[pe_idx(r, COLS-1, COLS)].e & hn[r][COLS-1])
                           | (sw[pe_idx(r, COLS-1, COLS)].ne & vw[r][COLS-1]);
    assign chg_east[r] = d ^ hw[r][COLS];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)     q <= 1'b0;
      else if (clear) q <= 1'b0;
      else if (step)  q <= d;
  end

  // South edge links, touched only by the last row's S switches
  for (genvar c = 0; c < COLS; c++) begin : g_south
    logic d, q;
    assign vw[ROWS][c] = q;
    assign d = vw[ROWS][c] | (sw[pe_idx(ROWS-1, c, COLS)].s & vn[ROWS-1][c]);
    assign chg_south[c] = d ^ vw[ROWS][c];
    always_ff @(posedge clk or negedge rst_n)
      if (!rst_n)     q <= 1'b0;
      else if (clear) q <= 1'b0;
      else if (step)  q <= d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
    end else begin
      done <= 1'b0;
      if (clear) begin
        busy <= 1'b1;
      end else if (busy && !changed) begin
        busy <= 1'b0;
        done <= 1'b1;
      end
    end
  end

endmodule
