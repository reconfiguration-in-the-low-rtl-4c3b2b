// sewn_mesh: the nearest-neighbour (S, E, W, N) mesh of the CAAPP.
//
// Each PE can read a bit from up to two of its four neighbours at once.  The
// bit a neighbour offers is its X register; the two directions are part of
// the broadcast instruction, so every PE looks the same way.  A PE on the
// array edge reads 0 from the missing neighbour (this design's choice; the
// mesh is not a torus).  Purely combinational: the values are ready in the
// cycle the instruction is executed.
//
// Interface: x from every PE, dir1/dir2 from the instruction, nb1/nb2 back
// to every PE, all in the chip-major order of iua_pkg::pe_idx (ROWS and COLS
// multiples of 8).  Row 0 is the north edge, column 0 the west edge.
module sewn_mesh
  import iua_pkg::*;
#(
  parameter int unsigned ROWS = 64,
  parameter int unsigned COLS = 64
) (
  input  logic x   [ROWS*COLS],
  input  dir_e dir1,
  input  dir_e dir2,
  output logic nb1 [ROWS*COLS],
  output logic nb2 [ROWS*COLS]
);

  function automatic logic pick(dir_e d, logic n, logic e, logic s, logic w);
    unique case (d)
      DIR_N:   return n;
      DIR_E:   return e;
      DIR_S:   return s;
      default: return w;
    endcase
  endfunction

  for (genvar r = 0; r < ROWS; r++) begin : g_r
    for (genvar c = 0; c < COLS; c++) begin : g_c
      logic n, e, s, w;
      if (r > 0)        begin : g_n assign n = x[pe_idx(r-1, c, COLS)]; end
      else              begin : g_n0 assign n = 1'b0; end
      if (r < ROWS - 1) begin : g_s assign s = x[pe_idx(r+1, c, COLS)]; end
      else              begin : g_s0 assign s = 1'b0; end
      if (c > 0)        begin : g_w assign w = x[pe_idx(r, c-1, COLS)]; end
      else              begin : g_w0 assign w = 1'b0; end
      if (c < COLS - 1) begin : g_e assign e = x[pe_idx(r, c+1, COLS)]; end
      else              begin : g_e0 assign e = 1'b0; end
      assign nb1[pe_idx(r, c, COLS)] = pick(dir1, n, e, s, w);
      assign nb2[pe_idx(r, c, COLS)] = pick(dir2, n, e, s, w);
    end
  end

endmodule
