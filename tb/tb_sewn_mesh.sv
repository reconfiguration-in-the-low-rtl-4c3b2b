// tb_sewn_mesh: self-checking test of the nearest-neighbour mesh on a
// 16 x 24 array.  For every pair of directions and random X planes, each
// PE's two neighbour inputs are compared with the X value of the PE one
// step away in that direction (0 past the array edge).
module tb_sewn_mesh;
  import iua_pkg::*;
  localparam int unsigned R = 16, C = 24, N = R * C;
  logic x [N], nb1 [N], nb2 [N];
  dir_e dir1, dir2;
  int checks = 0, failures = 0;

  sewn_mesh #(.ROWS(R), .COLS(C)) dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic expect_nb(int r, int c, dir_e d);
    int rr, cc;
    rr = r; cc = c;
    case (d)
      DIR_N: rr--;
      DIR_S: rr++;
      DIR_E: cc++;
      default: cc--;
    endcase
    if (rr < 0 || rr >= int'(R) || cc < 0 || cc >= int'(C)) return 1'b0;
    return x[pe_idx(rr, cc, C)];
  endfunction

  initial begin
    for (int t = 0; t < 64; t++) begin
      dir1 = dir_e'(t % 4);
      dir2 = dir_e'((t / 4) % 4);
      for (int k = 0; k < N; k++) x[k] = $urandom_range(1);
      #1;
      for (int r = 0; r < int'(R); r++)
        for (int c = 0; c < int'(C); c++) begin
          checks += 2;
          if (nb1[pe_idx(r, c, C)] !== expect_nb(r, c, dir1)) begin failures++; $display("nb1 %0d,%0d", r, c); end
          if (nb2[pe_idx(r, c, C)] !== expect_nb(r, c, dir2)) begin failures++; $display("nb2 %0d,%0d", r, c); end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
