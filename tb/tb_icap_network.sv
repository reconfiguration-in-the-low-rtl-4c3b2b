// tb_icap_network: self-checking test of the 64 x 64 ICAP network built
// from eight PARCOS chips.
//
// Random mappings (every output picks a random input, so broadcasts and
// permutations both occur) are stored with 64 link commands each into
// different control words while another word is live; then each stored
// pattern is made live with one reswitch command and the outputs are
// compared with the mapping kept by the testbench for random input vectors.
module tb_icap_network;
  import iua_pkg::*;

  logic        clk = 0, rst_n = 0;
  net_cmd_e    cmd = NET_NONE;
  logic [5:0]  cmd_out = 0, cmd_in = 0;
  logic [4:0]  cmd_row = 0;
  logic [63:0] sin = 0, sout;

  int checks = 0, failures = 0;
  logic [5:0] map [8][64];
  logic [5:0] live [64];
  bit         have_live = 0;

  icap_network dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic issue(net_cmd_e c, logic [5:0] o, logic [5:0] i, logic [4:0] r);
    @(negedge clk) cmd = c; cmd_out = o; cmd_in = i; cmd_row = r;
    @(negedge clk) cmd = NET_NONE;
  endtask

  task automatic check_outputs(string what);
    for (int t = 0; t < 4; t++) begin
      sin = {$urandom, $urandom};
      #1;
      for (int o = 0; o < 64; o++) begin
        checks++;
        if (sout[o] !== sin[live[o]]) begin
          failures++;
          $display("%s: out %0d got %0b expected input %0d", what, o, sout[o], live[o]);
        end
      end
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int p = 0; p < 8; p++) begin
      issue(NET_SET_ROW, 0, 0, 5'(p + 1));
      for (int o = 0; o < 64; o++) begin
        map[p][o] = (p == 2) ? 6'd17 : (p == 5) ? 6'($urandom_range(3)) : 6'($urandom);
        issue(NET_LINK, 6'(o), map[p][o], 0);
      end
      if (have_live) check_outputs("live while storing");
      issue(NET_RESWITCH, 0, 0, 5'(p + 1));
      live = map[p];
      have_live = 1;
      check_outputs("after store");
    end
    for (int n = 0; n < 16; n++) begin
      int p;
      p = $urandom_range(7);
      issue(NET_RESWITCH, 0, 0, 5'(p + 1));
      live = map[p];
      check_outputs("reswitch");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
