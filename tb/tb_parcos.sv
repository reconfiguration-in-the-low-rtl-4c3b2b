// tb_parcos: self-checking test of one 32 x 32 PARCOS crossbar chip.
//
// Checks the identity pattern after reset, random patterns (including
// broadcasts, where several outputs select the same input) written one
// output at a time into random control words, that writing a hidden control
// word leaves the live pattern alone, the single-write reswitch (WR2) and
// the reload of the live pattern from the selected word (PR), and read-back
// of the cache and of the row select register.  Expected outputs come from a
// copy of the patterns kept by the testbench.
module tb_parcos;
  import iua_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [5:0]  addr = 0;
  logic [4:0]  data_in = 0, data_out;
  logic        wr1 = 0, wr2 = 0, rd = 0, pr = 0;
  logic [31:0] sin, sout;

  int checks = 0, failures = 0;
  logic [4:0] pat [32][32];
  logic [4:0] live [32];

  parcos dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic strobe(input logic [5:0] a, input logic [4:0] d,
                        input logic w1, input logic w2, input logic p, input logic r);
    @(negedge clk);
    addr = a; data_in = d; wr1 = w1; wr2 = w2; pr = p; rd = r;
    @(negedge clk);
    wr1 = 0; wr2 = 0; pr = 0; rd = 0;
  endtask

  task automatic check_outputs(string what);
    for (int t = 0; t < 4; t++) begin
      sin = $urandom;
      #1;
      for (int j = 0; j < 32; j++) begin
        checks++;
        if (sout[j] !== sin[live[j]]) begin
          failures++;
          $display("%s: out %0d got %0b expected in %0d = %0b", what, j, sout[j], live[j], sin[live[j]]);
        end
      end
    end
  endtask

  initial begin
    sin = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int j = 0; j < 32; j++) live[j] = 5'(j);
    check_outputs("identity");

    // fill every control word with a random pattern; about a third are
    // broadcasts from a few inputs
    for (int w = 0; w < 32; w++) begin
      strobe(6'd32, 5'(w), 1, 0, 0, 0);                    // RSR <= w
      for (int j = 0; j < 32; j++) begin
        pat[w][j] = (w % 3 == 0) ? 5'($urandom_range(3)) : 5'($urandom);
        strobe({1'b0, 5'(j)}, pat[w][j], 1, 0, 0, 0);
      end
      check_outputs("hidden write");                       // live pattern unchanged
    end

    // single-write reswitch to random words
    for (int n = 0; n < 20; n++) begin
      int w;
      w = $urandom_range(31);
      strobe(6'd0, 5'(w), 0, 1, 0, 0);
      live = pat[w];
      check_outputs("wr2 reswitch");
      // read back the RSR and two cache bytes
      strobe(6'd32, 5'd0, 0, 0, 0, 1);
      checks++;
      if (data_out !== 5'(w)) begin failures++; $display("rsr read %0d expected %0d", data_out, w); end
      for (int m = 0; m < 2; m++) begin
        int j;
        j = $urandom_range(31);
        strobe({1'b0, 5'(j)}, 5'd0, 0, 0, 0, 1);
        checks++;
        if (data_out !== pat[w][j]) begin failures++; $display("cpc read word %0d port %0d", w, j); end
      end
    end

    // PR: select a word with WR1 then make it live
    for (int n = 0; n < 5; n++) begin
      int w;
      w = $urandom_range(31);
      strobe(6'd32, 5'(w), 1, 0, 0, 0);
      check_outputs("rsr only");
      strobe(6'd0, 5'd0, 0, 0, 1, 0);
      live = pat[w];
      check_outputs("pr");
    end

    // overwrite one byte of the live word: takes effect only after PR
    begin
      int j;
      j = $urandom_range(31);
      strobe({1'b0, 5'(j)}, live[j] + 5'd1, 1, 0, 0, 0);
      check_outputs("live word write");
      strobe(6'd0, 5'd0, 0, 0, 1, 0);
      live[j] = live[j] + 5'd1;
      check_outputs("pr after write");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
