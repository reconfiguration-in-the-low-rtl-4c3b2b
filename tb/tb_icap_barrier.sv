// tb_icap_barrier: self-checking test of the ICAP barrier unit.
//
// 64 processors arrive in random order after random delays.  The test checks
// that release comes only after the last arrival, that it is preceded by
// exactly one reswitch command carrying the requested control word when
// reconfiguration is enabled (and none otherwise), that the barrier count
// advances, and that a new barrier waits until all arrive lines have dropped.
module tb_icap_barrier;
  import iua_pkg::*;

  logic        clk = 0, rst_n = 0;
  logic [63:0] arrive = 0;
  logic        reconf_en = 0;
  logic [4:0]  reconf_row = 0;
  logic        all_arrived, release_o;
  net_cmd_e    net_cmd;
  logic [4:0]  net_row;
  logic [15:0] barriers;

  int checks = 0, failures = 0;
  int resw_seen, rel_seen, rel_early;

  icap_barrier dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // monitor
  always @(posedge clk) if (rst_n) begin
    if (net_cmd == NET_RESWITCH) begin
      resw_seen++;
      checks++;
      if (net_row !== reconf_row || !reconf_en || rel_seen != 0) begin
        failures++; $display("bad reswitch row %0d", net_row);
      end
    end
    if (release_o) begin
      rel_seen++;
      if (arrive != '1) rel_early++;
    end
  end

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 20; b++) begin
      int order [64];
      resw_seen = 0; rel_seen = 0; rel_early = 0;
      reconf_en  = $urandom_range(1);
      reconf_row = 5'($urandom);
      for (int i = 0; i < 64; i++) order[i] = i;
      order.shuffle();
      for (int i = 0; i < 64; i++) begin
        repeat ($urandom_range(2)) @(negedge clk);
        arrive[order[i]] = 1;
        if (i < 63) begin
          @(negedge clk);
          check("no early release", rel_seen == 0 && !all_arrived);
        end
      end
      repeat (6) @(negedge clk);
      check("one release", rel_seen == 1 && rel_early == 0);
      check("reswitch count", resw_seen == (reconf_en ? 1 : 0));
      check("barrier count", barriers == 16'(b + 1));
      // hold one line high: no second release
      arrive = '0; arrive[5] = 1;
      repeat (4) @(negedge clk);
      arrive = '1;
      repeat (4) @(negedge clk);
      check("no release before lines drop", rel_seen == 1);
      arrive = '0;
      // the stuck barrier above is released now that lines went low: hold
      // off checking until the unit is back in its waiting state
      repeat (4) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
