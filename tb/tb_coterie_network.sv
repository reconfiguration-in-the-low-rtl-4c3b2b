// tb_coterie_network: self-checking test of the Coterie network.
//
// Random switch settings and sparse random drives on an 8 x 16 array.  The
// expected level at every PE is computed independently with a union-find
// over the nets the closed switches join, then OR-ing the drives of every
// group.  Also checked: isolated groups do not disturb one another, a
// diagonal bypass carries a signal past a node without reaching its PE, and
// an evaluation never takes more cycles than there are nets plus one.
module tb_coterie_network;
  import iua_pkg::*;

  localparam int unsigned ROWS = 8;
  localparam int unsigned COLS = 16;
  localparam int unsigned N    = ROWS * COLS;
  // net numbering for the reference model
  localparam int unsigned NP   = 0;
  localparam int unsigned NH   = N;
  localparam int unsigned NV   = 2 * N;
  localparam int unsigned NHW  = 3 * N;                    // ROWS*(COLS+1)
  localparam int unsigned NVW  = NHW + ROWS * (COLS + 1);  // (ROWS+1)*COLS
  localparam int unsigned NNET = NVW + (ROWS + 1) * COLS;

  logic        clk = 0, rst_n = 0, start = 0;
  logic        drive [N];
  coterie_sw_t sw    [N];
  logic        busy, done;
  logic        value [N];

  int checks = 0, failures = 0;
  int parent [NNET];
  logic grp [NNET];

  coterie_network #(.ROWS(ROWS), .COLS(COLS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int find(int x);
    while (parent[x] != x) begin
      parent[x] = parent[parent[x]];
      x = parent[x];
    end
    return x;
  endfunction

  function automatic void join_if(logic closed, int a, int b);
    if (closed) parent[find(a)] = find(b);
  endfunction

  function automatic int hw_id(int r, int c); return NHW + r * (COLS + 1) + c; endfunction
  function automatic int vw_id(int r, int c); return NVW + r * COLS + c; endfunction

  task automatic reference();
    for (int i = 0; i < NNET; i++) begin parent[i] = i; grp[i] = 1'b0; end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        int k, id;
        coterie_sw_t s;
        k = pe_idx(r, c, COLS); s = sw[k]; id = r * COLS + c;
        join_if(s.h,  NP + id, NH + id);
        join_if(s.v,  NP + id, NV + id);
        join_if(s.w,  NH + id, hw_id(r, c));
        join_if(s.e,  NH + id, hw_id(r, c + 1));
        join_if(s.n,  NV + id, vw_id(r, c));
        join_if(s.s,  NV + id, vw_id(r + 1, c));
        join_if(s.nw, hw_id(r, c), vw_id(r, c));
        join_if(s.ne, vw_id(r, c), hw_id(r, c + 1));
      end
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        if (drive[pe_idx(r, c, COLS)]) grp[find(NP + r * COLS + c)] = 1'b1;
  endtask

  task automatic evaluate(output int cycles);
    @(negedge clk) start = 1;
    @(negedge clk) start = 0;
    cycles = 0;
    while (busy) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  task automatic compare(string what);
    int bad;
    bad = 0;
    reference();
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        checks++;
        if (value[pe_idx(r, c, COLS)] !== grp[find(NP + r * COLS + c)]) begin
          failures++; bad++;
          if (bad < 5) $display("%s: PE (%0d,%0d) got %0b expected %0b", what, r, c,
                                value[pe_idx(r, c, COLS)], grp[find(NP + r * COLS + c)]);
        end
      end
  endtask

  initial begin
    int cycles, maxc;
    for (int k = 0; k < N; k++) begin drive[k] = 0; sw[k] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. random switch settings, random sparse drives
    maxc = 0;
    for (int t = 0; t < 60; t++) begin
      int density;
      density = 30 + (t % 4) * 20;   // percent of closed switches
      for (int k = 0; k < N; k++) begin
        coterie_sw_t s;
        for (int b = 0; b < 8; b++) s[b] = ($urandom_range(99) < density);
        sw[k] = s;
        drive[k] = ($urandom_range(99) < 4);
      end
      evaluate(cycles);
      if (cycles > maxc) maxc = cycles;
      compare("random");
      checks++;
      if (cycles > NNET + 1) begin
        failures++;
        $display("evaluation took %0d cycles", cycles);
      end
    end
    $display("longest random evaluation: %0d cycles", maxc);

    // 2. two coteries side by side: left half rows joined as buses, right
    //    half isolated; a drive on the left must not leak to the right.
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        coterie_sw_t s;
        s = '0;
        s.h = 1; s.v = 1;
        if (c < COLS / 2) begin s.e = (c != COLS / 2 - 1); s.w = (c != 0); s.n = (r != 0); s.s = (r != ROWS - 1); end
        sw[pe_idx(r, c, COLS)] = s;
        drive[pe_idx(r, c, COLS)] = (r == 3 && c == 2);
      end
    evaluate(cycles);
    compare("two groups");
    checks++;
    if (value[pe_idx(0, 0, COLS)] !== 1'b1 || value[pe_idx(0, COLS / 2, COLS)] !== 1'b0) begin
      failures++;
      $display("broadcast within the left group failed");
    end

    // 3. diagonal bypass: PE (2,4) drives east along row 2 into node (2,5)
    //    whose NW and NE are closed and H/V open; the signal must turn north
    //    through the bypass without reaching PE (2,5), and reach PE (1,5)
    //    through its S and V switches.
    for (int k = 0; k < N; k++) begin sw[k] = '0; drive[k] = 0; end
    begin
      coterie_sw_t s;
      s = '0; s.h = 1; s.e = 1;             sw[pe_idx(2, 4, COLS)] = s;
      s = '0; s.nw = 1;                     sw[pe_idx(2, 5, COLS)] = s;
      s = '0; s.s = 1; s.v = 1;             sw[pe_idx(1, 5, COLS)] = s;
      drive[pe_idx(2, 4, COLS)] = 1;
    end
    evaluate(cycles);
    compare("bypass");
    checks++;
    if (value[pe_idx(1, 5, COLS)] !== 1'b1 || value[pe_idx(2, 5, COLS)] !== 1'b0) begin
      failures++;
      $display("diagonal bypass failed");
    end
    // exact latency: six nets on the path (p, hn, west link, north link, vn,
    // p), one cycle each, plus the cycle that sees no change
    checks++;
    if (cycles != 7) begin
      failures++;
      $display("bypass path took %0d cycles, expected 7", cycles);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
