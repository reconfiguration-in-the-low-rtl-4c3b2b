// tb_caapp_array: self-checking test of a 16 x 16 CAAPP array (four chips)
// running connected-component marking, the Coterie network's main use.
//
// The testbench plays the backing store: it presents a random binary image
// and a one-hot seed plane on the backing store read data.  The PE program
// then (1) copies both planes into PE RAM, (2) reads its east and south
// neighbours' pixels over the mesh, two at a time, and closes the switch
// towards each neighbour only where both pixels are set, joining its own PE
// to both segments when its pixel is set, (3) saves the switch pattern to
// RAM, clears it and restores it with one instruction each way, (4) places
// the seed on the Coterie network and (5) writes the settled value to the
// backing store, where the testbench compares it with a breadth-first
// search of the image.  The per-chip responder counts and the Some/None
// line are checked against the same reference, and instructions are
// checked to wait while the network is still settling.
module tb_caapp_array;
  import iua_pkg::*;

  localparam int unsigned R = 16, C = 16, N = R * C, NCHIP = N / 64;

  logic                 clk = 0, rst_n = 0;
  pe_instr_t            instr;
  logic                 instr_valid = 0, instr_ready, some, cot_busy, cot_done;
  logic [6:0]           chip_count [NCHIP];
  logic [BS_ADDR_W-1:0] bs_addr;
  logic                 bs_rd, bs_wr;
  logic                 bs_wmask [N], bs_wdata [N], bs_rdata [N];

  int checks = 0, failures = 0;
  bit img [R][C];
  bit inset [R][C];
  int cot_wait;

  caapp_array #(.ROWS(R), .COLS(C)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cot_busy) cot_wait++;

  task automatic issue(pe_instr_t i);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr = i; instr_valid = 1;
    @(negedge clk);
    instr_valid = 0; instr = i_nop();
  endtask

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic run_trial(int t);
    int sr, sc, q_r [$], q_c [$];
    int cnt [NCHIP];
    pe_instr_t i;
    // image: random density, seed on a set pixel (or none in trial 0)
    for (int r = 0; r < int'(R); r++)
      for (int c = 0; c < int'(C); c++) begin
        img[r][c] = ($urandom_range(99) < 55 + t % 3 * 5);
        inset[r][c] = 0;
      end
    sr = $urandom_range(R - 1); sc = $urandom_range(C - 1);
    img[sr][sc] = 1;
    if (t != 0) begin
      inset[sr][sc] = 1; q_r.push_back(sr); q_c.push_back(sc);
    end
    while (q_r.size() > 0) begin
      int r, c;
      r = q_r.pop_front(); c = q_c.pop_front();
      for (int d = 0; d < 4; d++) begin
        int rr, cc;
        rr = r + (d == 0 ? -1 : d == 2 ? 1 : 0);
        cc = c + (d == 1 ? 1 : d == 3 ? -1 : 0);
        if (rr >= 0 && rr < int'(R) && cc >= 0 && cc < int'(C) && img[rr][cc] && !inset[rr][cc]) begin
          inset[rr][cc] = 1; q_r.push_back(rr); q_c.push_back(cc);
        end
      end
    end

    // (1) image into mem[0], seed into mem[1]
    for (int r = 0; r < int'(R); r++) for (int c = 0; c < int'(C); c++) bs_rdata[pe_idx(r, c, C)] = img[r][c];
    issue(i_alu(DST_MEM, SRC_BS, SRC_ZERO, TT_S1, 1'b1, 0));
    for (int r = 0; r < int'(R); r++) for (int c = 0; c < int'(C); c++)
      bs_rdata[pe_idx(r, c, C)] = (t != 0) && r == sr && c == sc;
    issue(i_alu(DST_MEM, SRC_BS, SRC_ZERO, TT_S1, 1'b1, 1));
    issue(i_alu(DST_X, SRC_MEM, SRC_ZERO, TT_S1, 1'b1, 0));
    // (2) switches: E and S from the two neighbours at once, W and N likewise
    i = i_alu(DST_Y, SRC_NB1, SRC_NB2, TT_S1 & TT_S2, 1'b1, 0);    // dummy read, both neighbours
    i.nb1 = DIR_E; i.nb2 = DIR_S; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB1, TT_S1 & TT_S2, 1'b1, SW_E); i.nb1 = DIR_E; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB2, TT_S1 & TT_S2, 1'b1, SW_S); i.nb2 = DIR_S; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB1, TT_S1 & TT_S2, 1'b1, SW_W); i.nb1 = DIR_W; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB2, TT_S1 & TT_S2, 1'b1, SW_N); i.nb2 = DIR_N; issue(i);
    issue(i_alu(DST_SW, SRC_X, SRC_ZERO, TT_S1, 1'b1, SW_H));
    issue(i_alu(DST_SW, SRC_X, SRC_ZERO, TT_S1, 1'b1, SW_V));
    issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, SW_NE));
    issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, SW_NW));
    // (3) save, clear, restore
    issue(i_sw(OP_SWSTORE, 1'b1, 16));
    for (int b = 0; b < 8; b++) issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, PE_ADDR_W'(b)));
    issue(i_sw(OP_SWLOAD, 1'b1, 16));
    // (4) seed on the network
    i = i_cot(SRC_MEM); i.addr = 1;
    cot_wait = 0;
    issue(i);
    // the next instruction must wait for the network
    issue(i_alu(DST_R, SRC_COT, SRC_ZERO, TT_S1, 1'b1, 0));
    check("waited for network", t == 0 || cot_wait > 1);
    // (5) write the result to the backing store and compare
    @(negedge clk);
    instr = i_bswr(SRC_R, 15'd5, 0); instr_valid = 1;
    #1;
    check("bs_wr", bs_wr && bs_addr == 15'd5);
    for (int k = 0; k < int'(NCHIP); k++) cnt[k] = 0;
    for (int r = 0; r < int'(R); r++)
      for (int c = 0; c < int'(C); c++) begin
        checks++;
        if (bs_wdata[pe_idx(r, c, C)] !== inset[r][c] || bs_wmask[pe_idx(r, c, C)] !== 1'b1) begin
          failures++;
          $display("trial %0d pixel %0d,%0d got %0b expected %0b", t, r, c,
                   bs_wdata[pe_idx(r, c, C)], inset[r][c]);
        end
        cnt[pe_idx(r, c, C) / 64] += inset[r][c];
      end
    @(negedge clk) instr_valid = 0; instr = i_nop();
    #1;
    check("some", some == (t != 0));
    issue(i_sw(OP_CNT, 1'b0, 0));
    for (int k = 0; k < int'(NCHIP); k++) check("chip count", chip_count[k] == 7'(cnt[k]));
  endtask

  initial begin
    instr = i_nop();
    for (int k = 0; k < int'(N); k++) bs_rdata[k] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 12; t++) run_trial(t);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
