// tb_iua_top: end-to-end test of the slice at reduced size (16 x 16 CAAPP
// PEs on 4 chips with 1024-bit backing stores; the 64-port ICAP network,
// barrier and global feedback at full size).  tb_iua_top_full runs the same
// scenario at the top's default parameters.
//
// Scenario, repeated for several random images:
//  * the ICAP side writes a random binary image and a one-hot seed plane
//    into every chip's backing store through its 16-bit port;
//  * the CAAPP reads both planes through the other port, builds the
//    Coterie switch pattern of the image's 4-connected components from
//    two-neighbour mesh reads, saves and restores it, broadcasts the seed
//    over the network and writes the marked component back;
//  * the ICAP side reads the result through its port and compares it with
//    a breadth-first search; the Some/None line and the 64 chip counts are
//    checked too.
// Then the ICAP network: two random 64-port patterns (one a broadcast) are
// stored into control words with link commands, a barrier with
// reconfiguration switches to the requested word before releasing the
// processors, and the serial lines are checked through the new pattern.
// Finally the three global OR lines and the global sum.
// Each mechanism seen working is counted and all must be non-zero.
module tb_iua_top;
  import iua_pkg::*;

  localparam int unsigned R = 16, C = 16, N = R * C, NCHIP = N / 64, NP = 64;
  localparam int unsigned BSD = 1024, BAW = $clog2(BSD) + 2;

  logic        clk = 0, rst_n = 0;
  pe_instr_t   instr;
  logic        instr_valid = 0, instr_ready, some, cot_busy;
  logic [6:0]  chip_count [NCHIP];
  net_cmd_e    net_cmd = NET_NONE;
  logic [5:0]  net_out = 0, net_in = 0;
  logic [4:0]  net_row = 0;
  logic        net_cmd_taken;
  logic [BAW-1:0] icap_bs_addr [NCHIP];
  logic        icap_bs_rd [NCHIP], icap_bs_wr [NCHIP];
  logic [15:0] icap_bs_wdata [NCHIP], icap_bs_rdata [NCHIP];
  logic [63:0] icap_tx = 0, icap_rx;
  logic [63:0] arrive = 0;
  logic        reconf_en = 0;
  logic [4:0]  reconf_row = 0;
  logic        all_arrived, release_o;
  logic [15:0] barriers;
  logic [63:0] flags [3];
  logic [2:0]  global_or;
  logic [7:0]  sum_value [NP];
  logic        sum_start = 0, sum_busy, sum_valid;
  logic [13:0] sum;

  iua_top #(.ROWS(R), .COLS(C), .BS_DEPTH(BSD)) dut (.*);

  int checks = 0, failures = 0;
  // mechanism counters
  int m_icap_bs_write, m_icap_bs_read, m_caapp_bs_read, m_caapp_bs_write;
  int m_two_nb, m_sw_save, m_coterie, m_some, m_count;
  int m_net_store, m_broadcast, m_barrier, m_reswitch, m_global_or, m_sum;

  bit img [R][C];
  bit inset [R][C];
  logic [5:0] map [2][64];
  int cot_wait;

  always #5 clk = ~clk;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (cot_busy) cot_wait++;

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic issue(pe_instr_t i);
    @(negedge clk);
    while (!instr_ready) @(negedge clk);
    instr = i; instr_valid = 1;
    @(negedge clk);
    instr_valid = 0; instr = i_nop();
  endtask

  // position of pixel (r,c) in its chip's backing store word: chip, part, bit
  function automatic int chip_of(int r, int c); return pe_idx(r, c, C) / 64; endfunction
  function automatic int loc_of(int r, int c); return pe_idx(r, c, C) % 64; endfunction

  // ICAP side writes one plane into all chips (four 16-bit words each)
  task automatic icap_write_plane(int plane, bit seed_only, int sr, int sc);
    for (int part = 0; part < 4; part++) begin
      @(negedge clk);
      for (int k = 0; k < int'(NCHIP); k++) begin
        icap_bs_addr[k] = {(BAW-2)'(plane), 2'(part)}; icap_bs_wr[k] = 1; icap_bs_wdata[k] = 0;
      end
      for (int r = 0; r < int'(R); r++)
        for (int c = 0; c < int'(C); c++)
          if (loc_of(r, c) / 16 == part)
            icap_bs_wdata[chip_of(r, c)][loc_of(r, c) % 16] = seed_only ? (r == sr && c == sc) : img[r][c];
    end
    @(negedge clk);
    for (int k = 0; k < int'(NCHIP); k++) icap_bs_wr[k] = 0;
    m_icap_bs_write++;
  endtask

  task automatic run_image(int t);
    int sr, sc, q_r [$], q_c [$];
    int cnt [NCHIP];
    int bad;
    pe_instr_t i;
    for (int r = 0; r < int'(R); r++)
      for (int c = 0; c < int'(C); c++) begin
        img[r][c] = ($urandom_range(99) < 58);
        inset[r][c] = 0;
      end
    sr = $urandom_range(R - 1); sc = $urandom_range(C - 1);
    img[sr][sc] = 1; inset[sr][sc] = 1;
    q_r.push_back(sr); q_c.push_back(sc);
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

    icap_write_plane(0, 0, sr, sc);
    icap_write_plane(1, 1, sr, sc);
    issue(i_bsrd(15'd0));
    issue(i_alu(DST_MEM, SRC_BS, SRC_ZERO, TT_S1, 1'b1, 0));
    issue(i_bsrd(15'd1));
    issue(i_alu(DST_MEM, SRC_BS, SRC_ZERO, TT_S1, 1'b1, 1));
    m_caapp_bs_read++;
    issue(i_alu(DST_X, SRC_MEM, SRC_ZERO, TT_S1, 1'b1, 0));
    // Y := east AND south neighbour, stored, then checked below
    i = i_alu(DST_MEM, SRC_NB1, SRC_NB2, TT_S1 & TT_S2, 1'b1, 2); i.nb1 = DIR_E; i.nb2 = DIR_S; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB1, TT_S1 & TT_S2, 1'b1, SW_E); i.nb1 = DIR_E; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB2, TT_S1 & TT_S2, 1'b1, SW_S); i.nb2 = DIR_S; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB1, TT_S1 & TT_S2, 1'b1, SW_W); i.nb1 = DIR_W; issue(i);
    i = i_alu(DST_SW, SRC_X, SRC_NB2, TT_S1 & TT_S2, 1'b1, SW_N); i.nb2 = DIR_N; issue(i);
    issue(i_alu(DST_SW, SRC_X, SRC_ZERO, TT_S1, 1'b1, SW_H));
    issue(i_alu(DST_SW, SRC_X, SRC_ZERO, TT_S1, 1'b1, SW_V));
    issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, SW_NE));
    issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, SW_NW));
    issue(i_sw(OP_SWSTORE, 1'b1, 16));
    for (int b = 0; b < 8; b++) issue(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, PE_ADDR_W'(b)));
    issue(i_sw(OP_SWLOAD, 1'b1, 16));
    i = i_cot(SRC_MEM); i.addr = 1;
    cot_wait = 0;
    issue(i);
    issue(i_alu(DST_R, SRC_COT, SRC_ZERO, TT_S1, 1'b1, 0));
    check("network settle wait", cot_wait > 1);
    issue(i_bswr(SRC_R, 15'd2, 0));
    issue(i_bswr(SRC_MEM, 15'd3, 2));        // the two-neighbour plane
    m_caapp_bs_write++;
    #1;
    check("some", some == 1'b1);
    if (some) m_some++;
    issue(i_sw(OP_CNT, 1'b0, 0));

    // read planes 2 and 3 back through the ICAP ports
    bad = 0;
    for (int k = 0; k < int'(NCHIP); k++) cnt[k] = 0;
    for (int plane = 2; plane <= 3; plane++)
      for (int part = 0; part < 4; part++) begin
        @(negedge clk);
        for (int k = 0; k < int'(NCHIP); k++) begin
          icap_bs_addr[k] = {(BAW-2)'(plane), 2'(part)}; icap_bs_rd[k] = 1;
        end
        @(negedge clk);
        for (int k = 0; k < int'(NCHIP); k++) icap_bs_rd[k] = 0;
        for (int r = 0; r < int'(R); r++)
          for (int c = 0; c < int'(C); c++)
            if (loc_of(r, c) / 16 == part) begin
              logic got, exp;
              got = icap_bs_rdata[chip_of(r, c)][loc_of(r, c) % 16];
              exp = (plane == 2) ? inset[r][c]
                    : (r + 1 < int'(R) && c + 1 < int'(C) && img[r][c + 1] && img[r + 1][c]);
              checks++;
              if (got !== exp) begin
                failures++; bad++;
                if (bad < 10) $display("image %0d plane %0d pixel %0d,%0d got %0b expected %0b", t, plane, r, c, got, exp);
              end
              if (plane == 2) cnt[chip_of(r, c)] += inset[r][c];
            end
      end
    m_icap_bs_read++;
    if (bad == 0) begin m_coterie++; m_two_nb++; m_sw_save++; end
    bad = 0;
    for (int k = 0; k < int'(NCHIP); k++) begin
      checks++;
      if (chip_count[k] !== 7'(cnt[k])) begin failures++; bad++; $display("chip %0d count %0d expected %0d", k, chip_count[k], cnt[k]); end
    end
    if (bad == 0) m_count++;
  endtask

  task automatic net(net_cmd_e c, logic [5:0] o, logic [5:0] i, logic [4:0] r);
    @(negedge clk); net_cmd = c; net_out = o; net_in = i; net_row = r;
    #1;
    check("net command taken", net_cmd_taken);
    @(negedge clk); net_cmd = NET_NONE;
  endtask

  task automatic check_serial(int p, string what);
    int bad;
    bad = 0;
    for (int t = 0; t < 8; t++) begin
      icap_tx = {$urandom, $urandom};
      #1;
      for (int o = 0; o < 64; o++) begin
        checks++;
        if (icap_rx[o] !== icap_tx[map[p][o]]) begin failures++; bad++; $display("%s: port %0d", what, o); end
      end
    end
    if (bad == 0 && p == 1) m_broadcast++;
  endtask

  initial begin
    instr = i_nop();
    for (int k = 0; k < int'(NCHIP); k++) begin
      icap_bs_addr[k] = 0; icap_bs_rd[k] = 0; icap_bs_wr[k] = 0; icap_bs_wdata[k] = 0;
    end
    for (int l = 0; l < 3; l++) flags[l] = 0;
    for (int p = 0; p < int'(NP); p++) sum_value[p] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    for (int t = 0; t < 3; t++) run_image(t);

    // ICAP network: pattern 0 is a random mapping, pattern 1 broadcasts
    // processor 9 to every port except a few random ones
    for (int p = 0; p < 2; p++) begin
      net(NET_SET_ROW, 0, 0, 5'(4 + p));
      for (int o = 0; o < 64; o++) begin
        map[p][o] = (p == 1 && o % 5 != 0) ? 6'd9 : 6'($urandom);
        net(NET_LINK, 6'(o), map[p][o], 0);
      end
    end
    m_net_store++;
    for (int b = 0; b < 4; b++) begin
      int p, order [64], rel_at;
      bit resw_before;
      p = b % 2;
      reconf_en = 1; reconf_row = 5'(4 + p);
      for (int q = 0; q < 64; q++) order[q] = q;
      order.shuffle();
      resw_before = 0; rel_at = 0;
      for (int q = 0; q < 64; q++) begin
        @(negedge clk) arrive[order[q]] = 1;
      end
      for (int w = 0; w < 10 && rel_at == 0; w++) begin
        @(posedge clk);
        if (dut.cmd_mux == NET_RESWITCH) resw_before = 1;
        if (release_o) rel_at = w + 1;
      end
      check("barrier released", rel_at != 0);
      check("reswitch before release", resw_before);
      if (rel_at != 0) m_barrier++;
      @(negedge clk) arrive = 0;
      check_serial(p, "after barrier reswitch");
      if (resw_before) m_reswitch++;
      repeat (3) @(negedge clk);
    end
    check("barrier count", barriers == 16'd4);

    // global OR lines and global sum
    for (int t = 0; t < 20; t++) begin
      int exp_sum, bad;
      bad = 0;
      for (int l = 0; l < 3; l++) begin
        flags[l] = 0;
        if ($urandom_range(1)) flags[l][$urandom_range(63)] = 1;
      end
      exp_sum = 0;
      for (int q = 0; q < int'(NP); q++) begin sum_value[q] = 8'($urandom); exp_sum += sum_value[q]; end
      #1;
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (global_or[l] !== (flags[l] != 0)) begin failures++; bad++; end
      end
      if (bad == 0) m_global_or++;
      @(negedge clk) sum_start = 1;
      @(negedge clk) sum_start = 0;
      while (!sum_valid) @(negedge clk);
      checks++;
      if (sum !== 14'(exp_sum)) begin failures++; $display("sum %0d expected %0d", sum, exp_sum); end
      else m_sum++;
    end

    $display("mechanisms: icap_bs_write=%0d icap_bs_read=%0d caapp_bs_read=%0d caapp_bs_write=%0d",
             m_icap_bs_write, m_icap_bs_read, m_caapp_bs_read, m_caapp_bs_write);
    $display("mechanisms: two_neighbour=%0d switch_save_restore=%0d coterie=%0d some=%0d chip_count=%0d",
             m_two_nb, m_sw_save, m_coterie, m_some, m_count);
    $display("mechanisms: net_store=%0d broadcast=%0d barrier=%0d reswitch=%0d global_or=%0d sum=%0d",
             m_net_store, m_broadcast, m_barrier, m_reswitch, m_global_or, m_sum);
    check("all mechanisms", m_icap_bs_write && m_icap_bs_read && m_caapp_bs_read && m_caapp_bs_write
                          && m_two_nb && m_sw_save && m_coterie && m_some && m_count && m_net_store
                          && m_broadcast && m_barrier && m_reswitch && m_global_or && m_sum);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
