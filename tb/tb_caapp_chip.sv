// tb_caapp_chip: self-checking test of one CAAPP chip (64 PEs).
//
// Random per-PE data is loaded through the backing store input; the test
// then checks, against values computed here from that data: truth-table ALU
// results (AND, XOR, conditional assignment), a bit-serial add with carry
// over 4 bits, activity masking and unmasked instructions, the two
// neighbour inputs, switch bit writes, one-instruction switch save and
// restore, the backing store write enables, the Coterie drive and the
// latched responder count.
module tb_caapp_chip;
  import iua_pkg::*;

  localparam int unsigned NPE = CHIP_PES;

  logic        clk = 0, rst_n = 0, exec = 0;
  pe_instr_t   instr;
  logic        nb1 [NPE], nb2 [NPE], cot_in [NPE], bs_rdata [NPE];
  logic        x_out [NPE], resp [NPE], cot_drive [NPE], bs_we [NPE], bs_wdata [NPE];
  coterie_sw_t sw [NPE];
  logic [6:0]  count;

  int checks = 0, failures = 0;
  logic [3:0] va [NPE], vb [NPE];
  logic [7:0] swpat [NPE];

  caapp_chip dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(pe_instr_t i);
    @(negedge clk) instr = i; exec = 1;
    @(negedge clk) exec = 0; instr = i_nop();
  endtask

  task automatic check(string what, int k, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("%s: PE %0d got %0b expected %0b", what, k, got, exp);
    end
  endtask

  // write per-PE bits into RAM address a through the backing store input
  task automatic load_bit(int a, logic v [NPE]);
    for (int k = 0; k < NPE; k++) bs_rdata[k] = v[k];
    run(i_alu(DST_MEM, SRC_BS, SRC_ZERO, TT_S1, 1'b1, PE_ADDR_W'(a)));
  endtask

  initial begin
    logic v [NPE];
    instr = i_nop();
    for (int k = 0; k < NPE; k++) begin
      nb1[k] = 0; nb2[k] = 0; cot_in[k] = 0; bs_rdata[k] = 0;
      va[k] = 4'($urandom); vb[k] = 4'($urandom); swpat[k] = 8'($urandom);
    end
    repeat (2) @(negedge clk);
    rst_n = 1;

    // load A at 0..3, B at 8..11
    for (int b = 0; b < 4; b++) begin
      for (int k = 0; k < NPE; k++) v[k] = va[k][b];
      load_bit(b, v);
      for (int k = 0; k < NPE; k++) v[k] = vb[k][b];
      load_bit(8 + b, v);
    end

    // X := A0 & B0 ; Y := A1 ^ B1 (two instructions each: X := mem, X := X op mem)
    run(i_alu(DST_X, SRC_MEM, SRC_ZERO, TT_S1, 1'b0, 0));
    run(i_alu(DST_X, SRC_MEM, SRC_X, TT_S1 & TT_S2, 1'b0, 8));
    for (int k = 0; k < NPE; k++) check("and", k, x_out[k], va[k][0] & vb[k][0]);

    // bit-serial add A + B into 16..19, carry in C
    run(i_alu(DST_NONE, SRC_ZERO, SRC_ZERO, '0, 1'b0, 0));  // nop ALU
    begin
      pe_instr_t i;
      i = i_alu(DST_NONE, SRC_ZERO, SRC_ZERO, '0, 1'b0, 0);
      i.c_en = 1; i.ttc = '0;                                  // C := 0
      run(i);
      for (int b = 0; b < 4; b++) begin
        run(i_alu(DST_Y, SRC_MEM, SRC_ZERO, TT_S1, 1'b0, PE_ADDR_W'(b)));        // Y := A[b]
        i = i_alu(DST_MEM, SRC_MEM, SRC_Y, TT_S1 ^ TT_S2 ^ TT_C, 1'b0, PE_ADDR_W'(8 + b));
        i.c_en = 1;
        i.ttc  = (TC_S1 & TC_S2) | (TC_S1 & TC_C) | (TC_S2 & TC_C);
        run(i);                                                                     // B[b] := sum
      end
    end
    // read back the sum bit by bit through R, checking the responder count
    for (int b = 0; b < 4; b++) begin
      int exp_cnt;
      exp_cnt = 0;
      run(i_alu(DST_R, SRC_MEM, SRC_ZERO, TT_S1, 1'b0, PE_ADDR_W'(8 + b)));
      for (int k = 0; k < NPE; k++) begin
        logic [4:0] sum;
        sum = 5'(va[k]) + 5'(vb[k]);
        check("add", k, resp[k], sum[b]);
        exp_cnt += sum[b];
      end
      run(i_sw(OP_CNT, 1'b0, 0));
      checks++;
      if (count != 7'(exp_cnt)) begin
        failures++;
        $display("count %0d expected %0d", count, exp_cnt);
      end
    end

    // masking: A := A0 (original bit 0 of a), then X := 1 masked, X := 0 unmasked first
    run(i_alu(DST_X, SRC_ZERO, SRC_ZERO, '0, 1'b1, 0));
    run(i_alu(DST_A, SRC_MEM, SRC_ZERO, TT_S1, 1'b1, 0));
    run(i_alu(DST_X, SRC_ONE, SRC_ZERO, TT_S1, 1'b0, 0));
    for (int k = 0; k < NPE; k++) check("mask", k, x_out[k], va[k][0]);
    // conditional assignment: A := cot ? R : A with cot = random
    for (int k = 0; k < NPE; k++) cot_in[k] = $urandom_range(1);
    run(i_alu(DST_R, SRC_ONE, SRC_ZERO, TT_S1, 1'b1, 0));        // R := 1 everywhere
    run(i_alu(DST_R, SRC_MEM, SRC_ZERO, TT_S1, 1'b0, 1));        // R := A1 in active PEs
    for (int k = 0; k < NPE; k++) check("drive", k, 1'b0, 1'b0);
    // Coterie drive is s1 of the current instruction gated by activity
    @(negedge clk) instr = i_cot(SRC_R);
    #1;
    for (int k = 0; k < NPE; k++) check("cot_drive", k, cot_drive[k], va[k][0] & va[k][1]);
    instr = i_nop();
    run(i_alu(DST_A, SRC_COT, SRC_R, (TT_S1 & TT_S2) | (~TT_S1 & TT_D), 1'b0, 0));
    // read A through X unmasked
    run(i_alu(DST_X, SRC_A, SRC_ZERO, TT_S1, 1'b1, 0));
    for (int k = 0; k < NPE; k++)
      check("cond", k, x_out[k], va[k][0] ? (cot_in[k] ? va[k][1] : 1'b1) : 1'b0);
    run(i_alu(DST_A, SRC_ONE, SRC_ZERO, TT_S1, 1'b1, 0));        // all active again

    // neighbour inputs: X := NB1 ^ NB2
    for (int k = 0; k < NPE; k++) begin nb1[k] = $urandom_range(1); nb2[k] = $urandom_range(1); end
    run(i_alu(DST_X, SRC_NB1, SRC_NB2, TT_S1 ^ TT_S2, 1'b0, 0));
    for (int k = 0; k < NPE; k++) check("nb", k, x_out[k], nb1[k] ^ nb2[k]);

    // switches: write pattern bit by bit, save with one instruction at byte 5,
    // clear, restore with one instruction
    for (int b = 0; b < 8; b++) begin
      for (int k = 0; k < NPE; k++) bs_rdata[k] = swpat[k][b];
      run(i_alu(DST_SW, SRC_BS, SRC_ZERO, TT_S1, 1'b1, PE_ADDR_W'(b)));
    end
    for (int k = 0; k < NPE; k++)
      for (int b = 0; b < 8; b++) check("sw write", k, sw[k][b], swpat[k][b]);
    run(i_sw(OP_SWSTORE, 1'b1, 40));
    for (int b = 0; b < 8; b++) run(i_alu(DST_SW, SRC_ZERO, SRC_ZERO, '0, 1'b1, PE_ADDR_W'(b)));
    for (int k = 0; k < NPE; k++) check("sw clear", k, sw[k] == '0, 1'b1);
    run(i_sw(OP_SWLOAD, 1'b1, 40));
    for (int k = 0; k < NPE; k++) check("sw restore", k, sw[k] == coterie_sw_t'(swpat[k]), 1'b1);

    // backing store write enable follows activity
    run(i_alu(DST_A, SRC_MEM, SRC_ZERO, TT_S1, 1'b1, 2));        // A := A2
    @(negedge clk) instr = i_bswr(SRC_ONE, 15'd7, 0); exec = 1;
    #1;
    for (int k = 0; k < NPE; k++) check("bs_we", k, bs_we[k], va[k][2]);
    @(negedge clk) exec = 0; instr = i_nop();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
