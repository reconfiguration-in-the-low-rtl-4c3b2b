// tb_backing_store: self-checking test of one chip's dual-ported backing
// store.  Port A (the CAAPP side, one bit per PE, masked writes) and port B
// (the ICAP side, 16-bit words) are driven with random traffic, reads on
// both ports in the same cycles as writes; a testbench copy of the store
// gives the expected data.  A 1024-bit depth keeps the run short.
module tb_backing_store;
  localparam int unsigned DEPTH = 1024;
  logic        clk = 0;
  logic [9:0]  a_addr = 0;
  logic        a_rd = 0, a_wr = 0;
  logic        a_wmask [64], a_wdata [64], a_rdata [64];
  logic [11:0] b_addr = 0;
  logic        b_rd = 0, b_wr = 0;
  logic [15:0] b_wdata = 0, b_rdata;

  int checks = 0, failures = 0;
  logic [63:0] ref_mem [DEPTH];

  backing_store #(.PES(64), .DEPTH(DEPTH), .IW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] exp_a;
    logic [15:0] exp_b;
    bit          chk_a, chk_b;
    for (int i = 0; i < 64; i++) begin a_wmask[i] = 1; a_wdata[i] = 0; end
    // clear the store through port A
    for (int d = 0; d < DEPTH; d++) begin
      @(negedge clk) a_addr = 10'(d); a_wr = 1;
      ref_mem[d] = '0;
    end
    @(negedge clk) a_wr = 0;
    for (int t = 0; t < 6000; t++) begin
      @(negedge clk);
      a_addr = 10'($urandom_range(15));
      b_addr = {10'($urandom_range(15)), 2'($urandom)};
      a_rd = $urandom_range(1); b_rd = $urandom_range(1);
      a_wr = $urandom_range(1); b_wr = $urandom_range(1);
      b_wdata = 16'($urandom);
      for (int i = 0; i < 64; i++) begin a_wmask[i] = $urandom_range(1); a_wdata[i] = $urandom_range(1); end
      // reads return the contents before this cycle's writes
      exp_a = ref_mem[a_addr];
      exp_b = ref_mem[b_addr[11:2]][b_addr[1:0]*16 +: 16];
      chk_a = a_rd; chk_b = b_rd;
      // port B first, then port A (A wins on the same bit)
      if (b_wr) ref_mem[b_addr[11:2]][b_addr[1:0]*16 +: 16] = b_wdata;
      if (a_wr) for (int i = 0; i < 64; i++) if (a_wmask[i]) ref_mem[a_addr][i] = a_wdata[i];
      @(posedge clk); #1;
      if (chk_a) for (int i = 0; i < 64; i++) begin
        checks++;
        if (a_rdata[i] !== exp_a[i]) begin failures++; $display("A read bit %0d", i); end
      end
      if (chk_b) begin
        checks++;
        if (b_rdata !== exp_b) begin failures++; $display("B read %h expected %h", b_rdata, exp_b); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
