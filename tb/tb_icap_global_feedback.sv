// tb_icap_global_feedback: self-checking test of the three global OR lines
// and the bit-serial global sum of 64 eight-bit values.
module tb_icap_global_feedback;
  logic        clk = 0, rst_n = 0;
  logic [63:0] flags [3];
  logic [2:0]  global_or;
  logic [7:0]  value [64];
  logic        sum_start = 0, sum_busy, sum_valid;
  logic [13:0] sum;

  int checks = 0, failures = 0;

  icap_global_feedback dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int l = 0; l < 3; l++) flags[l] = '0;
    for (int i = 0; i < 64; i++) value[i] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 200; t++) begin
      int exp_sum, cyc;
      for (int l = 0; l < 3; l++) begin
        flags[l] = '0;
        case ($urandom_range(2))
          0: ;
          1: flags[l][$urandom_range(63)] = 1;
          default: flags[l] = {$urandom, $urandom};
        endcase
      end
      exp_sum = 0;
      for (int i = 0; i < 64; i++) begin
        value[i] = (t == 0) ? 8'hFF : 8'($urandom);
        exp_sum += value[i];
      end
      #1;
      for (int l = 0; l < 3; l++) begin
        checks++;
        if (global_or[l] !== (flags[l] != 0)) begin failures++; $display("or line %0d", l); end
      end
      @(negedge clk) sum_start = 1;
      @(negedge clk) sum_start = 0;
      cyc = 0;
      while (!sum_valid && cyc < 100) begin @(negedge clk); cyc++; end
      checks++;
      if (!sum_valid || sum !== 14'(exp_sum)) begin
        failures++; $display("sum %0d expected %0d", sum, exp_sum);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
