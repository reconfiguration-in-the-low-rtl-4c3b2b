// icap_global_feedback: the summary feedback from the ICAP array to the
// array controller.
//
// Three global OR lines: line i is high when any processor raises its flag
// i; what the flags mean is up to the program (task done, done with an
// exception, an associative Some/None test, ...).  A global sum: on start,
// the 8-bit values of all processors are added.  The sum is formed the way
// a responder counter does it: in cycle b the unit counts how many values
// have bit b set and adds that count, weighted by 2^b, to the total, so an
// 8-bit sum takes 8 cycles.  Bit-serial counting reuses one population
// counter as the CAAPP's count hardware would; it is this design's reading
// of how the count hardware forms the sum.
//
// Timing: the OR lines are combinational.  sum_valid rises W cycles after
// the start cycle and sum holds until the next start; values must stay
// stable while busy.
module icap_global_feedback #(
  parameter int unsigned NPROC = 64,
  parameter int unsigned NOR   = 3,
  parameter int unsigned W     = 8,
  localparam int unsigned SUMW = W + $clog2(NPROC)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [NPROC-1:0] flags [NOR],
  output logic [NOR-1:0]   global_or,
  input  logic [W-1:0]     value [NPROC],
  input  logic             sum_start,
  output logic             sum_busy,
  output logic             sum_valid,
  output logic [SUMW-1:0]  sum
);

  localparam int unsigned CW = $clog2(NPROC + 1);

  logic [$clog2(W)-1:0] bit_q;
  logic [CW-1:0]        cnt;

  always_comb
    for (int i = 0; i < NOR; i++) global_or[i] = |flags[i];

  always_comb begin
    cnt = '0;
    for (int p = 0; p < NPROC; p++) cnt += CW'(value[p][bit_q]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bit_q     <= '0;
      sum_busy  <= 1'b0;
      sum_valid <= 1'b0;
      sum       <= '0;
    end else if (sum_start && !sum_busy) begin
      bit_q     <= '0;
      sum_busy  <= 1'b1;
      sum_valid <= 1'b0;
      sum       <= '0;
    end else if (sum_busy) begin
      sum <= sum + (SUMW'(cnt) << bit_q);
      if (int'(bit_q) == W - 1) begin
        sum_busy  <= 1'b0;
        sum_valid <= 1'b1;
      end else begin
        bit_q <= bit_q + 1'b1;
      end
    end
  end

endmodule
