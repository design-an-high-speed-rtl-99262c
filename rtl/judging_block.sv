// Judging block of the adaptive hold logic. It counts the zeros in the operand
// the bypassing multiplier skips on (the multiplicand for column bypassing, the
// multiplicator for row bypassing) and outputs 1, "one-cycle pattern", when
// that count is larger than THRESH. Combinational; the zero count is a plain
// population count of the inverted operand. The rule "number of zeros larger
// than n" is the design's; the counting circuit is this design's choice.
module judging_block #(
  parameter int unsigned W      = amul_pkg::DEFAULT_M,
  parameter int unsigned THRESH = amul_pkg::DEFAULT_N
) (
  input  logic [W-1:0] operand,
  output logic         one_cycle
);
  localparam int unsigned CW = $clog2(W + 1);
  logic [CW-1:0] zeros;

  always_comb begin
    zeros = '0;
    for (int unsigned k = 0; k < W; k++) begin
      zeros = zeros + CW'(!operand[k]);
    end
  end

  assign one_cycle = (32'(zeros) > THRESH);
endmodule
