// Row-bypassing M x M unsigned array multiplier (combinational).
//
// Each row j of the array is a ripple-carry adder that adds the multiplicand,
// shifted left by j, to the running sum of the rows above. When multiplicator
// bit b[j] is 0 the row has nothing to add: it is bypassed, a mux passing the
// running sum straight to the next row while the row's adders see constant
// inputs and do not switch. The more zeros the multiplicator holds, the fewer
// rows lie on the active path, which is what the adaptive hold logic exploits
// when it counts the multiplicator's zeros.
//
// Interface: a (multiplicand), b (multiplicator), p = a*b, 2M bits. No clock.
// The bypass rule on the multiplicator follows the design's description; using
// carry-propagate rows (rather than a carry-save array with carry fix-up logic)
// is this design's own choice, which makes the bypass exact.
module row_bypass_multiplier #(
  parameter int unsigned M = amul_pkg::DEFAULT_M
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  // acc[j]: running sum after row j
  logic [2*M-1:0] acc [M];

  assign acc[0] = b[0] ? {{M{1'b0}}, a} : '0;

  for (genvar j = 1; j < M; j++) begin : g_row
    logic [M-1:0] rsum;
    logic         rco;
    logic [M-1:0] xin;
    // operand gating: a bypassed row sees zeros and stays quiet
    assign xin = b[j] ? acc[j-1][j +: M] : '0;
    ripple_adder #(.W(M)) u_row (.x(xin), .y(b[j] ? a : '0), .ci(1'b0), .sum(rsum), .co(rco));
    // a used row replaces bits j .. j+M of the running sum (they are zero above j+M-1)
    assign acc[j] = b[j] ? (2*M)'({rco, rsum, acc[j-1][j-1:0]}) : acc[j-1];
  end

  assign p = acc[M-1];
endmodule
