// W-bit ripple-carry adder made of a chain of full adders. Used as the final
// vector-merging row of the column-bypassing array and as each row of the
// row-bypassing array. Combinational; sum is W bits, co the carry out of the
// top bit.
module ripple_adder #(
  parameter int unsigned W = 16
) (
  input  logic [W-1:0] x,
  input  logic [W-1:0] y,
  input  logic         ci,
  output logic [W-1:0] sum,
  output logic         co
);
  logic [W:0] c;
  assign c[0] = ci;

  for (genvar k = 0; k < W; k++) begin : g_bit
    full_adder u_fa (.a(x[k]), .b(y[k]), .ci(c[k]), .s(sum[k]), .co(c[k+1]));
  end

  assign co = c[W];
endmodule
