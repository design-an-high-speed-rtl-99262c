// Column-bypassing M x M unsigned array multiplier (combinational).
//
// The array is a Braun carry-save array. The full adder in row j, column i adds
// the partial product a[i]&b[j], the sum coming from row j-1, column i+1, and the
// carry coming from row j-1, column i, so every carry in column i travels down
// that same column. When multiplicand bit a[i] is 0 the whole column adds
// nothing: its carries stay 0 and each sum is the incoming sum. The column is
// therefore bypassed: a mux passes the incoming sum straight down and forces the
// carry to 0, so those adders do not switch and do not lengthen the path. The
// more zeros the multiplicand holds, the shorter the longest active path, which
// is what the adaptive hold logic exploits when it counts the multiplicand's
// zeros. Row j's column-0 sum is product bit j; a ripple-carry adder merges the
// last row's sums and carries into the upper M product bits.
//
// Interface: a (multiplicand), b (multiplicator), p = a*b, 2M bits. No clock.
// The bypass rule on the multiplicand follows the design's description; the
// Braun array organisation and the plain ripple-carry merging row are this
// design's own choices.
module column_bypass_multiplier #(
  parameter int unsigned M = amul_pkg::DEFAULT_M
) (
  input  logic [M-1:0]   a,
  input  logic [M-1:0]   b,
  output logic [2*M-1:0] p
);
  // s[j][i], c[j][i]: sum and carry leaving the cell of row j, column i
  logic [M-1:0] s [M];
  logic [M-1:0] c [M];

  // Row 0: partial products only
  for (genvar i = 0; i < M; i++) begin : g_row0
    assign s[0][i] = a[i] & b[0];
    assign c[0][i] = 1'b0;
  end

  for (genvar j = 1; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      logic sin, fa_s, fa_c;
      if (i + 1 < M) begin : g_sin
        assign sin = s[j-1][i+1];
      end else begin : g_sin0
        assign sin = 1'b0;
      end
      full_adder u_fa (.a(a[i] & b[j]), .b(sin), .ci(c[j-1][i]), .s(fa_s), .co(fa_c));
      // column bypass: a[i] == 0 passes the sum through and kills the carry
      assign s[j][i] = a[i] ? fa_s : sin;
      assign c[j][i] = a[i] ? fa_c : 1'b0;
    end
  end

  for (genvar j = 0; j < M; j++) begin : g_low
    assign p[j] = s[j][0];
  end

  // Merge the last row: sums s[M-1][i] (i >= 1) carry weight M-1+i,
  // carries c[M-1][i] carry weight M+i.
  logic [M-1:0] mx, my, hi;
  logic         unused_co;
  assign mx = {1'b0, s[M-1][M-1:1]};
  assign my = c[M-1];
  ripple_adder #(.W(M)) u_merge (.x(mx), .y(my), .ci(1'b0), .sum(hi), .co(unused_co));
  assign p[2*M-1:M] = hi;
endmodule
