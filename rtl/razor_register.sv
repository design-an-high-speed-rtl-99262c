// W-bit register of Razor flip-flops, used for the 2m-bit product of the
// multiplier. Each bit is a razor_ff; the per-bit error flags are ORed into one
// error output, and a single restore input makes every bit reload its shadow
// value at the next clk edge. Timing is that of razor_ff: q changes on the
// rising edge of clk and error is valid for sampling at the next rising edge.
// Building the product register from 2m Razor flip-flops follows the design;
// the OR tree and the shared restore line are this design's choices.
module razor_register #(
  parameter int unsigned W = 2 * amul_pkg::DEFAULT_M
) (
  input  logic         clk,
  input  logic         clk_del,
  input  logic         rst_n,
  input  logic [W-1:0] d,
  input  logic         restore,
  output logic [W-1:0] q,
  output logic         error
);
  logic [W-1:0] bit_err;

  for (genvar k = 0; k < W; k++) begin : g_bit
    razor_ff u_ff (
      .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
      .d(d[k]), .restore(restore), .q(q[k]), .error(bit_err[k])
    );
  end

  assign error = |bit_err;
endmodule
