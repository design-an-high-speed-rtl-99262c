// Aging-aware variable-latency multiplier.
//
// A bypassing array multiplier is fast for patterns that let it skip many
// columns (or rows) and slow for patterns that skip few. Instead of clocking it
// for the worst pattern, this design clocks it for the typical one and gives
// slow patterns a second cycle. The adaptive hold logic (AHL) predicts, from the
// number of zeros in the operand the multiplier bypasses on, whether a pattern
// is a one-cycle pattern; if not, it holds the input registers for one extra
// cycle. The product is captured in a register of Razor flip-flops, so a
// pattern that was predicted one-cycle but still arrived late (because the
// transistors have slowed with age) is caught: the Razor register reloads the
// late, correct value from its shadow latches, the next operation is held for
// an extra cycle, and the error is counted. When errors become frequent the AHL
// switches to a stricter judging rule (one more zero required), so fewer
// patterns are tried in one cycle.
//
// Datapath, per operation:
//   edge E    : in_a/in_b load into the input registers (in_valid && in_ready);
//               the AHL's D flip-flop records whether the pattern is one-cycle.
//   edge E+1  : one-cycle pattern - the product is captured, out_valid = 1 after
//               the edge, and the next pattern may load on the same edge.
//   edge E+2  : two-cycle pattern - the input registers were held at E+1
//               (in_ready = 0 during that cycle) and the product is captured now.
//   Razor error on a captured product: during the cycle after the capture,
//   razor_error = 1 and out_valid = 0 (both valid for sampling at the clk edge);
//   at the next edge the shadow value is restored, out_valid returns, and the
//   operation then in the input registers is given one more cycle. The cycle
//   after a restore is not checked, as the shadow latches then already follow
//   the next operation.
//
// Razor timing in simulation: the shadow latches are transparent while clk_del
// is high, so they assume (as any Razor design does) that the product does not
// start changing for the next operation before clk_del falls. The RTL models
// no gate delay, so a testbench must hold the product net steady over that
// window after each edge to represent the multiplier's minimum path delay, and
// may present a stale value at the edge to represent a late (aged) path.
// The result is held at out_p until the next capture; out_valid is a one-edge
// strobe per result. A consumer samples out_p/out_valid on the rising clk edge.
//
// Clocks and reset: clk is the system clock; clk_del is the same clock delayed
// by less than half a period, used by the Razor shadow latches. rst_n is an
// asynchronous, active-low reset.
//
// The block structure (input registers, bypassing multiplier, 2M Razor
// flip-flops, AHL with aging indicator, two judging blocks, mux and D flip-flop)
// follows the design. The valid/ready handshake, the qualification of Razor
// errors by "this capture was a final result", the sizes M, N, WINDOW and
// ERR_THRESH, and the choice of column bypassing as the default are this
// design's own.
module aging_aware_multiplier
  import amul_pkg::*;
#(
  parameter int unsigned M          = DEFAULT_M,   // operand width
  parameter int unsigned N          = DEFAULT_N,   // judging threshold n
  parameter bypass_e     MODE       = BYPASS_COLUMN,
  parameter int unsigned WINDOW     = 1024,        // aging-indicator window (operations)
  parameter int unsigned ERR_THRESH = 16           // errors per window that signal aging
) (
  input  logic           clk,
  input  logic           clk_del,
  input  logic           rst_n,
  input  logic           in_valid,
  input  logic [M-1:0]   in_a,         // multiplicand
  input  logic [M-1:0]   in_b,         // multiplicator
  output logic           in_ready,
  output logic           out_valid,
  output logic [2*M-1:0] out_p,
  output logic           razor_error,  // a captured result was late (being repaired)
  output logic           hold,         // second cycle of a two-cycle pattern
  output logic           aged          // AHL uses the stricter judging block
);
  logic [M-1:0]   a_q, b_q;
  logic           ex_valid;    // input registers hold an operation
  logic [2*M-1:0] product;
  logic [2*M-1:0] p_q;
  logic           raw_err;
  logic           cap_valid;   // Razor register holds a final result
  logic           err;
  logic           restored;    // Razor register was reloaded from its shadow at the last edge
  logic           en;
  logic           accept;

  // ---------------------------------------------------------------- multiplier
  if (MODE == BYPASS_COLUMN) begin : g_col
    column_bypass_multiplier #(.M(M)) u_mult (.a(a_q), .b(b_q), .p(product));
  end else begin : g_row
    row_bypass_multiplier #(.M(M)) u_mult (.a(a_q), .b(b_q), .p(product));
  end

  // ------------------------------------------------------- Razor product register
  razor_register #(.W(2 * M)) u_razor (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .d(product), .restore(err), .q(p_q), .error(raw_err)
  );

  // Only a capture that was meant to be a result can be late. Right after a
  // restore the main flip-flops hold the repaired result while the shadow
  // latches already follow the next operation, so that cycle is not checked.
  assign err = raw_err && cap_valid && !restored;

  // --------------------------------------------------------- adaptive hold logic
  adaptive_hold_logic #(.W(M), .N(N), .WINDOW(WINDOW), .ERR_THRESH(ERR_THRESH)) u_ahl (
    .clk(clk), .rst_n(rst_n),
    .operand(MODE == BYPASS_COLUMN ? in_a : in_b),
    .load(accept), .error(err),
    .en(en), .one_cycle(), .aged(aged)
  );

  assign in_ready = en && !err;
  assign accept   = in_valid && in_ready;

  // ------------------------------------------------------------ input registers
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q      <= '0;
      b_q      <= '0;
      ex_valid <= 1'b0;
    end else if (in_ready) begin
      ex_valid <= in_valid;
      if (in_valid) begin
        a_q <= in_a;
        b_q <= in_b;
      end
    end
  end

  // --------------------------------------------------------- result bookkeeping
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cap_valid <= 1'b0;
      restored  <= 1'b0;
    end else begin
      cap_valid <= err || (ex_valid && en);
      restored  <= err;
    end
  end

  assign out_valid   = cap_valid && !err;
  assign out_p       = p_q;
  assign razor_error = err;
  assign hold        = !en;

  // a two-cycle hold never lasts more than one cycle
  a_hold_one_cycle : assert property (@(posedge clk) disable iff (!rst_n) !en |=> en);
endmodule
