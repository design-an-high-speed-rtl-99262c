// Adaptive hold logic (AHL): decides, pattern by pattern, whether the multiplier
// gets one cycle or two, and tightens that decision once the circuit has aged.
//
// Two judging blocks look at the operand being loaded into the input registers.
// The first calls the pattern one-cycle when it has more than N zeros, the
// second when it has more than N+1 zeros, so it lets fewer patterns through as
// one-cycle. The aging indicator, fed with the Razor error flag, picks between
// them through a mux: the first block while the circuit is fresh, the second
// once errors have become frequent. The mux output is ORed with the inverted
// output of a D flip-flop and the result is that flip-flop's next state. Its
// output en (the inverse of the clock-gating signal) is the load enable of the
// input registers: when a two-cycle pattern is loaded, en drops for one cycle so
// the registers hold the pattern for a second cycle; in that cycle the OR sees
// !en = 1, so en is always back to 1 one cycle later.
//
// Interface and timing: operand and load are sampled on the rising edge of clk
// together with the input registers (load = the input registers take a new
// pattern on this edge). en is registered; when en is 0 the owner must not load
// at the next edge. error is the qualified Razor error, sampled each edge.
// Reset (asynchronous, active low) leaves en = 1 and the indicator at "fresh".
//
// Parts and their connection follow the design. Driving a load enable rather
// than gating the input registers' clock, and keeping en at 1 in cycles where
// nothing is loaded, are this design's choices.
module adaptive_hold_logic #(
  parameter int unsigned W          = amul_pkg::DEFAULT_M,
  parameter int unsigned N          = amul_pkg::DEFAULT_N,
  parameter int unsigned WINDOW     = 1024,
  parameter int unsigned ERR_THRESH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [W-1:0] operand,    // multiplicand (column) or multiplicator (row)
  input  logic         load,       // input registers load operand on this edge
  input  logic         error,      // Razor error of a completed operation
  output logic         en,         // !gating: input registers may load next edge
  output logic         one_cycle,  // mux output for the current operand
  output logic         aged        // aging indicator output
);
  logic judge1, judge2, d_next;

  judging_block #(.W(W), .THRESH(N))     u_judge1 (.operand(operand), .one_cycle(judge1));
  judging_block #(.W(W), .THRESH(N + 1)) u_judge2 (.operand(operand), .one_cycle(judge2));

  aging_indicator #(.WINDOW(WINDOW), .ERR_THRESH(ERR_THRESH)) u_aging (
    .clk(clk), .rst_n(rst_n), .op_done(load), .error(error), .aged(aged)
  );

  assign one_cycle = aged ? judge2 : judge1;
  assign d_next    = one_cycle | !en | !load;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) en <= 1'b1;
    else        en <= d_next;
  end
endmodule
