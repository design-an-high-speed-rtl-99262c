// One-bit Razor flip-flop: a main flip-flop, a shadow latch, an XOR comparator
// and a restore mux.
//
// The main flip-flop samples d on the rising edge of clk, as an ordinary
// pipeline register would. The shadow latch samples the same d on clk_del, a
// copy of clk delayed by a fraction of the period: it is transparent while
// clk_del is high and holds from the falling edge of clk_del until clk_del rises
// again. If the logic feeding d settles after the clk edge but before the shadow
// latch closes, the two copies differ and error goes to 1. The owner of the
// flip-flop then raises restore, and at the next clk edge the mux loads the
// shadow latch's (correct) value into the main flip-flop instead of d.
//
// Timing: q changes on the rising edge of clk. error is meaningful from the
// falling edge of clk_del until the next rising edge of clk, and must only be
// sampled on that clk edge; clk_del's high phase must end before the next clk
// edge (delay plus high time shorter than one period). Between the clk edge and
// the closing of the shadow latch error may pulse; no logic in this design
// looks at it there.
//
// The structure (main flip-flop, shadow latch, XOR, mux) follows the design's
// description. The asynchronous active-low reset and the explicit restore input
// are this design's choices. The shadow latch is a deliberate level-sensitive
// latch; it is the reason a lint tool reports a latch here.
module razor_ff (
  input  logic clk,      // main clock
  input  logic clk_del,  // delayed clock for the shadow latch
  input  logic rst_n,    // asynchronous reset, active low
  input  logic d,
  input  logic restore,  // load the shadow value instead of d at the next clk edge
  output logic q,
  output logic error     // main and shadow copies disagree
);
  logic shadow;

  always_latch begin
    if (!rst_n)       shadow = 1'b0;
    else if (clk_del) shadow = d;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= 1'b0;
    else        q <= restore ? shadow : d;
  end

  assign error = q ^ shadow;
endmodule
