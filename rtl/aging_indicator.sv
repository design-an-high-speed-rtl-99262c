// Aging indicator of the adaptive hold logic. Two counters run over a window of
// WINDOW operations: one counts operations (op_done), the other counts Razor
// errors (error). When the error count exceeds ERR_THRESH the circuit is taken
// to have slowed down noticeably through aging and aged goes to 1; it then stays
// 1 until reset, since aging does not undo itself. At the end of each window
// both counters return to zero.
//
// Timing: counters update on the rising edge of clk; aged rises on the edge at
// which the (ERR_THRESH+1)-th error of a window is counted. Reset is
// asynchronous, active low.
//
// The counter over a fixed number of operations, its reset at the end of the
// window and the threshold test follow the design. The window length, the
// threshold and the sticky output are this design's choices.
module aging_indicator #(
  parameter int unsigned WINDOW     = 1024,  // operations per observation window
  parameter int unsigned ERR_THRESH = 16     // errors tolerated per window
) (
  input  logic clk,
  input  logic rst_n,
  input  logic op_done,  // one operation issued this cycle
  input  logic error,    // one Razor error this cycle
  output logic aged
);
  localparam int unsigned OW = $clog2(WINDOW + 1);
  localparam int unsigned EW = $clog2(WINDOW + 2);

  logic [OW-1:0] op_cnt;
  logic [EW-1:0] err_cnt;
  logic [EW-1:0] err_next;
  logic          window_end;

  // saturating, so errors reported without operations cannot wrap the count
  assign err_next   = (error && err_cnt != '1) ? err_cnt + 1'b1 : err_cnt;
  assign window_end = op_done && (32'(op_cnt) == WINDOW - 1);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_cnt  <= '0;
      err_cnt <= '0;
      aged    <= 1'b0;
    end else begin
      if (32'(err_next) > ERR_THRESH) aged <= 1'b1;
      if (window_end) begin
        op_cnt  <= '0;
        err_cnt <= '0;
      end else begin
        op_cnt  <= op_cnt + OW'(op_done);
        err_cnt <= err_next;
      end
    end
  end
endmodule
