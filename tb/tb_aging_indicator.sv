// Self-checking testbench for aging_indicator with a short window (32
// operations, threshold 4 errors) so that many windows pass quickly. Operations
// and errors arrive at random with a slowly rising error rate, as an ageing
// circuit would produce them. The testbench keeps its own operation and error
// counters, predicts when aged must rise (the first window whose error count
// passes the threshold) and checks aged after every clock edge, and that it
// stays high afterwards.
module tb_aging_indicator;
  localparam int unsigned WINDOW = 32, ERR_THRESH = 4;
  logic clk = 1'b0, rst_n = 1'b0, op_done = 1'b0, error = 1'b0;
  logic aged;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned m_ops = 0, m_errs = 0, windows = 0, rise_cycle = 0;
  logic m_aged = 1'b0;

  aging_indicator #(.WINDOW(WINDOW), .ERR_THRESH(ERR_THRESH)) dut (
    .clk(clk), .rst_n(rst_n), .op_done(op_done), .error(error), .aged(aged));

  always #5 clk = !clk;

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      // error rate grows from 0 to about 1 in 5 over the run
      op_done = ($urandom_range(3) != 0);
      error   = ($urandom_range(14999) < i);
      @(posedge clk);
      // model of the counters at this edge
      if (m_errs + error > ERR_THRESH && !m_aged) begin
        m_aged = 1'b1;
        rise_cycle = i;
      end
      if (op_done && m_ops == WINDOW - 1) begin
        m_ops = 0;
        m_errs = 0;
        windows++;
      end else begin
        m_ops += op_done;
        m_errs += error;
      end
      @(negedge clk);
      checks++;
      if (aged !== m_aged) begin
        failures++;
        if (failures < 10) $display("FAIL cycle %0d aged=%b expected %b", i, aged, m_aged);
      end
    end
    // the run must have seen quiet windows first and then the switch
    checks++;
    if (!m_aged || rise_cycle < 2 * WINDOW || windows < 3) failures++;
    $display("windows=%0d aged at cycle %0d", windows, rise_cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 5000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
