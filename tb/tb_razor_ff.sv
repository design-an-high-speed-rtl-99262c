// Self-checking testbench for razor_ff.
// clk has a 10 ns period (rising at multiples of 10 ns); clk_del is clk delayed
// by 2 ns, so the shadow latch is open from 2 ns to 7 ns after each clk edge.
// Each step sets d 1 ns before a clk edge ("early" value) and 1 ns after it
// ("late" value). Equal values are an ordinary capture; different values are a
// path that settled late: the main flip-flop keeps the early value while the
// shadow latch catches the late one, and error must rise. restore is driven at
// random; when it is 1 the main flip-flop must take the shadow value at the
// edge, whatever d is. q and error are checked 8 ns after every edge against a
// model of the main and shadow storage kept in the testbench.
module tb_razor_ff;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic d = 1'b0, restore = 1'b0;
  logic q, error;
  int unsigned checks = 0, failures = 0;
  int unsigned n_late = 0, n_restore = 0;

  razor_ff dut (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .d(d), .restore(restore),
                .q(q), .error(error));

  // clk rises at 10k ns, clk_del at 10k+2 ns
  initial forever begin
    #2 clk_del = 1'b1;
    #3 clk = 1'b0;
    #2 clk_del = 1'b0;
    #3 clk = 1'b1;
  end

  logic m_q = 1'b0, m_shadow = 1'b0;

  task automatic check(input logic exp_q, input logic exp_err, input string what);
    checks++;
    if (q !== exp_q || error !== exp_err) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t: q=%b err=%b expected q=%b err=%b",
                                  what, $time, q, error, exp_q, exp_err);
    end
  endtask

  initial begin
    // reset, then leave reset 1 ns before an edge
    #19 rst_n = 1'b1;     // t = 19
    #10 check(1'b0, 1'b0, "after reset");  // t = 29
    for (int i = 0; i < 2000; i++) begin
      logic early, late, r;
      early = ($urandom_range(1) == 1);
      late  = ($urandom_range(3) == 0) ? !early : early;
      r     = ($urandom_range(4) == 0);
      d = early;                       // 1 ns before the edge
      restore = r;
      #1;                              // clk edge
      m_q = r ? m_shadow : early;
      #1 d = late;                     // 1 ns after the edge
      restore = 1'b0;
      m_shadow = late;                 // latch open 2..7 ns after the edge
      if (late != early) n_late++;
      if (r) n_restore++;
      #7 check(m_q, m_q ^ m_shadow, "step");
      #1;
    end
    if (n_late == 0 || n_restore == 0) failures++;
    $display("late=%0d restore=%0d", n_late, n_restore);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
