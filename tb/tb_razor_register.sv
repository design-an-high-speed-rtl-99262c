// Self-checking testbench for razor_register at its default width (32 bits).
// Same clocking as the single-bit test: clk edges at multiples of 10 ns and the
// shadow latches open 2 ns to 7 ns after each edge. Each step drives an "early"
// word 1 ns before the edge and a "late" word 1 ns after it, in which a random
// subset of bits (often none) differ: those bits model paths that settled after
// the edge. The testbench keeps its own copy of main and shadow words and
// checks q and the ORed error 8 ns after each edge, including restores, where
// every bit must take its shadow value.
module tb_razor_register;
  localparam int unsigned W = 32;
  logic clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic [W-1:0] d = '0;
  logic restore = 1'b0;
  logic [W-1:0] q;
  logic error;
  int unsigned checks = 0, failures = 0;
  int unsigned n_err = 0, n_restore = 0;

  razor_register #(.W(W)) dut (.clk(clk), .clk_del(clk_del), .rst_n(rst_n), .d(d),
                               .restore(restore), .q(q), .error(error));

  initial forever begin
    #2 clk_del = 1'b1;
    #3 clk = 1'b0;
    #2 clk_del = 1'b0;
    #3 clk = 1'b1;
  end

  logic [W-1:0] m_q = '0, m_shadow = '0;

  initial begin
    #19 rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      logic [W-1:0] early, late, flip;
      logic r;
      early = $urandom;
      flip  = ($urandom_range(2) == 0) ? (W'(1) << $urandom_range(W - 1)) : '0;
      if ($urandom_range(9) == 0) flip = $urandom;
      late  = early ^ flip;
      r     = ($urandom_range(4) == 0);
      d = early;
      restore = r;
      #1;
      m_q = r ? m_shadow : early;
      #1 d = late;
      restore = 1'b0;
      m_shadow = late;
      if (r) n_restore++;
      #7;
      checks++;
      if (q !== m_q || error !== (m_q != m_shadow)) begin
        failures++;
        if (failures < 10) $display("FAIL at %0t: q=%h err=%b expected q=%h err=%b",
                                    $time, q, error, m_q, m_q != m_shadow);
      end
      if (error) n_err++;
      #1;
    end
    if (n_err == 0 || n_restore == 0) failures++;
    $display("errors=%0d restores=%0d", n_err, n_restore);
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
