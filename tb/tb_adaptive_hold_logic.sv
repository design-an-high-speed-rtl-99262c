// Self-checking testbench for adaptive_hold_logic at the default operand width
// and threshold (16 bits, n = 8) with a short aging window (32 operations,
// threshold 4 errors). Each cycle the testbench offers a random operand whose
// zero count is spread around n, loads it whenever en allows (and sometimes
// idles), and reports Razor errors at a rate that rises over the run. A cycle
// model in the testbench predicts the mux output (zeros > n while fresh,
// zeros > n+1 once aged), the D flip-flop (en drops for exactly one cycle after
// a two-cycle pattern is loaded) and the aging output; all three are compared
// every cycle. It also counts one-cycle and two-cycle decisions under both
// judging blocks and fails if any of the four never happened.
module tb_adaptive_hold_logic;
  localparam int unsigned W = 16, N = 8, WINDOW = 32, ERR_THRESH = 4;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [W-1:0] operand = '0;
  logic load = 1'b0, error = 1'b0;
  logic en, one_cycle, aged;
  int unsigned checks = 0, failures = 0, cycles = 0;
  int unsigned cnt[2][2] = '{default: 0};   // [aged][one_cycle] decisions on loads
  logic m_en = 1'b1, m_aged = 1'b0;
  int unsigned m_ops = 0, m_errs = 0;

  adaptive_hold_logic #(.W(W), .N(N), .WINDOW(WINDOW), .ERR_THRESH(ERR_THRESH)) dut (
    .clk(clk), .rst_n(rst_n), .operand(operand), .load(load), .error(error),
    .en(en), .one_cycle(one_cycle), .aged(aged));

  always #5 clk = !clk;

  function automatic int zeros_of(input logic [W-1:0] v);
    int z = 0;
    for (int k = 0; k < W; k++) if (!v[k]) z++;
    return z;
  endfunction

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4000; i++) begin
      logic m_one;
      int z;
      // operand with 6..11 zeros
      z = $urandom_range(11, 6);
      operand = '1;
      for (int k = 0; k < z; k++) operand[k] = 1'b0;
      for (int k = 0; k < W; k++) begin
        int j;
        logic t;
        j = $urandom_range(W - 1);
        t = operand[k];
        operand[k] = operand[j];
        operand[j] = t;
      end
      load  = m_en && ($urandom_range(7) != 0);
      error = ($urandom_range(19999) < i);
      #1;
      m_one = m_aged ? (zeros_of(operand) > N + 1) : (zeros_of(operand) > N);
      checks++;
      if (one_cycle !== m_one || en !== m_en || aged !== m_aged) begin
        failures++;
        if (failures < 10)
          $display("FAIL cycle %0d: one=%b en=%b aged=%b expected %b %b %b",
                   i, one_cycle, en, aged, m_one, m_en, m_aged);
      end
      if (load) cnt[m_aged][m_one]++;
      @(posedge clk);
      // model update at the edge
      if (m_errs + error > ERR_THRESH) m_aged = 1'b1;
      if (load && m_ops == WINDOW - 1) begin
        m_ops = 0;
        m_errs = 0;
      end else begin
        m_ops += load;
        m_errs += error;
      end
      m_en = m_one || !m_en || !load;
      @(negedge clk);
    end
    for (int a = 0; a < 2; a++)
      for (int o = 0; o < 2; o++) begin
        checks++;
        if (cnt[a][o] == 0) begin
          failures++;
          $display("FAIL: no load with aged=%0d one_cycle=%0d", a, o);
        end
      end
    $display("fresh: one=%0d two=%0d  aged: one=%0d two=%0d",
             cnt[0][1], cnt[0][0], cnt[1][1], cnt[1][0]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > 6000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
