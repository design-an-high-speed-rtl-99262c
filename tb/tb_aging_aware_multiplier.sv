// End-to-end testbench of aging_aware_multiplier at its default parameters
// (16-bit operands, n = 8, column bypassing, 1024-operation aging window,
// 16 errors per window).
//
// Clocking: clk edges at multiples of 10 ns; clk_del is clk delayed by 2 ns, so
// the Razor shadow latches are open 2 ns to 7 ns after each edge. The RTL has no
// gate delays, so this testbench models the multiplier's timing on the product
// net: from 1 ns to 8 ns after every edge it holds the product that was present
// at the edge (the minimum path delay every Razor design needs), and for a
// pattern whose path it declares too slow it presents a wrong value at the
// edge and the correct one 1 ns after it (a late arrival).
//
// Ageing model: for the first 400 operations the circuit is fresh and every
// pattern meets timing. After that, patterns whose multiplicand has exactly
// n+1 = 9 zeros become too slow for one cycle. The first judging block still
// calls them one-cycle patterns, so they produce Razor errors until the aging
// indicator has counted more than 16 in a window and switches to the second
// judging block, which gives them two cycles.
//
// Checks, all against values computed here: every product (in order), the
// number of cycles each operation took (1 or 2 by the testbench's own
// prediction of the judging rule, the ageing model and the Razor repairs), the
// moment the aging output rises, and that no errors follow it. It counts how
// often each mechanism happened (one-cycle and two-cycle patterns, Razor
// repair, the switch to the second judging block, patterns it reclassified,
// stalls of the input handshake, idle cycles) and fails any that never did.
module tb_aging_aware_multiplier;
  import amul_pkg::*;

  localparam int unsigned M = DEFAULT_M, N = DEFAULT_N;
  localparam int unsigned WINDOW = 1024, ERR_THRESH = 16;
  localparam bypass_e     MODE = BYPASS_COLUMN;
  localparam int unsigned NOPS = 3000, AGE_AT = 400;

  logic           clk = 1'b0, clk_del = 1'b0, rst_n = 1'b0;
  logic           in_valid = 1'b0;
  logic [M-1:0]   in_a = '0, in_b = '0;
  logic           in_ready, out_valid, razor_error, hold, aged;
  logic [2*M-1:0] out_p;

  aging_aware_multiplier dut (
    .clk(clk), .clk_del(clk_del), .rst_n(rst_n),
    .in_valid(in_valid), .in_a(in_a), .in_b(in_b), .in_ready(in_ready),
    .out_valid(out_valid), .out_p(out_p),
    .razor_error(razor_error), .hold(hold), .aged(aged));

  initial forever begin
    #2 clk_del = 1'b1;
    #3 clk = 1'b0;
    #2 clk_del = 1'b0;
    #3 clk = 1'b1;
  end

  typedef struct {
    logic [M-1:0] a, b;
    int unsigned  cycle;    // edge index at which it was accepted
    int unsigned  lat;      // expected edges until its result is captured for good
  } op_t;

  op_t         q[$];
  int unsigned checks = 0, failures = 0;
  int unsigned n_one = 0, n_two = 0, n_err = 0, n_stall = 0, n_idle = 0;
  int unsigned n_reclass = 0, n_err_after_aged = 0, n_out = 0;
  int unsigned edge_i = 0, accepted = 0, aged_edge = 0;
  logic        m_aged = 1'b0, switched = 1'b0;
  int unsigned m_ops = 0, m_errs = 0;
  logic        circuit_aged = 1'b0;
  logic [2*M-1:0] held_p;

  function automatic int zeros_of(input logic [M-1:0] v);
    int z = 0;
    for (int k = 0; k < M; k++) if (!v[k]) z++;
    return z;
  endfunction

  // random operand with a chosen number of zero bits
  function automatic logic [M-1:0] with_zeros(input int z);
    logic [M-1:0] v = '1;
    for (int k = 0; k < z; k++) v[k] = 1'b0;
    for (int k = M - 1; k > 0; k--) begin
      int j;
      logic t;
      j = $urandom_range(k);
      t = v[k];
      v[k] = v[j];
      v[j] = t;
    end
    return v;
  endfunction

  function automatic logic [M-1:0] judged(input logic [M-1:0] a, input logic [M-1:0] b);
    return (MODE == BYPASS_COLUMN) ? a : b;
  endfunction

  task automatic new_input();
    int z;
    logic [M-1:0] x;
    if ($urandom_range(9) == 0) begin
      in_valid = 1'b0;
      return;
    end
    z = $urandom_range(12, 5);
    if ($urandom_range(49) == 0) z = $urandom_range(1) ? 0 : M;
    x = with_zeros(z);
    in_valid = 1'b1;
    if (MODE == BYPASS_COLUMN) begin
      in_a = x;
      in_b = M'($urandom);
    end else begin
      in_a = M'($urandom);
      in_b = x;
    end
  endtask

  op_t just_loaded;
  logic have_just_loaded = 1'b0;

  initial begin
    #19 rst_n = 1'b1;               // t = 19, 1 ns before the edge at 20
    new_input();
    while (accepted < NOPS || q.size() != 0) begin
      logic inject, acc, restore_next, one;
      int   z;
      // ------------------------------------------- T-1: sample outputs
      if (out_valid) begin
        op_t o;
        n_out++;
        checks += 2;
        if (q.size() == 0) begin
          failures++;
          $display("FAIL unexpected result %h", out_p);
        end else begin
          o = q.pop_front();
          if (out_p !== (2*M)'(o.a) * (2*M)'(o.b)) begin
            failures++;
            if (failures < 10) $display("FAIL %h*%h = %h, got %h", o.a, o.b,
                                        (2*M)'(o.a) * (2*M)'(o.b), out_p);
          end
          if (edge_i - o.cycle != o.lat + 1) begin
            failures++;
            if (failures < 10) $display("FAIL latency of %h*%h: %0d cycles, expected %0d",
                                        o.a, o.b, edge_i - o.cycle - 1, o.lat);
          end
        end
      end
      if (hold) n_two++;
      if (razor_error) begin
        n_err++;
        if (m_aged) n_err_after_aged++;
      end
      checks++;
      if (aged !== m_aged) begin
        failures++;
        if (failures < 10) $display("FAIL aged=%b expected %b at edge %0d", aged, m_aged, edge_i);
      end
      // aging-indicator model: counts at this edge
      if (m_errs + razor_error > ERR_THRESH && !m_aged) begin
        m_aged = 1'b1;
        aged_edge = edge_i;
      end
      // a pattern loaded at the last edge, judged one-cycle, that is too slow
      inject = have_just_loaded && !razor_error && just_loaded.lat == 1 &&
               circuit_aged && zeros_of(judged(just_loaded.a, just_loaded.b)) == N + 1;
      if (inject) begin
        just_loaded.lat = 2;
        foreach (q[i]) if (q[i].cycle == just_loaded.cycle) q[i].lat = 2;
      end
      acc = in_valid && in_ready;
      if (in_valid && !in_ready) n_stall++;
      if (!in_valid) n_idle++;
      have_just_loaded = 1'b0;
      if (acc) begin
        op_t o;
        z = zeros_of(judged(in_a, in_b));
        one = (z > ((aged ? N + 1 : N)));
        if (one) n_one++;
        if (aged && z == N + 1) n_reclass++;
        restore_next = inject;     // the edge after this one repairs the last result
        o = '{a: in_a, b: in_b, cycle: edge_i, lat: (one && !restore_next) ? 1 : 2};
        q.push_back(o);
        just_loaded = o;
        have_just_loaded = 1'b1;
        accepted++;
        if (accepted == AGE_AT) circuit_aged = 1'b1;
      end
      if (acc && m_ops == WINDOW - 1) begin
        m_ops = 0;
        m_errs = 0;
      end else begin
        m_ops += acc;
        m_errs += razor_error;
      end
      held_p = dut.product;
      if (inject) force dut.product = ~held_p;   // still settling at the edge
      // ------------------------------------------- T: clock edge
      #1 edge_i++;
      // ------------------------------------------- T+1
      #1 force dut.product = held_p;          // minimum path delay
      if (acc || !in_valid) begin
        if (accepted < NOPS) new_input();
        else in_valid = 1'b0;
      end
      #7 release dut.product;                 // T+8, shadow latches closed
      #1;                                     // T+9
      if (edge_i > 20 * NOPS) begin
        failures++;
        $display("FAIL watchdog: stuck at edge %0d", edge_i);
        break;
      end
    end
    // every mechanism must have happened
    checks += 7;
    if (n_one == 0)     begin failures++; $display("FAIL no one-cycle pattern"); end
    if (n_two == 0)     begin failures++; $display("FAIL no two-cycle pattern"); end
    if (n_err == 0)     begin failures++; $display("FAIL no Razor repair"); end
    if (!m_aged)        begin failures++; $display("FAIL aging indicator never switched"); end
    if (n_reclass == 0) begin failures++; $display("FAIL second judging block never used"); end
    if (n_stall == 0)   begin failures++; $display("FAIL input never stalled"); end
    if (n_err_after_aged != 0) begin
      failures++;
      $display("FAIL %0d Razor errors after the switch", n_err_after_aged);
    end
    $display("ops=%0d results=%0d one-cycle=%0d two-cycle=%0d razor=%0d aged@edge=%0d reclassified=%0d stalls=%0d idle=%0d",
             accepted, n_out, n_one, n_two, n_err, aged_edge, n_reclass, n_stall, n_idle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(10 * 30 * NOPS);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
