// Self-checking testbench for column_bypass_multiplier at its default width.
// Drives corner patterns (zero, all-ones, single bits, alternating bits) and
// random operands with a controlled number of zero bits in the multiplicand, so
// that every amount of column bypassing is exercised, and compares each product
// with the simulator's own multiplication. Combinational block: the checks are
// paced by a free-running clock, with a cycle watchdog.
module tb_column_bypass_multiplier;
  localparam int unsigned M = 16;
  localparam int unsigned NRAND = 4000;

  logic [M-1:0]   a, b;
  logic [2*M-1:0] p;
  logic           clk = 1'b0;
  int unsigned    checks = 0, failures = 0, cycles = 0;

  column_bypass_multiplier #(.M(M)) dut (.a(a), .b(b), .p(p));

  always #5 clk = !clk;

  task automatic check(input logic [M-1:0] x, input logic [M-1:0] y);
    logic [2*M-1:0] exp;
    a = x;
    b = y;
    exp = {{M{1'b0}}, x} * {{M{1'b0}}, y};
    @(posedge clk);
    checks++;
    if (p !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL a=%h b=%h p=%h expected %h", x, y, p, exp);
    end
  endtask

  // random value in which each bit is 1 with probability ones/16
  function automatic logic [M-1:0] biased(input int unsigned ones);
    logic [M-1:0] v;
    for (int k = 0; k < M; k++) v[k] = ($urandom_range(15) < ones);
    return v;
  endfunction

  initial begin
    check('0, '0);
    check('1, '1);
    check('1, '0);
    check('0, '1);
    for (int i = 0; i < M; i++) begin
      check(M'(1) << i, '1);
      check('1, M'(1) << i);
      check(~(M'(1) << i), '1);
    end
    check({(M/2){2'b10}}, '1);
    check({(M/2){2'b01}}, {(M/2){2'b10}});
    for (int unsigned i = 0; i < NRAND; i++) begin
      check(biased(i % 17), M'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cycles++;
    if (cycles > NRAND + 1000) begin
      failures++;
      $display("watchdog expired");
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end
endmodule
