// Self-checking testbench for judging_block. Two instances at the default
// width of 16 bits: one with the default threshold n = 8 and one with n + 1 = 9,
// as the adaptive hold logic uses them. Every one of the 65536 operand values
// is applied and each output is compared with "number of zero bits > threshold"
// computed by the testbench.
module tb_judging_block;
  localparam int unsigned W = 16;
  logic [W-1:0] operand;
  logic one1, one2;
  int unsigned checks = 0, failures = 0;

  judging_block dut1 (.operand(operand), .one_cycle(one1));
  judging_block #(.W(W), .THRESH(9)) dut2 (.operand(operand), .one_cycle(one2));

  initial begin
    for (int v = 0; v < (1 << W); v++) begin
      int zeros;
      operand = W'(v);
      #1;
      zeros = 0;
      for (int k = 0; k < W; k++) if (((v >> k) & 1) == 0) zeros++;
      checks += 2;
      if (one1 !== (zeros > 8)) begin
        failures++;
        if (failures < 10) $display("FAIL n=8 operand=%h one=%b zeros=%0d", operand, one1, zeros);
      end
      if (one2 !== (zeros > 9)) begin
        failures++;
        if (failures < 10) $display("FAIL n=9 operand=%h one=%b zeros=%0d", operand, one2, zeros);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
