// tb_moa: exhaustive self-checking test of the multi-operand adder.
// Every one of the 65536 patterns of the sixteen partial-product bits is
// applied (not only those that come from a real multiply) and z is compared
// with sum over i,j of pp[i*4+j] * 2^(i+j), worked out in the testbench. The
// garbage copies of the first-row operands (G1 = P10, G2 = P20, G3 = P11,
// G4 = P21, G5 = P12, G6 = P31, G7 = P22) are checked as well. A watchdog
// ends a hung run.
module tb_moa;
  int checks = 0, failures = 0;
  logic [15:0] pp;
  logic [7:0]  z;
  logic [19:0] g;
  int unsigned expected;

  moa dut (.pp, .z, .garbage(g));

  initial begin
    #1_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 65536; v++) begin
      pp = 16'(v);
      #1;
      expected = 0;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (pp[i*4+j]) expected += 1 << (i + j);
      checks++;
      if (int'(z) != expected) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h z=%0d expected %0d", pp, z, expected);
      end
      checks++;
      if (g[6:0] !== {pp[2*4+2], pp[3*4+1], pp[1*4+2], pp[2*4+1], pp[1*4+1], pp[2*4+0], pp[1*4+0]}) begin
        failures++;
        if (failures < 10) $display("FAIL pp=%h first-row garbage %b", pp, g[6:0]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
