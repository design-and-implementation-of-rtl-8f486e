// tb_rev_mult4: end-to-end self-checking test of the 4x4 reversible multiplier
// at its default size.
// * All 256 operand pairs: z must equal x * y.
// * Reversibility: the 36-bit output word {z, ppg_garbage, moa_garbage} must
//   differ for every operand pair, so (x, y) can be recovered from it.
// * The worked example 0001 x 1010 = 00001010.
// * The figures of merit derived in rev_pkg must be 28 gates, 28 constant
//   inputs, 28 garbage outputs and quantum cost 129, and the garbage ports
//   must together be 28 bits wide.
// It also counts how often the carry chain reaches the top product bit and
// how often a product is zero; a count that stays 0 is a failure.
// A watchdog ends a hung run.
module tb_rev_mult4;
  import rev_pkg::*;

  int checks = 0, failures = 0;
  int top_carry = 0, zero_products = 0;
  logic [3:0]  x, y;
  logic [7:0]  z;
  logic [7:0]  gp;
  logic [19:0] gm;
  bit [35:0] seen [$];

  rev_mult4 dut (.x, .y, .z, .ppg_garbage(gp), .moa_garbage(gm));

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // figures of merit of the design
    check("gate count",      GATE_COUNT == 28);
    check("constant inputs", CONSTANT_INPUTS == 28);
    check("garbage outputs", GARBAGE_OUTPUTS == 28 && $bits(gp) + $bits(gm) == GARBAGE_OUTPUTS);
    check("quantum cost",    QUANTUM_COST == 129);

    // worked example
    x = 4'b0001;
    y = 4'b1010;
    #1;
    check($sformatf("0001 x 1010 gave %b", z), z === 8'b0000_1010);

    for (int v = 0; v < 256; v++) begin
      {x, y} = 8'(v);
      #1;
      check($sformatf("%0d x %0d gave %0d", x, y, z), int'(z) == int'(x) * int'(y));
      if (z[7]) top_carry++;
      if (z == 0) zero_products++;
      foreach (seen[k])
        if (seen[k] == {z, gp, gm}) begin
          check($sformatf("outputs of %0d x %0d repeat an earlier pair", x, y), 1'b0);
          break;
        end
      seen.push_back({z, gp, gm});
    end
    check("all 256 output words collected", seen.size() == 256);

    $display("carry into z[7]: %0d times, zero product: %0d times", top_carry, zero_products);
    check("carry into z[7] seen", top_carry > 0);
    check("zero product seen", zero_products > 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
