// tb_peres_gate: exhaustive self-checking test of peres_gate.
// Applies all 8 input combinations and compares (p, q, r) with
// (a, a ^ b, ab ^ c); with c = 0 also checks the half-adder reading
// {r, q} = a + b. Checks that the gate is reversible (8 distinct outputs).
// A watchdog ends a hung run.
module tb_peres_gate;
  logic a, b, c, p, q, r;
  int checks = 0, failures = 0;
  bit [7:0] seen;

  peres_gate dut (.a, .b, .c, .p, .q, .r);

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({p, q, r} !== {a, a ^ b, (a & b) ^ c}) begin
        failures++;
        $display("FAIL a=%b b=%b c=%b -> p=%b q=%b r=%b", a, b, c, p, q, r);
      end
      if (!c) begin
        checks++;
        if (2'({r, q}) != 2'(a) + 2'(b)) begin
          failures++;
          $display("FAIL half adder a=%b b=%b -> carry=%b sum=%b", a, b, r, q);
        end
      end
      seen[{p, q, r}] = 1'b1;
    end
    checks++;
    if (seen !== 8'hFF) begin
      failures++;
      $display("FAIL gate is not reversible, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
