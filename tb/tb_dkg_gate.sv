// tb_dkg_gate: exhaustive self-checking test of dkg_gate.
// Key k = 0: {r, s} must equal a + b + c (full adder) and p, q must copy a, b.
// Key k = 1: s must be the difference and r the borrow of a - b - c, i.e.
// a - b - c = s - 2*r. For each key value the 8 outputs must be distinct
// in (p, q, s) (reversible with the key held constant). A watchdog ends a hung run.
module tb_dkg_gate;
  logic k, a, b, c, p, q, r, s;
  int checks = 0, failures = 0;
  bit [15:0] seen;

  dkg_gate dut (.k, .a, .b, .c, .p, .q, .r, .s);

  initial begin
    #10_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    seen = '0;
    for (int v = 0; v < 16; v++) begin
      {k, a, b, c} = 4'(v);
      #1;
      checks++;
      if (p !== a || q !== b) begin
        failures++;
        $display("FAIL pass-through k=%b a=%b b=%b -> p=%b q=%b", k, a, b, p, q);
      end
      checks++;
      if (!k) begin
        if (int'({r, s}) != int'(a) + int'(b) + int'(c)) begin
          failures++;
          $display("FAIL add %b+%b+%b -> carry=%b sum=%b", a, b, c, r, s);
        end
      end else begin
        if (int'(a) - int'(b) - int'(c) != int'(s) - 2 * int'(r)) begin
          failures++;
          $display("FAIL sub %b-%b-%b -> borrow=%b diff=%b", a, b, c, r, s);
        end
      end
      seen[{k, p, q, s}] = 1'b1;
    end
    // with the key fixed, (p, q, s) already determine (a, b, c)
    checks++;
    if (seen !== 16'hFFFF) begin
      failures++;
      $display("FAIL gate is not reversible for a fixed key, outputs seen %b", seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
