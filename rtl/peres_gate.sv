// peres_gate: 3x3 reversible Peres gate.
//
// p = a, q = a ^ b, r = (a & b) ^ c. With c tied to 0 it is a half adder
// (q is the sum, r the carry, p a garbage copy of a) or an AND cell (r) that
// passes a on through p. Quantum cost 4. Purely combinational; no clock.
module peres_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = a ^ b;
    r = (a & b) ^ c;
  end
endmodule
