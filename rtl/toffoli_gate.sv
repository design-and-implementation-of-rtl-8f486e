// toffoli_gate: 3x3 reversible Toffoli (controlled-controlled-NOT) gate.
//
// The two control inputs pass through unchanged (p = a, q = b) and the target
// is inverted when both controls are 1 (r = c ^ (a & b)). With c tied to 0 the
// gate is a reversible AND cell that also hands both operands on, which is
// how the product-generation grid uses it. Quantum cost 5.
// Purely combinational; no clock.
module toffoli_gate (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r
);
  always_comb begin
    p = a;
    q = b;
    r = c ^ (a & b);
  end
endmodule
