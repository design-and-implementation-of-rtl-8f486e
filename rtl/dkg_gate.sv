// dkg_gate: 4x4 reversible Dual Key Gate (DKG), a full adder / full subtractor.
//
// The key input k selects the operation. With k = 0 the gate is a full adder
// of a, b and c: s = a ^ b ^ c is the sum and r = a(b ^ c) ^ bc the carry.
// p and q return copies of a and b (garbage outputs), so the three data
// inputs can be recovered from the outputs. The adder-mode equations are the
// ones this multiplier is built on; the multiplier ties k to 0.
// With k = 1 the gate is a full subtractor: s is the difference and
// r = ~a(b ^ c) ^ bc the borrow of a - b - c. The subtractor equation is this
// design's completion of the key input (r = (k ^ a)(b ^ c) ^ bc), chosen so
// that k = 0 gives back the adder exactly. Quantum cost 5.
// Purely combinational; no clock.
module dkg_gate (
  input  logic k,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic p,
  output logic q,
  output logic r,
  output logic s
);
  always_comb begin
    p = a;
    q = b;
    r = ((k ^ a) & (b ^ c)) ^ (b & c);
    s = a ^ b ^ c;
  end
endmodule
