// rev_mult4: 4x4 unsigned array multiplier built only from reversible gates.
//
// z = x * y. The multiply runs in two stages, each a network of reversible
// gates in which every gate has as many outputs as inputs and no signal fans
// out:
//   1. ppg: a 4x4 grid of Toffoli and Peres AND cells forms the sixteen
//      partial products x[i] & y[j].
//   2. moa: DKG full adders and Peres half adders add the partial products,
//      first as a carry-save row, then in two rows that ripple the carries
//      into the 8-bit product.
// Outputs that take no part in the result are brought out as garbage ports
// so that the whole circuit stays reversible: (x, y) can be recovered from
// (z, ppg_garbage, moa_garbage). Totals (see rev_pkg): 28 gates, 28 constant
// inputs, 28 garbage outputs, quantum cost 129.
// Purely combinational: the product is valid one propagation delay after the
// operands change; there is no clock or reset.
module rev_mult4
  import rev_pkg::MULT_N, rev_pkg::MOA_GARBAGE;
(
  input  logic [MULT_N-1:0]   x,
  input  logic [MULT_N-1:0]   y,
  output logic [2*MULT_N-1:0] z,
  output logic [2*MULT_N-1:0] ppg_garbage,
  output logic [MOA_GARBAGE-1:0] moa_garbage
);

  logic [MULT_N*MULT_N-1:0] pp;

  ppg #(.N(MULT_N)) u_ppg (
    .x      (x),
    .y      (y),
    .pp     (pp),
    .garbage(ppg_garbage)
  );

  moa u_moa (
    .pp     (pp),
    .z      (z),
    .garbage(moa_garbage)
  );

endmodule
