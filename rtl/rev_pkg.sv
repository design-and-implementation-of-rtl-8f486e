// rev_pkg: constants shared by the reversible multiplier.
//
// Holds the quantum cost of every primitive reversible gate and the cell
// counts of the 4x4 multiplier, from which the figures of merit of a
// reversible circuit (gate count, constant inputs, garbage outputs and
// quantum cost) are derived. The per-gate costs and the resulting totals
// (28 gates, 28 constant inputs, 28 garbage outputs, quantum cost 129) are
// those of the design this RTL implements; the split of the totals into the
// two stages is worked out from the cell lists of the two stages.
package rev_pkg;

  // Quantum cost of each primitive gate (number of 1x1/2x2 quantum primitives).
  localparam int unsigned QC_PERES   = 4;
  localparam int unsigned QC_TOFFOLI = 5;
  localparam int unsigned QC_DKG     = 5;

  // Operand width of the multiplier.
  localparam int unsigned MULT_N = 4;

  // Product-generation grid of an n x n multiplier: Toffoli cells inside,
  // Peres cells along the last column and the last row.
  function automatic int unsigned ppg_toffoli_cells(int unsigned n);
    return (n - 1) * (n - 1);
  endfunction

  function automatic int unsigned ppg_peres_cells(int unsigned n);
    return 2 * n - 1;
  endfunction

  // Every product cell has one constant-0 input; 2n of their outputs are garbage.
  function automatic int unsigned ppg_garbage_bits(int unsigned n);
    return 2 * n;
  endfunction

  // Addition network of the 4x4 multiplier: 8 DKG full adders, 4 Peres half adders.
  localparam int unsigned MOA_DKG_CELLS   = 8;
  localparam int unsigned MOA_PERES_CELLS = 4;
  localparam int unsigned MOA_GARBAGE     = 2 * MOA_DKG_CELLS + MOA_PERES_CELLS;

  localparam int unsigned GATE_COUNT = ppg_toffoli_cells(MULT_N) + ppg_peres_cells(MULT_N)
                                     + MOA_DKG_CELLS + MOA_PERES_CELLS;
  localparam int unsigned CONSTANT_INPUTS = GATE_COUNT;  // one constant 0 per cell
  localparam int unsigned GARBAGE_OUTPUTS = ppg_garbage_bits(MULT_N) + MOA_GARBAGE;
  localparam int unsigned QUANTUM_COST =
      QC_TOFFOLI * ppg_toffoli_cells(MULT_N) + QC_PERES * ppg_peres_cells(MULT_N)
    + QC_DKG * MOA_DKG_CELLS + QC_PERES * MOA_PERES_CELLS;

endpackage
