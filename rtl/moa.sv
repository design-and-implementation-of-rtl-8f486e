// moa: multi-operand addition network of the 4x4 reversible multiplier.
//
// Adds the sixteen partial products pp[i*4+j] = x[i] & y[j] (weight i+j) into
// the 8-bit product z. Full adders are DKG gates in adder mode (key = 0, sum
// on s, carry on r, operand copies on p and q as garbage); half adders are
// Peres gates with c = 0 (sum on q, carry on r, copy of a on p as garbage).
// Three rows of four cells each:
//   row 1 (carry save): HA(P10,P01) -> z1;  FA(P20,P11,P02);
//                       FA(P21,P12,P03);    FA(P31,P22,P13)
//   row 2: HA(w1 carry, w2 sum) -> z2; FA(w3 sum, w2 carry, HA carry);
//          FA(w4 sum, w3 carry, previous carry); FA(P23, w4 carry, previous carry)
//   row 3: HA(P30, w3 sum) -> z3; HA(w4 sum, carry) -> z4;
//          FA(P32, w5 sum, carry) -> z5; FA(P33, w6 carries) -> z6, z7
// z0 is P00 itself. Rows 2 and 3 ripple their carries from the low to the
// high columns. garbage[k-1] is output G<k>: G1 u_ha1; G2,G3 u_fa1;
// G4,G5 u_fa2; G6,G7 u_fa3; G8 u_ha2; G9,G10 u_fa4; G11,G12 u_fa5;
// G13,G14 u_fa6; G15,G16 u_fa7; G17,G18 u_fa8; G19 u_ha3; G20 u_ha4.
// 8 DKG + 4 Peres cells: 12 constant inputs, 20 garbage outputs, quantum
// cost 56. The cells, the partial products they take, the outputs they drive
// and their garbage labels follow the design's addition network; the
// assignment of the unnamed inter-cell wires is this design's reading of it,
// checked exhaustively against integer multiplication. Instance names
// ha1..ha4 and fa1..fa8 and the net s2 (fa1 sum into ha2 input b) follow the
// design's RTL schematic.
// Purely combinational; no clock.
module moa (
  input  logic [15:0] pp,
  output logic [7:0]  z,
  output logic [19:0] garbage
);

  // Pij = x[i] & y[j]
  function automatic logic pij(input logic [15:0] v, input int i, input int j);
    return v[i*4+j];
  endfunction

  logic s2, c2, s3, c3, s4, c4, c1;   // row 1 sums/carries (w = weight)
  logic h2, s5, c5, s6, c6, s7, c7;   // row 2
  logic h3, h4, c8;                   // row 3

  // ---- row 1: carry-save reduction of the partial products
  peres_gate u_ha1 (.a(pij(pp,1,0)), .b(pij(pp,0,1)), .c(1'b0),
                    .p(garbage[0]), .q(z[1]), .r(c1));
  dkg_gate   u_fa1 (.k(1'b0), .a(pij(pp,2,0)), .b(pij(pp,1,1)), .c(pij(pp,0,2)),
                    .p(garbage[1]), .q(garbage[2]), .r(c2), .s(s2));
  dkg_gate   u_fa2 (.k(1'b0), .a(pij(pp,2,1)), .b(pij(pp,1,2)), .c(pij(pp,0,3)),
                    .p(garbage[3]), .q(garbage[4]), .r(c3), .s(s3));
  dkg_gate   u_fa3 (.k(1'b0), .a(pij(pp,3,1)), .b(pij(pp,2,2)), .c(pij(pp,1,3)),
                    .p(garbage[5]), .q(garbage[6]), .r(c4), .s(s4));

  // ---- row 2
  peres_gate u_ha2 (.a(c1), .b(s2), .c(1'b0),
                    .p(garbage[7]), .q(z[2]), .r(h2));
  dkg_gate   u_fa4 (.k(1'b0), .a(s3), .b(c2), .c(h2),
                    .p(garbage[8]), .q(garbage[9]), .r(c5), .s(s5));
  dkg_gate   u_fa5 (.k(1'b0), .a(s4), .b(c3), .c(c5),
                    .p(garbage[10]), .q(garbage[11]), .r(c6), .s(s6));
  dkg_gate   u_fa6 (.k(1'b0), .a(pij(pp,2,3)), .b(c4), .c(c6),
                    .p(garbage[12]), .q(garbage[13]), .r(c7), .s(s7));

  // ---- row 3
  dkg_gate   u_fa7 (.k(1'b0), .a(pij(pp,3,2)), .b(s7), .c(h4),
                    .p(garbage[14]), .q(garbage[15]), .r(c8), .s(z[5]));
  dkg_gate   u_fa8 (.k(1'b0), .a(pij(pp,3,3)), .b(c7), .c(c8),
                    .p(garbage[16]), .q(garbage[17]), .r(z[7]), .s(z[6]));
  peres_gate u_ha3 (.a(pij(pp,3,0)), .b(s5), .c(1'b0),
                    .p(garbage[18]), .q(z[3]), .r(h3));
  peres_gate u_ha4 (.a(s6), .b(h3), .c(1'b0),
                    .p(garbage[19]), .q(z[4]), .r(h4));

  assign z[0] = pij(pp,0,0);

endmodule
