// mm3_preadd_u: first-factor pre-adder (block 2 of the unit).
//
// Forms, from row 0 of Y and columns 1 and 2 of X, the first factor of each
// of the 22 products M1..M22 (u[k-1] is the first factor of Mk). Seven
// shared partial sums L1..L7 come first; the factors are then single
// operands, an L, or one more two-input (M7: three-input) addition:
//   L1 = x02 - x12   L2 = x01 + x11   L3 = x01 + x21   L4 = x12 + x22
//   L5 = y01 + x01   L6 = y02 - x12   L7 = x02 + x22
//   u:  M1 y02+L1   M2 y01+L2   M3 y01+L3   M4 y02-L4   M5 y00-L1
//       M6 y00+L2   M7 y00+L3+L4   M8 y01   M9 y02   M10 x01   M11 x12
//       M12 L1   M13 L2   M14 L5   M15 x11   M16 L6   M17 x12
//       M18 x21-L4   M19 L7-L3   M20 L3   M21 L4   M22 L4-L3
// The sums and the adder set (7 for the L's, 6 two-input and one
// three-input for M1..M7, 3 for M18, M19, M22) follow the published design.
//
// Interface: d[0..8] = y00 y01 y02 x01 x11 x21 x02 x12 x22 (outputs 0..8 of
// the input permutation), signed N-bit. u[0..21] signed PW-bit; the default
// PW = N+3 holds the widest factor (M7, a sum of five operands) exactly.
// Purely combinational.
module mm3_preadd_u #(
  parameter int unsigned N  = 15,
  parameter int unsigned PW = N + 3
) (
  input  logic signed [N-1:0]  d [mm3_pkg::NUM_PRE_IN],
  output logic signed [PW-1:0] u [mm3_pkg::NUM_PRODUCTS]
);

  logic signed [PW-1:0] y00, y01, y02, x01, x11, x21, x02, x12, x22;
  logic signed [PW-1:0] l1, l2, l3, l4, l5, l6, l7;

  // Sign-extend the operands to the factor width.
  assign y00 = PW'(d[0]);
  assign y01 = PW'(d[1]);
  assign y02 = PW'(d[2]);
  assign x01 = PW'(d[3]);
  assign x11 = PW'(d[4]);
  assign x21 = PW'(d[5]);
  assign x02 = PW'(d[6]);
  assign x12 = PW'(d[7]);
  assign x22 = PW'(d[8]);

  always_comb begin
    l1 = x02 - x12;
    l2 = x01 + x11;
    l3 = x01 + x21;
    l4 = x12 + x22;
    l5 = y01 + x01;
    l6 = y02 - x12;
    l7 = x02 + x22;

    u[0]  = y02 + l1;
    u[1]  = y01 + l2;
    u[2]  = y01 + l3;
    u[3]  = y02 - l4;
    u[4]  = y00 - l1;
    u[5]  = y00 + l2;
    u[6]  = y00 + l3 + l4;
    u[7]  = y01;
    u[8]  = y02;
    u[9]  = x01;
    u[10] = x12;
    u[11] = l1;
    u[12] = l2;
    u[13] = l5;
    u[14] = x11;
    u[15] = l6;
    u[16] = x12;
    u[17] = x21 - l4;
    u[18] = l7 - l3;
    u[19] = l3;
    u[20] = l4;
    u[21] = l4 - l3;
  end

endmodule
