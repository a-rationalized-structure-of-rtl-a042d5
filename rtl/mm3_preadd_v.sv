// mm3_preadd_v: second-factor pre-adder (block 3 of the unit).
//
// Forms, from column 0 of X and rows 1 and 2 of Y, the second factor of
// each of the 22 products M1..M22 (v[k-1] is the second factor of Mk).
// Seven shared partial sums N1..N7 come first (N1 and N2 are three-input):
//   N1 = y20 - y21 + y22   N2 = y10 - y11 + y12   N3 = x00 + y20
//   N4 = y10 - x10   N5 = y10 - x20   N6 = y12 + y21   N7 = x20 - y20
//   v:  M1 x00+N1   M2 x10-N2   M3 x20-N2   M4 x20-N1   M5 x00   M6 x10
//       M7 x20   M8 x00+N2   M9 x10+N1   M10 y10   M11 y20   M12 N3
//       M13 N4   M14 N2   M15 y12   M16 N1   M17 y21   M18 y12   M19 y21
//       M20 N5+N6   M21 N7+N6   M22 N6
// The sums and the adder set (two three-input and five two-input adders
// for N1..N7, eight two-input adders for the factors) follow the published
// design.
//
// Interface: d[0..8] = x00 x10 x20 y10 y11 y12 y20 y21 y22 (outputs 9..17
// of the input permutation), signed N-bit. v[0..21] signed PW-bit; four
// operands at most enter a factor, so N+2 bits would do, but both
// pre-adders share the width PW = N+3 so the multipliers are uniform.
// Purely combinational.
module mm3_preadd_v #(
  parameter int unsigned N  = 15,
  parameter int unsigned PW = N + 3
) (
  input  logic signed [N-1:0]  d [mm3_pkg::NUM_PRE_IN],
  output logic signed [PW-1:0] v [mm3_pkg::NUM_PRODUCTS]
);

  logic signed [PW-1:0] x00, x10, x20, y10, y11, y12, y20, y21, y22;
  logic signed [PW-1:0] n1, n2, n3, n4, n5, n6, n7;

  assign x00 = PW'(d[0]);
  assign x10 = PW'(d[1]);
  assign x20 = PW'(d[2]);
  assign y10 = PW'(d[3]);
  assign y11 = PW'(d[4]);
  assign y12 = PW'(d[5]);
  assign y20 = PW'(d[6]);
  assign y21 = PW'(d[7]);
  assign y22 = PW'(d[8]);

  always_comb begin
    n1 = y20 - y21 + y22;
    n2 = y10 - y11 + y12;
    n3 = x00 + y20;
    n4 = y10 - x10;
    n5 = y10 - x20;
    n6 = y12 + y21;
    n7 = x20 - y20;

    v[0]  = x00 + n1;
    v[1]  = x10 - n2;
    v[2]  = x20 - n2;
    v[3]  = x20 - n1;
    v[4]  = x00;
    v[5]  = x10;
    v[6]  = x20;
    v[7]  = x00 + n2;
    v[8]  = x10 + n1;
    v[9]  = y10;
    v[10] = y20;
    v[11] = n3;
    v[12] = n4;
    v[13] = n2;
    v[14] = y12;
    v[15] = n1;
    v[16] = y21;
    v[17] = y12;
    v[18] = y21;
    v[19] = n5 + n6;
    v[20] = n7 + n6;
    v[21] = n6;
  end

endmodule
