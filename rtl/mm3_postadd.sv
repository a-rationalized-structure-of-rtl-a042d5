// mm3_postadd: post-adder (block 5 of the unit).
//
// Combines the 22 products M1..M22 (m[k-1] = Mk) into the nine elements of
// Z = X*Y. Seven two-input adders form the shared sums
//   Q1 = M10 + M11   Q2 = M10 - M14   Q3 = M17 - M18   Q4 = M19 - M22
//   Q5 = M11 + M16   Q6 = M15 + M17   Q7 = M20 + M22
// and nine multi-input adders form the results:
//   z00 = M5 + Q1 + M12            z01 = M8 + Q2 + Q3 + Q4
//   z02 = M1 - Q5 - M12 + Q3 + Q4  z10 = M6 - M10 + M11 + M13
//   z11 = M2 - Q2 + M13 + Q6       z12 = M9 - Q5 + Q6
//   z20 = M7 - Q1 + Q7 - M21       z21 = M3 - Q2 - Q3 + Q7
//   z22 = M4 + Q5 - Q3 + M21
// All of this follows the published design except z10. There the
// published unit uses a three-input adder, M6 - Q1 + M13; with these
// products that sum is short by 2*x12*y20, so this design adds M11 instead
// of subtracting it and z10 becomes a four-input adder.
//
// Arithmetic is two's complement modulo 2**ZW. Every true result fits in
// ZW = 2N+1 bits (three products of N-bit operands), so wrapping the
// intermediate sums, and dropping the products' upper bits, cannot change
// it. Interface: m[0..21] signed MW-bit; z[3*i+j] = z_ij, signed ZW-bit.
// Purely combinational.
module mm3_postadd #(
  parameter int unsigned N  = 15,
  parameter int unsigned MW = 2 * (N + 3),
  parameter int unsigned ZW = 2 * N + 1
) (
  input  logic signed [MW-1:0] m [mm3_pkg::NUM_PRODUCTS],
  output logic signed [ZW-1:0] z [mm3_pkg::NUM_RESULTS]
);

  // M1..M22 reduced to the result width (index 0 unused).
  logic signed [ZW-1:0] mt [1:22];
  logic signed [ZW-1:0] q1, q2, q3, q4, q5, q6, q7;

  for (genvar k = 1; k <= 22; k++) begin : g_trunc
    assign mt[k] = m[k-1][ZW-1:0];
  end

  always_comb begin
    q1 = mt[10] + mt[11];
    q2 = mt[10] - mt[14];
    q3 = mt[17] - mt[18];
    q4 = mt[19] - mt[22];
    q5 = mt[11] + mt[16];
    q6 = mt[15] + mt[17];
    q7 = mt[20] + mt[22];

    z[0] = mt[5] + q1 + mt[12];
    z[1] = mt[8] + q2 + q3 + q4;
    z[2] = mt[1] - q5 - mt[12] + q3 + q4;
    z[3] = mt[6] - mt[10] + mt[11] + mt[13];
    z[4] = mt[2] - q2 + mt[13] + q6;
    z[5] = mt[9] - q5 + q6;
    z[6] = mt[7] - q1 + q7 - mt[21];
    z[7] = mt[3] - q2 - q3 + q7;
    z[8] = mt[4] + q5 - q3 + mt[21];
  end

endmodule
