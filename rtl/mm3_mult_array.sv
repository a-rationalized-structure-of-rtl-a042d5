// mm3_mult_array: the 22 parallel multipliers of the unit.
//
// Multiplier j (product M(j+1)) multiplies p[2j] by p[2j+1]: the operand
// bus arrives already interleaved by the operand permutation, even entries
// being first factors and odd entries second factors. Each product is the
// full signed 2*PW-bit result of two signed PW-bit factors, so no multiplier
// loses information. The published design fixes the number of multipliers (22, all
// working at once); their internal structure is left to the synthesis tool.
// Purely combinational.
module mm3_mult_array #(
  parameter int unsigned PW = 18
) (
  input  logic signed [PW-1:0]   p [2 * mm3_pkg::NUM_PRODUCTS],
  output logic signed [2*PW-1:0] m [mm3_pkg::NUM_PRODUCTS]
);

  for (genvar j = 0; j < int'(mm3_pkg::NUM_PRODUCTS); j++) begin : g_mul
    assign m[j] = (2*PW)'(p[2*j]) * (2*PW)'(p[2*j+1]);
  end

endmodule
