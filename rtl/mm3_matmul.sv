// mm3_matmul: fully parallel 3x3 matrix-product unit with 22 multipliers.
//
// Computes Z = X*Y (z_ij = sum_k x_ik*y_kj) for signed N-bit elements in
// one combinational pass through five stages:
//   1. input permutation: splits the operands into {row 0 of Y, columns 1-2
//      of X} and {column 0 of X, rows 1-2 of Y};
//   2./3. two pre-adders, one per group, each forming 22 factors;
//   4. operand permutation: pairs factor j of both pre-adders;
//   mult. 22 multipliers working at once;
//   5. post-adder: combines the 22 products into the 9 results.
// The split lets every product pair an element of one group with one of
// the other, so the unit relies on x_i0*y_0j = y_0j*x_i0; it is meant for
// commutative number systems such as the integers used here.
//
// Interface: d_in[0..8] = x00..x22 and d_in[9..17] = y00..y22, row by row,
// signed N-bit. z[3*i+j] = z_ij, exact, signed 2N+1 bits. The published
// design gives no word length; N = 15 is this design's choice, made so that
// every factor (N+3 = 18 bits) fits one 18x18 embedded FPGA multiplier.
// No clock: the result is valid one combinational delay after the
// operands; registering them is left to the user.
module mm3_matmul #(
  parameter int unsigned N = 15,
  localparam int unsigned PW = N + 3,
  localparam int unsigned ZW = 2 * N + 1
) (
  input  logic signed [N-1:0]  d_in [mm3_pkg::NUM_OPERANDS],
  output logic signed [ZW-1:0] z    [mm3_pkg::NUM_RESULTS]
);
  import mm3_pkg::*;

  logic signed [N-1:0]    grp_u [NUM_PRE_IN];       // block 1 outputs 0..8
  logic signed [N-1:0]    grp_v [NUM_PRE_IN];       // block 1 outputs 9..17
  logic signed [PW-1:0]   fac   [2 * NUM_PRODUCTS]; // u factors, then v
  logic signed [PW-1:0]   mul_in[2 * NUM_PRODUCTS]; // block 4 outputs
  logic signed [2*PW-1:0] prod  [NUM_PRODUCTS];

  // Block 1: input permutation.
  for (genvar k = 0; k < int'(NUM_PRE_IN); k++) begin : g_blk1
    assign grp_u[k] = d_in[BLOCK1_SRC[k]];
    assign grp_v[k] = d_in[BLOCK1_SRC[k + NUM_PRE_IN]];
  end

  // Blocks 2 and 3: pre-additions.
  mm3_preadd_u #(.N(N), .PW(PW)) u_blk2 (
    .d(grp_u),
    .u(fac[0:NUM_PRODUCTS-1])
  );
  mm3_preadd_v #(.N(N), .PW(PW)) u_blk3 (
    .d(grp_v),
    .v(fac[NUM_PRODUCTS:2*NUM_PRODUCTS-1])
  );

  // Block 4: operand permutation.
  for (genvar k = 0; k < int'(2 * NUM_PRODUCTS); k++) begin : g_blk4
    assign mul_in[k] = fac[block4_src(k)];
  end

  mm3_mult_array #(.PW(PW)) u_mul (
    .p(mul_in),
    .m(prod)
  );

  // Block 5: post-additions.
  mm3_postadd #(.N(N), .MW(2 * PW), .ZW(ZW)) u_blk5 (
    .m(prod),
    .z(z)
  );

endmodule
