// mm3_pkg: sizes and routing tables shared by the 3x3 matrix-product unit.
//
// The unit takes 18 operands (x00..x22 then y00..y22, each matrix row by
// row) and produces the 9 elements of Z = X*Y with 22 multipliers. Two
// blocks of the unit are pure wiring; their connection patterns live here
// so the top level and the testbenches read the same table:
//   * block 1 (input permutation): output k carries operand BLOCK1_SRC[k].
//     Outputs 0..8 feed the first pre-adder, outputs 9..17 the second.
//   * block 4 (operand permutation): multiplier input k carries pre-adder
//     output block4_src(k). Even inputs come from the first pre-adder
//     (outputs 0..21), odd inputs from the second (outputs 22..43), so
//     multiplier j multiplies factor j of each pre-adder.
// Both patterns follow the unit's published wiring diagrams. The operand
// numbering (x before y, row-major) is this design's reading of them.
package mm3_pkg;

  localparam int unsigned NUM_OPERANDS = 18;  // 9 elements of X, 9 of Y
  localparam int unsigned NUM_PRE_IN   = 9;   // operands per pre-adder
  localparam int unsigned NUM_PRODUCTS = 22;  // multipliers M1..M22
  localparam int unsigned NUM_RESULTS  = 9;   // z00..z22

  // Block 1: destination position k <- source operand BLOCK1_SRC[k].
  localparam int unsigned BLOCK1_SRC [NUM_OPERANDS] = '{
    9, 10, 11, 1, 4, 7, 2, 5, 8,       // y00 y01 y02 x01 x11 x21 x02 x12 x22
    0, 3, 6, 12, 13, 14, 15, 16, 17    // x00 x10 x20 y10 y11 y12 y20 y21 y22
  };

  // Block 4: multiplier input k <- pre-adder output block4_src(k), where
  // pre-adder outputs 0..21 are the first factors and 22..43 the second.
  function automatic int unsigned block4_src(int unsigned k);
    return (k % 2 == 0) ? k / 2 : NUM_PRODUCTS + k / 2;
  endfunction

endpackage
