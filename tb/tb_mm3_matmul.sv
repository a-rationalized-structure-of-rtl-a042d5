// tb_mm3_matmul: end-to-end test of the 3x3 matrix-product unit at its
// default size (N = 15-bit operands, 31-bit results).
//
// Drives X and Y, computes Z = X*Y directly (27 products, 64-bit) and
// compares all nine outputs. Stimulus, one vector per clock cycle:
//   * unit matrices: X = E_ab, Y = E_cd for every a,b,c,d (6561 pairs),
//     which exercise each operand route and each result on its own;
//   * X or Y = identity with the other random;
//   * every operand at the most negative value, the largest result;
//   * random matrices, part of them drawn from the extreme values.
// It also counts how often the unit's number-range mechanisms occurred:
// a product wider than the result word (so the post-adder's modular
// wrap-around is needed), a first-factor sum beyond N+2 bits (so the
// N+3-bit factor width is needed) and a result at the extreme value. A
// mechanism that never occurred counts as a failure. The unit has no
// clock; the design computes in one combinational pass, so each result is
// checked one time step after its operands are applied. A watchdog ends
// the run if the loop does not finish.
module tb_mm3_matmul;
  localparam int unsigned N  = 15;
  localparam int unsigned PW = N + 3;
  localparam int unsigned ZW = 2 * N + 1;
  localparam int NRAND = 20000;
  localparam int NVEC  = 6561 + 2 * 200 + 1 + NRAND;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int n_wrap = 0;      // a product exceeded the result word
  int n_wide = 0;      // a factor needed the (N+3)-th bit
  int n_extreme = 0;   // a result reached 3 * 2**(2N-2)

  logic signed [N-1:0]  d_in [18];
  logic signed [ZW-1:0] z [9];

  mm3_matmul dut (.d_in(d_in), .z(z));

  localparam logic signed [N-1:0] MINV = {1'b1, {(N-1){1'b0}}};
  localparam logic signed [N-1:0] MAXV = {1'b0, {(N-1){1'b1}}};

  function automatic logic signed [N-1:0] rnd_operand(bit extremes);
    if (extremes) begin
      case ($urandom_range(0, 4))
        0: return MINV;
        1: return MAXV;
        2: return '0;
        3: return -N'(1);
        default: return N'($urandom);
      endcase
    end
    return N'($urandom);
  endfunction

  // x_ik is d_in[3*i+k], y_kj is d_in[9+3*k+j].
  task automatic check_vector();
    longint expd;
    longint pmin, pmax, umax;
    #1;
    for (int i = 0; i < 3; i++) begin
      for (int j = 0; j < 3; j++) begin
        expd = 0;
        for (int k = 0; k < 3; k++)
          expd += longint'(d_in[3*i+k]) * longint'(d_in[9+3*k+j]);
        checks++;
        if (longint'(z[3*i+j]) != expd) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH z%0d%0d: got %0d expected %0d", i, j, z[3*i+j], expd);
        end
        if (expd == 3 * (longint'(1) << (2*N-2))) n_extreme++;
      end
    end
    pmin = -(longint'(1) << (ZW-1));
    pmax =  (longint'(1) << (ZW-1)) - 1;
    umax =  (longint'(1) << (N+1));
    for (int k = 0; k < 22; k++) begin
      if (longint'(dut.prod[k]) < pmin || longint'(dut.prod[k]) > pmax) n_wrap++;
      if (longint'(dut.fac[k]) >= umax || longint'(dut.fac[k]) < -umax) n_wide++;
    end
  endtask

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    // Unit matrices: one nonzero element in each of X and Y.
    for (int a = 0; a < 81; a++) begin
      @(posedge clk);
      for (int k = 0; k < 18; k++) d_in[k] = '0;
      d_in[a / 9]     = N'(3);
      d_in[9 + a % 9] = N'(5);
      check_vector();
    end
    for (int a = 0; a < 6561 - 81; a++) begin
      @(posedge clk);
      for (int k = 0; k < 18; k++) d_in[k] = '0;
      d_in[(a / 81) % 9] = N'(a % 7 + 2);
      d_in[9 + a % 9]    = -N'((a / 9) % 9 + 1);
      check_vector();
    end
    // Identity on one side.
    for (int v = 0; v < 400; v++) begin
      @(posedge clk);
      for (int k = 0; k < 18; k++) d_in[k] = rnd_operand(v % 4 == 0);
      for (int r = 0; r < 3; r++)
        for (int c = 0; c < 3; c++)
          d_in[(v < 200 ? 0 : 9) + 3*r + c] = (r == c) ? N'(1) : '0;
      check_vector();
    end
    // Largest result.
    @(posedge clk);
    for (int k = 0; k < 18; k++) d_in[k] = MINV;
    check_vector();
    // Random matrices.
    for (int v = 0; v < NRAND; v++) begin
      @(posedge clk);
      for (int k = 0; k < 18; k++) d_in[k] = rnd_operand(v % 2 == 0);
      check_vector();
    end

    $display("mechanisms: product wrap-around=%0d wide factor=%0d extreme result=%0d",
             n_wrap, n_wide, n_extreme);
    if (n_wrap == 0)    begin failures++; $display("NEVER: product wrap-around"); end
    if (n_wide == 0)    begin failures++; $display("NEVER: wide factor"); end
    if (n_extreme == 0) begin failures++; $display("NEVER: extreme result"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
