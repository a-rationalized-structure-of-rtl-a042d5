// tb_mm3_preadd_v: self-checking test of the second-factor pre-adder.
//
// Each of the 22 factors is a signed sum of the nine operands with
// coefficients -1, 0 or +1. The table COEF below lists those coefficients
// (row k = factor of M(k+1), columns = operands x00 x10 x20 y10 y11 y12 y20 y21 y22); the
// test computes every factor from it in 64-bit arithmetic and compares it
// with the block's output for corner operands (all minimum, all maximum,
// mixed extremes) and for random operands. One vector per clock cycle; a
// watchdog ends the run if the loop does not finish.
module tb_mm3_preadd_v;
  localparam int unsigned N  = 15;
  localparam int unsigned PW = N + 3;
  localparam int NVEC = 3000;

  localparam int COEF [22][9] = '{
    '{ 1,  0,  0,  0,  0,  0,  1, -1,  1},
    '{ 0,  1,  0, -1,  1, -1,  0,  0,  0},
    '{ 0,  0,  1, -1,  1, -1,  0,  0,  0},
    '{ 0,  0,  1,  0,  0,  0, -1,  1, -1},
    '{ 1,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  1,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  1,  0,  0,  0,  0,  0,  0},
    '{ 1,  0,  0,  1, -1,  1,  0,  0,  0},
    '{ 0,  1,  0,  0,  0,  0,  1, -1,  1},
    '{ 0,  0,  0,  1,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  1,  0,  0},
    '{ 1,  0,  0,  0,  0,  0,  1,  0,  0},
    '{ 0, -1,  0,  1,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  1, -1,  1,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  1,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  1, -1,  1},
    '{ 0,  0,  0,  0,  0,  0,  0,  1,  0},
    '{ 0,  0,  0,  0,  0,  1,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  1,  0},
    '{ 0,  0, -1,  1,  0,  1,  0,  1,  0},
    '{ 0,  0,  1,  0,  0,  1, -1,  1,  0},
    '{ 0,  0,  0,  0,  0,  1,  0,  1,  0}
  };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [N-1:0]  d [9];
  logic signed [PW-1:0] v [22];

  mm3_preadd_v #(.N(N), .PW(PW)) dut (.d(d), .v(v));

  function automatic logic signed [N-1:0] pick(int mode);
    case (mode)
      0: return {1'b1, {(N-1){1'b0}}};   // most negative
      1: return {1'b0, {(N-1){1'b1}}};   // most positive
      default: return N'($urandom);
    endcase
  endfunction

  task automatic check_vector();
    longint expd;
    #1;
    for (int k = 0; k < 22; k++) begin
      expd = 0;
      for (int j = 0; j < 9; j++) expd += longint'(COEF[k][j]) * longint'(d[j]);
      checks++;
      if (longint'(v[k]) != expd) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH factor M%0d: got %0d expected %0d", k + 1, v[k], expd);
      end
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
    for (int v = 0; v < NVEC; v++) begin
      @(posedge clk);
      for (int j = 0; j < 9; j++) begin
        if (v == 0)      d[j] = pick(0);
        else if (v == 1) d[j] = pick(1);
        else if (v < 40) d[j] = pick(int'($urandom_range(0, 2)));
        else             d[j] = pick(2);
      end
      check_vector();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
