// tb_mm3_postadd: self-checking test of the post-adder.
//
// Each result z_ij is a signed sum of the 22 products with coefficients
// -1, 0 or +1; the table COEF (row 3*i+j, column k = product M(k+1)) was
// derived by solving for the combination of the products that equals
// sum_k x_ik*y_kj. The test feeds random products of full width, computes
// the expected results from COEF modulo 2**ZW and compares. Directed
// vectors put a single +1 or -1 on each product in turn, so every
// coefficient is checked on its own. One vector per clock cycle; a
// watchdog ends the run if the loop does not finish.
module tb_mm3_postadd;
  localparam int unsigned N  = 15;
  localparam int unsigned MW = 2 * (N + 3);
  localparam int unsigned ZW = 2 * N + 1;
  localparam int NVEC = 3000;

  localparam int COEF [9][22] = '{
    '{ 0,  0,  0,  0,  1,  0,  0,  0,  0,  1,  1,  1,  0,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  1,  0,  1,  0,  0,  0, -1,  0,  0,  1, -1,  1,  0,  0, -1},
    '{ 1,  0,  0,  0,  0,  0,  0,  0,  0,  0, -1, -1,  0,  0,  0, -1,  1, -1,  1,  0,  0, -1},
    '{ 0,  0,  0,  0,  0,  1,  0,  0,  0, -1,  1,  0,  1,  0,  0,  0,  0,  0,  0,  0,  0,  0},
    '{ 0,  1,  0,  0,  0,  0,  0,  0,  0, -1,  0,  0,  1,  1,  1,  0,  1,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  0,  0,  1,  0, -1,  0,  0,  0,  1, -1,  1,  0,  0,  0,  0,  0},
    '{ 0,  0,  0,  0,  0,  0,  1,  0,  0, -1, -1,  0,  0,  0,  0,  0,  0,  0,  0,  1, -1,  1},
    '{ 0,  0,  1,  0,  0,  0,  0,  0,  0, -1,  0,  0,  0,  1,  0,  0, -1,  1,  0,  1,  0,  1},
    '{ 0,  0,  0,  1,  0,  0,  0,  0,  0,  0,  1,  0,  0,  0,  0,  1, -1,  1,  0,  0,  1,  0}
  };

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [MW-1:0] m [22];
  logic signed [ZW-1:0] z [9];

  mm3_postadd #(.N(N), .MW(MW), .ZW(ZW)) dut (.m(m), .z(z));

  task automatic check_vector();
    longint expd;
    logic signed [ZW-1:0] expw;
    #1;
    for (int r = 0; r < 9; r++) begin
      expd = 0;
      for (int k = 0; k < 22; k++) expd += longint'(COEF[r][k]) * longint'(m[k]);
      expw = ZW'(expd);
      checks++;
      if (z[r] != expw) begin
        failures++;
        if (failures <= 10)
          $display("MISMATCH z%0d%0d: got %0d expected %0d", r / 3, r % 3, z[r], expw);
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
      for (int k = 0; k < 22; k++) begin
        if (v < 44)  m[k] = (k == v / 2) ? ((v % 2 == 0) ? MW'(1) : -MW'(1)) : '0;
        else         m[k] = MW'({$urandom, $urandom});
      end
      check_vector();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
