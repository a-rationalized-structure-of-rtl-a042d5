// tb_mm3_mult_array: self-checking test of the 22-multiplier array.
//
// Multiplier j must return p[2j] * p[2j+1] as an exact signed product. The
// test drives the interleaved operand bus with corner values (both most
// negative, both most positive, opposite extremes) and random values,
// computes each product in 64-bit arithmetic and compares. The operands
// of each multiplier differ from those of its neighbours, so a crossed
// pair shows up. One vector per clock cycle; a watchdog ends the run if
// the loop does not finish.
module tb_mm3_mult_array;
  localparam int unsigned PW = 18;
  localparam int NVEC = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [PW-1:0]   p [44];
  logic signed [2*PW-1:0] m [22];

  mm3_mult_array #(.PW(PW)) dut (.p(p), .m(m));

  localparam logic signed [PW-1:0] MINV = {1'b1, {(PW-1){1'b0}}};
  localparam logic signed [PW-1:0] MAXV = {1'b0, {(PW-1){1'b1}}};

  initial begin : watchdog
    repeat (NVEC + 100) @(posedge clk);
    failures++;
    $display("WATCHDOG: test did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin : stimulus
    longint expd;
    for (int v = 0; v < NVEC; v++) begin
      @(posedge clk);
      for (int k = 0; k < 44; k++) begin
        case (v)
          0:       p[k] = MINV;
          1:       p[k] = MAXV;
          2:       p[k] = (k % 2 == 0) ? MINV : MAXV;
          default: p[k] = PW'($urandom);
        endcase
      end
      #1;
      for (int j = 0; j < 22; j++) begin
        expd = longint'(p[2*j]) * longint'(p[2*j+1]);
        checks++;
        if (longint'(m[j]) != expd) begin
          failures++;
          if (failures <= 10)
            $display("MISMATCH M%0d: got %0d expected %0d", j + 1, m[j], expd);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
