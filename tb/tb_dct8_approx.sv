// tb_dct8_approx: checks the 8-point approximate DCT unit against the kernel
// matrix, on extreme and random inputs, and checks that the kernel is
// orthogonal with the expected row norms.
module tb_dct8_approx;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IW = 10;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [IW-1:0] x [8];
  logic signed [IW+2:0] y [8];
  int xi [32];

  dct8_approx #(.IW(IW)) dut (.x(x), .y(y));

  task automatic apply_and_check();
    for (int j = 0; j < 8; j++) x[j] = IW'(xi[j]);
    @(posedge clk);
    for (int k = 0; k < 8; k++) begin
      checks++;
      if (int'(y[k]) != coef(8, k, xi, 0)) begin
        failures++;
        $display("FAIL F%0d got %0d expected %0d", k, y[k], coef(8, k, xi, 0));
      end
    end
  endtask

  initial begin
    for (int j = 0; j < 32; j++) xi[j] = 0;
    // extremes: every sample at the most negative / most positive value
    for (int j = 0; j < 8; j++) xi[j] = -(1 << (IW - 1));
    apply_and_check();
    for (int j = 0; j < 8; j++) xi[j] = (1 << (IW - 1)) - 1;
    apply_and_check();
    // sign patterns matching each row, which reach the largest magnitudes
    for (int k = 0; k < 8; k++) begin
      for (int j = 0; j < 8; j++)
        xi[j] = (T8[k][j] < 0) ? -(1 << (IW - 1)) : (1 << (IW - 1)) - 1;
      apply_and_check();
    end
    // unit impulses: each column of the kernel
    for (int j0 = 0; j0 < 8; j0++) begin
      for (int j = 0; j < 8; j++) xi[j] = (j == j0) ? 1 : 0;
      apply_and_check();
    end
    repeat (2000) begin
      for (int j = 0; j < 8; j++) xi[j] = rnd(IW);
      apply_and_check();
    end
    // kernel orthogonality: row k . row m = 0 for k != m
    for (int k = 0; k < 8; k++)
      for (int m = k + 1; m < 8; m++) begin
        int s;
        s = 0;
        for (int j = 0; j < 8; j++) s += T8[k][j] * T8[m][j];
        checks++;
        if (s != 0) begin
          failures++;
          $display("FAIL rows %0d and %0d not orthogonal", k, m);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
