// tb_dct32_reconfig: checks the 32-lane reconfigurable datapath in all
// control settings (32-point, two 16-point, four 8-point, and sel32 with
// sel16 low) against the kernel model, and checks from impulse responses
// measured on the hardware that the 32-point transform it computes is
// orthogonal.
module tb_dct32_reconfig;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                 sel32;
  logic                 sel16;
  logic signed [IW-1:0] x [32];
  logic signed [IW+4:0] f [32];
  int xi [32];
  int col [32][32];   // col[j][k]: F_k for an impulse at X_j

  dct32_reconfig #(.IW(IW)) dut (.sel32(sel32), .sel16(sel16), .x(x), .f(f));

  task automatic run();
    for (int j = 0; j < 32; j++) x[j] = IW'(xi[j]);
    for (int s = 0; s < 4; s++) begin
      sel32 = s[1];
      sel16 = s[0];
      @(posedge clk);
      for (int k = 0; k < 32; k++) begin
        int exp;
        if (s >= 2)     exp = coef(32, k, xi, 0);
        else if (s == 1) exp = coef(16, k % 16, xi, (k / 16) * 16);
        else             exp = coef(8, k % 8, xi, (k / 8) * 8);
        checks++;
        if (int'(f[k]) != exp) begin
          failures++;
          $display("FAIL sel32=%0d sel16=%0d F%0d got %0d expected %0d",
                   s / 2, s % 2, k, f[k], exp);
        end
      end
    end
  endtask

  initial begin
    for (int j = 0; j < 32; j++) xi[j] = -128;
    run();
    for (int j = 0; j < 32; j++) xi[j] = 127;
    run();
    for (int k = 0; k < 32; k++) begin
      for (int j = 0; j < 32; j++) xi[j] = (kern(32, k, j) < 0) ? -128 : 127;
      run();
    end
    repeat (500) begin
      for (int j = 0; j < 32; j++) xi[j] = rnd(IW);
      run();
    end

    // orthogonality of the hardware's 32-point transform
    sel32 = 1'b1;
    sel16 = 1'b0;
    for (int j0 = 0; j0 < 32; j0++) begin
      for (int j = 0; j < 32; j++) x[j] = (j == j0) ? IW'(1) : '0;
      @(posedge clk);
      for (int k = 0; k < 32; k++) col[j0][k] = int'(f[k]);
    end
    for (int k = 0; k < 32; k++)
      for (int m = k; m < 32; m++) begin
        int s;
        int norm;
        s = 0;
        norm = 0;
        for (int j = 0; j < 32; j++) begin
          s += col[j][k] * col[j][m];
          norm += kern(32, k, j) * kern(32, k, j);
        end
        checks++;
        if ((k != m && s != 0) || (k == m && (s != norm || s == 0))) begin
          failures++;
          $display("FAIL rows %0d, %0d: inner product %0d", k, m, s);
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
