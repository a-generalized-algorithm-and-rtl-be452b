// tb_dct16_reconfig: checks the reconfigurable 16-point unit in both modes
// against the kernel model: one 16-point transform with sel16 = 1, two
// 8-point transforms with sel16 = 0, on extreme, impulse and random inputs.
module tb_dct16_reconfig;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IW = 9;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                 sel16;
  logic signed [IW-1:0] x [16];
  logic signed [IW+3:0] f [16];
  int xi [32];

  dct16_reconfig #(.IW(IW)) dut (.sel16(sel16), .x(x), .f(f));

  task automatic run();
    for (int j = 0; j < 16; j++) x[j] = IW'(xi[j]);
    for (int s = 0; s < 2; s++) begin
      sel16 = s[0];
      @(posedge clk);
      for (int k = 0; k < 16; k++) begin
        int exp;
        if (s == 1) exp = coef(16, k, xi, 0);
        else        exp = coef(8, k % 8, xi, (k / 8) * 8);
        checks++;
        if (int'(f[k]) != exp) begin
          failures++;
          $display("FAIL sel16=%0d F%0d got %0d expected %0d", s, k, f[k], exp);
        end
      end
    end
  endtask

  initial begin
    for (int j = 0; j < 32; j++) xi[j] = 0;
    for (int j = 0; j < 16; j++) xi[j] = -(1 << (IW - 1));
    run();
    for (int j = 0; j < 16; j++) xi[j] = (1 << (IW - 1)) - 1;
    run();
    for (int k = 0; k < 16; k++) begin
      for (int j = 0; j < 16; j++)
        xi[j] = (kern(16, k, j) < 0) ? -(1 << (IW - 1)) : (1 << (IW - 1)) - 1;
      run();
    end
    for (int j0 = 0; j0 < 16; j0++) begin
      for (int j = 0; j < 16; j++) xi[j] = (j == j0) ? 1 : 0;
      run();
    end
    repeat (1000) begin
      for (int j = 0; j < 16; j++) xi[j] = rnd(IW);
      run();
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
