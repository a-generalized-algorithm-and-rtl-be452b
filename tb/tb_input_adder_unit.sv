// tb_input_adder_unit: checks the N-point butterfly (sums to a[], differences
// to b[]) for N = 16 and N = 32 on extreme and random samples.
module tb_input_adder_unit;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic signed [IW-1:0] x16 [16];
  logic signed [IW:0]   a16 [8];
  logic signed [IW:0]   b16 [8];
  logic signed [IW-1:0] x32 [32];
  logic signed [IW:0]   a32 [16];
  logic signed [IW:0]   b32 [16];
  int xi [32];

  input_adder_unit #(.N(16), .IW(IW)) dut16 (.x(x16), .a(a16), .b(b16));
  input_adder_unit #(.N(32), .IW(IW)) dut32 (.x(x32), .a(a32), .b(b32));

  task automatic check(int got, int exp, string what, int i);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s[%0d] got %0d expected %0d", what, i, got, exp);
    end
  endtask

  task automatic run();
    for (int j = 0; j < 16; j++) x16[j] = IW'(xi[j]);
    for (int j = 0; j < 32; j++) x32[j] = IW'(xi[j]);
    @(posedge clk);
    for (int i = 0; i < 8; i++) begin
      check(int'(a16[i]), xi[i] + xi[15 - i], "a16", i);
      check(int'(b16[i]), xi[i] - xi[15 - i], "b16", i);
    end
    for (int i = 0; i < 16; i++) begin
      check(int'(a32[i]), xi[i] + xi[31 - i], "a32", i);
      check(int'(b32[i]), xi[i] - xi[31 - i], "b32", i);
    end
  endtask

  initial begin
    for (int j = 0; j < 32; j++) xi[j] = (j < 16) ? 127 : -128;
    run();
    for (int j = 0; j < 32; j++) xi[j] = (j < 16) ? -128 : 127;
    run();
    for (int j = 0; j < 32; j++) xi[j] = -128;
    run();
    repeat (1000) begin
      for (int j = 0; j < 32; j++) xi[j] = rnd(IW);
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
