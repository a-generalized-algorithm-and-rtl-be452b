// tb_approx_dct_top: end-to-end test of the clocked engine at its default
// parameters. Streams random 32-sample blocks with a random mode and random
// gaps in in_valid, and checks every output against the kernel model one
// clock after the block went in (latency 1, one block per clock). Also
// checks reset, that the result holds while in_valid is low, and that each
// mechanism was exercised: the three transform configurations, mode code 3,
// back-to-back blocks, mode switches between consecutive blocks, idle cycles
// and a reset in mid-stream.
module tb_approx_dct_top;
  import dct_pkg::*;
  import tb_dct_ref_pkg::*;

  localparam int unsigned IW = 8;
  localparam int unsigned NBLOCKS = 3000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                 rst_n;
  logic                 in_valid;
  dct_mode_e            mode;
  logic signed [IW-1:0] x [32];
  logic                 out_valid;
  dct_mode_e            out_mode;
  logic signed [IW+4:0] f [32];

  approx_dct_top dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .mode(mode), .x(x),
    .out_valid(out_valid), .out_mode(out_mode), .f(f)
  );

  int xi [32];
  int exp_f [32];
  int n_mode [4];
  int n_b2b = 0;
  int n_switch = 0;
  int n_idle = 0;
  int n_reset = 0;
  int blocks = 0;

  task automatic check(int got, int exp, string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d expected %0d at %0t", what, got, exp, $time);
    end
  endtask

  // Expected result of a block in the given mode code.
  task automatic model(int m);
    for (int k = 0; k < 32; k++) begin
      if (m >= 2)      exp_f[k] = coef(32, k, xi, 0);
      else if (m == 1) exp_f[k] = coef(16, k % 16, xi, (k / 16) * 16);
      else             exp_f[k] = coef(8, k % 8, xi, (k / 8) * 8);
    end
  endtask

  task automatic do_reset(int cycles);
    @(negedge clk);
    rst_n = 1'b0;
    in_valid = 1'b1;   // must be ignored during reset
    repeat (cycles) @(posedge clk);
    #1;
    check(int'(out_valid), 0, "out_valid after reset");
    for (int k = 0; k < 32; k++) check(int'(f[k]), 0, "f after reset");
    n_reset++;
    @(negedge clk);
    rst_n = 1'b1;
    in_valid = 1'b0;
  endtask

  initial begin
    int prev_valid;
    int prev_mode;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    for (int k = 0; k < 32; k++) exp_f[k] = 0;
    mode = MODE_8X4;
    for (int j = 0; j < 32; j++) x[j] = '0;
    do_reset(2);
    prev_valid = 0;
    prev_mode = -1;

    while (blocks < int'(NBLOCKS)) begin
      int v;
      int m;
      if (blocks == int'(NBLOCKS) / 2 && n_reset == 1) begin
        do_reset(1);
        prev_valid = 0;
        prev_mode = -1;
        for (int k = 0; k < 32; k++) exp_f[k] = 0;
      end
      @(negedge clk);
      v = ($urandom_range(3, 0) != 0) ? 1 : 0;
      m = int'($urandom_range(3, 0));
      in_valid = v[0];
      mode = dct_mode_e'(m[1:0]);
      for (int j = 0; j < 32; j++) begin
        xi[j] = rnd(IW);
        x[j] = IW'(xi[j]);
      end
      if (v == 1) begin
        model(m);
        blocks++;
        n_mode[m]++;
        if (prev_valid == 1) n_b2b++;
        if (prev_mode >= 0 && prev_mode != m) n_switch++;
        prev_mode = m;
      end else begin
        n_idle++;
      end
      prev_valid = v;
      // the result appears exactly one clock later
      @(posedge clk);
      #1;
      check(int'(out_valid), v, "out_valid");
      if (v == 1) check(int'(out_mode), m, "out_mode");
      for (int k = 0; k < 32; k++) check(int'(f[k]), exp_f[k], "F");
    end

    if (n_mode[0] == 0) begin failures++; $display("never ran four 8-point DCTs"); end
    if (n_mode[1] == 0) begin failures++; $display("never ran two 16-point DCTs"); end
    if (n_mode[2] == 0) begin failures++; $display("never ran a 32-point DCT"); end
    if (n_mode[3] == 0) begin failures++; $display("never used mode code 3"); end
    if (n_b2b == 0)     begin failures++; $display("never ran back-to-back blocks"); end
    if (n_switch == 0)  begin failures++; $display("never switched mode"); end
    if (n_idle == 0)    begin failures++; $display("never idled"); end
    if (n_reset < 2)    begin failures++; $display("never reset mid-stream"); end
    $display("blocks=%0d 8x4=%0d 16x2=%0d 32=%0d code3=%0d back_to_back=%0d switches=%0d idle=%0d resets=%0d",
             blocks, n_mode[0], n_mode[1], n_mode[2], n_mode[3], n_b2b, n_switch, n_idle, n_reset);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
