// tb_output_permutation_unit: checks the even/odd interleave with sel = 1
// (F(2k) from upper lane k, F(2k+1) from lower lane k) and the
// straight-through order with sel = 0.
module tb_output_permutation_unit;
  import tb_dct_ref_pkg::*;

  localparam int unsigned N = 16;
  localparam int unsigned W = 12;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                sel;
  logic signed [W-1:0] u [N];
  logic signed [W-1:0] f [N];
  int ui [N];

  output_permutation_unit #(.N(N), .W(W)) dut (.sel(sel), .u(u), .f(f));

  initial begin
    repeat (1000) begin
      for (int j = 0; j < int'(N); j++) begin
        ui[j] = rnd(W);
        u[j]  = W'(ui[j]);
      end
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        @(posedge clk);
        for (int k = 0; k < int'(N); k++) begin
          int exp;
          if (s == 0)          exp = ui[k];
          else if (k % 2 == 0) exp = ui[k / 2];
          else                 exp = ui[N/2 + k / 2];
          checks++;
          if (int'(f[k]) != exp) begin
            failures++;
            $display("FAIL sel=%0d F%0d got %0d expected %0d", s, k, f[k], exp);
          end
        end
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
