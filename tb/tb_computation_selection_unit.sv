// tb_computation_selection_unit: checks that sel = 1 routes the butterfly
// sums to the upper lanes and the differences to the lower lanes, and that
// sel = 0 passes the raw samples through, sign-extended.
module tb_computation_selection_unit;
  import tb_dct_ref_pkg::*;

  localparam int unsigned N  = 16;
  localparam int unsigned IW = 8;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  logic                 sel;
  logic signed [IW-1:0] x [N];
  logic signed [IW:0]   a [N/2];
  logic signed [IW:0]   b [N/2];
  logic signed [IW:0]   y [N];
  int xi [N];
  int ai [N/2];
  int bi [N/2];

  computation_selection_unit #(.N(N), .IW(IW)) dut (
    .sel(sel), .x(x), .a(a), .b(b), .y(y)
  );

  initial begin
    repeat (1000) begin
      for (int j = 0; j < int'(N); j++) begin
        xi[j] = rnd(IW);
        x[j]  = IW'(xi[j]);
      end
      for (int j = 0; j < int'(N/2); j++) begin
        ai[j] = rnd(IW + 1);
        bi[j] = rnd(IW + 1);
        a[j]  = (IW + 1)'(ai[j]);
        b[j]  = (IW + 1)'(bi[j]);
      end
      for (int s = 0; s < 2; s++) begin
        sel = s[0];
        @(posedge clk);
        for (int j = 0; j < int'(N); j++) begin
          int exp;
          if (s == 0) exp = xi[j];
          else        exp = (j < int'(N/2)) ? ai[j] : bi[j - N/2];
          checks++;
          if (int'(y[j]) != exp) begin
            failures++;
            $display("FAIL sel=%0d lane %0d got %0d expected %0d", s, j, y[j], exp);
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
