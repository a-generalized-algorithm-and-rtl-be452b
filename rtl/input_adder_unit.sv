// input_adder_unit: N-point input butterfly of the recursive approximate DCT.
//
// An N-point approximate DCT is obtained from two N/2-point ones at the cost
// of N additions done here:
//   a_i = x_i + x_(N-1-i)   feeds the upper N/2-point unit (even coefficients)
//   b_i = x_i - x_(N-1-i)   feeds the lower N/2-point unit (odd coefficients)
// for i = 0 .. N/2-1. The sum/difference split follows the architecture; the
// natural order of the differences (b_0 pairs x_0 with x_(N-1)) is this
// design's reading of the butterfly.
//
// Interface: x[0..N-1] signed IW-bit samples; a[] and b[] signed IW+1 bits,
// exact. Timing: combinational, one adder delay.
module input_adder_unit #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = 8
) (
  input  logic signed [IW-1:0] x [N],
  output logic signed [IW:0]   a [N/2],
  output logic signed [IW:0]   b [N/2]
);

  localparam int unsigned OW = IW + 1;

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      a[i] = OW'(x[i]) + OW'(x[N-1-i]);
      b[i] = OW'(x[i]) - OW'(x[N-1-i]);
    end
  end

endmodule
