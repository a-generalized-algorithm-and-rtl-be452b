// dct8_approx: multiplier-free orthogonal 8-point approximate DCT.
//
// Computes y = T8 * x with the integer kernel
//   F0: [ 1  1  1  1  1  1  1  1]     F4: [ 1 -1 -1  1  1 -1 -1  1]
//   F1: [ 1  1  1  0  0 -1 -1 -1]     F5: [ 1 -1  0  1 -1  0  1 -1]
//   F2: [ 1  0  0 -1 -1  0  0  1]     F6: [ 0 -1  1  0  0  1 -1  0]
//   F3: [ 1  0 -1 -1  1  1  0 -1]     F7: [ 0 -1  1 -1  1 -1  1  0]
// whose rows are mutually orthogonal. It takes 22 additions in three adder
// columns of 8, 8 and 6 adders:
//   column 1  a_i = x_i + x_(7-i), b_i = x_i - x_(7-i)            (i = 0..3)
//   column 2  even: a0+a3, a1+a2, a0-a3 (= F2), a2-a1 (= F6)
//             odd:  b0+b2, b0-b2, b0+b3, b2-b1
//   column 3  F0, F4 from the even sums; F1, F3, F5, F7 add one b each.
// The three-column structure with F2 and F6 leaving after column 2 follows
// the architecture's signal flow graph; the exact pairing of the odd adders
// is this design's choice with the same adder count. No normalisation is
// applied: the outputs are the raw integer sums, which the quantiser that
// follows a DCT usually absorbs.
//
// Interface: x[0..7] are signed IW-bit samples, y[0..7] the coefficients F0..F7
// in natural order, signed IW+3 bits (exact, no truncation).
// Timing: purely combinational, three adder delays deep.
module dct8_approx #(
  parameter int unsigned IW = 10
) (
  input  logic signed [IW-1:0] x [8],
  output logic signed [IW+2:0] y [8]
);

  localparam int unsigned W1 = IW + 1;
  localparam int unsigned W2 = IW + 2;
  localparam int unsigned OW = IW + 3;

  logic signed [W1-1:0] a [4];   // butterfly sums
  logic signed [W1-1:0] b [4];   // butterfly differences
  logic signed [W2-1:0] c [4];   // even part, column 2
  logic signed [W2-1:0] e [4];   // odd part, column 2

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      a[i] = W1'(x[i]) + W1'(x[7-i]);
      b[i] = W1'(x[i]) - W1'(x[7-i]);
    end

    c[0] = W2'(a[0]) + W2'(a[3]);
    c[1] = W2'(a[1]) + W2'(a[2]);
    c[2] = W2'(a[0]) - W2'(a[3]);
    c[3] = W2'(a[2]) - W2'(a[1]);

    e[0] = W2'(b[0]) + W2'(b[2]);
    e[1] = W2'(b[0]) - W2'(b[2]);
    e[2] = W2'(b[0]) + W2'(b[3]);
    e[3] = W2'(b[2]) - W2'(b[1]);

    y[0] = OW'(c[0]) + OW'(c[1]);
    y[4] = OW'(c[0]) - OW'(c[1]);
    y[2] = OW'(c[2]);
    y[6] = OW'(c[3]);
    y[1] = OW'(e[0]) + OW'(b[1]);
    y[3] = OW'(e[1]) - OW'(b[3]);
    y[5] = OW'(e[2]) - OW'(b[1]);
    y[7] = OW'(e[3]) - OW'(b[3]);
  end

endmodule
