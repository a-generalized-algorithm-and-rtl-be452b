// dct32_reconfig: reconfigurable approximate DCT of length 32, 16 or 8.
//
// One 32-lane combinational datapath computes, by the setting of two control
// lines, one 32-point approximate DCT, two 16-point ones or four 8-point ones:
//   sel32 = 1           X0..X31 -> F0..F31, one 32-point transform
//   sel32 = 0, sel16 = 1  X0..X15 and X16..X31 are two 16-point blocks
//   sel32 = 0, sel16 = 0  X0..X7, X8..X15, X16..X23, X24..X31 are four
//                         8-point blocks
// A 32-point transform is a 32-point input butterfly (sums to the upper
// half, differences to the lower), two 16-point transforms and an even/odd
// interleave; each 16-point transform recurses once more down to the 8-point
// units. The datapath therefore holds a 32-point adder unit, a 32/16-point
// selection row, two reconfigurable 16-point units (each with its own
// 16-point adder unit, 16/8-point selection, two 8-point units and
// permutation) and a 32-point permutation: 32 + 2*16 + 4*22 = 152 adders.
// Grouping the per-16 permutations inside the 16-point units gives the same
// output order as a single permutation block. sel32 forces the 16-point
// stages on, because the 32-point transform needs them. Mode polarity and
// widths are this design's choices; no normalisation is applied.
//
// Interface: x[0..31] signed IW-bit samples (8 bits by default), f[0..31]
// signed IW+5 bits, exact. In 16- and 8-point modes the results are
// sign-extended to that width.
// Timing: combinational.
module dct32_reconfig #(
  parameter int unsigned IW = 8
) (
  input  logic                 sel32,
  input  logic                 sel16,
  input  logic signed [IW-1:0] x [32],
  output logic signed [IW+4:0] f [32]
);

  localparam int unsigned SW = IW + 1;     // after the 32-point butterfly
  localparam int unsigned OW = SW + 4;     // out of a 16-point unit

  logic signed [SW-1:0] a     [16];
  logic signed [SW-1:0] b     [16];
  logic signed [SW-1:0] sel_y [32];
  logic signed [SW-1:0] up_in [16];
  logic signed [SW-1:0] lo_in [16];
  logic signed [OW-1:0] up_y  [16];
  logic signed [OW-1:0] lo_y  [16];
  logic signed [OW-1:0] u     [32];
  logic                 sel16_eff;

  assign sel16_eff = sel16 | sel32;

  input_adder_unit #(.N(32), .IW(IW)) u_adder (
    .x (x),
    .a (a),
    .b (b)
  );

  computation_selection_unit #(.N(32), .IW(IW)) u_select (
    .sel (sel32),
    .x   (x),
    .a   (a),
    .b   (b),
    .y   (sel_y)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      up_in[i] = sel_y[i];
      lo_in[i] = sel_y[16 + i];
    end
  end

  dct16_reconfig #(.IW(SW)) u_c16_upper (
    .sel16 (sel16_eff),
    .x     (up_in),
    .f     (up_y)
  );

  dct16_reconfig #(.IW(SW)) u_c16_lower (
    .sel16 (sel16_eff),
    .x     (lo_in),
    .f     (lo_y)
  );

  always_comb begin
    for (int i = 0; i < 16; i++) begin
      u[i]      = up_y[i];
      u[16 + i] = lo_y[i];
    end
  end

  output_permutation_unit #(.N(32), .W(OW)) u_perm (
    .sel (sel32),
    .u   (u),
    .f   (f)
  );

endmodule
