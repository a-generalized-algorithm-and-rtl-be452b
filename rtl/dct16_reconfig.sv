// dct16_reconfig: reconfigurable 16-point / dual 8-point approximate DCT.
//
// Structure: a 16-point input adder unit (8 sums a_i, 8 differences b_i), a
// 16/8-point computation selection row of multiplexers, two 8-point
// approximate DCT units and an output permutation unit, all steered by the
// one control line sel16.
//   sel16 = 1: the upper 8-point unit transforms a[], the lower one b[]; the
//              permutation interleaves them into F0..F15 of one 16-point
//              approximate DCT (F even from the upper, F odd from the lower).
//   sel16 = 0: X0..X7 and X8..X15 are two separate blocks; F0..F7 and
//              F8..F15 are their 8-point approximate DCTs.
// In 8-point mode the input adder unit is idle; only multiplexers are added
// to two plain 8-point units to make the structure reconfigurable.
// The block structure follows the architecture; mode polarity and widths are
// this design's choices. No normalisation is applied.
//
// Interface: x[0..15] signed IW-bit samples, f[0..15] signed IW+4 bits
// (exact). IW defaults to 9, the width this unit sees inside the 32-point
// datapath; a stand-alone 16-point transform of 8-bit samples uses IW = 8.
// Timing: combinational, one adder + one mux + three adders + one mux deep.
module dct16_reconfig #(
  parameter int unsigned IW = 9
) (
  input  logic                 sel16,
  input  logic signed [IW-1:0] x [16],
  output logic signed [IW+3:0] f [16]
);

  localparam int unsigned SW = IW + 1;               // after the butterfly
  localparam int unsigned OW = SW + dct_pkg::C8_GROWTH;

  logic signed [SW-1:0] a    [8];
  logic signed [SW-1:0] b    [8];
  logic signed [SW-1:0] sel_y[16];
  logic signed [SW-1:0] lo_in[8];
  logic signed [SW-1:0] hi_in[8];
  logic signed [OW-1:0] lo_y [8];
  logic signed [OW-1:0] hi_y [8];
  logic signed [OW-1:0] u    [16];

  input_adder_unit #(.N(16), .IW(IW)) u_adder (
    .x (x),
    .a (a),
    .b (b)
  );

  computation_selection_unit #(.N(16), .IW(IW)) u_select (
    .sel (sel16),
    .x   (x),
    .a   (a),
    .b   (b),
    .y   (sel_y)
  );

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      lo_in[i] = sel_y[i];
      hi_in[i] = sel_y[8 + i];
    end
  end

  dct8_approx #(.IW(SW)) u_c8_upper (
    .x (lo_in),
    .y (lo_y)
  );

  dct8_approx #(.IW(SW)) u_c8_lower (
    .x (hi_in),
    .y (hi_y)
  );

  always_comb begin
    for (int i = 0; i < 8; i++) begin
      u[i]     = lo_y[i];
      u[8 + i] = hi_y[i];
    end
  end

  output_permutation_unit #(.N(16), .W(OW)) u_perm (
    .sel (sel16),
    .u   (u),
    .f   (f)
  );

endmodule
