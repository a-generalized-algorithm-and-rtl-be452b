// computation_selection_unit: the row of 2:1 multiplexers in front of the two
// half-size transform units.
//
// With sel = 1 the lanes carry the N-point butterfly outputs: lanes
// 0..N/2-1 get the sums a_i, lanes N/2..N-1 the differences b_i, so the two
// N/2-point units together compute one N-point transform. With sel = 0 the
// raw samples x_i pass straight through and the two units work on two
// independent N/2-sample blocks. The multiplexer row is the architecture's;
// the polarity of sel (1 = larger transform) is this design's choice.
//
// Interface: x[0..N-1] signed IW-bit raw samples, a[] / b[] signed IW+1-bit
// butterfly outputs, y[0..N-1] signed IW+1 bits (raw samples sign-extended).
// Timing: combinational, one multiplexer delay.
module computation_selection_unit #(
  parameter int unsigned N  = 16,
  parameter int unsigned IW = 8
) (
  input  logic                 sel,
  input  logic signed [IW-1:0] x [N],
  input  logic signed [IW:0]   a [N/2],
  input  logic signed [IW:0]   b [N/2],
  output logic signed [IW:0]   y [N]
);

  localparam int unsigned OW = IW + 1;

  always_comb begin
    for (int i = 0; i < N/2; i++) begin
      y[i]       = sel ? a[i] : OW'(x[i]);
      y[N/2 + i] = sel ? b[i] : OW'(x[N/2 + i]);
    end
  end

endmodule
