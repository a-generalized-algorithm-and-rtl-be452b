// output_permutation_unit: puts the results of the two half-size transform
// units into coefficient order.
//
// Lanes u[0..N/2-1] come from the upper unit (fed with butterfly sums) and
// u[N/2..N-1] from the lower unit (fed with differences). With sel = 1 (one
// N-point transform) the upper unit holds the even coefficients and the lower
// the odd ones, so F(2k) = u[k] and F(2k+1) = u[N/2+k]. With sel = 0 (two
// independent N/2-point transforms) every lane passes straight through. The
// even/odd interleave is the architecture's; the straight-through wiring of
// the split mode is this design's reading.
//
// Interface: u[], f[] signed W-bit. Timing: combinational, one multiplexer.
module output_permutation_unit #(
  parameter int unsigned N = 16,
  parameter int unsigned W = 12
) (
  input  logic                sel,
  input  logic signed [W-1:0] u [N],
  output logic signed [W-1:0] f [N]
);

  always_comb begin
    for (int k = 0; k < N/2; k++) begin
      f[2*k]     = sel ? u[k]       : u[2*k];
      f[2*k + 1] = sel ? u[N/2 + k] : u[2*k + 1];
    end
  end

endmodule
