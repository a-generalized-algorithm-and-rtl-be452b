// approx_dct_top: clocked reconfigurable approximate DCT engine.
//
// Wraps the 32-lane reconfigurable datapath (dct32_reconfig) with a mode
// decoder and one output register stage. Every clock with in_valid high it
// accepts 32 samples and a mode, and one clock later presents
//   MODE_32   : F0..F31 of one 32-point approximate DCT of X0..X31,
//   MODE_16X2 : two 16-point approximate DCTs (X0..15 -> F0..15,
//               X16..31 -> F16..31),
//   MODE_8X4  : four 8-point approximate DCTs, one per group of 8 lanes,
// with out_valid high and out_mode telling which. The mode may change on any
// cycle; nothing stalls. Throughput: one 32-sample block per clock in every
// mode. Latency: one clock.
// The datapath and its three configurations follow the architecture; the
// single output register, valid/mode handshake, mode encoding and the
// synchronous active-low reset are this design's choices.
//
// Interface: x[0..31] signed IW-bit samples (8 bits by default), f[0..31]
// signed IW+5 bits, exact integer sums without normalisation. Reset clears
// out_valid, out_mode and f.
module approx_dct_top
  import dct_pkg::*;
#(
  parameter int unsigned IW = 8
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  dct_mode_e            mode,
  input  logic signed [IW-1:0] x [LANES],
  output logic                 out_valid,
  output dct_mode_e            out_mode,
  output logic signed [IW+4:0] f [LANES]
);

  localparam int unsigned OW = IW + 5;

  logic                 sel32;
  logic                 sel16;
  logic signed [OW-1:0] f_comb [LANES];

  // Mode decoder: 2'd3 is treated as a 32-point request.
  always_comb begin
    sel32 = mode[1];
    sel16 = (mode == MODE_16X2);
  end

  dct32_reconfig #(.IW(IW)) u_datapath (
    .sel32 (sel32),
    .sel16 (sel16),
    .x     (x),
    .f     (f_comb)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_mode  <= MODE_8X4;
      for (int i = 0; i < int'(LANES); i++) f[i] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_mode <= mode;
        f        <= f_comb;
      end
    end
  end

endmodule
