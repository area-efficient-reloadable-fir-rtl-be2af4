// neda_fir: reloadable, fully parallel FIR filter built on New Distributed
// Arithmetic (NEDA).
//
// y[n] = sum_k c_k * x[n-k] is computed without multipliers or look-up
// tables. Writing each coefficient in two's complement,
//   c_k = -c_k[W-1] + sum_{b<W-1} c_k[b] 2^(b-W+1),
// the sum becomes a weighted sum over coefficient bit planes: for plane b,
// the samples whose coefficient bit is 1 are added (neda_mux_adder), and
// the COEF_W partial sums are shifted by their bit weight and added, the sign
// plane negatively (neda_shift_add). The coefficients only steer muxes, so a
// new coefficient set is used as soon as it is loaded: nothing has to be
// recomputed, unlike a distributed-arithmetic filter whose look-up tables
// hold sums of coefficients.
//
// Structure (follows the design): input sample register (tap_delay_line),
// coefficient register (coef_reg), one gated adder per coefficient bit plane
// (the bit-plane slicing is wiring here), shift-and-add combiner. All bit
// planes work in parallel: one output per clock, one sample per clock.
// Own choices: synchronous active-high reset; a load strobe for the
// coefficients; no pipeline register between the sample register and y;
// y carries full precision (sample plus coefficient fraction bits, 14 by
// default) instead of being rounded.
//
// Interface:
//   x_in            sample, DATA_W bits, two's complement, 7 fraction bits
//   coef_load       loads all of coef_in into the coefficient register
//   coef_in[TAPS]   new coefficients, c_0 multiplies the newest sample
//   y_out           filter output, Y_W bits, 14 fraction bits by default
// Timing: a sample presented at a clock edge is in the tap register after
// it, and y_out (combinational from the registers) shows the output for it
// in the same cycle. A coefficient set loaded at an edge applies to y_out
// from that edge on.
module neda_fir #(
  parameter int unsigned TAPS   = neda_pkg::DEF_TAPS,
  parameter int unsigned DATA_W = neda_pkg::DEF_DATA_W,
  parameter int unsigned COEF_W = neda_pkg::DEF_COEF_W,
  parameter int unsigned PSUM_W = neda_pkg::psum_width(DATA_W, TAPS),
  parameter int unsigned Y_W    = PSUM_W + COEF_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  input  logic                     coef_load,
  input  logic signed [COEF_W-1:0] coef_in [TAPS],
  output logic signed [Y_W-1:0]    y_out
);

  logic signed [DATA_W-1:0] taps [TAPS];
  logic signed [COEF_W-1:0] coef [TAPS];
  logic        [TAPS-1:0]   plane [COEF_W];   // plane[b][k] = coef[k][b]
  logic signed [PSUM_W-1:0] psum  [COEF_W];

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) u_taps (
    .clk  (clk),
    .rst  (rst),
    .x_in (x_in),
    .taps (taps)
  );

  coef_reg #(.TAPS(TAPS), .COEF_W(COEF_W)) u_coef (
    .clk     (clk),
    .rst     (rst),
    .load    (coef_load),
    .coef_in (coef_in),
    .coef    (coef)
  );

  // Bit-plane slicing: pure wiring.
  always_comb begin
    for (int b = 0; b < int'(COEF_W); b++)
      for (int k = 0; k < int'(TAPS); k++)
        plane[b][k] = coef[k][b];
  end

  for (genvar b = 0; b < int'(COEF_W); b++) begin : g_plane
    neda_mux_adder #(.TAPS(TAPS), .DATA_W(DATA_W), .PSUM_W(PSUM_W)) u_mux (
      .x    (taps),
      .sel  (plane[b]),
      .psum (psum[b])
    );
  end

  neda_shift_add #(.COEF_W(COEF_W), .PSUM_W(PSUM_W), .Y_W(Y_W)) u_shift_add (
    .psum (psum),
    .y    (y_out)
  );

endmodule
