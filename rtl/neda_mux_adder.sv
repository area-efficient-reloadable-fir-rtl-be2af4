// neda_mux_adder: gated adder for one coefficient bit plane.
//
// NEDA moves the distribution of the arithmetic onto the coefficients: for a
// fixed bit position b, the bits c_k[b] of all coefficients are 0 or 1, so
// the product of that bit plane with the sample vector is just the sum of
// the samples whose coefficient bit is 1. Each sample passes a 2:1 mux that
// selects the sample when sel[k] is 1 and zero otherwise, and the mux
// outputs are added (sign-extended) into one partial sum.
//
// Follows the design (mux blocks fed by one coefficient bit plane and the
// registered samples, then the partial sum). Own choice: a plain adder tree
// written as a loop, no pipeline register.
//
// Interface: x[TAPS] (DATA_W, signed), sel[TAPS] -> psum (PSUM_W, signed).
// Timing: combinational.
module neda_mux_adder #(
  parameter int unsigned TAPS   = neda_pkg::DEF_TAPS,
  parameter int unsigned DATA_W = neda_pkg::DEF_DATA_W,
  parameter int unsigned PSUM_W = neda_pkg::psum_width(DATA_W, TAPS)
) (
  input  logic signed [DATA_W-1:0] x   [TAPS],
  input  logic        [TAPS-1:0]   sel,
  output logic signed [PSUM_W-1:0] psum
);

  always_comb begin
    psum = '0;
    for (int k = 0; k < int'(TAPS); k++) begin
      if (sel[k]) psum = psum + PSUM_W'(x[k]);
    end
  end

endmodule
