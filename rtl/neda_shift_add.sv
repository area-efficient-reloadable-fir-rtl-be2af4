// neda_shift_add: shift-and-add combiner of the bit-plane partial sums.
//
// Input psum[b] is the partial sum of coefficient bit plane b (b = 0 is the
// coefficient LSB, b = COEF_W-1 its sign bit). The filter output is
//   y = -psum[COEF_W-1] * 2^0 + sum_{b<COEF_W-1} psum[b] * 2^(b-COEF_W+1)
// in the coefficient's fraction scale. To keep every bit, the scaling is done
// as a left shift by b on an integer whose LSB weighs 2^-(COEF_W-1) of a
// partial sum: y has the sample's fraction bits plus COEF_W-1. The sign
// plane is subtracted because the coefficient's sign bit has weight -2^0.
//
// Follows the design: one shift per bit plane with amounts 7, 6, ..., 0 for
// the LSB plane up to the sign plane, and one adder over all eight shifted
// sums, with the sign plane taken negative. Own choice: left shifts into a
// full-precision integer instead of right shifts of a fixed-point value.
//
// Interface: psum[COEF_W] (PSUM_W, signed) -> y (Y_W, signed).
// Timing: combinational.
module neda_shift_add #(
  parameter int unsigned COEF_W = neda_pkg::DEF_COEF_W,
  parameter int unsigned PSUM_W = neda_pkg::psum_width(neda_pkg::DEF_DATA_W,
                                                       neda_pkg::DEF_TAPS),
  parameter int unsigned Y_W    = PSUM_W + COEF_W
) (
  input  logic signed [PSUM_W-1:0] psum [COEF_W],
  output logic signed [Y_W-1:0]    y
);

  always_comb begin
    y = '0;
    for (int b = 0; b < int'(COEF_W) - 1; b++) begin
      y = y + (Y_W'(psum[b]) <<< b);
    end
    y = y - (Y_W'(psum[COEF_W-1]) <<< (COEF_W - 1));
  end

endmodule
