// coef_reg: the reloadable coefficient register of the filter ("coeff in").
//
// Holds TAPS coefficients. While `load` is high at a rising clock edge all
// TAPS coefficients are replaced at once by coef_in; otherwise they are held.
// Because the NEDA datapath uses the coefficient bits directly (no table is
// computed from them), a new set takes effect on the very next output: this
// is what makes the filter reloadable at any time.
//
// Follows the design: coefficients enter the hardware as signals and are
// registered, all of them loadable at once. Own choices: the single load
// strobe, the synchronous active-high reset to all-zero coefficients.
//
// Interface: clk, rst, load, coef_in[TAPS] -> coef[TAPS] (COEF_W, signed).
// Timing: coef shows coef_in one clock after `load`.
module coef_reg #(
  parameter int unsigned TAPS   = neda_pkg::DEF_TAPS,
  parameter int unsigned COEF_W = neda_pkg::DEF_COEF_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic                     load,
  input  logic signed [COEF_W-1:0] coef_in [TAPS],
  output logic signed [COEF_W-1:0] coef    [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(TAPS); k++) coef[k] <= '0;
    end else if (load) begin
      for (int k = 0; k < int'(TAPS); k++) coef[k] <= coef_in[k];
    end
  end

endmodule
