// tap_delay_line: the input sample register of the filter ("filter in").
//
// A chain of TAPS registers. On every rising clock edge the new sample x_in
// enters taps[0] and every stored sample moves one place along, so after the
// edge taps[k] holds x[n-k], where x[n] is the sample just taken. The filter
// takes one sample per clock; there is no enable. A synchronous, active-high
// reset clears the chain to zero.
//
// Follows the design: the input samples are registered first, one register
// per tap, with a reset input. Own choices: synchronous reset, no enable.
//
// Interface: clk, rst, x_in (DATA_W, signed) -> taps[TAPS] (DATA_W, signed).
// Timing: taps[0] shows x_in one clock after it is presented.
module tap_delay_line #(
  parameter int unsigned TAPS   = neda_pkg::DEF_TAPS,
  parameter int unsigned DATA_W = neda_pkg::DEF_DATA_W
) (
  input  logic                     clk,
  input  logic                     rst,
  input  logic signed [DATA_W-1:0] x_in,
  output logic signed [DATA_W-1:0] taps [TAPS]
);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int k = 0; k < int'(TAPS); k++) taps[k] <= '0;
    end else begin
      taps[0] <= x_in;
      for (int k = 1; k < int'(TAPS); k++) taps[k] <= taps[k-1];
    end
  end

endmodule
