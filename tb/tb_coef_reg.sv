// tb_coef_reg: self-checking test of the reloadable coefficient register.
//
// Presents a new random coefficient set every cycle but asserts `load` only
// now and then; the register must hold its contents between loads, take the
// whole set in the cycle after a load, and clear on reset.
module tb_coef_reg;
  localparam int TAPS   = 7;
  localparam int COEF_W = 8;

  logic clk = 1'b0;
  logic rst, load;
  logic signed [COEF_W-1:0] coef_in [TAPS];
  logic signed [COEF_W-1:0] coef    [TAPS];
  logic signed [COEF_W-1:0] model   [TAPS];
  int checks = 0, failures = 0, loads = 0;

  coef_reg #(.TAPS(TAPS), .COEF_W(COEF_W)) dut (.clk, .rst, .load, .coef_in, .coef);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; load = 1'b0;
    for (int k = 0; k < TAPS; k++) begin coef_in[k] = '0; model[k] = '0; end
    @(posedge clk); #1;
    rst = 1'b0;
    for (int i = 0; i < 1000; i++) begin
      rst  = ($urandom_range(0, 199) == 0);
      load = ($urandom_range(0, 3) == 0);
      for (int k = 0; k < TAPS; k++) coef_in[k] = COEF_W'($urandom);
      @(posedge clk); #1;
      if (rst) begin
        for (int k = 0; k < TAPS; k++) model[k] = '0;
      end else if (load) begin
        loads++;
        for (int k = 0; k < TAPS; k++) model[k] = coef_in[k];
      end
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (coef[k] !== model[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d coef %0d: got %0d want %0d", i, k, coef[k], model[k]);
        end
      end
    end
    checks++;
    if (loads == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
