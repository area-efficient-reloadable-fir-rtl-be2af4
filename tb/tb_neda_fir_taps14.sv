// tb_neda_fir_taps14: self-checking test of the NEDA FIR filter built with
// 14 taps, the larger of the two filter sizes compared for area.
//
// Random samples and random coefficient sets reloaded mid-stream, then the
// full-scale case (-1.0 samples times -1.0 coefficients on every tap, the
// largest possible output). Every cycle y_out is compared with a direct-form
// convolution computed here with multiplications.
module tb_neda_fir_taps14;
  localparam int TAPS   = 14;
  localparam int DATA_W = 8;
  localparam int COEF_W = 8;
  localparam int Y_W    = neda_pkg::y_width(DATA_W, COEF_W, TAPS);

  logic clk = 1'b0;
  logic rst, coef_load;
  logic signed [DATA_W-1:0] x_in;
  logic signed [COEF_W-1:0] coef_in [TAPS];
  logic signed [Y_W-1:0]    y_out;

  int hist [TAPS];
  int cref [TAPS];
  int checks = 0, failures = 0, n_reload = 0, n_fullscale = 0;

  neda_fir #(.TAPS(TAPS)) dut (.clk, .rst, .x_in, .coef_load, .coef_in, .y_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint ref_y();
    longint s = 0;
    for (int k = 0; k < TAPS; k++) s += longint'(cref[k]) * longint'(hist[k]);
    return s;
  endfunction

  task automatic step(input int x, input bit ld);
    x_in = DATA_W'(x);
    coef_load = ld;
    @(posedge clk); #1;
    if (rst) begin
      for (int k = 0; k < TAPS; k++) begin hist[k] = 0; cref[k] = 0; end
    end else begin
      for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
      hist[0] = x;
      if (ld) begin
        for (int k = 0; k < TAPS; k++) cref[k] = int'(coef_in[k]);
        n_reload++;
      end
    end
    coef_load = 1'b0;
    if (ref_y() == longint'(TAPS) * 16384) n_fullscale++;
    checks++;
    if (longint'(y_out) != ref_y()) begin
      failures++;
      if (failures < 10) $display("t=%0t: y_out %0d want %0d", $time, y_out, ref_y());
    end
  endtask

  initial begin
    bit ld;
    rst = 1'b1; coef_load = 1'b0; x_in = '0;
    for (int k = 0; k < TAPS; k++) begin coef_in[k] = '0; hist[k] = 0; cref[k] = 0; end
    step(0, 1'b0);
    rst = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      ld = ($urandom_range(0, 29) == 0) || (i == 0);
      if (ld) for (int k = 0; k < TAPS; k++) coef_in[k] = COEF_W'($urandom);
      step(int'($urandom_range(0, 255)) - 128, ld);
    end
    for (int k = 0; k < TAPS; k++) coef_in[k] = -128;
    step(-128, 1'b1);
    for (int i = 0; i < TAPS + 2; i++) step(-128, 1'b0);
    checks += 2;
    if (n_reload < 2)     failures++;
    if (n_fullscale == 0) failures++;
    $display("reloads=%0d full_scale=%0d", n_reload, n_fullscale);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
