// tb_neda_fir: end-to-end, self-checking test of the NEDA FIR filter at its
// default size (7 taps, 8-bit samples, 8-bit coefficients with 7 fraction
// bits).
//
// The reference is a direct-form convolution with multiplications, computed
// here from the testbench's own history of samples and its own copy of the
// loaded coefficients; y_out must match it bit for bit in every cycle.
// Phases:
//   1. reset: output zero;
//   2. random samples with random coefficient sets reloaded mid-stream;
//   3. full-scale corner case (all samples and coefficients at -1.0);
//   4. low-pass workload: a 7-tap Hamming-windowed-sinc low-pass (cut-off
//      2 kHz at 10 kHz sampling) filters 0.75 sin(100 Hz) + 0.2 sin(4 kHz);
//      besides bit-exactness, the 4 kHz amplitude at the output must be
//      small and the 100 Hz amplitude kept;
//   5. a reload to a different (high-pass) set while the tone streams.
// Counted mechanisms, each must occur: reset, coefficient reload while
// streaming, negative coefficient (sign plane subtracted), full-scale output.
module tb_neda_fir;
  localparam int TAPS   = neda_pkg::DEF_TAPS;
  localparam int DATA_W = neda_pkg::DEF_DATA_W;
  localparam int COEF_W = neda_pkg::DEF_COEF_W;
  localparam int Y_W    = neda_pkg::y_width(DATA_W, COEF_W, TAPS);
  localparam real PI    = 3.14159265358979;
  localparam real FS    = 10000.0;

  logic clk = 1'b0;
  logic rst, coef_load;
  logic signed [DATA_W-1:0] x_in;
  logic signed [COEF_W-1:0] coef_in [TAPS];
  logic signed [Y_W-1:0]    y_out;

  // Reference state.
  int hist [TAPS];
  int cref [TAPS];
  int checks = 0, failures = 0;
  int n_reset = 0, n_reload = 0, n_negcoef = 0, n_fullscale = 0;

  neda_fir dut (.clk, .rst, .x_in, .coef_load, .coef_in, .y_out);

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

  // One clock: apply inputs, update the reference like the registers, check.
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
        if (hist[TAPS-1] != 0) n_reload++;   // reload while data streams
      end
    end
    coef_load = 1'b0;
    for (int k = 0; k < TAPS; k++) if (cref[k] < 0 && hist[k] != 0) begin n_negcoef++; break; end
    if (ref_y() == longint'(TAPS) * 16384) n_fullscale++;
    checks++;
    if (longint'(y_out) != ref_y()) begin
      failures++;
      if (failures < 10) $display("t=%0t: y_out %0d want %0d", $time, y_out, ref_y());
    end
  endtask

  // Amplitude of a tone of frequency f in y over nsamp samples.
  real acc_s, acc_c, in_s, in_c;

  initial begin
    int x;
    real hr, w, m;
    real amp_lo_in, amp_hi_in, amp_lo_out, amp_hi_out;
    int lp [TAPS];

    rst = 1'b1; coef_load = 1'b0; x_in = '0;
    for (int k = 0; k < TAPS; k++) begin coef_in[k] = '0; hist[k] = 0; cref[k] = 0; end
    step(0, 1'b0);
    step(77, 1'b0);
    n_reset++;
    rst = 1'b0;
    // Phase 1: output must stay zero with zero coefficients.
    for (int i = 0; i < 10; i++) step(int'($urandom_range(0, 255)) - 128, 1'b0);

    // Phase 2: random coefficient sets, reloaded at random moments.
    for (int i = 0; i < 2000; i++) begin
      bit ld;
      ld = ($urandom_range(0, 19) == 0) || (i == 0);
      if (ld) for (int k = 0; k < TAPS; k++) coef_in[k] = COEF_W'($urandom);
      step(int'($urandom_range(0, 255)) - 128, ld);
    end

    // Phase 3: full scale, -1.0 * -1.0 on every tap.
    for (int k = 0; k < TAPS; k++) coef_in[k] = -128;
    step(-128, 1'b1);
    for (int i = 0; i < TAPS + 2; i++) step(-128, 1'b0);

    // Phase 4: low-pass workload. Coefficients: h[n] = sinc-window design,
    // h[n] = sin(2 pi fc m)/(pi m) (2 fc for m = 0) times
    // 0.54 - 0.46 cos(2 pi n/(TAPS-1)), m = n - (TAPS-1)/2, fc = 2k/10k,
    // rounded to 7 fraction bits.
    for (int n = 0; n < TAPS; n++) begin
      m  = real'(n) - real'(TAPS - 1) / 2.0;
      hr = (m == 0.0) ? 0.4 : $sin(2.0 * PI * 0.2 * m) / (PI * m);
      w  = 0.54 - 0.46 * $cos(2.0 * PI * real'(n) / real'(TAPS - 1));
      lp[n] = int'($floor(hr * w * 128.0 + 0.5));
      coef_in[n] = COEF_W'(lp[n]);
    end
    rst = 1'b1; step(0, 1'b0); n_reset++; rst = 1'b0;
    step(0, 1'b1);
    acc_s = 0; acc_c = 0; in_s = 0; in_c = 0;
    amp_lo_out = 0; amp_hi_out = 0;
    // Settle, then measure over 1000 samples (10 periods of 100 Hz, 400 of 4 kHz).
    for (int i = 0; i < 1000 + TAPS; i++) begin
      real t;
      t = real'(i) / FS;
      x = int'($floor(128.0 * (0.75 * $sin(2.0 * PI * 100.0 * t)
                              + 0.2 * $sin(2.0 * PI * 4000.0 * t)) + 0.5));
      step(x, 1'b0);
      if (i >= TAPS) begin
        acc_s += real'(y_out) / 16384.0 * $sin(2.0 * PI * 4000.0 * t);
        acc_c += real'(y_out) / 16384.0 * $cos(2.0 * PI * 4000.0 * t);
        in_s  += real'(y_out) / 16384.0 * $sin(2.0 * PI * 100.0 * t);
        in_c  += real'(y_out) / 16384.0 * $cos(2.0 * PI * 100.0 * t);
      end
    end
    amp_hi_out = 2.0 * $sqrt(acc_s * acc_s + acc_c * acc_c) / 1000.0;
    amp_lo_out = 2.0 * $sqrt(in_s * in_s + in_c * in_c) / 1000.0;
    amp_lo_in = 0.75; amp_hi_in = 0.2;
    $display("low-pass: coefficients %0d %0d %0d %0d %0d %0d %0d",
             lp[0], lp[1], lp[2], lp[3], lp[4], lp[5], lp[6]);
    $display("low-pass: 100 Hz amplitude %f -> %f, 4 kHz amplitude %f -> %f",
             amp_lo_in, amp_lo_out, amp_hi_in, amp_hi_out);
    checks++;
    if (!(amp_hi_out < 0.1 * amp_hi_in)) begin failures++; $display("4 kHz not attenuated"); end
    checks++;
    if (!(amp_lo_out > 0.8 * amp_lo_in && amp_lo_out < 1.0 * amp_lo_in)) begin
      failures++; $display("100 Hz not passed");
    end

    // Phase 5: reload a high-pass set (alternating signs) mid-tone.
    for (int n = 0; n < TAPS; n++) coef_in[n] = COEF_W'((n % 2 == 0) ? lp[n] : -lp[n]);
    for (int i = 0; i < 50; i++) begin
      real t;
      t = real'(i + 1000 + TAPS) / FS;
      x = int'($floor(128.0 * (0.75 * $sin(2.0 * PI * 100.0 * t)
                              + 0.2 * $sin(2.0 * PI * 4000.0 * t)) + 0.5));
      step(x, i == 10);
    end

    $display("mechanisms: reset=%0d reload_while_streaming=%0d negative_coef=%0d full_scale=%0d",
             n_reset, n_reload, n_negcoef, n_fullscale);
    checks += 4;
    if (n_reset == 0)     failures++;
    if (n_reload == 0)    failures++;
    if (n_negcoef == 0)   failures++;
    if (n_fullscale == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
