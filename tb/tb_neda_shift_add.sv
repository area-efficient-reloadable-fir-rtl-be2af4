// tb_neda_shift_add: self-checking test of the shift-and-add combiner.
//
// Applies random partial sums (and full-scale corner cases) and compares y
// with -psum[W-1]*2^(W-1) + sum_b psum[b]*2^b computed with multiplications
// in 64-bit integers here.
module tb_neda_shift_add;
  localparam int COEF_W = 8;
  localparam int PSUM_W = 11;
  localparam int Y_W    = PSUM_W + COEF_W;

  logic clk = 1'b0;
  logic signed [PSUM_W-1:0] psum [COEF_W];
  logic signed [Y_W-1:0]    y;
  int checks = 0, failures = 0;

  neda_shift_add #(.COEF_W(COEF_W), .PSUM_W(PSUM_W), .Y_W(Y_W)) dut (.psum, .y);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint want;
    for (int i = 0; i < 3000; i++) begin
      for (int b = 0; b < COEF_W; b++) begin
        case (i)
          0:       psum[b] = (b == COEF_W - 1) ? -896 : 889;
          1:       psum[b] = (b == COEF_W - 1) ? 889 : -896;
          2:       psum[b] = (b == 3) ? 1 : 0;
          default: psum[b] = PSUM_W'($urandom);
        endcase
      end
      @(posedge clk); #1;
      want = 0;
      for (int b = 0; b < COEF_W - 1; b++) want += longint'(psum[b]) * (longint'(1) << b);
      want -= longint'(psum[COEF_W-1]) * (longint'(1) << (COEF_W - 1));
      checks++;
      if (longint'(y) != want) begin
        failures++;
        if (failures < 10) $display("vector %0d: got %0d want %0d", i, y, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
