// tb_tap_delay_line: self-checking test of the sample register chain.
//
// Drives random samples (and occasional resets) into tap_delay_line and
// keeps its own history of the last TAPS accepted samples; after each clock
// edge every tap must equal the sample taken k clocks earlier, or zero after
// a reset. A watchdog ends the run if it hangs.
module tb_tap_delay_line;
  localparam int TAPS   = 7;
  localparam int DATA_W = 8;

  logic clk = 1'b0;
  logic rst;
  logic signed [DATA_W-1:0] x_in;
  logic signed [DATA_W-1:0] taps [TAPS];
  logic signed [DATA_W-1:0] hist [TAPS];
  int checks = 0, failures = 0;

  tap_delay_line #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.clk, .rst, .x_in, .taps);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1'b1; x_in = '0;
    for (int k = 0; k < TAPS; k++) hist[k] = '0;
    @(posedge clk); #1;
    for (int i = 0; i < 1000; i++) begin
      rst  = ($urandom_range(0, 99) == 0);
      x_in = DATA_W'($urandom);
      @(posedge clk); #1;
      if (rst) begin
        for (int k = 0; k < TAPS; k++) hist[k] = '0;
      end else begin
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = x_in;
      end
      for (int k = 0; k < TAPS; k++) begin
        checks++;
        if (taps[k] !== hist[k]) begin
          failures++;
          if (failures < 10) $display("cycle %0d tap %0d: got %0d want %0d", i, k, taps[k], hist[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
