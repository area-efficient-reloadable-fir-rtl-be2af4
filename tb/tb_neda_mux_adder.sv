// tb_neda_mux_adder: self-checking test of one bit-plane gated adder.
//
// Applies random samples and random bit planes, plus the corner cases (all
// samples most negative or most positive with every bit set, empty plane),
// and compares the partial sum with an integer sum computed here.
module tb_neda_mux_adder;
  localparam int TAPS   = 7;
  localparam int DATA_W = 8;
  localparam int PSUM_W = DATA_W + $clog2(TAPS);

  logic clk = 1'b0;
  logic signed [DATA_W-1:0] x [TAPS];
  logic        [TAPS-1:0]   sel;
  logic signed [PSUM_W-1:0] psum;
  int checks = 0, failures = 0;

  neda_mux_adder #(.TAPS(TAPS), .DATA_W(DATA_W)) dut (.x, .sel, .psum);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input int i);
    int want = 0;
    for (int k = 0; k < TAPS; k++) if (sel[k]) want += int'(x[k]);
    checks++;
    if (int'(psum) != want) begin
      failures++;
      if (failures < 10) $display("vector %0d: got %0d want %0d", i, psum, want);
    end
  endtask

  initial begin
    for (int i = 0; i < 3000; i++) begin
      case (i)
        0: begin for (int k = 0; k < TAPS; k++) x[k] = -128; sel = '1; end
        1: begin for (int k = 0; k < TAPS; k++) x[k] = 127;  sel = '1; end
        2: begin for (int k = 0; k < TAPS; k++) x[k] = -1;   sel = '0; end
        default: begin
          for (int k = 0; k < TAPS; k++) x[k] = DATA_W'($urandom);
          sel = TAPS'($urandom);
        end
      endcase
      @(posedge clk); #1;
      check(i);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
