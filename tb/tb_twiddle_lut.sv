// Lets the twiddle LUT fill itself after reset, checks when 'ready' rises
// (N/2 * (ITER + 4) clocks, ITER = TW + 4), then reads every entry with random
// back-to-back indices: each must be within one LSB of cos / -sin and appear
// one clock after its index.
module tb_twiddle_lut;
  localparam int N = 32, TW = 16, ITER = TW + 4;
  localparam int FILL = N / 2 * (ITER + 4);
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] idx = '0;
  logic signed [TW-1:0] w_re, w_im;
  logic ready;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  twiddle_lut #(.N(N), .TW(TW)) dut (.*);

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int t;
    real one, er, ei;
    one = 2.0 ** (TW - 2);
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    t = 0;
    do begin @(posedge clk); #1; t++; end while (!ready);
    $display("ready after %0d clocks", t);
    checks++;
    if (t != FILL) begin failures++; $display("FAIL fill time %0d expected %0d", t, FILL); end
    for (int i = 0; i < 200; i++) begin
      int k;
      k = (i < 16) ? i : int'($urandom_range(0, N / 2 - 1));
      idx <= 4'(k);
      @(posedge clk);
      #1;
      er = real'(w_re) - one * $cos(2.0 * PI * k / N);
      ei = real'(w_im) + one * $sin(2.0 * PI * k / N);
      checks++;
      if (er > 1.0 || er < -1.0 || ei > 1.0 || ei < -1.0) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d got %0d %0d", k, w_re, w_im);
      end
    end
    checks++;
    if (!ready) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
