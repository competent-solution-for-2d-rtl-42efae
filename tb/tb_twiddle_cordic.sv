// Runs the CORDIC twiddle unit for every k of a 32-point and a 64-point FFT
// and compares cos and -sin with double precision: each must be within one
// LSB (TW-2 fraction bits). Also checks that done comes exactly ITER+1
// clocks after start, and that W^0 and W^(N/4) come out as exact 1 and -j.
module tb_twiddle_cordic;
  localparam int TW = 16, G = 4, ITER = TW + G;
  localparam real PI = 3.14159265358979323846;
  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0;
  logic [3:0] k32 = '0;
  logic [4:0] k64 = '0;
  logic done32, done64;
  logic signed [TW-1:0] re32, im32, re64, im64;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  twiddle_cordic #(.N(32), .TW(TW)) dut32 (.clk(clk), .rst_n(rst_n), .start(start), .k(k32),
                                           .done(done32), .w_re(re32), .w_im(im32));
  twiddle_cordic #(.N(64), .TW(TW)) dut64 (.clk(clk), .rst_n(rst_n), .start(start), .k(k64),
                                           .done(done64), .w_re(re64), .w_im(im64));

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cmp(int n, int k, logic signed [TW-1:0] re, logic signed [TW-1:0] im);
    real one, er, ei;
    one = 2.0 ** (TW - 2);
    er = real'(re) - one * $cos(2.0 * PI * k / n);
    ei = real'(im) + one * $sin(2.0 * PI * k / n);
    checks++;
    if (er > 1.0 || er < -1.0 || ei > 1.0 || ei < -1.0) begin
      failures++;
      $display("FAIL N=%0d k=%0d got %0d %0d err %f %f", n, k, re, im, er, ei);
    end
  endtask

  initial begin
    int lat;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 32; k++) begin
      k32 <= 4'(k % 16); k64 <= 5'(k);
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      #1;
      lat = 0;
      while (!done64) begin @(posedge clk); #1; lat++; end
      checks++;
      if (lat != ITER + 1 || !done32) begin failures++; $display("FAIL latency %0d", lat); end
      cmp(64, k, re64, im64);
      if (k < 16) cmp(32, k, re32, im32);
      if (k == 0) begin
        checks++;
        if (re32 != TW'(1 << (TW - 2)) || im32 != 0) begin failures++; $display("FAIL W^0"); end
      end
      if (k == 8) begin
        checks++;
        if (re32 != 0 || im32 != -TW'(1 << (TW - 2))) begin failures++; $display("FAIL W^(N/4)"); end
      end
      @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
