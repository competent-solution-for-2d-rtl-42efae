// Frame-level test of the in-place FFT core (N = 32, 32-bit data).
//
// Random complex frames, forward and inverse, are fed back to back. Each
// output frame is compared with a double-precision DFT (forward) or IDFT
// including 1/N (inverse), the core's default scaling. The tolerance is a few
// LSB plus 2^-14 of the frame's largest value. Also checked:
//  * latency: the first output word comes N + log2(N)*(N/2+3) + 1 clocks
//    after the first input word, and the N output words are consecutive;
//  * input with gaps (datai_valid low for some clocks) gives the same result;
//  * a full-scale frame saturates and raises ovflow_flag, and the next frame
//    clears it.
module tb_fft_core;
  localparam int N = 32, LN = 5, W = 32, TW = 16;
  localparam int LAT = N + LN * (N / 2 + 3) + 1;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, inverse = 1'b0, datai_valid = 1'b0;
  logic signed [W-1:0] datai_re = '0, datai_im = '0;
  logic buf_ready, datao_valid, ovflow_flag;
  logic signed [W-1:0] datao_re, datao_im;
  int checks = 0, failures = 0;
  longint cyc = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  fft_core #(.N(N), .W(W), .TW(TW)) dut (.*);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real dabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run_frame(input bit inv, input int mag, input bit gaps, input bit expect_ovf);
    longint xr [N], xi [N];
    real er [N], ei [N], pk, tol;
    longint t_first, t_out;
    int k;
    for (int n = 0; n < N; n++) begin
      if (mag < 0) begin
        xr[n] = (n % 2 == 0) ? 64'sd2147483647 : -64'sd2147483648;  // full scale
        xi[n] = xr[n];
      end else begin
        xr[n] = longint'($urandom_range(0, 2 * mag)) - mag;
        xi[n] = longint'($urandom_range(0, 2 * mag)) - mag;
      end
    end
    pk = 0.0;
    for (int q = 0; q < N; q++) begin
      er[q] = 0.0; ei[q] = 0.0;
      for (int n = 0; n < N; n++) begin
        real c, s;
        c = $cos(2.0 * PI * q * n / N);
        s = inv ? $sin(2.0 * PI * q * n / N) : -$sin(2.0 * PI * q * n / N);
        er[q] += real'(xr[n]) * c - real'(xi[n]) * s;
        ei[q] += real'(xr[n]) * s + real'(xi[n]) * c;
      end
      if (inv) begin er[q] /= N; ei[q] /= N; end
      if (dabs(er[q]) > pk) pk = dabs(er[q]);
      if (dabs(ei[q]) > pk) pk = dabs(ei[q]);
    end
    tol = 4.0 + pk / 16384.0;
    while (!buf_ready) @(posedge clk);
    for (int n = 0; n < N; n++) begin
      if (gaps && $urandom_range(0, 2) == 0) begin
        datai_valid <= 1'b0;
        @(posedge clk);
      end
      datai_valid <= 1'b1; inverse <= inv;
      datai_re <= W'(xr[n]); datai_im <= W'(xi[n]);
      @(posedge clk);
      if (n == 0) t_first = cyc;
      inverse <= ~inv;  // only the first word's direction counts
    end
    datai_valid <= 1'b0;
    k = 0;
    while (k < N) begin
      @(posedge clk);
      if (datao_valid) begin
        t_out = cyc;
        if (k == 0 && !gaps) begin
          checks++;
          if (t_out - t_first != longint'(LAT)) begin
            failures++;
            $display("FAIL latency %0d expected %0d", t_out - t_first, LAT);
          end
        end
        if (mag >= 0) begin
          checks++;
          if (dabs(real'(datao_re) - er[k]) > tol || dabs(real'(datao_im) - ei[k]) > tol) begin
            failures++;
            if (failures < 10) $display("FAIL inv=%0d k=%0d got %0d,%0d exp %f,%f", inv, k,
                                        datao_re, datao_im, er[k], ei[k]);
          end
        end
        k++;
      end else if (k > 0) begin
        checks++; failures++;
        $display("FAIL output words not consecutive");
      end
    end
    @(posedge clk);
    checks++;
    if (ovflow_flag != expect_ovf) begin
      failures++;
      $display("FAIL ovflow_flag=%0d expected %0d", ovflow_flag, expect_ovf);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int f = 0; f < 12; f++)
      run_frame(1'(f % 2), (f < 6) ? 30000 : 1000000, 1'(f >= 8), 1'b0);
    run_frame(1'b0, -1, 1'b0, 1'b1);   // full scale: must saturate
    run_frame(1'b1, 5000, 1'b0, 1'b0); // flag cleared by the next frame
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
