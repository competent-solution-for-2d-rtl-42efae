// Workload test: the data-width and scaling-factor configurations of the
// quantitative analysis that fit the engine, run side by side on the same
// kind of 32 x 32 images:
//   32-bit data, scaling factor 256 (default engine, FWD_SCALE = 0)
//   32-bit data, scaling factor 128 (FWD_SCALE = 0)
//   16-bit data, scaling factor 128 (FWD_SCALE = 1: forward passes divide by N)
// The fourth, 16-bit data with factor 256, cannot work: 255 * 256 exceeds a
// 16-bit word. Each configuration is checked completely by
// fft2d_check_harness, which prints its error figures and clock count.
module tb_fft2d_table1;
  int c0, f0, c1, f1, c2, f2;
  bit d0, d1, d2;

  fft2d_check_harness #(.W(32), .S(8), .FWD_SCALE(1'b0), .PIX_TOL(0.5)) u_w32_f256 (
    .checks(c0), .failures(f0), .finished(d0));
  fft2d_check_harness #(.W(32), .S(7), .FWD_SCALE(1'b0), .PIX_TOL(0.5)) u_w32_f128 (
    .checks(c1), .failures(f1), .finished(d1));
  fft2d_check_harness #(.W(16), .S(7), .FWD_SCALE(1'b1), .PIX_TOL(1.0)) u_w16_f128 (
    .checks(c2), .failures(f2), .finished(d2));

  initial begin : watchdog
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2 + 1);
    $finish;
  end

  initial begin
    wait (d0 && d1 && d2);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2, f0 + f1 + f2);
    $finish;
  end
endmodule
