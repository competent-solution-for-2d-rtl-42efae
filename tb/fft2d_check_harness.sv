// One complete check of the 2D-FFT / 2D-IFFT engine in a given
// configuration, for use by the workload testbench. It instantiates fft2d_top
// with the given data width, scaling factor and scaling scheme, runs two
// 32 x 32 images through it and checks:
//  * every ROW_FFT, COL_FFT_IM and COL_IFFT word against double-precision row
//    DFTs and the 2D DFT (divided by N per forward pass when FWD_SCALE = 1);
//  * every reconstructed pixel to within PIX_TOL pixel steps;
//  * the clock count of the four passes, 4N * (2N + log2(N)*(N/2+3) + 2);
//  * that input stalls, forward/inverse and row/column passes and 'done'
//    all happened.
// RMS, relative RMS and maximum absolute reconstruction error are printed in
// scaled units. 'finished' rises when both images are done; checks and
// failures count as in a testbench.
module fft2d_check_harness #(
  parameter int  W         = 32,
  parameter int  S         = 8,
  parameter bit  FWD_SCALE = 1'b0,
  parameter real PIX_TOL   = 0.5    // allowed reconstruction error, in pixels
) (
  output int checks,
  output int failures,
  output bit finished
);
  import fft2d_pkg::*;
  localparam int N  = 32;
  localparam int LN = 5;
  localparam real DIV = FWD_SCALE ? real'(N) : 1.0;  // forward divide per pass
  localparam int LINE_CLK = 2 * N + LN * (N / 2 + 3) + 2;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pix_valid = 1'b0;
  logic [7:0] pix_data = '0;
  logic pix_ready, busy, done, res_valid, ovflow_flag;
  ctrl_state_t state, res_state;
  logic [LN-1:0] res_line, res_idx;
  logic signed [W-1:0] res_re, res_im;

  always #5 clk = ~clk;

  fft2d_top #(.W(W), .SCALE_LOG2(S), .FWD_SCALE(FWD_SCALE)) dut (.*);

  initial begin
    checks = 0;
    failures = 0;
    finished = 1'b0;
  end
  int n_stall = 0, n_fwd = 0, n_inv = 0, n_row = 0, n_col = 0, n_done = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // captured results
  longint got_re [4][N][N];
  longint got_im [4][N][N];
  int     img [N][N];

  always @(posedge clk) if (res_valid) begin
    int p;
    p = int'(res_state) - int'(S_ROW_FFT);
    if (p >= 0 && p < 4) begin
      got_re[p][res_line][res_idx] = longint'(res_re);
      got_im[p][res_line][res_idx] = longint'(res_im);
      if (res_idx == LN'(N - 1)) begin
        if (p < 2) n_fwd++; else n_inv++;
        if (p == 0 || p == 3) n_row++; else n_col++;
      end
    end
  end
  always @(posedge clk) begin
    if (pix_ready && !pix_valid && state == S_INITIALISE) n_stall++;
    if (rst_n && done) n_done++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic real dabs(real v);
    return v < 0.0 ? -v : v;
  endfunction

  task automatic run_image(input int kind);
    real xr [N][N], xi [N][N], rr [N][N], ri [N][N], cr [N][N], ci [N][N];
    real e, se, sr, mae, tol, pk_row, pk_2d;
    longint t0, t1;
    // image
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++)
        img[r][c] = (kind == 0) ? ((r * 5 + c * 3 + int'($urandom_range(0, 40))) % 256)
                                : (((r + c) % 2 == 0) ? 255 : 0);
    // reference: row DFTs then column DFTs of the scaled image
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin xr[r][c] = img[r][c] * (2.0 ** S); xi[r][c] = 0.0; end
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        rr[r][k] = 0.0; ri[r][k] = 0.0;
        for (int n = 0; n < N; n++) begin
          rr[r][k] += xr[r][n] * $cos(2.0 * PI * k * n / N);
          ri[r][k] -= xr[r][n] * $sin(2.0 * PI * k * n / N);
        end
        rr[r][k] /= DIV; ri[r][k] /= DIV;
        
      end
    for (int c = 0; c < N; c++)
      for (int k = 0; k < N; k++) begin
        cr[k][c] = 0.0; ci[k][c] = 0.0;
        for (int n = 0; n < N; n++) begin
          real cs, sn;
          cs = $cos(2.0 * PI * k * n / N); sn = $sin(2.0 * PI * k * n / N);
          cr[k][c] += rr[n][c] * cs + ri[n][c] * sn;
          ci[k][c] += ri[n][c] * cs - rr[n][c] * sn;
        end
        cr[k][c] /= DIV; ci[k][c] /= DIV;
        
      end
    // Fixed-point error grows with the largest value in the transform
    // (twiddle quantization), so tolerances are a few LSB plus 2^-16 of it.
    pk_row = 0.0; pk_2d = 0.0;
    for (int a = 0; a < N; a++)
      for (int b = 0; b < N; b++) begin
        pk_row = (dabs(rr[a][b]) > pk_row) ? dabs(rr[a][b]) : pk_row;
        pk_row = (dabs(ri[a][b]) > pk_row) ? dabs(ri[a][b]) : pk_row;
        pk_2d  = (dabs(cr[a][b]) > pk_2d) ? dabs(cr[a][b]) : pk_2d;
        pk_2d  = (dabs(ci[a][b]) > pk_2d) ? dabs(ci[a][b]) : pk_2d;
      end
    // drive
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        if ($urandom_range(0, 7) == 0) begin
          pix_valid <= 1'b0;
          @(posedge clk);
        end
        pix_valid <= 1'b1;
        pix_data  <= 8'(img[r][c]);
        @(posedge clk);
        while (!pix_ready) @(posedge clk);
      end
    pix_valid <= 1'b0;
    wait (state == S_ROW_FFT);
    t0 = cyc;
    @(posedge clk iff done);
    t1 = cyc;
    check(t1 - t0 == longint'(4 * N * LINE_CLK), "operation clock count");
    $display("W=%0d factor %0d image %0d: %0d clocks for the four passes (expected %0d)", W, 1 << S, kind, t1 - t0, 4 * N * LINE_CLK);
    // row FFT words
    tol = 4.0 + pk_row / 65536.0;
    for (int r = 0; r < N; r++)
      for (int k = 0; k < N; k++) begin
        check(dabs(real'(got_re[0][r][k]) - rr[r][k]) <= tol &&
              dabs(real'(got_im[0][r][k]) - ri[r][k]) <= tol,
              $sformatf("row FFT r%0d k%0d got %0d,%0d exp %f,%f", r, k,
                        got_re[0][r][k], got_im[0][r][k], rr[r][k], ri[r][k]));
      end
    // 2D spectrum (column pass stores [column][k])
    tol = 8.0 + pk_2d / 65536.0;
    for (int c = 0; c < N; c++)
      for (int k = 0; k < N; k++)
        check(dabs(real'(got_re[1][c][k]) - cr[k][c]) <= tol &&
              dabs(real'(got_im[1][c][k]) - ci[k][c]) <= tol,
              $sformatf("2D FFT k%0d c%0d got %0d,%0d exp %f,%f", k, c,
                        got_re[1][c][k], got_im[1][c][k], cr[k][c], ci[k][c]));
    // column IFFT words: the row spectra again, stored [column][row]. With
    // forward scaling the 2D spectrum was rounded at 1/N of this scale, so
    // its rounding errors return multiplied by up to N/2.
    tol = 8.0 + pk_row / 65536.0 + (FWD_SCALE ? real'(N / 2) : 0.0);
    for (int c = 0; c < N; c++)
      for (int r = 0; r < N; r++)
        check(dabs(real'(got_re[2][c][r]) - rr[r][c]) <= tol &&
              dabs(real'(got_im[2][c][r]) - ri[r][c]) <= tol,
              $sformatf("col IFFT r%0d c%0d got %0d,%0d exp %f,%f", r, c,
                        got_re[2][c][r], got_im[2][c][r], rr[r][c], ri[r][c]));
    // reconstruction
    se = 0.0; sr = 0.0; mae = 0.0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        longint rec;
        rec = got_re[3][r][c];
        e = real'(rec) - xr[r][c];
        se += e * e; sr += xr[r][c] * xr[r][c];
        if (dabs(e) > mae) mae = dabs(e);
        check(dabs(e) < PIX_TOL * (2.0 ** S),
              $sformatf("pixel r%0d c%0d got %0d exp %0d", r, c, rec, img[r][c]));
        check(dabs(real'(got_im[3][r][c])) < PIX_TOL * (2.0 ** S), $sformatf("pixel im r%0d c%0d", r, c));
      end
    $display("W=%0d factor %0d image %0d: RMS=%f RRMS=%f MAE=%0f (scaled by %0d)", W, 1 << S, kind,
             $sqrt(se / (N * N)), $sqrt(se / sr), mae, 1 << S);
    check(!ovflow_flag, "no saturation");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run_image(0);
    repeat (5) @(posedge clk);
    run_image(1);
    repeat (3) @(posedge clk);
    $display("W=%0d factor %0d mechanisms: stalls=%0d fwd_lines=%0d inv_lines=%0d row_lines=%0d col_lines=%0d done=%0d",
             W, 1 << S, n_stall, n_fwd, n_inv, n_row, n_col, n_done);
    check(n_stall > 0, "input stall seen");
    check(n_fwd == 4 * N && n_inv == 4 * N, "forward and inverse line counts");
    check(n_row == 4 * N && n_col == 4 * N, "row and column line counts");
    check(n_done == 2, "done pulses");
    finished = 1'b1;
  end
endmodule
