// Test of the frame controller on its own (N = 8, 32-bit data, scaling 2^3).
//
// The frame SRAM is modelled by an array with one clock of read latency. The
// FFT core is replaced by a stand-in that takes N words while buf_ready is
// high, waits a few clocks and returns them in reverse order, adding 1 to the
// real part in a forward frame and 1000 in an inverse one (and 3 or 7 to the
// imaginary part). Reversal makes every row/column addressing mistake
// visible, and the added constants make every direction mistake visible. The
// test keeps a reference matrix, applies the same operation per pass, and
// checks every res_* word (pass, line, index, value), the pass order, the
// final SRAM contents, the 'done' pulse and that the controller waits for
// buf_ready. Two images are processed back to back.
module tb_fft2d_ctrl;
  import fft2d_pkg::*;
  localparam int N = 8, LN = 3, W = 32, S = 3;

  logic clk = 1'b0, rst_n = 1'b0, start = 1'b0, pix_valid = 1'b0;
  logic [7:0] pix_data = '0;
  logic pix_ready, busy, done;
  ctrl_state_t state, res_state;
  logic sram_en, sram_we;
  logic [2*LN-1:0] sram_addr;
  logic [2*W-1:0] sram_wdata, sram_rdata;
  logic core_inverse, core_datai_valid, core_buf_ready, core_datao_valid;
  logic signed [W-1:0] core_datai_re, core_datai_im, core_datao_re, core_datao_im;
  logic res_valid;
  logic [LN-1:0] res_line, res_idx;
  logic signed [W-1:0] res_re, res_im;

  int checks = 0, failures = 0, n_wait = 0, n_done = 0;

  always #5 clk = ~clk;

  fft2d_ctrl #(.N(N), .W(W), .PIX_W(8), .SCALE_LOG2(S)) dut (.*);

  // ---- SRAM model
  logic [2*W-1:0] mem [N*N];
  always @(posedge clk) if (sram_en) begin
    if (sram_we) mem[sram_addr] <= sram_wdata;
    else         sram_rdata <= mem[sram_addr];
  end

  // ---- core stand-in
  logic signed [W-1:0] buf_re [N], buf_im [N];
  int  cin = 0;
  bit  cinv;
  initial begin
    core_buf_ready = 1'b0;
    core_datao_valid = 1'b0;
    core_datao_re = '0;
    core_datao_im = '0;
    wait (rst_n);
    forever begin
      // random delay before accepting the next frame
      repeat ($urandom_range(0, 3)) @(posedge clk);
      core_buf_ready <= 1'b1;
      cin = 0;
      while (cin < N) begin
        @(posedge clk);
        if (core_datai_valid) begin
          if (cin == 0) cinv = core_inverse;
          buf_re[cin] = core_datai_re;
          buf_im[cin] = core_datai_im;
          cin++;
        end
      end
      core_buf_ready <= 1'b0;
      repeat ($urandom_range(2, 6)) @(posedge clk);
      for (int i = 0; i < N; i++) begin
        core_datao_valid <= 1'b1;
        core_datao_re <= buf_re[N-1-i] + (cinv ? 1000 : 1);
        core_datao_im <= buf_im[N-1-i] + (cinv ? 7 : 3);
        @(posedge clk);
      end
      core_datao_valid <= 1'b0;
    end
  end

  always @(posedge clk) begin
    if (rst_n && state != S_START && state != S_INITIALISE && !core_buf_ready && !core_datai_valid
        && dut.phase == 1'b0) n_wait++;
    if (rst_n && done) n_done++;
  end

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---- reference
  longint mre [N][N], mim [N][N], nre [N][N], nim [N][N];
  ctrl_state_t pass_seen [$];

  task automatic apply_pass(input ctrl_state_t p);
    bit col, inv;
    col = (p == S_COL_FFT_IM) || (p == S_COL_IFFT);
    inv = (p == S_COL_IFFT) || (p == S_ROW_IFFT);
    for (int l = 0; l < N; l++)
      for (int i = 0; i < N; i++) begin
        if (col) begin
          nre[i][l] = mre[N-1-i][l] + (inv ? 1000 : 1);
          nim[i][l] = mim[N-1-i][l] + (inv ? 7 : 3);
        end else begin
          nre[l][i] = mre[l][N-1-i] + (inv ? 1000 : 1);
          nim[l][i] = mim[l][N-1-i] + (inv ? 7 : 3);
        end
      end
  endtask

  // res stream checker: compares against nre/nim of the current pass
  always @(posedge clk) if (res_valid) begin
    bit col;
    longint er, ei;
    col = (res_state == S_COL_FFT_IM) || (res_state == S_COL_IFFT);
    er = col ? nre[res_idx][res_line] : nre[res_line][res_idx];
    ei = col ? nim[res_idx][res_line] : nim[res_line][res_idx];
    checks++;
    if (res_re != W'(er) || res_im != W'(ei)) begin
      failures++;
      if (failures < 10) $display("FAIL %s line %0d idx %0d got %0d,%0d exp %0d,%0d",
                                  res_state.name(), res_line, res_idx, res_re, res_im, er, ei);
    end
  end

  task automatic run_image();
    ctrl_state_t order [4] = '{S_ROW_FFT, S_COL_FFT_IM, S_COL_IFFT, S_ROW_IFFT};
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        mre[r][c] = longint'($urandom_range(0, 255));
        mim[r][c] = 0;
      end
    @(posedge clk); start <= 1'b1;
    @(posedge clk); start <= 1'b0;
    #1;
    checks++;
    if (state != S_INITIALISE) begin failures++; $display("FAIL not in INITIALISE"); end
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) begin
        pix_valid <= 1'b1;
        pix_data  <= 8'(mre[r][c]);
        @(posedge clk);
        if ($urandom_range(0, 3) == 0) begin
          pix_valid <= 1'b0;
          @(posedge clk);
        end
      end
    pix_valid <= 1'b0;
    for (int r = 0; r < N; r++)
      for (int c = 0; c < N; c++) mre[r][c] = mre[r][c] << S;
    for (int p = 0; p < 4; p++) begin
      apply_pass(order[p]);
      wait (state == order[p]);
      checks++;
      if (state != order[p]) failures++;
      @(posedge clk iff (state != order[p]));
      mre = nre;
      mim = nim;
    end
    checks++;
    if (state != S_START) begin failures++; $display("FAIL not back in START"); end
    // SRAM contents after the last pass
    for (int a = 0; a < N * N; a++) begin
      checks++;
      if (mem[a] != {W'(mre[a / N][a % N]), W'(mim[a / N][a % N])}) begin
        failures++;
        if (failures < 10) $display("FAIL sram %0d", a);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    repeat (2) @(posedge clk);
    run_image();
    run_image();
    repeat (2) @(posedge clk);
    checks++;
    if (n_done != 2) begin failures++; $display("FAIL done pulses %0d", n_done); end
    checks++;
    if (n_wait == 0) begin failures++; $display("FAIL never waited for the core"); end
    $display("waits for core: %0d", n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
