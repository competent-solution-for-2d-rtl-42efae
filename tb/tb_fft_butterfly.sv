// Random and corner-case vectors for the radix-2 butterfly. The expected
// X = A + W*B and Y = A - W*B are computed with 64-bit integers: the twiddle
// product rounded half up at TW-2 fraction bits, then optionally halved
// (round half to even) and saturated to W bits. Results must appear exactly
// two clocks after the inputs; the overflow flag must match saturation.
module tb_fft_butterfly;
  localparam int W = 32, TW = 16;
  logic clk = 1'b0, rst_n = 1'b0, in_valid = 1'b0, conj = 1'b0, halve = 1'b0;
  logic signed [W-1:0] a_re = '0, a_im = '0, b_re = '0, b_im = '0;
  logic signed [TW-1:0] w_re = '0, w_im = '0;
  logic out_valid, ovf;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;
  fft_butterfly #(.W(W), .TW(TW)) dut (.*);

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint rshift_round(longint v, int sh);
    return (v + (longint'(1) <<< (sh - 1))) >>> sh;
  endfunction
  function automatic longint half_even(longint v);
    longint q;
    q = v >>> 1;
    if ((v & 1) != 0 && (q & 1) != 0) q = q + 1;
    return q;
  endfunction
  function automatic longint satw(longint v, output bit o);
    longint mx, mn;
    mx = (longint'(1) <<< (W - 1)) - 1;
    mn = -(longint'(1) <<< (W - 1));
    o = 0;
    if (v > mx) begin o = 1; return mx; end
    if (v < mn) begin o = 1; return mn; end
    return v;
  endfunction

  longint exp_q [$];
  bit     exp_o [$];

  task automatic apply(longint ar, longint ai, longint br, longint bi,
                       longint wr, longint wi, bit cj, bit hv);
    longint wie, tr, ti, v[4];
    bit o;
    wie = cj ? -wi : wi;
    tr = rshift_round(br * wr - bi * wie, TW - 2);
    ti = rshift_round(br * wie + bi * wr, TW - 2);
    v[0] = ar + tr; v[1] = ai + ti; v[2] = ar - tr; v[3] = ai - ti;
    o = 0;
    for (int i = 0; i < 4; i++) begin
      bit oi;
      if (hv) v[i] = half_even(v[i]);
      v[i] = satw(v[i], oi);
      o = o | oi;
      exp_q.push_back(v[i]);
    end
    exp_o.push_back(o);
    if (o) n_sat++;
    a_re <= W'(ar); a_im <= W'(ai); b_re <= W'(br); b_im <= W'(bi);
    w_re <= TW'(wr); w_im <= TW'(wi); conj <= cj; halve <= hv; in_valid <= 1'b1;
    @(posedge clk);
  endtask

  // output checker: every out_valid must match the oldest expected result
  int lat_errors = 0;
  always @(posedge clk) if (rst_n && out_valid) begin
    longint e[4];
    bit eo;
    for (int i = 0; i < 4; i++) e[i] = exp_q.pop_front();
    eo = exp_o.pop_front();
    checks++;
    if (x_re != W'(e[0]) || x_im != W'(e[1]) || y_re != W'(e[2]) || y_im != W'(e[3]) || ovf != eo) begin
      failures++;
      if (failures < 10) $display("FAIL got %0d %0d %0d %0d ovf %0d exp %0d %0d %0d %0d %0d",
                                  x_re, x_im, y_re, y_im, ovf, e[0], e[1], e[2], e[3], eo);
    end
  end

  initial begin
    longint one, big;
    one = longint'(1) <<< (TW - 2);
    big = (longint'(1) <<< (W - 1)) - 1;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // latency: one isolated butterfly, valid must come 2 clocks later
    apply(100, -7, 33, 12, one, 0, 1'b0, 1'b0);
    in_valid <= 1'b0;
    checks++;
    if (out_valid) failures++;
    @(posedge clk);
    #1 checks++;
    if (!out_valid) begin failures++; $display("FAIL latency"); end
    @(posedge clk);
    // corner cases: saturation both ways, -1 twiddle, halving of odd values
    apply(big, -big - 1, big, -big - 1, one, 0, 1'b0, 1'b0);
    apply(big, -big - 1, big, -big - 1, one, 0, 1'b0, 1'b1);
    apply(3, -3, 0, 0, one, 0, 1'b0, 1'b1);
    apply(1, -1, 2, 5, 0, -one, 1'b1, 1'b1);
    // random, back to back
    for (int i = 0; i < 3000; i++) begin
      longint rng;
      rng = (i % 3 == 0) ? big : 65535;
      apply($signed($urandom) % (rng + 1), $signed($urandom) % (rng + 1),
            $signed($urandom) % (rng + 1), $signed($urandom) % (rng + 1),
            $signed($urandom) % (one + 1), $signed($urandom) % (one + 1),
            1'($urandom), 1'($urandom));
    end
    in_valid <= 1'b0;
    repeat (4) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || n_sat == 0) begin failures++; $display("FAIL leftover or no saturation"); end
    $display("saturating cases: %0d left %0d", n_sat, exp_q.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
