// Iterative CORDIC that computes one twiddle factor W_N^k = cos(2*pi*k/N)
// - j*sin(2*pi*k/N) for 0 <= k < N/2.
//
// Angles are binary fractions of a full turn, so 2*pi*k/N is exactly k in
// units of 1/N turn. For k >= N/4 the unit rotates by the angle minus a
// quarter turn and swaps the results (cos t = -sin(t - pi/2),
// sin t = cos(t - pi/2)), which keeps the CORDIC inside its range of
// convergence. The vector starts at (K, 0), K being the inverse CORDIC gain, and
// is rotated by +-atan(2^-i) for i = 0 .. ITER-1, one step per clock. The
// datapath carries G guard bits below the TW-2 fraction bits of the result,
// and rounds them off at the end. The arctangent table and K are computed during
// elaboration.
//
// Interface: pulse 'start' with k; 'done' pulses ITER+1 clocks later with
// w_re (cos) and w_im (-sin), signed with TW-2 fraction bits (+1.0 = 2^(TW-2)).
// The results hold until the next start. The source says only that the
// twiddle factors are computed automatically at power-on; using CORDIC, with
// this precision and this timing, is this design's choice.
module twiddle_cordic #(
  parameter int N    = 32,
  parameter int TW   = 16,
  parameter int G    = 4,
  parameter int ITER = TW + G
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic [$clog2(N)-2:0] k,
  output logic                 done,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im
);
  localparam int LN = $clog2(N);
  localparam int XW = TW + G + 1;      // x/y width: sign, integer bit, fractions, spare
  localparam int FB = TW - 2 + G;      // fraction bits of x/y
  localparam int AW = 24;              // angle: 1 turn = 2^AW
  localparam real PI = 3.14159265358979323846;

  typedef logic signed [XW-1:0] xy_t;
  typedef logic signed [AW-1:0] ang_t;

  function automatic ang_t atan_turns(input int i);
    return ang_t'($rtoi($atan(2.0 ** (-i)) / (2.0 * PI) * (2.0 ** AW) + 0.5));
  endfunction

  function automatic real cordic_k();
    real kk;
    kk = 1.0;
    for (int i = 0; i < ITER; i++) kk = kk / $sqrt(1.0 + 2.0 ** (-2 * i));
    return kk;
  endfunction

  localparam xy_t X0 = xy_t'($rtoi(cordic_k() * (2.0 ** FB) + 0.5));

  ang_t atan_tab [ITER];
  for (genvar i = 0; i < ITER; i++) begin : g_atan
    localparam ang_t A = atan_turns(i);
    assign atan_tab[i] = A;
  end

  xy_t  x, y;
  ang_t z;
  logic busy, quad;
  logic [$clog2(ITER+1)-1:0] it;

  // final rounding from FB to TW-2 fraction bits
  function automatic logic signed [TW-1:0] rnd(input xy_t v);
    xy_t r;
    r = (v + (xy_t'(1) <<< (G - 1))) >>> G;
    return r[TW-1:0];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      done <= 1'b0;
      quad <= 1'b0;
      it   <= '0;
      x    <= '0;
      y    <= '0;
      z    <= '0;
      w_re <= '0;
      w_im <= '0;
    end else begin
      done <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        it   <= '0;
        x    <= X0;
        y    <= '0;
        quad <= k[LN-2];                 // k >= N/4: angle beyond a quarter turn
        z    <= ang_t'({1'b0, k[LN-3:0]}) << (AW - LN);
      end else if (busy) begin
        if (it == ($clog2(ITER+1))'(ITER)) begin
          busy <= 1'b0;
          done <= 1'b1;
          // t < pi/2: W = cos t - j sin t;  otherwise use the quarter-turn swap
          w_re <= quad ? -rnd(y) : rnd(x);
          w_im <= quad ? -rnd(x) : -rnd(y);
        end else begin
          if (!z[AW-1]) begin
            x <= x - (y >>> it);
            y <= y + (x >>> it);
            z <= z - atan_tab[it];
          end else begin
            x <= x + (y >>> it);
            y <= y - (x >>> it);
            z <= z + atan_tab[it];
          end
          it <= it + 1'b1;
        end
      end
    end
  end
endmodule
