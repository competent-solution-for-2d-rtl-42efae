// Twiddle factor look-up table of the FFT core, filled by itself after reset.
//
// The table holds W_N^k = cos(2*pi*k/N) - j*sin(2*pi*k/N) for k = 0 .. N/2-1,
// which are all the factors a radix-2 decimation-in-time FFT uses. After reset
// a sequencer runs the CORDIC unit (twiddle_cordic) once per entry and writes
// the results into the table. 'ready' rises when all N/2 entries are written,
// N/2 * (ITER + 4) clocks after reset (384 for N = 32, TW = 16), and stays high.
// Values are signed with TW-2 fraction bits, so +1.0 = 2^(TW-2).
//
// Read port: idx is the exponent k; w_re / w_im are registered and appear one
// clock after idx, matching the read latency of the in-place RAM banks. Reads
// before 'ready' return unfilled entries.
// A table the core computes automatically at power-on follows the source. The
// fill sequence, the CORDIC method and the word length are this design's
// choices.
module twiddle_lut #(
  parameter int N  = 32,
  parameter int TW = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [$clog2(N)-2:0] idx,
  output logic signed [TW-1:0] w_re,
  output logic signed [TW-1:0] w_im,
  output logic                 ready
);
  localparam int KW = $clog2(N) - 1;

  logic [2*TW-1:0] table_mem [N/2];

  logic                 c_start, c_done;
  logic signed [TW-1:0] c_re, c_im;
  logic [KW-1:0]        k;
  logic                 running;

  twiddle_cordic #(.N(N), .TW(TW)) u_cordic (
    .clk(clk), .rst_n(rst_n), .start(c_start), .k(k),
    .done(c_done), .w_re(c_re), .w_im(c_im));

  // fill sequencer: start entry k, wait for done, write, next k
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k       <= '0;
      c_start <= 1'b0;
      running <= 1'b0;
      ready   <= 1'b0;
    end else begin
      c_start <= 1'b0;
      if (!ready && !running) begin
        c_start <= 1'b1;
        running <= 1'b1;
      end else if (running && c_done) begin
        running <= 1'b0;
        k       <= k + 1'b1;
        if (k == KW'(N/2 - 1)) ready <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (running && c_done) table_mem[k] <= {c_re, c_im};
    w_re <= table_mem[idx][2*TW-1:TW];
    w_im <= table_mem[idx][TW-1:0];
  end
endmodule
