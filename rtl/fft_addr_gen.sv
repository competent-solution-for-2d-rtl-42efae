// Read address generator of the in-place radix-2 FFT core.
//
// For stage s (0 .. log2(N)-1) and butterfly b (0 .. N/2-1) of a
// decimation-in-time FFT on bit-reversed input, the two operands sit at
//   A = (b >> s) * 2^(s+1) + (b mod 2^s)   and   B = A + 2^s,
// and the twiddle exponent is k = (b mod 2^s) * N / 2^(s+1).
// The in-place memory is split into two banks of N/2 words: a word at address
// a lives in bank parity(a) (XOR of its bits) at index a >> 1. A and B differ
// in one bit, so they always fall into different banks and one butterfly can
// read both operands in the same clock. The generator gives each bank's index,
// and swap = 1 when operand A is in bank 1; the read and write switches use
// swap to steer the words. Purely combinational.
// Operand order and twiddle indexing follow the radix-2 DIT flow. The
// parity-based bank split is this design's choice, since the two-bank memory
// is described only by its size.
module fft_addr_gen #(
  parameter int N = 32
) (
  input  logic [$clog2($clog2(N))-1:0] stage,
  input  logic [$clog2(N)-2:0]         bfly,
  output logic [$clog2(N)-2:0]         idx_bank0,
  output logic [$clog2(N)-2:0]         idx_bank1,
  output logic                         swap,
  output logic [$clog2(N)-2:0]         tw_idx
);
  localparam int LN = $clog2(N);

  logic [LN-1:0] addr_a, addr_b, low_mask;

  always_comb begin
    low_mask = (LN'(1) << stage) - LN'(1);
    addr_a   = ((LN'(bfly) & ~low_mask) << 1) | (LN'(bfly) & low_mask);
    addr_b   = addr_a | (LN'(1) << stage);
    swap     = ^addr_a;
    idx_bank0 = swap ? addr_b[LN-1:1] : addr_a[LN-1:1];
    idx_bank1 = swap ? addr_a[LN-1:1] : addr_b[LN-1:1];
    tw_idx   = (LN-1)'((bfly & low_mask[LN-2:0]) << (LN - 1 - int'(stage)));
  end
endmodule
