// Exhaustive check of the read address generator for N = 32 and N = 8.
// For every stage and butterfly it rebuilds the two operand addresses from
// the bank indices and the swap bit and checks them against the textbook
// radix-2 DIT pairing (operands 2^s apart, twiddle exponent
// (b mod 2^s) * N / 2^(s+1)); it also checks that each stage touches every
// address exactly once, so the two-bank in-place scheme is conflict-free.
module tb_fft_addr_gen;
  int checks = 0, failures = 0;

  logic [2:0] st32; logic [3:0] bf32; logic [3:0] i0_32, i1_32, tw32; logic sw32;
  fft_addr_gen #(.N(32)) dut32 (.stage(st32), .bfly(bf32), .idx_bank0(i0_32),
                                .idx_bank1(i1_32), .swap(sw32), .tw_idx(tw32));
  logic [1:0] st8; logic [1:0] bf8; logic [1:0] i0_8, i1_8, tw8; logic sw8;
  fft_addr_gen #(.N(8)) dut8 (.stage(st8), .bfly(bf8), .idx_bank0(i0_8),
                              .idx_bank1(i1_8), .swap(sw8), .tw_idx(tw8));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // rebuild the full address held at index idx of bank 'bank'
  function automatic int full_addr(int idx, int bank);
    int a0;
    a0 = idx << 1;
    return ($countones(a0) % 2 == bank) ? a0 : (a0 | 1);
  endfunction

  task automatic check_one(int n, int s, int b, int i0, int i1, int sw, int tw);
    int ea, eb, ek, ga, gb;
    bit [63:0] dummy;
    ea = ((b >> s) << (s + 1)) | (b & ((1 << s) - 1));
    eb = ea + (1 << s);
    ek = (b & ((1 << s) - 1)) * (n >> (s + 1));
    ga = sw ? full_addr(i1, 1) : full_addr(i0, 0);
    gb = sw ? full_addr(i0, 0) : full_addr(i1, 1);
    checks++;
    if (ga != ea || gb != eb || tw != ek) begin
      failures++;
      $display("FAIL N=%0d s=%0d b=%0d got A=%0d B=%0d k=%0d exp %0d %0d %0d", n, s, b, ga, gb, tw, ea, eb, ek);
    end
  endtask

  initial begin
    for (int s = 0; s < 5; s++) begin
      bit [31:0] seen;
      seen = '0;
      for (int b = 0; b < 16; b++) begin
        st32 = 3'(s); bf32 = 4'(b);
        #1;
        check_one(32, s, b, i0_32, i1_32, sw32, tw32);
        seen[full_addr(i0_32, 0)] = 1'b1;
        seen[full_addr(i1_32, 1)] = 1'b1;
      end
      checks++;
      if (seen != '1) begin failures++; $display("FAIL coverage stage %0d", s); end
    end
    for (int s = 0; s < 3; s++)
      for (int b = 0; b < 4; b++) begin
        st8 = 2'(s); bf8 = 2'(b);
        #1;
        check_one(8, s, b, i0_8, i1_8, sw8, tw8);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
