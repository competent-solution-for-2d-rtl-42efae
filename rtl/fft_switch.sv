// Two-way crossbar used as the read switch and the write switch of the FFT
// core. With swap = 0, in0 goes to out0 and in1 to out1; with swap = 1 the two
// are exchanged. As read switch it turns (bank0, bank1) words into the
// butterfly operands (A, B); as write switch it turns the butterfly results
// (X, Y) back into (bank0, bank1) words. Combinational.
// The switches are named in the published core; this circuit is the simplest
// one that does what they are described to do.
module fft_switch #(
  parameter int DW = 64
) (
  input  logic          swap,
  input  logic [DW-1:0] in0,
  input  logic [DW-1:0] in1,
  output logic [DW-1:0] out0,
  output logic [DW-1:0] out1
);
  always_comb begin
    out0 = swap ? in1 : in0;
    out1 = swap ? in0 : in1;
  end
endmodule
