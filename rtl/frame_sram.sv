// Frame store for one N x N image of complex words.
//
// Single-port synchronous SRAM of N*N words of DW bits (real part in the upper
// half, imaginary part in the lower half). The address is row * N + column.
// With en = 1 and we = 1 the word is written at the clock edge. With en = 1 and
// we = 0 it is read, and rdata holds it from the next clock until the next
// read. The image, the row transforms, the 2D spectrum and the reconstructed
// image all live here in turn, each overwriting the one before. A single SRAM
// reused in place by every pass follows the published flow; the single port
// and the one-clock read latency are this design's choices.
module frame_sram #(
  parameter int N  = 32,
  parameter int DW = 64
) (
  input  logic                     clk,
  input  logic                     en,
  input  logic                     we,
  input  logic [2*$clog2(N)-1:0]   addr,
  input  logic [DW-1:0]            wdata,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [N*N];

  always_ff @(posedge clk) begin
    if (en) begin
      if (we) mem[addr] <= wdata;
      else    rdata     <= mem[addr];
    end
  end
endmodule
