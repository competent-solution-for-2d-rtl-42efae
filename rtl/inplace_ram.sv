// One bank of the FFT core's in-place memory.
//
// A simple dual-port RAM of DEPTH words of DW bits: one write port and one
// read port, both synchronous to clk. rdata shows the word at raddr one clock
// after raddr is presented. A read of the address being written in the same
// clock returns the old word. There is no reset; the core never reads a word
// it has not written in the current frame. The FFT core uses two of these
// banks of N/2 complex words each. Two banks of N/2 words follow the published
// core; the port arrangement is this design's choice.
module inplace_ram #(
  parameter int DEPTH = 16,
  parameter int DW    = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [DW-1:0]            wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [DW-1:0]            rdata
);
  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
