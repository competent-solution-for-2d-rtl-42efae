// Shared types for the 2D-FFT / 2D-IFFT engine.
//
// ctrl_state_t is the top-level sequence of the frame controller. An image is
// loaded, transformed row by row and then column by column, inverse
// transformed column by column and finally row by row. The state names follow
// the published state machine. The numeric encoding is this design's choice.
// The package also holds the bit-reversal helper that the FFT core uses to
// place input samples for the decimation-in-time flow.
package fft2d_pkg;

  typedef enum logic [2:0] {
    S_START      = 3'd0,  // idle, waiting for start
    S_INITIALISE = 3'd1,  // image pixels are scaled and written to the frame SRAM
    S_ROW_FFT    = 3'd2,  // forward 1D FFT of every row
    S_COL_FFT_IM = 3'd3,  // forward 1D FFT of every column (2D spectrum complete)
    S_COL_IFFT   = 3'd4,  // inverse 1D FFT of every column
    S_ROW_IFFT   = 3'd5   // inverse 1D FFT of every row (image reconstructed)
  } ctrl_state_t;

  // Reverse the low 'bits' bits of v.
  function automatic logic [15:0] bitrev(input logic [15:0] v, input int bits);
    logic [15:0] r;
    r = '0;
    for (int i = 0; i < bits; i++) r[i] = v[bits-1-i];
    return r;
  endfunction

endpackage
