// 2D-FFT and 2D-IFFT engine for N x N images.
//
// The 2D transform is split into 1D transforms: one radix-2 FFT core
// transforms the rows of the image, then its columns, and (as an inverse
// transform) the columns and rows of the spectrum again. A single frame SRAM
// holds the image and every intermediate result in place. The frame controller
// moves each row or column between the SRAM and the core.
//
// Interface
//   start               begins one operation (accepted in state START).
//   pix_valid/pix_ready/pix_data   N*N unsigned pixels, row-major.
//   res_*               every 1D transform result word: the pass it belongs to
//                       (res_state), row or column number (res_line) and
//                       position in that line (res_idx). COL_FFT_IM words
//                       form the 2D spectrum of the scaled image (divided by
//                       N*N if FWD_SCALE = 1). ROW_IFFT words are the
//                       reconstructed pixels, scaled by 2^SCALE_LOG2.
//   state, busy, done   progress; done pulses when the image is reconstructed.
//   ovflow_flag         a butterfly of the last line transform saturated.
// Defaults: N = 32 (32 x 32 image, 32-point core), 32-bit data, scaling
// factor 256 (SCALE_LOG2 = 8), as evaluated in the source. Twiddle width,
// pixel width and where the 1/N scaling happens (FWD_SCALE, see fft_core) are
// this design's choices. With 16-bit data set FWD_SCALE = 1 and a scaling
// factor of at most 128 (SCALE_LOG2 = 7), so that pixels fit the word.
module fft2d_top
  import fft2d_pkg::*;
#(
  parameter int N          = 32,
  parameter int W          = 32,
  parameter int TW         = 16,
  parameter int PIX_W      = 8,
  parameter int SCALE_LOG2 = 8,
  parameter bit FWD_SCALE  = 1'b0
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 pix_valid,
  input  logic [PIX_W-1:0]     pix_data,
  output logic                 pix_ready,
  output ctrl_state_t          state,
  output logic                 busy,
  output logic                 done,
  output logic                 res_valid,
  output ctrl_state_t          res_state,
  output logic [$clog2(N)-1:0] res_line,
  output logic [$clog2(N)-1:0] res_idx,
  output logic signed [W-1:0]  res_re,
  output logic signed [W-1:0]  res_im,
  output logic                 ovflow_flag
);
  localparam int LN = $clog2(N);

  logic                sram_en, sram_we;
  logic [2*LN-1:0]     sram_addr;
  logic [2*W-1:0]      sram_wdata, sram_rdata;
  logic                c_inv, c_iv, c_ready, c_ov;
  logic signed [W-1:0] c_ire, c_iim, c_ore, c_oim;

  fft2d_ctrl #(.N(N), .W(W), .PIX_W(PIX_W), .SCALE_LOG2(SCALE_LOG2)) u_ctrl (
    .clk(clk), .rst_n(rst_n), .start(start),
    .pix_valid(pix_valid), .pix_data(pix_data), .pix_ready(pix_ready),
    .state(state), .busy(busy), .done(done),
    .sram_en(sram_en), .sram_we(sram_we), .sram_addr(sram_addr),
    .sram_wdata(sram_wdata), .sram_rdata(sram_rdata),
    .core_inverse(c_inv), .core_datai_valid(c_iv), .core_datai_re(c_ire),
    .core_datai_im(c_iim), .core_buf_ready(c_ready), .core_datao_valid(c_ov),
    .core_datao_re(c_ore), .core_datao_im(c_oim),
    .res_valid(res_valid), .res_state(res_state), .res_line(res_line),
    .res_idx(res_idx), .res_re(res_re), .res_im(res_im));

  frame_sram #(.N(N), .DW(2 * W)) u_sram (
    .clk(clk), .en(sram_en), .we(sram_we), .addr(sram_addr),
    .wdata(sram_wdata), .rdata(sram_rdata));

  fft_core #(.N(N), .W(W), .TW(TW), .FWD_SCALE(FWD_SCALE)) u_core (
    .clk(clk), .rst_n(rst_n), .inverse(c_inv),
    .datai_valid(c_iv), .datai_re(c_ire), .datai_im(c_iim), .buf_ready(c_ready),
    .datao_valid(c_ov), .datao_re(c_ore), .datao_im(c_oim), .ovflow_flag(ovflow_flag));
endmodule
