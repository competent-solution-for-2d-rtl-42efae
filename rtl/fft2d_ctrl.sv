// Frame controller of the 2D-FFT / 2D-IFFT engine.
//
// A state machine sequences one 1D FFT core over an N x N image held in the
// frame SRAM:
//   START        waits for 'start'.
//   INITIALISE   takes N*N pixels in row-major order (pix_valid / pix_ready).
//                Each pixel is multiplied by the scaling factor 2^SCALE_LOG2 to
//                keep fractional precision, and stored as a complex word with
//                zero imaginary part.
//   ROW_FFT      forward FFT of each row; results go back to the same row.
//   COL_FFT_IM   forward FFT of each column; results go back to the same
//                column. The SRAM now holds the 2D spectrum.
//   COL_IFFT     inverse FFT of each column, written back column-wise.
//   ROW_IFFT     inverse FFT of each row, written back row-wise. The SRAM now
//                holds the reconstructed image (still scaled by 2^SCALE_LOG2).
// Then 'done' pulses for one clock and the machine returns to START.
//
// For each line (row or column) the controller reads the N words from the
// SRAM on N consecutive clocks and hands them to the core (FEED). It then waits
// for the core's N output words and writes each one back to where it came from
// (COLLECT). FEED starts only when the core shows buf_ready. The SRAM has a
// single port; FEED reads and COLLECT writes never overlap.
//
// Every core output word is also offered on the res_* stream with the pass,
// line and index it belongs to. This is how the row spectra, the 2D spectrum
// and the reconstructed image leave the engine. One full operation takes
// N*N clocks of pixel input (if pix_valid stays high) plus 4*N line transforms
// of 2N + log2(N)*(N/2+3) + 2 clocks each (161 for N = 32).
//
// The state names, their order and the row/column order of the passes follow
// the published flow. The pixel input stream, the result stream, input
// scaling by a power of two and the FEED/COLLECT handshake are this design's
// own choices.
module fft2d_ctrl
  import fft2d_pkg::*;
#(
  parameter int N          = 32,
  parameter int W          = 32,
  parameter int PIX_W      = 8,
  parameter int SCALE_LOG2 = 8
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic                     pix_valid,
  input  logic [PIX_W-1:0]         pix_data,
  output logic                     pix_ready,
  output ctrl_state_t              state,
  output logic                     busy,
  output logic                     done,
  // frame SRAM
  output logic                     sram_en,
  output logic                     sram_we,
  output logic [2*$clog2(N)-1:0]   sram_addr,
  output logic [2*W-1:0]           sram_wdata,
  input  logic [2*W-1:0]           sram_rdata,
  // FFT core
  output logic                     core_inverse,
  output logic                     core_datai_valid,
  output logic signed [W-1:0]      core_datai_re,
  output logic signed [W-1:0]      core_datai_im,
  input  logic                     core_buf_ready,
  input  logic                     core_datao_valid,
  input  logic signed [W-1:0]      core_datao_re,
  input  logic signed [W-1:0]      core_datao_im,
  // result stream
  output logic                     res_valid,
  output ctrl_state_t              res_state,
  output logic [$clog2(N)-1:0]     res_line,
  output logic [$clog2(N)-1:0]     res_idx,
  output logic signed [W-1:0]      res_re,
  output logic signed [W-1:0]      res_im
);
  localparam int LN = $clog2(N);
  localparam int AW = 2 * LN;

  typedef enum logic {P_FEED, P_COLLECT} phase_t;

  phase_t        phase;
  logic [AW-1:0] icnt;       // pixel counter during INITIALISE
  logic [LN-1:0] line;       // current row or column
  logic [LN-1:0] fidx;       // next word to feed
  logic [LN-1:0] oidx;       // next word to collect
  logic          feed_v;     // SRAM read data valid (one clock after issue)

  logic is_pass, is_col, feed_issue, col_write, init_write, last_line;

  assign is_pass    = (state == S_ROW_FFT) || (state == S_COL_FFT_IM) ||
                      (state == S_COL_IFFT) || (state == S_ROW_IFFT);
  assign is_col     = (state == S_COL_FFT_IM) || (state == S_COL_IFFT);
  assign feed_issue = is_pass && (phase == P_FEED) && ((fidx != '0) || core_buf_ready);
  assign col_write  = is_pass && (phase == P_COLLECT) && core_datao_valid;
  assign pix_ready  = (state == S_INITIALISE);
  assign init_write = pix_ready && pix_valid;
  assign last_line  = (line == LN'(N - 1));

  function automatic logic [AW-1:0] line_addr(input logic col, input logic [LN-1:0] ln,
                                              input logic [LN-1:0] i);
    return col ? {i, ln} : {ln, i};
  endfunction

  // SRAM port
  always_comb begin
    sram_en    = init_write || feed_issue || col_write;
    sram_we    = init_write || col_write;
    sram_addr  = '0;
    sram_wdata = '0;
    if (init_write) begin
      sram_addr  = icnt;
      sram_wdata = {W'(pix_data) << SCALE_LOG2, W'(0)};
    end else if (col_write) begin
      sram_addr  = line_addr(is_col, line, oidx);
      sram_wdata = {core_datao_re, core_datao_im};
    end else if (feed_issue) begin
      sram_addr  = line_addr(is_col, line, fidx);
    end
  end

  // core input
  assign core_inverse     = (state == S_COL_IFFT) || (state == S_ROW_IFFT);
  assign core_datai_valid = feed_v;
  assign core_datai_re    = sram_rdata[2*W-1:W];
  assign core_datai_im    = sram_rdata[W-1:0];

  // result stream
  assign res_valid = col_write;
  assign res_state = state;
  assign res_line  = line;
  assign res_idx   = oidx;
  assign res_re    = core_datao_re;
  assign res_im    = core_datao_im;

  assign busy = (state != S_START);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_START;
      phase  <= P_FEED;
      icnt   <= '0;
      line   <= '0;
      fidx   <= '0;
      oidx   <= '0;
      feed_v <= 1'b0;
      done   <= 1'b0;
    end else begin
      feed_v <= feed_issue;
      done   <= 1'b0;
      unique case (state)
        S_START: if (start) begin
          state <= S_INITIALISE;
          icnt  <= '0;
        end
        S_INITIALISE: if (pix_valid) begin
          icnt <= icnt + 1'b1;
          if (icnt == AW'(N * N - 1)) begin
            state <= S_ROW_FFT;
            phase <= P_FEED;
            line  <= '0;
            fidx  <= '0;
            oidx  <= '0;
          end
        end
        default: begin  // the four transform passes
          if (phase == P_FEED) begin
            if (feed_issue) begin
              fidx <= fidx + 1'b1;
              if (fidx == LN'(N - 1)) phase <= P_COLLECT;
            end
          end else if (core_datao_valid) begin
            oidx <= oidx + 1'b1;
            if (oidx == LN'(N - 1)) begin
              phase <= P_FEED;
              line  <= line + 1'b1;
              if (last_line) begin
                unique case (state)
                  S_ROW_FFT:    state <= S_COL_FFT_IM;
                  S_COL_FFT_IM: state <= S_COL_IFFT;
                  S_COL_IFFT:   state <= S_ROW_IFFT;
                  default: begin
                    state <= S_START;
                    done  <= 1'b1;
                  end
                endcase
              end
            end
          end
        end
      endcase
    end
  end

  // The core must be ready for every word the controller hands it.
  a_feed_accepted: assert property (@(posedge clk) disable iff (!rst_n)
    core_datai_valid |-> core_buf_ready);
endmodule
