// In-place radix-2 FFT / IFFT core, one frame of N complex points at a time.
//
// After reset the twiddle table fills itself (see twiddle_lut); buf_ready stays
// low until it is complete, 384 clocks for N = 32. Then a frame passes through
// three phases.
//  LOAD   : buf_ready is high. Each word offered with datai_valid is written to
//           the in-place memory at the bit-reversed position of its index. The
//           core starts on its own once N words are in.
//  CALC   : log2(N) stages run one after the other. In each stage the read
//           address generator walks the N/2 butterflies. Both operands come
//           out of the two RAM banks in the same clock, through the read switch,
//           with the twiddle from the LUT. The butterfly result goes back
//           through the write switch to the same two addresses (in place). One
//           butterfly is issued per clock. After the last one the stage waits
//           3 clocks for the pipeline to drain before the next stage reads.
//  UNLOAD : the transform leaves in natural order, one word per clock on
//           datao_valid/datao_re/datao_im, then the core returns to LOAD.
// Timing, with one input word per clock: the first output word appears
// N + log2(N)*(N/2+3) + 1 clocks after the first input word (128 for N = 32),
// the others follow on consecutive clocks, and buf_ready rises again with the
// last output word, so a frame takes 2N + log2(N)*(N/2+3) clocks (159 for
// N = 32). The consumer must take every output word; there is no back-pressure.
//
// Direction and scaling: 'inverse' is sampled with the first input word of a
// frame; an inverse frame conjugates the twiddles. Every butterfly result of
// one direction is halved, which divides that transform by N, so a forward
// frame followed by an inverse frame returns the input:
//   FWD_SCALE = 0 : forward output is the DFT, inverse output is the IDFT
//                   (1/N included). Best precision; the words must hold the
//                   growth of the forward transform (log2(N) bits per 1D pass).
//   FWD_SCALE = 1 : forward output is DFT/N, inverse output is N*IDFT. Words
//                   never outgrow the input range, for narrow data widths.
// ovflow_flag reports a saturated butterfly result anywhere in the last frame;
// it is cleared when the next frame starts.
//
// The frame-wise flow, the two banks of N/2 words, read and write switches,
// address generator, twiddle LUT and start-after-one-frame behaviour follow
// the published core. Port names, the bank mapping, the scaling scheme and the
// pipeline timing are this design's own choices.
module fft_core
  import fft2d_pkg::*;
#(
  parameter int N  = 32,
  parameter int W  = 32,
  parameter int TW = 16,
  parameter bit FWD_SCALE = 1'b0
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                inverse,
  input  logic                datai_valid,
  input  logic signed [W-1:0] datai_re,
  input  logic signed [W-1:0] datai_im,
  output logic                buf_ready,
  output logic                datao_valid,
  output logic signed [W-1:0] datao_re,
  output logic signed [W-1:0] datao_im,
  output logic                ovflow_flag
);
  localparam int LN = $clog2(N);
  localparam int SB = $clog2(LN);
  localparam int BI = LN - 1;       // bank index width
  localparam int DW = 2 * W;

  typedef enum logic [1:0] {C_LOAD, C_CALC, C_DRAIN, C_UNLOAD} core_state_t;
  core_state_t st;

  logic [LN-1:0] cnt;
  logic [SB-1:0] stage;
  logic [BI-1:0] bfly;
  logic          inv_q;

  // ---------------- address generation ----------------
  logic [BI-1:0] ag_i0, ag_i1, ag_tw;
  logic          ag_swap;

  fft_addr_gen #(.N(N)) u_addr (
    .stage(stage), .bfly(bfly),
    .idx_bank0(ag_i0), .idx_bank1(ag_i1), .swap(ag_swap), .tw_idx(ag_tw)
  );

  logic signed [TW-1:0] w_re, w_im;
  logic                 tw_ready;
  twiddle_lut #(.N(N), .TW(TW)) u_tw (
    .clk(clk), .rst_n(rst_n), .idx(ag_tw), .w_re(w_re), .w_im(w_im), .ready(tw_ready));

  // ---------------- in-place memory ----------------
  logic          we0, we1;
  logic [BI-1:0] wa0, wa1, ra0, ra1;
  logic [DW-1:0] wd0, wd1, rd0, rd1;

  inplace_ram #(.DEPTH(N/2), .DW(DW)) u_bank0 (
    .clk(clk), .we(we0), .waddr(wa0), .wdata(wd0), .raddr(ra0), .rdata(rd0));
  inplace_ram #(.DEPTH(N/2), .DW(DW)) u_bank1 (
    .clk(clk), .we(we1), .waddr(wa1), .wdata(wd1), .raddr(ra1), .rdata(rd1));

  // ---------------- pipeline bookkeeping ----------------
  // p0: RAM/LUT outputs valid, p1: butterfly stage 1, p2: butterfly output.
  logic          p0_v, p1_v;
  logic          p0_swap, p1_swap, p2_swap;
  logic [BI-1:0] p0_i0, p1_i0, p2_i0, p0_i1, p1_i1, p2_i1;
  logic          issue;

  assign issue = (st == C_CALC);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p0_v <= 1'b0;
      p1_v <= 1'b0;
    end else begin
      p0_v <= issue;
      p1_v <= p0_v;
    end
  end

  always_ff @(posedge clk) begin
    p0_swap <= ag_swap;  p0_i0 <= ag_i0;  p0_i1 <= ag_i1;
    p1_swap <= p0_swap;  p1_i0 <= p0_i0;  p1_i1 <= p0_i1;
    p2_swap <= p1_swap;  p2_i0 <= p1_i0;  p2_i1 <= p1_i1;
  end

  // ---------------- read switch + butterfly + write switch ----------------
  logic [DW-1:0] op_a, op_b;
  fft_switch #(.DW(DW)) u_rd_switch (
    .swap(p0_swap), .in0(rd0), .in1(rd1), .out0(op_a), .out1(op_b));

  logic                bf_v, bf_ovf;
  logic signed [W-1:0] x_re, x_im, y_re, y_im;
  fft_butterfly #(.W(W), .TW(TW)) u_bfly (
    .clk(clk), .rst_n(rst_n), .in_valid(p0_v), .conj(inv_q), .halve(inv_q ^ FWD_SCALE),
    .a_re(op_a[DW-1:W]), .a_im(op_a[W-1:0]), .b_re(op_b[DW-1:W]), .b_im(op_b[W-1:0]),
    .w_re(w_re), .w_im(w_im),
    .out_valid(bf_v), .x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im), .ovf(bf_ovf));

  logic [DW-1:0] bw0, bw1;
  fft_switch #(.DW(DW)) u_wr_switch (
    .swap(p2_swap), .in0({x_re, x_im}), .in1({y_re, y_im}), .out0(bw0), .out1(bw1));

  // ---------------- memory port multiplexing ----------------
  logic [LN-1:0] ld_addr;
  logic          load_fire;

  assign load_fire = buf_ready && datai_valid;
  assign ld_addr   = LN'(bitrev(16'(cnt), LN));

  always_comb begin
    if (st == C_LOAD) begin
      we0 = load_fire && !(^ld_addr);
      we1 = load_fire &&  (^ld_addr);
      wa0 = ld_addr[LN-1:1];
      wa1 = ld_addr[LN-1:1];
      wd0 = {datai_re, datai_im};
      wd1 = {datai_re, datai_im};
    end else begin
      we0 = bf_v;
      we1 = bf_v;
      wa0 = p2_i0;
      wa1 = p2_i1;
      wd0 = bw0;
      wd1 = bw1;
    end
    if (st == C_UNLOAD) begin
      ra0 = cnt[LN-1:1];
      ra1 = cnt[LN-1:1];
    end else begin
      ra0 = ag_i0;
      ra1 = ag_i1;
    end
  end

  // ---------------- frame sequencer ----------------
  logic out_sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st          <= C_LOAD;
      cnt         <= '0;
      stage       <= '0;
      bfly        <= '0;
      inv_q       <= 1'b0;
      ovflow_flag <= 1'b0;
      datao_valid <= 1'b0;
      out_sel     <= 1'b0;
    end else begin
      datao_valid <= (st == C_UNLOAD);
      out_sel     <= ^cnt;
      if (bf_ovf) ovflow_flag <= 1'b1;
      unique case (st)
        C_LOAD: if (load_fire) begin
          if (cnt == '0) begin
            inv_q       <= inverse;
            ovflow_flag <= 1'b0;
          end
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) begin
            st    <= C_CALC;
            stage <= '0;
            bfly  <= '0;
          end
        end
        C_CALC: begin
          bfly <= bfly + 1'b1;
          if (bfly == BI'(N/2 - 1)) st <= C_DRAIN;
        end
        C_DRAIN: if (!p0_v && !p1_v) begin
          // the last write of the stage happens in this clock
          if (stage == SB'(LN - 1)) begin
            st  <= C_UNLOAD;
            cnt <= '0;
          end else begin
            st    <= C_CALC;
            stage <= stage + 1'b1;
            bfly  <= '0;
          end
        end
        C_UNLOAD: begin
          cnt <= cnt + 1'b1;
          if (cnt == LN'(N - 1)) st <= C_LOAD;
        end
        default: st <= C_LOAD;
      endcase
    end
  end

  assign buf_ready = (st == C_LOAD) && tw_ready;
  assign datao_re  = out_sel ? rd1[DW-1:W] : rd0[DW-1:W];
  assign datao_im  = out_sel ? rd1[W-1:0]  : rd0[W-1:0];

  // Input words are only taken while the buffer is ready.
  a_input_when_ready: assert property (@(posedge clk) disable iff (!rst_n)
    datai_valid |-> buf_ready);
endmodule
