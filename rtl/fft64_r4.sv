// fft64_r4: 64-point radix-4 FFT/IFFT processor built from frame memories.
//
// Data flow (one frame = 64 complex samples):
//   stream in -> fft_loader -> memory X -> stage 1 (R4) -> X1 -> stage 2 (R4) -> X2
//   -> stage 3 (R4) -> X3 -> reorder_unit -> Y -> fft_unloader -> stream out
// Each stage holds one radix-4 butterfly and uses it 16 times per frame, four words
// in and four words out per clock. The stages work on successive frames at the same
// time, so up to five frames are in flight. Each memory carries a full flag: a unit
// starts when its source is full and its destination empty, and a unit waiting on a
// full destination is stalled. Two overlaps keep the rate at one sample per clock:
// stage 1 releases X with its first butterfly (its reads stay ahead of the loader's
// writes), and the reorder unit refills Y in natural order right behind the
// unloader's read pointer. Twiddle factors come from constant logic, not a ROM.
//
// Number format: input IN_W-bit signed integers; every stage grows the word by three
// bits (two for the 4-term sum, one for the twiddle rotation), so the output is
// IN_W+9 bits and never overflows; no scaling is applied. Twiddles have TW_W bits with
// 1.0 = 2^(TW_W-2). Forward: out[k] = sum_n in[n] * exp(-j*2*pi*n*k/64), with the
// rounding of stages 2 and 3. Inverse (s_inverse_i high on a frame's first sample):
// real and imaginary parts are swapped at input and output, giving 64 times the
// inverse DFT.
//
// Timing: input and output one sample per clock, sustained: with a producer and a
// consumer that are always ready a frame enters and leaves every 64 clocks. A frame's
// first output word is valid 4*16+1 = 65 clocks after its last input sample was
// accepted (three stages and the reorder step of 16 clocks each, one clock to fill Y).
// The block structure (memories X..Y, three R4 stages, reorder, twiddles without ROM,
// IFFT by swapping) and the rate of one sample per clock follow the processor
// description; word lengths, the stream handshake, the memory full flags and the two
// overlaps are this design's choices.
module fft64_r4
  import fft_pkg::*;
#(
  parameter int unsigned IN_W = 8,
  parameter int unsigned TW_W = 12,
  localparam int unsigned OUT_W = IN_W + 9
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // input stream, natural time order
  input  logic                    s_valid_i,
  output logic                    s_ready_o,
  input  logic signed [IN_W-1:0]  s_re_i,
  input  logic signed [IN_W-1:0]  s_im_i,
  input  logic                    s_inverse_i,
  // output stream, natural frequency order
  output logic                    m_valid_o,
  input  logic                    m_ready_i,
  output logic signed [OUT_W-1:0] m_re_o,
  output logic signed [OUT_W-1:0] m_im_o,
  output logic                    m_last_o,
  output logic                    m_inverse_o,
  // busy flags of stage 1, 2, 3 and the reorder unit
  output logic [3:0]              busy_o
);

  localparam int unsigned W0 = IN_W;
  localparam int unsigned W1 = IN_W + 3;
  localparam int unsigned W2 = IN_W + 6;
  localparam int unsigned W3 = IN_W + 9;

  // ---------------------------------------------------------------- memory X
  logic                 x_we;
  addr_t                x_waddr [1];
  logic signed [W0-1:0] x_wre [1], x_wim [1];
  addr_t                x_raddr [4];
  logic signed [W0-1:0] x_rre [4], x_rim [4];
  logic                 x_fill, x_drain, x_full;
  dir_e                 x_dir_in, x_dir;

  fft_loader #(.W(W0)) u_loader (
    .clk, .rst_n,
    .s_valid_i, .s_ready_o, .s_re_i, .s_im_i, .s_inverse_i,
    .x_full_i(x_full), .x_drain_i(x_drain), .x_we_o(x_we), .x_addr_o(x_waddr[0]),
    .x_re_o(x_wre[0]), .x_im_o(x_wim[0]), .x_fill_o(x_fill), .x_dir_o(x_dir_in)
  );

  frame_mem #(.W(W0), .N(N), .NRD(4), .NWR(1)) u_mem_x (
    .clk, .rst_n,
    .we_i(x_we), .waddr_i(x_waddr), .wre_i(x_wre), .wim_i(x_wim),
    .raddr_i(x_raddr), .rre_o(x_rre), .rim_o(x_rim),
    .fill_i(x_fill), .dir_i(x_dir_in), .drain_i(x_drain),
    .full_o(x_full), .dir_o(x_dir)
  );

  // ---------------------------------------------------------------- stage 1 -> X1
  logic [3:0]           x1_we;
  addr_t                x1_waddr [4];
  logic signed [W1-1:0] x1_wre [4], x1_wim [4];
  addr_t                x1_raddr [4];
  logic signed [W1-1:0] x1_rre [4], x1_rim [4];
  logic                 x1_fill, x1_drain, x1_full;
  dir_e                 x1_dir_in, x1_dir;

  fft_stage #(.STAGE(0), .IN_W(W0), .TW_W(TW_W), .EARLY_DRAIN(1'b1)) u_stage1 (
    .clk, .rst_n,
    .src_full_i(x_full), .src_dir_i(x_dir), .src_addr_o(x_raddr),
    .src_re_i(x_rre), .src_im_i(x_rim), .src_drain_o(x_drain),
    .dst_full_i(x1_full), .dst_we_o(x1_we), .dst_addr_o(x1_waddr),
    .dst_re_o(x1_wre), .dst_im_o(x1_wim), .dst_fill_o(x1_fill), .dst_dir_o(x1_dir_in),
    .busy_o(busy_o[0])
  );

  frame_mem #(.W(W1), .N(N), .NRD(4), .NWR(4)) u_mem_x1 (
    .clk, .rst_n,
    .we_i(x1_we), .waddr_i(x1_waddr), .wre_i(x1_wre), .wim_i(x1_wim),
    .raddr_i(x1_raddr), .rre_o(x1_rre), .rim_o(x1_rim),
    .fill_i(x1_fill), .dir_i(x1_dir_in), .drain_i(x1_drain),
    .full_o(x1_full), .dir_o(x1_dir)
  );

  // ---------------------------------------------------------------- stage 2 -> X2
  logic [3:0]           x2_we;
  addr_t                x2_waddr [4];
  logic signed [W2-1:0] x2_wre [4], x2_wim [4];
  addr_t                x2_raddr [4];
  logic signed [W2-1:0] x2_rre [4], x2_rim [4];
  logic                 x2_fill, x2_drain, x2_full;
  dir_e                 x2_dir_in, x2_dir;

  fft_stage #(.STAGE(1), .IN_W(W1), .TW_W(TW_W)) u_stage2 (
    .clk, .rst_n,
    .src_full_i(x1_full), .src_dir_i(x1_dir), .src_addr_o(x1_raddr),
    .src_re_i(x1_rre), .src_im_i(x1_rim), .src_drain_o(x1_drain),
    .dst_full_i(x2_full), .dst_we_o(x2_we), .dst_addr_o(x2_waddr),
    .dst_re_o(x2_wre), .dst_im_o(x2_wim), .dst_fill_o(x2_fill), .dst_dir_o(x2_dir_in),
    .busy_o(busy_o[1])
  );

  frame_mem #(.W(W2), .N(N), .NRD(4), .NWR(4)) u_mem_x2 (
    .clk, .rst_n,
    .we_i(x2_we), .waddr_i(x2_waddr), .wre_i(x2_wre), .wim_i(x2_wim),
    .raddr_i(x2_raddr), .rre_o(x2_rre), .rim_o(x2_rim),
    .fill_i(x2_fill), .dir_i(x2_dir_in), .drain_i(x2_drain),
    .full_o(x2_full), .dir_o(x2_dir)
  );

  // ---------------------------------------------------------------- stage 3 -> X3
  logic [3:0]           x3_we;
  addr_t                x3_waddr [4];
  logic signed [W3-1:0] x3_wre [4], x3_wim [4];
  addr_t                x3_raddr [4];
  logic signed [W3-1:0] x3_rre [4], x3_rim [4];
  logic                 x3_fill, x3_drain, x3_full;
  dir_e                 x3_dir_in, x3_dir;

  fft_stage #(.STAGE(2), .IN_W(W2), .TW_W(TW_W)) u_stage3 (
    .clk, .rst_n,
    .src_full_i(x2_full), .src_dir_i(x2_dir), .src_addr_o(x2_raddr),
    .src_re_i(x2_rre), .src_im_i(x2_rim), .src_drain_o(x2_drain),
    .dst_full_i(x3_full), .dst_we_o(x3_we), .dst_addr_o(x3_waddr),
    .dst_re_o(x3_wre), .dst_im_o(x3_wim), .dst_fill_o(x3_fill), .dst_dir_o(x3_dir_in),
    .busy_o(busy_o[2])
  );

  frame_mem #(.W(W3), .N(N), .NRD(4), .NWR(4)) u_mem_x3 (
    .clk, .rst_n,
    .we_i(x3_we), .waddr_i(x3_waddr), .wre_i(x3_wre), .wim_i(x3_wim),
    .raddr_i(x3_raddr), .rre_o(x3_rre), .rim_o(x3_rim),
    .fill_i(x3_fill), .dir_i(x3_dir_in), .drain_i(x3_drain),
    .full_o(x3_full), .dir_o(x3_dir)
  );

  // ---------------------------------------------------------------- reorder -> Y
  logic [3:0]           y_we;
  addr_t                y_waddr [4];
  logic signed [W3-1:0] y_wre [4], y_wim [4];
  addr_t                y_raddr [1];
  logic signed [W3-1:0] y_rre [1], y_rim [1];
  logic                 y_fill, y_drain, y_full;
  logic [6:0]           y_used;
  dir_e                 y_dir_in, y_dir;

  reorder_unit #(.W(W3)) u_reorder (
    .clk, .rst_n,
    .src_full_i(x3_full), .src_dir_i(x3_dir), .src_addr_o(x3_raddr),
    .src_re_i(x3_rre), .src_im_i(x3_rim), .src_drain_o(x3_drain),
    .dst_full_i(y_full), .dst_used_i(y_used), .dst_we_o(y_we), .dst_addr_o(y_waddr),
    .dst_re_o(y_wre), .dst_im_o(y_wim), .dst_fill_o(y_fill), .dst_dir_o(y_dir_in),
    .busy_o(busy_o[3])
  );

  frame_mem #(.W(W3), .N(N), .NRD(1), .NWR(4)) u_mem_y (
    .clk, .rst_n,
    .we_i(y_we), .waddr_i(y_waddr), .wre_i(y_wre), .wim_i(y_wim),
    .raddr_i(y_raddr), .rre_o(y_rre), .rim_o(y_rim),
    .fill_i(y_fill), .dir_i(y_dir_in), .drain_i(y_drain),
    .full_o(y_full), .dir_o(y_dir)
  );

  fft_unloader #(.W(W3)) u_unloader (
    .clk, .rst_n,
    .y_full_i(y_full), .y_dir_i(y_dir), .y_addr_o(y_raddr[0]),
    .y_re_i(y_rre[0]), .y_im_i(y_rim[0]), .y_drain_o(y_drain), .y_used_o(y_used),
    .m_valid_o, .m_ready_i, .m_re_o, .m_im_o, .m_last_o, .m_inverse_o
  );

endmodule
