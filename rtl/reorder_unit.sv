// reorder_unit: puts the transform result into natural frequency order.
//
// After the third radix-4 stage, word a of memory X3 holds frequency bin
// digit_rev(a) (the three base-4 digits of the address reversed, the radix-4 form of
// bit-reversed order). While X3 holds a frame, this unit fills memory Y in natural
// order, four words per step: in step j it reads X3 at digit_rev(4j+l) and writes Y
// words 4j+l, l = 0..3. In step 15 it drains X3 and fills Y, passing the direction
// tag on.
//
// Y may still hold the previous frame while the unloader streams it out one word per
// clock. Step j is therefore taken only when Y is empty or when the unloader has
// consumed words 0..4j+3 of the old frame by the end of this clock (dst_used_i, the
// number of old words consumed including the one taken in this clock). New words thus
// only overwrite words already read, and the last step coincides with the read of the
// old frame's last word, so Y turns over without a gap.
//
// Interface: the memory handshake of fft_stage plus dst_used_i (0..64). busy_o is
// high in clocks that take a step. Timing: 16 steps per frame, one per clock unless
// held back by the unloader. The reorder step between X3 and Y follows the processor's
// block diagram; the overlapping with the output is a design choice.
module reorder_unit
  import fft_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                src_full_i,
  input  dir_e                src_dir_i,
  output addr_t               src_addr_o [4],
  input  logic signed [W-1:0] src_re_i   [4],
  input  logic signed [W-1:0] src_im_i   [4],
  output logic                src_drain_o,
  input  logic                dst_full_i,
  input  logic [6:0]          dst_used_i,
  output logic [3:0]          dst_we_o,
  output addr_t               dst_addr_o [4],
  output logic signed [W-1:0] dst_re_o   [4],
  output logic signed [W-1:0] dst_im_o   [4],
  output logic                dst_fill_o,
  output dir_e                dst_dir_o,
  output logic                busy_o
);

  bfly_t j;
  logic  step;
  logic  last;

  // words 4j..4j+3 of Y are free when Y is empty or already read
  assign step = src_full_i && (!dst_full_i || dst_used_i >= {1'b0, j, 2'b00} + 7'd4);
  assign last = step && (j == bfly_t'(BFLY - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) j <= '0;
    else if (step) j <= j + 1'b1;
  end

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      src_addr_o[l] = digit_rev({j, 2'(l)});
      dst_addr_o[l] = {j, 2'(l)};
      dst_re_o[l]   = src_re_i[l];
      dst_im_o[l]   = src_im_i[l];
    end
  end

  assign dst_we_o    = {4{step}};
  assign src_drain_o = last;
  assign dst_fill_o  = last;
  assign dst_dir_o   = src_dir_i;
  assign busy_o      = step;

endmodule
