// fft_loader: input interface, writes one complex sample per clock into memory X.
//
// Samples arrive in natural time order on a valid/ready stream. The loader counts them
// and writes sample n to address n of memory X. The direction of a frame is taken
// from s_inverse_i with its first sample; for an inverse frame the real and imaginary
// parts are swapped on the way in, so that the forward datapath computes the inverse
// transform (times N). With the 64th sample it fills X. s_ready_o is low while X holds
// a frame that the first stage has not yet taken (backpressure). The first stage
// releases X (x_drain_i) in the clock of its first butterfly; its read order stays
// ahead of the loader's write order, so the next frame may start in that same clock.
//
// Interface: s_valid_i/s_ready_o/s_re_i/s_im_i/s_inverse_i, and a single write port
// plus fill/full/drain signals towards memory X. Timing: one sample per clock when ready.
// The swap for the inverse transform follows the processor description; the stream
// handshake and per-frame direction are design choices.
module fft_loader
  import fft_pkg::*;
#(
  parameter int unsigned W = 8
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                s_valid_i,
  output logic                s_ready_o,
  input  logic signed [W-1:0] s_re_i,
  input  logic signed [W-1:0] s_im_i,
  input  logic                s_inverse_i,
  // towards memory X
  input  logic                x_full_i,
  input  logic                x_drain_i,
  output logic                x_we_o,
  output addr_t               x_addr_o,
  output logic signed [W-1:0] x_re_o,
  output logic signed [W-1:0] x_im_o,
  output logic                x_fill_o,
  output dir_e                x_dir_o
);

  addr_t cnt;
  dir_e  frame_dir;
  dir_e  cur_dir;
  logic  take;

  assign s_ready_o = !x_full_i || x_drain_i;
  assign take      = s_valid_i && s_ready_o;
  // The first sample of a frame decides its direction.
  assign cur_dir   = (cnt == '0) ? dir_e'(s_inverse_i) : frame_dir;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      frame_dir <= DIR_FWD;
    end else if (take) begin
      cnt       <= cnt + 1'b1;
      frame_dir <= cur_dir;
    end
  end

  assign x_we_o   = take;
  assign x_addr_o = cnt;
  assign x_re_o   = (cur_dir == DIR_INV) ? s_im_i : s_re_i;
  assign x_im_o   = (cur_dir == DIR_INV) ? s_re_i : s_im_i;
  assign x_fill_o = take && (cnt == addr_t'(N - 1));
  assign x_dir_o  = cur_dir;

endmodule
