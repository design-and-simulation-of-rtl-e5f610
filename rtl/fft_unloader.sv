// fft_unloader: output interface, streams memory Y one complex word per clock.
//
// When Y holds a frame, the unloader presents word k (bin k in natural order) on a
// valid/ready stream and advances when the word is taken; m_last_o marks bin 63 and
// m_inverse_o the frame's direction. For an inverse frame the real and imaginary parts
// are swapped back on the way out; the result is then N times the inverse DFT (the
// binary point sits log2(N) = 6 bits further left). After the last word it drains Y.
//
// Interface: one read port, full/drain and y_used_o towards Y; m_valid_o/m_ready_i/m_re_o/
// m_im_o/m_last_o/m_inverse_o. Timing: one word per clock while m_ready_i is high;
// the output is combinational from Y. y_used_o (words consumed by the end of the
// clock) lets the reorder unit refill Y behind the read pointer. The output swap follows the processor
// description; the stream handshake is a design choice.
module fft_unloader
  import fft_pkg::*;
#(
  parameter int unsigned W = 17
) (
  input  logic                clk,
  input  logic                rst_n,
  // towards memory Y
  input  logic                y_full_i,
  input  dir_e                y_dir_i,
  output addr_t               y_addr_o,
  input  logic signed [W-1:0] y_re_i,
  input  logic signed [W-1:0] y_im_i,
  output logic                y_drain_o,
  output logic [6:0]          y_used_o,
  // output stream
  output logic                m_valid_o,
  input  logic                m_ready_i,
  output logic signed [W-1:0] m_re_o,
  output logic signed [W-1:0] m_im_o,
  output logic                m_last_o,
  output logic                m_inverse_o
);

  addr_t cnt;
  logic  give;

  assign m_valid_o = y_full_i;
  assign give      = m_valid_o && m_ready_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) cnt <= '0;
    else if (give) cnt <= cnt + 1'b1;
  end

  assign y_addr_o    = cnt;
  assign m_re_o      = (y_dir_i == DIR_INV) ? y_im_i : y_re_i;
  assign m_im_o      = (y_dir_i == DIR_INV) ? y_re_i : y_im_i;
  assign m_last_o    = (cnt == addr_t'(N - 1));
  assign m_inverse_o = (y_dir_i == DIR_INV);
  assign y_drain_o   = give && m_last_o;
  // words of the current frame consumed by the end of this clock
  assign y_used_o    = {1'b0, cnt} + 7'(give);

  // Stream rule: an offered word stays offered and unchanged until it is taken.
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_valid_o && !m_ready_i |=> m_valid_o && $stable(m_re_o) && $stable(m_im_o) && $stable(m_last_o))
    else $error("output word changed before it was taken");

endmodule
