// cmult: complex multiplier, data word times twiddle factor.
//
// Computes (a_re + j a_im) * (w_re + j w_im) with full-precision products, then
// rounds to nearest (add half, arithmetic shift) back to the data scale, where the
// twiddle's 1.0 is 2^(TW_W-2). The result is one bit wider than the input because a
// rotation can raise one component by up to sqrt(2); no saturation is needed.
// Multiplying by exactly 1.0 returns the input unchanged.
//
// Interface: a_re/a_im signed W bits, w_re/w_im signed TW_W bits, p_re/p_im signed
// W+1 bits. Combinational. The multiplier itself is the "complex multiplier that
// multiplies data with the twiddle factor" of the processor; rounding and widths are
// design choices.
module cmult #(
  parameter int unsigned W    = 8,
  parameter int unsigned TW_W = 12
) (
  input  logic signed [W-1:0]    a_re,
  input  logic signed [W-1:0]    a_im,
  input  logic signed [TW_W-1:0] w_re,
  input  logic signed [TW_W-1:0] w_im,
  output logic signed [W:0]      p_re,
  output logic signed [W:0]      p_im
);

  localparam int unsigned PW = W + TW_W + 1;  // product sum width
  localparam int unsigned SH = TW_W - 2;      // scale of the twiddle's 1.0

  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (SH - 1);

  logic signed [PW-1:0] sum_re, sum_im;

  always_comb begin
    sum_re = PW'(a_re * w_re) - PW'(a_im * w_im);
    sum_im = PW'(a_re * w_im) + PW'(a_im * w_re);
    // Round to nearest; the result fits W+1 bits, the upper bits are sign copies.
    p_re   = (W + 1)'((sum_re + HALF) >>> SH);
    p_im   = (W + 1)'((sum_im + HALF) >>> SH);
  end

endmodule
