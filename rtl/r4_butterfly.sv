// r4_butterfly: radix-4 butterfly with input twiddle factors (the "R4" element).
//
// Input F(l,q), l = 0..3, is first multiplied by W^(l*q): input 0 passes unscaled and
// inputs 1..3 go through a complex multiplier each with the twiddles w1 = W^q,
// w2 = W^2q, w3 = W^3q. The four products b_l then form the 4-point DFT
//   X(p) = sum_l b_l * (-j)^(l*p),  p = 0..3,
// which needs only additions, subtractions and real/imaginary swaps (multiplication by
// +-1 and +-j). Outputs are IN_W+3 bits: one bit for the twiddle rotation and two for
// the sum of four terms, so nothing overflows.
//
// Interface: x_re/x_im[4] signed IN_W bits, w_re/w_im[1..3] signed TW_W bits (index 0
// unused), y_re/y_im[4] signed IN_W+3 bits. Combinational; the stage around it
// registers the result into the next frame memory.
// The twiddle-then-4-point-DFT structure follows the butterfly drawn for the design;
// word lengths and rounding are design choices.
module r4_butterfly #(
  parameter int unsigned IN_W = 8,
  parameter int unsigned TW_W = 12
) (
  input  logic signed [IN_W-1:0]   x_re [4],
  input  logic signed [IN_W-1:0]   x_im [4],
  input  logic signed [TW_W-1:0]   w_re [4],
  input  logic signed [TW_W-1:0]   w_im [4],
  output logic signed [IN_W+2:0]   y_re [4],
  output logic signed [IN_W+2:0]   y_im [4]
);

  localparam int unsigned OW = IN_W + 3;

  logic signed [IN_W:0] b_re [4];
  logic signed [IN_W:0] b_im [4];

  // Input 0 always has twiddle W^0 = 1.
  assign b_re[0] = (IN_W + 1)'(x_re[0]);
  assign b_im[0] = (IN_W + 1)'(x_im[0]);

  for (genvar l = 1; l < 4; l++) begin : g_mul
    cmult #(.W(IN_W), .TW_W(TW_W)) u_cmult (
      .a_re(x_re[l]), .a_im(x_im[l]),
      .w_re(w_re[l]), .w_im(w_im[l]),
      .p_re(b_re[l]), .p_im(b_im[l])
    );
  end

  logic signed [OW-1:0] e_re [4];
  logic signed [OW-1:0] e_im [4];

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      e_re[l] = OW'(b_re[l]);
      e_im[l] = OW'(b_im[l]);
    end
    // p = 0: b0 + b1 + b2 + b3
    y_re[0] = e_re[0] + e_re[1] + e_re[2] + e_re[3];
    y_im[0] = e_im[0] + e_im[1] + e_im[2] + e_im[3];
    // p = 1: b0 - j b1 - b2 + j b3
    y_re[1] = e_re[0] + e_im[1] - e_re[2] - e_im[3];
    y_im[1] = e_im[0] - e_re[1] - e_im[2] + e_re[3];
    // p = 2: b0 - b1 + b2 - b3
    y_re[2] = e_re[0] - e_re[1] + e_re[2] - e_re[3];
    y_im[2] = e_im[0] - e_im[1] + e_im[2] - e_im[3];
    // p = 3: b0 + j b1 - b2 - j b3
    y_re[3] = e_re[0] - e_im[1] - e_re[2] + e_im[3];
    y_im[3] = e_im[0] + e_re[1] - e_im[2] - e_re[3];
  end

endmodule
