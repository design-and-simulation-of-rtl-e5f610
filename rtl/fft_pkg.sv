// fft_pkg: constants and address arithmetic shared by the 64-point radix-4 FFT.
//
// The transform length is 64 = 4^3, so the processor has three radix-4 stages and
// each stage runs its single butterfly 16 times per frame. All addresses are 6-bit
// word addresses into a 64-word frame memory.
//
// Address mapping (decimation in time, computed in place, natural-order input):
//   stage s (0,1,2) has stride S = 4^(2-s) = 16, 4, 1. Butterfly j (0..15) reads and
//   writes the four words  a(j,l) = (j / S) * 4S + (j mod S) + l*S,  l = 0..3.
//   The twiddle factor on input l is W_64^(l * q * S), where q is the base-4 digit
//   reversal of j / S over s digits (q = 0 in stage 0).
// After stage 2, word a of the frame holds frequency bin digit_rev(a), where digit_rev
// reverses the three base-4 digits of a; the reorder unit undoes that.
package fft_pkg;

  localparam int unsigned N      = 64;  // transform length
  localparam int unsigned RADIX  = 4;
  localparam int unsigned STAGES = 3;   // log4(N)
  localparam int unsigned BFLY   = N / RADIX;  // butterflies per stage
  localparam int unsigned AW     = 6;   // word address width, log2(N)
  localparam int unsigned JW     = 4;   // butterfly counter width, log2(BFLY)

  typedef logic [AW-1:0] addr_t;
  typedef logic [JW-1:0] bfly_t;

  // Transform direction of a frame. An inverse frame is computed with the forward
  // datapath by swapping real and imaginary parts at the input and at the output.
  typedef enum logic {DIR_FWD = 1'b0, DIR_INV = 1'b1} dir_e;

  // Stride of stage s: 16, 4, 1.
  function automatic int unsigned stage_stride(input int unsigned s);
    return 1 << (2 * (STAGES - 1 - s));
  endfunction

  // Reverse the three base-4 digits of a 6-bit address.
  function automatic addr_t digit_rev(input addr_t a);
    return {a[1:0], a[3:2], a[5:4]};
  endfunction

  // Word address of input/output l of butterfly j in stage s.
  function automatic addr_t bfly_addr(input int unsigned s, input bfly_t j,
                                      input logic [1:0] l);
    int unsigned st;
    int unsigned jj;
    st = stage_stride(s);
    jj = int'(j);
    return addr_t'((jj / st) * 4 * st + (jj % st) + int'(l) * st);
  endfunction

  // Twiddle exponent (in units of W_64) applied to input l of butterfly j in stage s.
  function automatic addr_t tw_exp(input int unsigned s, input bfly_t j,
                                   input logic [1:0] l);
    int unsigned st;
    logic [3:0] hi;
    logic [3:0] q;
    st = stage_stride(s);
    hi = 4'(int'(j) / st);
    case (s)
      1:       q = {2'b00, hi[1:0]};
      2:       q = {hi[1:0], hi[3:2]};
      default: q = 4'd0;
    endcase
    return addr_t'((int'(l) * int'(q) * st) % N);
  endfunction

endpackage
