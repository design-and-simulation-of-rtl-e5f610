// twiddle_gen: twiddle factor W_64^e = exp(-j*2*pi*e/64) as fixed-point constants.
//
// The factors are not kept in a ROM or a memory file: the 64 values are computed at
// elaboration time from cos/sin and the exponent selects one of them through
// combinational logic, so each stage sees its twiddle in the same cycle as its
// exponent (no read latency). Format: signed TW_W bits with 1.0 = 2^(TW_W-2), values
// rounded to nearest, so +-1.0 is exact.
//
// Interface: exp_i (6 bits, taken modulo 64) -> w_re_o = round(cos(2*pi*e/64) * 2^(TW_W-2)),
// w_im_o = round(-sin(2*pi*e/64) * 2^(TW_W-2)). Purely combinational.
// The constant table instead of a ROM follows the processor description; the word
// length TW_W is a design choice.
module twiddle_gen #(
  parameter int unsigned TW_W = 12
) (
  input  logic [5:0]             exp_i,
  output logic signed [TW_W-1:0] w_re_o,
  output logic signed [TW_W-1:0] w_im_o
);

  localparam real PI  = 3.14159265358979323846;
  localparam real ONE = real'(1 << (TW_W - 2));

  typedef logic signed [TW_W-1:0] tw_t;

  function automatic tw_t tw_round(input real v);
    return tw_t'($rtoi(v >= 0.0 ? v + 0.5 : v - 0.5));
  endfunction

  function automatic tw_t tw_cos(input int e);
    return tw_round($cos(2.0 * PI * real'(e) / 64.0) * ONE);
  endfunction

  function automatic tw_t tw_msin(input int e);
    return tw_round(-$sin(2.0 * PI * real'(e) / 64.0) * ONE);
  endfunction

  tw_t re_tab [64];
  tw_t im_tab [64];

  for (genvar e = 0; e < 64; e++) begin : g_tab
    localparam tw_t RE = tw_cos(e);
    localparam tw_t IM = tw_msin(e);
    assign re_tab[e] = RE;
    assign im_tab[e] = IM;
  end

  assign w_re_o = re_tab[exp_i];
  assign w_im_o = im_tab[exp_i];

endmodule
