// fft_stage: one radix-4 stage of the 64-point FFT ("shift and 16 repeat").
//
// The stage owns a 4-bit butterfly counter. In the first clock in which its source
// memory holds a frame and its destination memory is empty it computes butterfly 0,
// and it goes on with butterflies 1..15 in the next 15 clocks. In the clock of
// butterfly j it reads the four words a(j,0..3) of the source (addresses from
// fft_pkg::bfly_addr), multiplies them by the twiddles W_64^(tw_exp) produced
// directly by twiddle_gen instances, passes them through the R4 butterfly and writes
// the four results to the same addresses of the destination memory (in-place
// addressing, so no address translation is needed between stages). With butterfly 15
// it fills the destination, passing the frame's direction tag on.
//
// The source is released (src_drain_o) with butterfly 15, or with butterfly 0 when
// EARLY_DRAIN is set. The first stage uses EARLY_DRAIN: it reads word a in clock
// (a mod 16) of its run, never later than the input loader, writing one word per clock
// in address order, can overwrite it, so the next frame can be loaded at once.
//
// Parameters: STAGE (0, 1, 2) selects the stride 16/4/1 and the twiddle pattern;
// stage 0 uses only W^0. IN_W is the source word width; results are IN_W+3 bits.
// Timing: one butterfly per clock, 16 clocks per frame, back to back. busy_o is high in
// the 16 clocks of a run. The stage structure and 16 butterflies per stage follow the
// processor's block diagram; the address mapping (decimation in time, in place), the
// start rule and the early release are this design's own.
module fft_stage
  import fft_pkg::*;
#(
  parameter int unsigned STAGE = 0,
  parameter int unsigned IN_W  = 8,
  parameter int unsigned TW_W  = 12,
  parameter bit          EARLY_DRAIN = 1'b0
) (
  input  logic                   clk,
  input  logic                   rst_n,
  // source memory
  input  logic                   src_full_i,
  input  dir_e                   src_dir_i,
  output addr_t                  src_addr_o [4],
  input  logic signed [IN_W-1:0] src_re_i   [4],
  input  logic signed [IN_W-1:0] src_im_i   [4],
  output logic                   src_drain_o,
  // destination memory
  input  logic                   dst_full_i,
  output logic [3:0]             dst_we_o,
  output addr_t                  dst_addr_o [4],
  output logic signed [IN_W+2:0] dst_re_o   [4],
  output logic signed [IN_W+2:0] dst_im_o   [4],
  output logic                   dst_fill_o,
  output dir_e                   dst_dir_o,
  // status
  output logic                   busy_o
);

  bfly_t j;      // butterfly in progress
  logic  run;    // butterflies 1..15 pending
  logic  go;     // butterfly 0 this clock
  logic  step;   // a butterfly this clock
  bfly_t jj;     // butterfly index of this clock
  logic  last;

  assign go   = !run && src_full_i && !dst_full_i;
  assign step = go || run;
  assign jj   = run ? j : '0;
  assign last = run && (j == bfly_t'(BFLY - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run <= 1'b0;
      j   <= '0;
    end else if (go) begin
      run <= 1'b1;
      j   <= bfly_t'(1);
    end else if (run) begin
      j <= j + 1'b1;
      if (last) run <= 1'b0;
    end
  end

  logic signed [TW_W-1:0] w_re [4];
  logic signed [TW_W-1:0] w_im [4];

  for (genvar l = 0; l < 4; l++) begin : g_port
    assign src_addr_o[l] = bfly_addr(STAGE, jj, 2'(l));
    assign dst_addr_o[l] = bfly_addr(STAGE, jj, 2'(l));
    twiddle_gen #(.TW_W(TW_W)) u_tw (
      .exp_i (tw_exp(STAGE, jj, 2'(l))),
      .w_re_o(w_re[l]),
      .w_im_o(w_im[l])
    );
  end

  r4_butterfly #(.IN_W(IN_W), .TW_W(TW_W)) u_r4 (
    .x_re(src_re_i), .x_im(src_im_i),
    .w_re(w_re),     .w_im(w_im),
    .y_re(dst_re_o), .y_im(dst_im_o)
  );

  assign dst_we_o    = {4{step}};
  assign src_drain_o = EARLY_DRAIN ? go : last;
  assign dst_fill_o  = last;
  assign dst_dir_o   = src_dir_i;
  assign busy_o      = step;

  // The source frame stays in place for the whole run unless released early, and the
  // destination stays free until this stage fills it.
  a_src_held: assert property (@(posedge clk) disable iff (!rst_n)
    run |-> (src_full_i || EARLY_DRAIN) && !dst_full_i)
    else $error("frame memory changed hands during a stage run");

endmodule
