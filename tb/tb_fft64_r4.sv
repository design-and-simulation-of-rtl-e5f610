// tb_fft64_r4: end-to-end test of the 64-point radix-4 FFT/IFFT processor at its
// default parameters.
//
// Frames of random, impulse and full-scale samples are streamed in, some as inverse
// transforms. Each output bin is compared with a direct DFT computed here in floating
// point (sum over n of x[n]*exp(-+j*2*pi*n*k/64)), within a tolerance of TOL output
// LSBs that covers the rounding of the fixed-point twiddles. The test also checks:
// the latency of an isolated frame (65 clocks from the last input sample to the first
// output word), that every stage runs exactly 16 clocks per frame and the reorder unit
// takes 16 steps, the sustained period of 64 clocks per frame (one sample per clock)
// with a producer and consumer that are always ready, and m_last/m_inverse. It counts
// how often each mechanism occurred (input backpressure, output backpressure, a unit
// stalled on a full destination, loading overlapped with stage 1, Y refilled while
// still being read, forward and inverse frames, direction switches) and fails if one
// never did.
module tb_fft64_r4;
  import fft_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + 9;
  localparam real TOL  = 8.0;  // output LSBs; twiddle rounding gives about 4 at most
  localparam int NFRAMES = 24;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    s_valid, s_ready, s_inverse;
  logic signed [IN_W-1:0]  s_re, s_im;
  logic                    m_valid, m_ready, m_last, m_inverse;
  logic signed [OUT_W-1:0] m_re, m_im;
  logic [3:0]              busy;

  fft64_r4 dut (
    .clk, .rst_n,
    .s_valid_i(s_valid), .s_ready_o(s_ready), .s_re_i(s_re), .s_im_i(s_im),
    .s_inverse_i(s_inverse),
    .m_valid_o(m_valid), .m_ready_i(m_ready), .m_re_o(m_re), .m_im_o(m_im),
    .m_last_o(m_last), .m_inverse_o(m_inverse),
    .busy_o(busy)
  );

  int checks = 0;
  int failures = 0;
  longint cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  // frames sent, kept for the reference model
  int  in_re  [NFRAMES][64];
  int  in_im  [NFRAMES][64];
  bit  in_inv [NFRAMES];

  // mechanism counters
  int n_in_stall = 0, n_out_stall = 0, n_stage_stall = 0;
  int n_fwd = 0, n_inv = 0, n_switch = 0;
  real max_err = 0.0;

  // random stimulus controls
  bit  rand_gaps = 1'b0;
  bit  rand_ready = 1'b0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL @%0d: %s", cycle, what);
    end
  endtask

  // ------------------------------------------------------------ stimulus data
  task automatic make_frame(input int f);
    int kind;
    kind = f % 6;
    in_inv[f] = (f % 3 == 2) || (f % 7 == 5);
    for (int n = 0; n < 64; n++) begin
      case (kind)
        0: begin in_re[f][n] = (n == 0) ? 100 : 0; in_im[f][n] = 0; end
        1: begin in_re[f][n] = -128; in_im[f][n] = -128; end
        2: begin in_re[f][n] = (n % 2 == 0) ? 127 : -128; in_im[f][n] = (n % 4 < 2) ? -128 : 127; end
        default: begin
          in_re[f][n] = int'($urandom_range(255)) - 128;
          in_im[f][n] = int'($urandom_range(255)) - 128;
        end
      endcase
    end
  endtask

  // ------------------------------------------------------------ driver
  int sent_frames = 0;
  longint last_in_cycle [NFRAMES];

  // Inputs change on the falling edge; s_ready does not change between a falling
  // edge and the next rising edge, so its value here says whether that edge accepts.
  task automatic send_frames(input int first, input int count);
    bit acc;
    for (int f = first; f < first + count; f++) begin
      for (int n = 0; n < 64; n++) begin
        @(negedge clk);
        if (rand_gaps) begin
          while ($urandom_range(7) == 0) begin
            s_valid = 1'b0;
            @(negedge clk);
          end
        end
        s_valid   = 1'b1;
        s_re      = IN_W'(in_re[f][n]);
        s_im      = IN_W'(in_im[f][n]);
        s_inverse = (n == 0) ? in_inv[f] : !in_inv[f];  // only the first sample counts
        acc = s_ready;
        while (!acc) begin
          n_in_stall++;
          @(negedge clk);
          acc = s_ready;
        end
        @(posedge clk);
        if (n == 63) last_in_cycle[f] = cycle;
      end
      sent_frames++;
    end
    @(negedge clk);
    s_valid = 1'b0;
  endtask

  // ------------------------------------------------------------ output monitor
  int out_frame = 0;
  int out_bin = 0;
  longint first_out_cycle [NFRAMES];
  longint last_out_cycle  [NFRAMES];

  always @(posedge clk) begin
    if (rand_ready) m_ready <= ($urandom_range(1) != 0);
    else            m_ready <= 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n && m_valid && !m_ready) n_out_stall++;
    if (rst_n && m_valid && m_ready) begin
      real er, ei, ang, err;
      int f, k;
      f = out_frame;
      k = out_bin;
      if (k == 0) first_out_cycle[f] = cycle;
      er = 0.0; ei = 0.0;
      for (int n = 0; n < 64; n++) begin
        ang = 2.0 * PI * real'(n * k % 64) / 64.0;
        if (in_inv[f]) ang = -ang;
        er += real'(in_re[f][n]) * $cos(ang) + real'(in_im[f][n]) * $sin(ang);
        ei += real'(in_im[f][n]) * $cos(ang) - real'(in_re[f][n]) * $sin(ang);
      end
      err = (real'(m_re) - er) < 0 ? er - real'(m_re) : real'(m_re) - er;
      if (err > max_err) max_err = err;
      check(err <= TOL, $sformatf("frame %0d bin %0d re %0d expected %f", f, k, m_re, er));
      err = (real'(m_im) - ei) < 0 ? ei - real'(m_im) : real'(m_im) - ei;
      if (err > max_err) max_err = err;
      check(err <= TOL, $sformatf("frame %0d bin %0d im %0d expected %f", f, k, m_im, ei));
      check(m_last == (k == 63), "m_last position");
      check(m_inverse == in_inv[f], "m_inverse tag");
      if (k == 63) begin
        last_out_cycle[f] = cycle;
        if (in_inv[f]) n_inv++; else n_fwd++;
        if (f > 0 && in_inv[f] != in_inv[f-1]) n_switch++;
        out_frame <= f + 1;
        out_bin   <= 0;
      end else begin
        out_bin <= k + 1;
      end
    end
  end

  // ------------------------------------------------------------ stage run lengths
  int run_len [3] = '{0, 0, 0};
  int reorder_steps = 0;
  int n_overlap_in = 0, n_overlap_out = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      for (int s = 0; s < 3; s++) begin
        if (busy[s]) run_len[s]++;
        else if (run_len[s] != 0) begin
          check(run_len[s] == 16, $sformatf("stage %0d ran %0d clocks", s + 1, run_len[s]));
          run_len[s] = 0;
        end
      end
      if (busy[3]) reorder_steps++;
      // a unit whose source holds a frame but whose destination is not free
      if (!busy[0] && dut.x_full && dut.x1_full) n_stage_stall++;
      if (!busy[1] && dut.x1_full && dut.x2_full) n_stage_stall++;
      if (!busy[2] && dut.x2_full && dut.x3_full) n_stage_stall++;
      if (!busy[3] && dut.x3_full)                n_stage_stall++;
      // next frame loaded while stage 1 still reads X
      if (s_valid && s_ready && busy[0]) n_overlap_in++;
      // reorder refilling Y while the previous frame is still being read out
      if (busy[3] && dut.y_full) n_overlap_out++;
    end
  end

  // ------------------------------------------------------------ watchdog
  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog expired, %0d frames out", out_frame);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ sequence
  initial begin
    s_valid = 1'b0; s_re = '0; s_im = '0; s_inverse = 1'b0; m_ready = 1'b1;
    for (int f = 0; f < NFRAMES; f++) make_frame(f);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);

    // 1. one isolated frame: latency
    send_frames(0, 1);
    wait (out_frame == 1);
    check(first_out_cycle[0] - last_in_cycle[0] == 65,
          $sformatf("latency %0d, expected 65", first_out_cycle[0] - last_in_cycle[0]));

    // 2. back-to-back frames, consumer always ready: sustained period
    send_frames(1, 5);
    wait (out_frame == 6);
    for (int f = 3; f < 6; f++)
      check(last_out_cycle[f] - last_out_cycle[f-1] == 64,
            $sformatf("frame period %0d, expected 64", last_out_cycle[f] - last_out_cycle[f-1]));

    // 3. random input gaps and output backpressure
    rand_gaps  = 1'b1;
    rand_ready = 1'b1;
    send_frames(6, NFRAMES - 6);
    wait (out_frame == NFRAMES);
    repeat (5) @(posedge clk);

    check(n_in_stall > 0,    "input backpressure never happened");
    check(n_out_stall > 0,   "output backpressure never happened");
    check(n_stage_stall > 0, "no stage ever stalled on a full destination");
    check(n_fwd > 0,         "no forward frame");
    check(n_inv > 0,         "no inverse frame");
    check(n_switch > 0,      "no direction switch");
    check(n_overlap_in > 0,  "loading never overlapped stage 1");
    check(n_overlap_out > 0, "reorder never overlapped the output");
    check(reorder_steps == 16 * NFRAMES, $sformatf("reorder took %0d steps for %0d frames", reorder_steps, NFRAMES));
    $display("frames fwd=%0d inv=%0d switches=%0d in_stalls=%0d out_stalls=%0d stage_stalls=%0d overlap_in=%0d overlap_out=%0d max_err=%f",
             n_fwd, n_inv, n_switch, n_in_stall, n_out_stall, n_stage_stall, n_overlap_in, n_overlap_out, max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
