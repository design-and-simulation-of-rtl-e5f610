// tb_fft_stage: the three radix-4 stage configurations (STAGE 0, 1, 2).
//
// The testbench models the frame memories as integer arrays. A random frame goes
// through stage 0, then 1, then 2; after each stage every output word is compared
// with a reference computed here: output word a = hi*4S + p*S + lo (stride S =
// 16/4/1) is sum over l of round(in[hi*4S + l*S + lo] * W_64^(l*q*S)) * (-j)^(l*p),
// with q = 0, hi, or hi with its two base-4 digits swapped. The test also checks that
// a stage waits while its destination is full, runs exactly 16 clocks, fills its
// destination in the last clock, drains its source in the last clock (in the first
// for stage 0, built with EARLY_DRAIN) and passes the direction tag.
module tb_fft_stage;
  import fft_pkg::*;

  localparam int TW_W = 12;
  localparam real PI = 3.14159265358979323846;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // memory models: mem[s] is the source of stage s, mem[s+1] its destination
  int   mre [4][64];
  int   mim [4][64];
  logic src_full [3];
  dir_e src_dir  [3];
  logic dst_full [3];

  // per-stage signals
  addr_t      s0_sa [4], s1_sa [4], s2_sa [4];
  addr_t      s0_da [4], s1_da [4], s2_da [4];
  logic [3:0] s0_we, s1_we, s2_we;
  logic       drain [3], fill [3], busy [3];
  dir_e       ddir [3];
  logic signed [7:0]  s0_ir [4], s0_ii [4];
  logic signed [10:0] s0_or [4], s0_oi [4], s1_ir [4], s1_ii [4];
  logic signed [13:0] s1_or [4], s1_oi [4], s2_ir [4], s2_ii [4];
  logic signed [16:0] s2_or [4], s2_oi [4];

  always_comb begin
    for (int l = 0; l < 4; l++) begin
      s0_ir[l] = 8'(mre[0][s0_sa[l]]);  s0_ii[l] = 8'(mim[0][s0_sa[l]]);
      s1_ir[l] = 11'(mre[1][s1_sa[l]]); s1_ii[l] = 11'(mim[1][s1_sa[l]]);
      s2_ir[l] = 14'(mre[2][s2_sa[l]]); s2_ii[l] = 14'(mim[2][s2_sa[l]]);
    end
  end

  always @(posedge clk) begin
    for (int l = 0; l < 4; l++) begin
      if (s0_we[l]) begin mre[1][s0_da[l]] <= int'(s0_or[l]); mim[1][s0_da[l]] <= int'(s0_oi[l]); end
      if (s1_we[l]) begin mre[2][s1_da[l]] <= int'(s1_or[l]); mim[2][s1_da[l]] <= int'(s1_oi[l]); end
      if (s2_we[l]) begin mre[3][s2_da[l]] <= int'(s2_or[l]); mim[3][s2_da[l]] <= int'(s2_oi[l]); end
    end
  end

  fft_stage #(.STAGE(0), .IN_W(8), .TW_W(TW_W), .EARLY_DRAIN(1'b1)) u_s0 (
    .clk, .rst_n, .src_full_i(src_full[0]), .src_dir_i(src_dir[0]), .src_addr_o(s0_sa),
    .src_re_i(s0_ir), .src_im_i(s0_ii), .src_drain_o(drain[0]),
    .dst_full_i(dst_full[0]), .dst_we_o(s0_we), .dst_addr_o(s0_da),
    .dst_re_o(s0_or), .dst_im_o(s0_oi), .dst_fill_o(fill[0]), .dst_dir_o(ddir[0]),
    .busy_o(busy[0]));
  fft_stage #(.STAGE(1), .IN_W(11), .TW_W(TW_W)) u_s1 (
    .clk, .rst_n, .src_full_i(src_full[1]), .src_dir_i(src_dir[1]), .src_addr_o(s1_sa),
    .src_re_i(s1_ir), .src_im_i(s1_ii), .src_drain_o(drain[1]),
    .dst_full_i(dst_full[1]), .dst_we_o(s1_we), .dst_addr_o(s1_da),
    .dst_re_o(s1_or), .dst_im_o(s1_oi), .dst_fill_o(fill[1]), .dst_dir_o(ddir[1]),
    .busy_o(busy[1]));
  fft_stage #(.STAGE(2), .IN_W(14), .TW_W(TW_W)) u_s2 (
    .clk, .rst_n, .src_full_i(src_full[2]), .src_dir_i(src_dir[2]), .src_addr_o(s2_sa),
    .src_re_i(s2_ir), .src_im_i(s2_ii), .src_drain_o(drain[2]),
    .dst_full_i(dst_full[2]), .dst_we_o(s2_we), .dst_addr_o(s2_da),
    .dst_re_o(s2_or), .dst_im_o(s2_oi), .dst_fill_o(fill[2]), .dst_dir_o(ddir[2]),
    .busy_o(busy[2]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  function automatic int tw(input int e, input bit im);
    real v;
    v = im ? -$sin(2.0 * PI * e / 64.0) : $cos(2.0 * PI * e / 64.0);
    return $rtoi($floor(v * 1024.0 + 0.5));
  endfunction

  // expected output of stage s from the contents of mem[s]
  task automatic expect_stage(input int s, output int er [64], output int ei [64]);
    int S, hi, p, lo, q, e, br, bi, vr, vi, tmp;
    S = (s == 0) ? 16 : (s == 1) ? 4 : 1;
    for (int a = 0; a < 64; a++) begin
      hi = a / (4 * S);
      p  = (a / S) % 4;
      lo = a % S;
      q  = (s == 0) ? 0 : (s == 1) ? hi : (hi % 4) * 4 + hi / 4;
      er[a] = 0; ei[a] = 0;
      for (int l = 0; l < 4; l++) begin
        int xr, xi;
        xr = mre[s][hi * 4 * S + l * S + lo];
        xi = mim[s][hi * 4 * S + l * S + lo];
        e  = (l * q * S) % 64;
        br = $rtoi($floor((real'(xr) * tw(e, 0) - real'(xi) * tw(e, 1)) / 1024.0 + 0.5));
        bi = $rtoi($floor((real'(xr) * tw(e, 1) + real'(xi) * tw(e, 0)) / 1024.0 + 0.5));
        vr = br; vi = bi;
        for (int r = 0; r < (l * p) % 4; r++) begin
          tmp = vr; vr = vi; vi = -tmp;
        end
        er[a] += vr; ei[a] += vi;
      end
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 3; s++) begin
      src_full[s] = 1'b0; dst_full[s] = 1'b0; src_dir[s] = DIR_FWD;
    end
    for (int f = 0; f < 6; f++) begin
      // a random (or, for frame 1, full-scale negative) input frame in mem[0]
      for (int a = 0; a < 64; a++) begin
        mre[0][a] = (f == 1) ? -128 : int'($urandom_range(255)) - 128;
        mim[0][a] = (f == 1) ? -128 : int'($urandom_range(255)) - 128;
      end
      repeat (2) @(posedge clk);
      rst_n = 1'b1;
      for (int s = 0; s < 3; s++) begin
        int er [64], ei [64];
        int run, drains, fills;
        dir_e d;
        expect_stage(s, er, ei);
        d = dir_e'(f % 2);
        // destination still full for a few clocks: the stage must wait
        @(negedge clk);
        src_full[s] = 1'b1; src_dir[s] = d; dst_full[s] = 1'b1;
        repeat (4) begin
          @(negedge clk);
          check(!busy[s] && s0_we == 0 && s1_we == 0 && s2_we == 0,
                $sformatf("stage %0d started with a full destination", s));
        end
        dst_full[s] = 1'b0;
        run = 0; drains = 0; fills = 0;
        // the memory flags change at the clock edge, as in frame_mem
        do begin
          @(posedge clk);
          if (busy[s]) run++;
          if (drain[s]) begin
            drains++;
            // stage 0 releases its source with its first butterfly, the others with the last
            check(run == ((s == 0) ? 1 : 16), $sformatf("stage %0d drained in clock %0d", s, run));
            src_full[s] <= 1'b0;
          end
          if (fill[s]) begin
            fills++;
            check(run == 16, $sformatf("stage %0d filled in clock %0d", s, run));
            check(ddir[s] == d, "direction tag not passed");
            dst_full[s] <= 1'b1;
          end
        end while (run == 0 || busy[s]);
        check(run == 16, $sformatf("stage %0d ran %0d clocks", s, run));
        check(drains == 1 && fills == 1, $sformatf("stage %0d drain %0d fill %0d", s, drains, fills));
        @(negedge clk);
        check(!busy[s] && !src_full[s] && dst_full[s], "flags after the run");
        dst_full[s] = 1'b0;
        for (int a = 0; a < 64; a++) begin
          check(mre[s+1][a] == er[a] && mim[s+1][a] == ei[a],
                $sformatf("frame %0d stage %0d word %0d = (%0d,%0d), expected (%0d,%0d)",
                          f, s, a, mre[s+1][a], mim[s+1][a], er[a], ei[a]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
