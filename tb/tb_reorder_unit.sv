// tb_reorder_unit: the reorder step from memory X3 to memory Y.
// X3 is filled with random words; after the unit has run, Y word k must equal X3
// word r(k), where r swaps the first and last base-4 digits of k:
// r(k) = (k mod 4)*16 + ((k/4) mod 4)*4 + k/16. Half of the frames find Y empty and
// must be copied in 16 consecutive clocks. The other half find Y still holding an old
// frame that a model of the output side reads one word per clock with random pauses;
// then every write must land on a word already read, and the old frame's words must
// still be intact when read. Also checked: one drain and one fill per frame and the
// direction tag.
module tb_reorder_unit;
  import fft_pkg::*;

  localparam int W = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int xr [64], xi [64], yr [64], yi [64];
  int oldr [64], oldi [64];
  logic       src_full, dst_full, drain, fill, busy;
  logic [6:0] used;
  dir_e       src_dir, dst_dir;
  addr_t      sa [4], da [4];
  logic [3:0] we;
  logic signed [W-1:0] sr [4], si [4], dr [4], di [4];
  int checks = 0, failures = 0;

  // output side model: reads old word rd while reading, one per clock when it takes
  bit reading = 0;
  bit take;
  int rd = 0;
  assign used = reading ? 7'(rd + int'(take)) : 7'd0;

  always_comb for (int l = 0; l < 4; l++) begin sr[l] = W'(xr[sa[l]]); si[l] = W'(xi[sa[l]]); end

  reorder_unit #(.W(W)) dut (
    .clk, .rst_n, .src_full_i(src_full), .src_dir_i(src_dir), .src_addr_o(sa),
    .src_re_i(sr), .src_im_i(si), .src_drain_o(drain),
    .dst_full_i(dst_full), .dst_used_i(used), .dst_we_o(we), .dst_addr_o(da),
    .dst_re_o(dr), .dst_im_o(di), .dst_fill_o(fill), .dst_dir_o(dst_dir), .busy_o(busy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  int steps = 0, drains = 0, fills = 0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (reading && take) begin
        check(yr[rd] == oldr[rd] && yi[rd] == oldi[rd], $sformatf("old word %0d overwritten before it was read", rd));
        rd <= rd + 1;
        if (rd == 63) reading <= 1'b0;
      end
      for (int l = 0; l < 4; l++)
        if (we[l]) begin
          yr[da[l]] <= int'(dr[l]); yi[da[l]] <= int'(di[l]);
          if (reading) check(int'(da[l]) < rd + int'(take), $sformatf("write to unread word %0d", da[l]));
        end
      if (busy) steps++;
      if (drain) begin drains++; src_full <= 1'b0; end
      if (fill) begin
        fills++;
        check(dst_dir == src_dir, "direction tag");
        dst_full <= 1'b1;
      end
    end
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    src_full = 0; dst_full = 0; src_dir = DIR_FWD; take = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      bit overlap;
      int t0, t1;
      overlap = (f % 2 == 1);
      for (int a = 0; a < 64; a++) begin
        xr[a] = int'($urandom_range(131071)) - 65536;
        xi[a] = int'($urandom_range(131071)) - 65536;
      end
      @(negedge clk);
      if (overlap) begin
        // Y holds an old frame that is read while the new one is written
        for (int a = 0; a < 64; a++) begin oldr[a] = yr[a]; oldi[a] = yi[a]; end
        dst_full = 1; reading = 1; rd = 0;
      end else begin
        dst_full = 0;
      end
      src_full = 1; src_dir = dir_e'(f % 2);
      steps = 0; drains = 0; fills = 0;
      t0 = 0;
      while (src_full) begin
        take = overlap && reading && ($urandom_range(2) != 0);
        #1;
        if (!overlap) check(busy, "no step although Y is empty");
        if (overlap) check(!busy || used >= 7'(4 * (steps + 1)), "step before its words were read");
        @(negedge clk);
        t0++;
        if (overlap && !reading) dst_full = 0;
      end
      take = 0;
      if (!overlap) check(t0 == 16, $sformatf("copy took %0d clocks", t0));
      check(steps == 16, $sformatf("%0d steps", steps));
      check(drains == 1 && fills == 1, "one drain and one fill");
      check(!reading, "fill before the old frame was read");
      for (int k = 0; k < 64; k++) begin
        int r;
        r = (k % 4) * 16 + ((k / 4) % 4) * 4 + k / 16;
        check(yr[k] == xr[r] && yi[k] == xi[r],
              $sformatf("Y[%0d] = (%0d,%0d), expected X3[%0d] = (%0d,%0d)", k, yr[k], yi[k], r, xr[r], xi[r]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
