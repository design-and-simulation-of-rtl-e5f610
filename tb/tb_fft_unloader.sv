// tb_fft_unloader: output interface from memory Y.
// A model of Y holds random frames; the consumer's ready is random. Checks that
// m_valid follows the full flag, words come out in address order with real and
// imaginary parts swapped for inverse frames, m_last marks word 63, m_inverse the
// tag, Y is drained exactly when word 63 is taken, and the used count tells how
// many words are consumed by the end of each clock.
module tb_fft_unloader;
  import fft_pkg::*;

  localparam int W = 17;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  int yr [64], yi [64];
  logic  y_full, y_drain, m_valid, m_ready, m_last, m_inverse;
  logic [6:0] y_used;
  dir_e  y_dir;
  addr_t y_addr;
  logic signed [W-1:0] y_re, y_im, m_re, m_im;
  int checks = 0, failures = 0;

  assign y_re = W'(yr[y_addr]);
  assign y_im = W'(yi[y_addr]);

  fft_unloader #(.W(W)) dut (
    .clk, .rst_n, .y_full_i(y_full), .y_dir_i(y_dir), .y_addr_o(y_addr),
    .y_re_i(y_re), .y_im_i(y_im), .y_drain_o(y_drain), .y_used_o(y_used),
    .m_valid_o(m_valid), .m_ready_i(m_ready), .m_re_o(m_re), .m_im_o(m_im),
    .m_last_o(m_last), .m_inverse_o(m_inverse));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    y_full = 0; y_dir = DIR_FWD; m_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      int k;
      bit inv;
      inv = (f % 3 == 1);
      for (int a = 0; a < 64; a++) begin
        yr[a] = int'($urandom_range(131071)) - 65536;
        yi[a] = int'($urandom_range(131071)) - 65536;
      end
      // empty Y: nothing offered
      m_ready = 1;
      #1;
      check(!m_valid && !y_drain, "valid while Y empty");
      @(negedge clk);
      y_full = 1; y_dir = dir_e'(inv);
      k = 0;
      while (k < 64) begin
        m_ready = ($urandom_range(3) != 0);
        #1;
        check(m_valid, "not valid while Y full");
        check(inv ? (m_re == W'(yi[k]) && m_im == W'(yr[k])) : (m_re == W'(yr[k]) && m_im == W'(yi[k])),
              $sformatf("frame %0d word %0d = (%0d,%0d)", f, k, m_re, m_im));
        check(m_last == (k == 63), "m_last position");
        check(m_inverse == inv, "m_inverse tag");
        check(y_drain == (m_ready && k == 63), "drain pulse");
        check(int'(y_used) == k + int'(m_ready), $sformatf("used count %0d at word %0d", y_used, k));
        @(negedge clk);
        if (m_ready) k++;
      end
      y_full = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
