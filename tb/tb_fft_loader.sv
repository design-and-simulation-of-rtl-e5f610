// tb_fft_loader: input interface into memory X.
// Streams frames with random valid gaps, half of them inverse. Checks every write:
// address = sample index, data = sample (real and imaginary swapped for an inverse
// frame, whatever s_inverse does after the first sample), the fill pulse with the
// 64th sample and its direction tag, that s_ready is low and nothing is written
// while X is full, and that s_ready rises in the clock X is released.
module tb_fft_loader;
  import fft_pkg::*;

  localparam int W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic s_valid, s_ready, s_inverse, x_full, x_drain, x_we, x_fill;
  logic signed [W-1:0] s_re, s_im, x_re, x_im;
  addr_t x_addr;
  dir_e  x_dir;
  int checks = 0, failures = 0;

  fft_loader #(.W(W)) dut (
    .clk, .rst_n, .s_valid_i(s_valid), .s_ready_o(s_ready), .s_re_i(s_re), .s_im_i(s_im),
    .s_inverse_i(s_inverse), .x_full_i(x_full), .x_drain_i(x_drain), .x_we_o(x_we), .x_addr_o(x_addr),
    .x_re_o(x_re), .x_im_o(x_im), .x_fill_o(x_fill), .x_dir_o(x_dir));

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

  int full_wait = 0;
  initial begin
    s_valid = 0; s_re = '0; s_im = '0; s_inverse = 0; x_full = 0; x_drain = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 8; f++) begin
      bit inv;
      inv = (f % 2 == 1);
      for (int n = 0; n < 64; n++) begin
        while ($urandom_range(3) == 0) begin
          @(negedge clk);
          s_valid = 0;
          #1;
          check(!x_we && !x_fill, "write without valid");
        end
        @(negedge clk);
        s_valid = 1;
        s_re = W'($urandom); s_im = W'($urandom);
        s_inverse = (n == 0) ? inv : 1'($urandom);
        #1;
        check(s_ready && x_we, "sample not taken while X empty");
        check(x_addr == addr_t'(n), $sformatf("address %0d for sample %0d", x_addr, n));
        check(inv ? (x_re == s_im && x_im == s_re) : (x_re == s_re && x_im == s_im),
              $sformatf("frame %0d sample %0d data", f, n));
        check(x_fill == (n == 63), "fill pulse position");
        if (n == 63) check(x_dir == dir_e'(inv), "fill direction tag");
      end
      // X now holds the frame: the loader must hold off
      @(negedge clk);
      x_full = 1;
      s_valid = 1;
      repeat (3 + f) begin
        #1;
        check(!s_ready && !x_we && !x_fill, "accepted while X full");
        full_wait++;
        @(negedge clk);
      end
      // the first stage releases X: the next frame may start in the same clock
      s_valid = 0;
      x_drain = 1;
      #1;
      check(s_ready, "not ready while X is released");
      @(negedge clk);
      x_full = 0;
      x_drain = 0;
      s_valid = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
