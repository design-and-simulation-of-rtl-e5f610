// tb_cmult: complex multiplier against products computed in floating point.
// Random data words (including the extreme values) are multiplied by random
// twiddle-format factors; the expected result is floor(x/1024 + 0.5) of the exact
// complex product, which real arithmetic represents exactly at these sizes.
module tb_cmult;
  localparam int W = 11;
  localparam int TW_W = 12;

  logic signed [W-1:0]    ar, ai;
  logic signed [TW_W-1:0] wr, wi;
  logic signed [W:0]      pr, pi;
  int checks = 0, failures = 0;

  cmult #(.W(W), .TW_W(TW_W)) dut (.a_re(ar), .a_im(ai), .w_re(wr), .w_im(wi),
                                   .p_re(pr), .p_im(pi));

  function automatic int rnd(input real x);
    return $rtoi($floor(x / 1024.0 + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int a_r, a_i, w_r, w_i, er, ei;
      if (t < 4) begin
        a_r = (t % 2 != 0) ? 1023 : -1024;  a_i = (t / 2 != 0) ? 1023 : -1024;
        w_r = 724; w_i = (t % 2 != 0) ? 724 : -724;
      end else begin
        a_r = int'($urandom_range(2047)) - 1024;
        a_i = int'($urandom_range(2047)) - 1024;
        w_r = int'($urandom_range(2048)) - 1024;
        w_i = int'($urandom_range(2048)) - 1024;
      end
      ar = W'(a_r); ai = W'(a_i); wr = TW_W'(w_r); wi = TW_W'(w_i);
      #1;
      er = rnd(real'(a_r) * w_r - real'(a_i) * w_i);
      ei = rnd(real'(a_r) * w_i + real'(a_i) * w_r);
      checks++;
      if (int'(pr) != er || int'(pi) != ei) begin
        failures++;
        if (failures < 10)
          $display("FAIL: (%0d,%0d)*(%0d,%0d) = (%0d,%0d), expected (%0d,%0d)",
                   a_r, a_i, w_r, w_i, pr, pi, er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
