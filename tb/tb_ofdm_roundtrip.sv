// tb_ofdm_roundtrip: an OFDM symbol through the processor twice, as a transmitter's
// IFFT and a receiver's FFT.
//
// Each frame carries 64 QPSK subcarrier symbols (+-A +-jA, A = 100, random). The
// processor computes the inverse transform (64 times the IDFT). The testbench
// applies the 1/N scaling as a rounded right shift by log2(64) = 6 bits, which gives
// the 8-bit time-domain samples (checked to fit), and feeds them back as a forward
// frame. Since FFT(IDFT(X)) = X, the result must be close to the original symbols:
// every symbol's signs must be recovered, and each component must be within TOL of
// the symbol. The error comes from rounding the time-domain samples to integers
// (at most 1/2 per sample, adding up over 64 samples with random signs) and from the
// twiddles. Inverse and forward frames alternate on one instance, so the direction
// switches from frame to frame.
module tb_ofdm_roundtrip;
  localparam int IN_W = 8;
  localparam int OUT_W = IN_W + 9;
  localparam int A = 100;
  localparam int NSYM = 8;
  localparam int TOL = 16;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic                    s_valid, s_ready, s_inverse;
  logic signed [IN_W-1:0]  s_re, s_im;
  logic                    m_valid, m_last, m_inverse;
  logic                    m_ready;
  logic signed [OUT_W-1:0] m_re, m_im;
  logic [3:0]              busy;

  fft64_r4 dut (
    .clk, .rst_n,
    .s_valid_i(s_valid), .s_ready_o(s_ready), .s_re_i(s_re), .s_im_i(s_im),
    .s_inverse_i(s_inverse),
    .m_valid_o(m_valid), .m_ready_i(m_ready), .m_re_o(m_re), .m_im_o(m_im),
    .m_last_o(m_last), .m_inverse_o(m_inverse), .busy_o(busy));

  int checks = 0, failures = 0;
  int sym_re [64], sym_im [64];
  int td_re [64], td_im [64];
  int fd_re [64], fd_im [64];
  int max_err = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL: %s", what); end
  endtask

  // one frame in, one frame out; inputs change on the falling edge
  task automatic transform(input bit inv, input int xr [64], input int xi [64],
                           output int yr [64], output int yi [64]);
    int k;
    fork
      begin
        for (int n = 0; n < 64; n++) begin
          @(negedge clk);
          s_valid = 1'b1; s_re = IN_W'(xr[n]); s_im = IN_W'(xi[n]); s_inverse = inv;
          while (!s_ready) @(negedge clk);
          @(posedge clk);
        end
        @(negedge clk);
        s_valid = 1'b0;
      end
      begin
        k = 0;
        while (k < 64) begin
          @(posedge clk);
          if (m_valid && m_ready) begin
            yr[k] = int'(m_re); yi[k] = int'(m_im);
            check(m_inverse == inv, "direction tag");
            check(m_last == (k == 63), "m_last");
            k++;
          end
        end
      end
    join
  endtask

  function automatic int shift6(input int v);  // round(v / 64)
    return (v + 32) >>> 6;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    s_valid = 0; s_re = '0; s_im = '0; s_inverse = 0; m_ready = 1;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < NSYM; t++) begin
      for (int k = 0; k < 64; k++) begin
        sym_re[k] = ($urandom_range(1) != 0) ? A : -A;
        sym_im[k] = ($urandom_range(1) != 0) ? A : -A;
      end
      transform(1'b1, sym_re, sym_im, td_re, td_im);     // transmitter: IFFT
      for (int n = 0; n < 64; n++) begin
        td_re[n] = shift6(td_re[n]);
        td_im[n] = shift6(td_im[n]);
        check(td_re[n] >= -128 && td_re[n] <= 127 && td_im[n] >= -128 && td_im[n] <= 127,
              "time-domain sample out of range");
      end
      transform(1'b0, td_re, td_im, fd_re, fd_im);       // receiver: FFT
      for (int k = 0; k < 64; k++) begin
        int er, ei;
        er = fd_re[k] - sym_re[k];
        ei = fd_im[k] - sym_im[k];
        if (er < 0) er = -er;
        if (ei < 0) ei = -ei;
        if (er > max_err) max_err = er;
        if (ei > max_err) max_err = ei;
        check(er <= TOL && ei <= TOL,
              $sformatf("symbol %0d carrier %0d: (%0d,%0d), sent (%0d,%0d)", t, k, fd_re[k], fd_im[k], sym_re[k], sym_im[k]));
        check((fd_re[k] > 0) == (sym_re[k] > 0) && (fd_im[k] > 0) == (sym_im[k] > 0),
              $sformatf("symbol %0d carrier %0d decided wrong", t, k));
      end
    end
    $display("largest error %0d LSBs", max_err);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
