// tb_twiddle_gen: checks all 64 twiddle factors against cos/-sin computed here.
// Each component must be within half an LSB of the exact value (round to nearest)
// and the eight multiples of 45 degrees with exact values must be exact.
module tb_twiddle_gen;
  localparam int TW_W = 12;
  localparam real ONE = 1024.0;
  localparam real PI  = 3.14159265358979323846;

  logic [5:0]             e;
  logic signed [TW_W-1:0] wr, wi;
  int checks = 0, failures = 0;

  twiddle_gen #(.TW_W(TW_W)) dut (.exp_i(e), .w_re_o(wr), .w_im_o(wi));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 64; k++) begin
      real cr, ci;
      e = 6'(k);
      #1;
      cr = $cos(2.0 * PI * k / 64.0) * ONE;
      ci = -$sin(2.0 * PI * k / 64.0) * ONE;
      check((real'(wr) - cr) <= 0.5 && (cr - real'(wr)) <= 0.5,
            $sformatf("e=%0d re=%0d exact %f", k, wr, cr));
      check((real'(wi) - ci) <= 0.5 && (ci - real'(wi)) <= 0.5,
            $sformatf("e=%0d im=%0d exact %f", k, wi, ci));
    end
    // exact points: W^0 = 1, W^16 = -j, W^32 = -1, W^48 = j
    e = 6'd0;  #1; check(wr == 1024 && wi == 0, "W^0");
    e = 6'd16; #1; check(wr == 0 && wi == -1024, "W^16");
    e = 6'd32; #1; check(wr == -1024 && wi == 0, "W^32");
    e = 6'd48; #1; check(wr == 0 && wi == 1024, "W^48");
    e = 6'd8;  #1; check(wr == 724 && wi == -724, "W^8 = (1-j)/sqrt2");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
