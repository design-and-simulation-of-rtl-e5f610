// tb_r4_butterfly: radix-4 butterfly against an independent model.
// Inputs are random IN_W-bit words; the twiddles are W^q, W^2q, W^3q for random q,
// computed here from cos/sin. The model rounds each twiddle product to the nearest
// integer and evaluates X(p) = sum_l b_l * exp(-j*pi/2*l*p) with explicit complex
// rotations, so the comparison is exact.
module tb_r4_butterfly;
  localparam int IN_W = 8;
  localparam int TW_W = 12;
  localparam real PI = 3.14159265358979323846;

  logic signed [IN_W-1:0] xr [4], xi [4];
  logic signed [TW_W-1:0] wr [4], wi [4];
  logic signed [IN_W+2:0] yr [4], yi [4];
  int checks = 0, failures = 0;

  r4_butterfly #(.IN_W(IN_W), .TW_W(TW_W)) dut (
    .x_re(xr), .x_im(xi), .w_re(wr), .w_im(wi), .y_re(yr), .y_im(yi));

  function automatic int tw(input int e, input bit im);
    real v;
    v = im ? -$sin(2.0 * PI * e / 64.0) : $cos(2.0 * PI * e / 64.0);
    return $rtoi($floor(v * 1024.0 + 0.5));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 1000; t++) begin
      int q;
      int ar [4], ai [4], br [4], bi [4];
      q = (t < 16) ? t : int'($urandom_range(15));
      for (int l = 0; l < 4; l++) begin
        ar[l] = (t == 1) ? -128 : int'($urandom_range(255)) - 128;
        ai[l] = (t == 1) ? -128 : int'($urandom_range(255)) - 128;
        xr[l] = IN_W'(ar[l]);
        xi[l] = IN_W'(ai[l]);
        wr[l] = TW_W'(tw(l * q % 64, 1'b0));
        wi[l] = TW_W'(tw(l * q % 64, 1'b1));
        br[l] = $rtoi($floor((real'(ar[l]) * tw(l * q % 64, 0) - real'(ai[l]) * tw(l * q % 64, 1)) / 1024.0 + 0.5));
        bi[l] = $rtoi($floor((real'(ar[l]) * tw(l * q % 64, 1) + real'(ai[l]) * tw(l * q % 64, 0)) / 1024.0 + 0.5));
      end
      #1;
      for (int p = 0; p < 4; p++) begin
        int er, ei;
        er = 0; ei = 0;
        for (int l = 0; l < 4; l++) begin
          // multiply b_l by (-j)^(l*p): rotate by -90 degrees (l*p mod 4) times
          int vr, vi, tmp;
          vr = br[l]; vi = bi[l];
          for (int r = 0; r < (l * p) % 4; r++) begin
            tmp = vr; vr = vi; vi = -tmp;
          end
          er += vr; ei += vi;
        end
        checks++;
        if (int'(yr[p]) != er || int'(yi[p]) != ei) begin
          failures++;
          if (failures < 10)
            $display("FAIL: q=%0d X(%0d) = (%0d,%0d), expected (%0d,%0d)", q, p, yr[p], yi[p], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
