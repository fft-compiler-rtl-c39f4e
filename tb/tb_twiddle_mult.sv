// tb_twiddle_mult: self-checking test of the complex constant multiplier.
// Twiddles are unit-magnitude values exp(-j*theta) in Q2.14 (including the
// exact +-1 and +-j); data are random 16-bit words of magnitude below 2^15.
// The reference is the product in floating point, divided by 2^14 and
// rounded; the RTL must be within 1 LSB per part.
module tb_twiddle_mult;
  import fft_pkg::*;
  cplx_t    x, y;
  tw_cplx_t w;
  int checks = 0, failures = 0;

  twiddle_mult dut (.x(x), .w(w), .y(y));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real th, er, ei, xr, xi, wr, wi, mag;
    for (int t = 0; t < 4000; t++) begin
      th = 6.283185307179586 * real'(t % 64) / 64.0;
      w.re = tw_t'($rtoi($floor($cos(th) * 16384.0 + 0.5)));
      w.im = tw_t'($rtoi($floor(-$sin(th) * 16384.0 + 0.5)));
      do begin
        x.re = data_t'($urandom);
        x.im = data_t'($urandom);
        xr = real'(x.re); xi = real'(x.im);
        mag = $sqrt(xr * xr + xi * xi);
      end while (mag > 32000.0);
      #1;
      wr = real'(w.re); wi = real'(w.im);
      er = (xr * wr - xi * wi) / 16384.0;
      ei = (xr * wi + xi * wr) / 16384.0;
      checks += 2;
      if ((real'(y.re) - er > 1.0) || (er - real'(y.re) > 1.0) ||
          (real'(y.im) - ei > 1.0) || (ei - real'(y.im) > 1.0)) begin
        failures++;
        $display("FAIL x=(%0d,%0d) w=(%0d,%0d) got (%0d,%0d) expected (%f,%f)",
                 int'(x.re), int'(x.im), int'(w.re), int'(w.im), int'(y.re), int'(y.im), er, ei);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
