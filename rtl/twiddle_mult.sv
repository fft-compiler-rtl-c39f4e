// twiddle_mult: complex multiplication of one data word by one twiddle
// constant, y = x * w (one multiplier of the twiddle stage T_l^n, Fig. 1(e)
// and Fig. 3 of the FFT compiler paper).
//
// Four real products, one subtraction and one addition, then rounding to
// nearest (add half an LSB, arithmetic shift by TW_FRAC) and saturation to
// 16 bits. The twiddle is Q2.14, so |w| <= 1 never grows the magnitude;
// saturation only guards rounding at the very edge of the range. Purely
// combinational. The rounding and saturation are this design's choices.
module twiddle_mult
  import fft_pkg::*;
(
  input  cplx_t    x,
  input  tw_cplx_t w,
  output cplx_t    y
);

  localparam int PW = DATA_W + TW_W + 1;
  localparam logic signed [PW-1:0] HALF = PW'(1) <<< (TW_FRAC - 1);

  logic signed [PW-1:0] pre, pim;

  always_comb begin
    pre = PW'(x.re * w.re) - PW'(x.im * w.im) + HALF;
    pim = PW'(x.re * w.im) + PW'(x.im * w.re) + HALF;
    y.re = sat(pre >>> TW_FRAC);
    y.im = sat(pim >>> TW_FRAC);
  end

endmodule
