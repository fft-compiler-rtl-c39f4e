// fft_pkg: types, constants and helper functions shared by the FFT datapath.
//
// Data words are complex fixed-point numbers with a 16-bit signed real part
// and a 16-bit signed imaginary part, the data format of the evaluated
// designs. Twiddle constants are 16-bit signed with 14 fraction bits
// (Q2.14), so that +1.0 and -1.0 are both exact; that twiddle format is a
// choice of this design. The radix, which is also the number of words moved
// per clock, is a parameter of the modules (R = 4 by default).
package fft_pkg;

  localparam int DATA_W  = 16;   // bits per real or imaginary part
  localparam int TW_W    = 16;   // bits per twiddle real or imaginary part
  localparam int TW_FRAC = 14;   // fraction bits of a twiddle constant

  typedef logic signed [DATA_W-1:0] data_t;
  typedef logic signed [TW_W-1:0]   tw_t;

  typedef struct packed {
    data_t re;
    data_t im;
  } cplx_t;

  typedef struct packed {
    tw_t re;
    tw_t im;
  } tw_cplx_t;

  // Saturate a wide signed value to DATA_W bits.
  function automatic data_t sat(input logic signed [DATA_W+TW_W:0] v);
    localparam logic signed [DATA_W+TW_W:0] MAXV = (1 <<< (DATA_W-1)) - 1;
    localparam logic signed [DATA_W+TW_W:0] MINV = -(1 <<< (DATA_W-1));
    if (v > MAXV)      return data_t'(MAXV);
    else if (v < MINV) return data_t'(MINV);
    else               return data_t'(v);
  endfunction

  // Base-2^dbits digit reversal of an index with `digits` digits
  // (dbits = 2 for radix 4, 1 for radix 2).
  function automatic int unsigned digit_rev(input int unsigned a, input int digits,
                                            input int dbits);
    int unsigned v = 0;
    int unsigned m = (1 << dbits) - 1;
    for (int d = 0; d < digits; d++) begin
      v = (v << dbits) | ((a >> (dbits * d)) & m);
    end
    return v;
  endfunction

endpackage
