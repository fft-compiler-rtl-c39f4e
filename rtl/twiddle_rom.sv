// twiddle_rom: twiddle lookup table of one lane of the Pease FFT kernel
// (the "lookup" boxes of Fig. 3 of the FFT compiler paper).
//
// The core computes DFT_N, N = R^K, as K iterations of
// L_R^N (I_{N/R} (x) DFT_R) T_s^N on radix-R digit-reversed input, W words
// (W/R DFT_R blocks) per cycle. Word t of a vector belongs to DFT_R block
// c = t div R as its input j = t mod R. In iteration s it is multiplied by
//   w = exp(-2*pi*j * e / N),  e = j * (c - c mod R^(K-1-s))  mod N,
// i.e. by w_{R^(s+1)}^(j * floor(c / R^(K-1-s))). This table serves lane
// LANE of the W-word stream, so in cycle group g it holds the twiddle of
// block c = g*W/R + LANE div R, input j = LANE mod R. Lanes with j = 0 always
// get 1 and have no table. The table has K*N/W entries, addressed by {s, g}, and is
// computed at elaboration from that formula (Q2.14, rounded to nearest); the
// read is combinational, as the lookup sits in the combinational path
// ahead of the multiplier. The paper names the lookup and says only the
// constants change between iterations; the exponent formula is this
// design's own derivation of T_s^N, checked against the DFT definition.
module twiddle_rom
  import fft_pkg::*;
#(
  parameter int N    = 16,   // transform size, a power of R
  parameter int R    = 4,    // radix, 2 or 4
  parameter int W    = 4,    // words per cycle, a multiple of R
  parameter int LANE = 1,    // lane served, 0..W-1, not a multiple of R
  localparam int K   = $clog2(N) / $clog2(R),          // iterations
  localparam int STW = (K > 1) ? $clog2(K) : 1,
  localparam int GW  = $clog2(N / W)
) (
  input  logic [STW-1:0] stage,   // iteration s, 0..K-1
  input  logic [GW-1:0]  grp,     // cycle group g within the vector
  output tw_cplx_t       w
);

  localparam int G     = N / W;               // groups per vector
  localparam int DEPTH = K * G;

  typedef logic [2*TW_W-1:0] table_t [DEPTH];   // {re, im} per entry

  function automatic table_t build_table();
    table_t   t;
    tw_cplx_t v;
    real      ang;
    int       e, blk, c, j;
    for (int s = 0; s < K; s++) begin
      blk = 1;
      for (int d = 0; d < K - 1 - s; d++) blk = blk * R;   // R^(K-1-s)
      for (int g = 0; g < G; g++) begin
        c   = g * (W / R) + LANE / R;
        j   = LANE % R;
        e   = (j * (c - (c % blk))) % N;
        ang = 6.283185307179586 * real'(e) / real'(N);
        v.re = tw_t'($rtoi($floor( $cos(ang) * real'(1 << TW_FRAC) + 0.5)));
        v.im = tw_t'($rtoi($floor(-$sin(ang) * real'(1 << TW_FRAC) + 0.5)));
        t[s*G + g] = {v.re, v.im};
      end
    end
    return t;
  endfunction

  localparam table_t TABLE = build_table();

  always_comb begin
    w = tw_cplx_t'(TABLE[int'(stage) * G + int'(grp)]);
  end

endmodule
