// pease_fft: horizontally reused Pease FFT (the datapath of Fig. 3 of the
// FFT compiler paper, formula
//   DFT_N = prod^hr_{s=0..K-1} L_R^N (I_{N/W} (x)^sr (I_{W/R} (x) DFT_R)) T_s^N,
// N = R^K, with radix R and streaming width W; default R = W = 4, N = 16,
// K = 2, which is the paper's example DFT'_{4^2}).
//
// One kernel is built and used K times per transform. A W-word group
// enters per cycle through a mux that picks the input port (iteration 0) or
// the kernel's own output (iterations 1..K-1). Every lane whose position
// inside its R-word block is not 0 is multiplied by a twiddle from its own
// lookup table (for W = R = 4: lanes 1..3, lane 0 is never multiplied). The
// W words then go through W/R parallel combinational DFT_R blocks (dft4, or
// dft2 for R = 2), are scaled by 1/R (rounded, saturated) and enter the
// streaming stride permutation L_R^N, whose output register closes the
// loop. hr_ctrl drives the mux and the table addresses and marks the groups
// of the last iteration as the result.
//
// Data format: complex words, 16-bit signed real and imaginary parts.
// Because each iteration scales by 1/R, out = DFT_N(x) / N. No overflow can
// occur while every input word has complex magnitude below 2^15 - 4*K.
//
// Ordering: input vector x arrives in radix-R digit-reversed order: group g,
// lane l holds x[rev_R(W*g + l)]. The result leaves in natural order: group
// g, lane l holds X[W*g + l] / N.
//
// Interface and timing: in_valid/in_ready handshake per group; in_valid may
// drop between groups. in_ready is low while iterations 1..K-1 run. With
// back-to-back input the first result group appears K*(N/W + 2) cycles after
// the first input group was taken, the N/W result groups follow on
// consecutive cycles, and a new vector can start every K*(N/W + 2) - 2
// cycles. There is no output backpressure. Needs N >= R*W.
// Follows the paper: the kernel structure, the feedback mux, a twiddle
// lookup and multiplier per lane that needs one, W/R parallel DFT_R blocks,
// radix 4 with width 4 as the main configuration, radix and streaming width
// as parameters of the formula, 16-bit data and digit-reversed input. This
// design's own choices: per-iteration 1/R scaling, Q2.14 twiddles, the
// handshake and the permutation's memory organisation.
module pease_fft
  import fft_pkg::*;
#(
  parameter int N = 16,                       // transform size, R^K, K >= 2
  parameter int R = 4,                        // radix, 2 or 4
  parameter int W = 4,                        // words per cycle, R * 2^m
  localparam int K   = $clog2(N) / $clog2(R),
  localparam int G   = N / W,
  localparam int GW  = $clog2(G),
  localparam int STW = (K > 1) ? $clog2(K) : 1
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  cplx_t in_data  [W],
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out_data [W]
);

  localparam int SH = $clog2(R);              // growth bits of DFT_R
  localparam int XW = DATA_W + TW_W + 1;      // width handed to sat()

  logic           sel_fb, wr_valid, fb_valid, fb_last_unused;
  logic [STW-1:0] stage;
  logic [GW-1:0]  grp;
  cplx_t          fb_data  [W];
  cplx_t          kin      [W];
  cplx_t          tw_out   [W];
  cplx_t          perm_in  [W];
  data_t          dk_in_re [W], dk_in_im [W];
  logic signed [DATA_W+SH-1:0] dk_re [W], dk_im [W];

  hr_ctrl #(.N(N), .R(R), .W(W)) u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .in_ready  (in_ready),
    .fb_valid  (fb_valid),
    .sel_fb    (sel_fb),
    .wr_valid  (wr_valid),
    .stage     (stage),
    .grp       (grp),
    .out_valid (out_valid),
    .out_last  (out_last)
  );

  // input mux: new vector or recirculated kernel output
  always_comb begin
    for (int l = 0; l < W; l++) kin[l] = sel_fb ? fb_data[l] : in_data[l];
  end

  // twiddle stage T_s^N: the first input of each DFT_R block passes, the
  // others multiply by a lookup
  for (genvar l = 0; l < W; l++) begin : g_tw
    if (l % R == 0) begin : g_pass
      assign tw_out[l] = kin[l];
    end else begin : g_mul
      tw_cplx_t tw;
      twiddle_rom #(.N(N), .R(R), .W(W), .LANE(l)) u_rom (.stage(stage), .grp(grp), .w(tw));
      twiddle_mult u_mul (.x(kin[l]), .w(tw), .y(tw_out[l]));
    end
  end

  always_comb begin
    for (int l = 0; l < W; l++) begin
      dk_in_re[l] = tw_out[l].re;
      dk_in_im[l] = tw_out[l].im;
    end
  end

  // W/R parallel DFT_R blocks, block k on lanes R*k .. R*k+R-1
  for (genvar k = 0; k < W / R; k++) begin : g_blk
    data_t                       b_in_re [R], b_in_im [R];
    logic signed [DATA_W+SH-1:0] b_re [R], b_im [R];
    always_comb begin
      for (int j = 0; j < R; j++) begin
        b_in_re[j]     = dk_in_re[R*k + j];
        b_in_im[j]     = dk_in_im[R*k + j];
        dk_re[R*k + j] = b_re[j];
        dk_im[R*k + j] = b_im[j];
      end
    end
    if (R == 4) begin : g_dft4
      dft4 #(.W(DATA_W)) u_dft (.x_re(b_in_re), .x_im(b_in_im), .y_re(b_re), .y_im(b_im));
    end else begin : g_dft2
      dft2 #(.W(DATA_W)) u_dft (.x_re(b_in_re), .x_im(b_in_im), .y_re(b_re), .y_im(b_im));
    end
  end

  // scale by 1/R with rounding to nearest
  always_comb begin
    for (int l = 0; l < W; l++) begin
      perm_in[l].re = sat((XW'(dk_re[l]) + (XW'(1) <<< (SH - 1))) >>> SH);
      perm_in[l].im = sat((XW'(dk_im[l]) + (XW'(1) <<< (SH - 1))) >>> SH);
    end
  end

  stride_perm #(.N(N), .R(R), .W(W)) u_perm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (wr_valid),
    .in_data   (perm_in),
    .out_valid (fb_valid),
    .out_last  (fb_last_unused),
    .out_data  (fb_data)
  );

  assign out_data = fb_data;

  // only radix 2 and radix 4 kernels exist; W must hold whole DFT_R blocks
  if ((R != 2 && R != 4) || W % R != 0 || N < R * W) begin : g_bad_param
    $error("pease_fft: needs R in {2, 4}, W a multiple of R and N >= R*W");
  end

endmodule
