// dft4: combinational 4-point DFT, y_k = sum_l x_l * exp(-2*pi*j*k*l/4).
//
// Built exactly as the factorisation
//   DFT_4 = (DFT_2 (x) I_2) . T_2^4 . (I_2 (x) DFT_2) . L_2^4
// of Fig. 1(g) of the FFT compiler paper:
//   1. L_2^4 reorders (x0,x1,x2,x3) to (x0,x2,x1,x3) (wiring only);
//   2. I_2 (x) DFT_2: butterflies on (x0,x2) and on (x1,x3);
//   3. T_2^4: the fourth word is multiplied by w_4 = -j, which is a swap
//      of real and imaginary parts and a negation (no multiplier);
//   4. DFT_2 (x) I_2: butterflies on words (0,2) and (1,3), outputs back to
//      positions (0,2) and (1,3).
// Outputs carry two growth bits (W+2 bits wide) and are exact; scaling is
// done by the caller. The sign of the constant follows the DFT definition
// exp(-2*pi*j*k*l/n).
module dft4 #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x_re [4],
  input  logic signed [W-1:0] x_im [4],
  output logic signed [W+1:0] y_re [4],
  output logic signed [W+1:0] y_im [4]
);

  // first column of butterflies, after L_2^4
  logic signed [W-1:0] a_in_re [2], a_in_im [2], b_in_re [2], b_in_im [2];
  logic signed [W:0]   a_re [2], a_im [2], b_re [2], b_im [2];
  // second column inputs, after the twiddle T_2^4
  logic signed [W:0]   c_in_re [2], c_in_im [2], d_in_re [2], d_in_im [2];
  logic signed [W+1:0] c_re [2], c_im [2], d_re [2], d_im [2];

  always_comb begin
    a_in_re = '{x_re[0], x_re[2]};
    a_in_im = '{x_im[0], x_im[2]};
    b_in_re = '{x_re[1], x_re[3]};
    b_in_im = '{x_im[1], x_im[3]};
  end

  dft2 #(.W(W)) u_bf_a (.x_re(a_in_re), .x_im(a_in_im), .y_re(a_re), .y_im(a_im));
  dft2 #(.W(W)) u_bf_b (.x_re(b_in_re), .x_im(b_in_im), .y_re(b_re), .y_im(b_im));

  // T_2^4 = diag(1, 1, 1, -j) on (a0, a1, b0, b1); -j * (p + jq) = q - jp
  always_comb begin
    c_in_re = '{a_re[0], b_re[0]};
    c_in_im = '{a_im[0], b_im[0]};
    d_in_re = '{a_re[1], b_im[1]};
    d_in_im = '{a_im[1], -b_re[1]};
  end

  dft2 #(.W(W+1)) u_bf_c (.x_re(c_in_re), .x_im(c_in_im), .y_re(c_re), .y_im(c_im));
  dft2 #(.W(W+1)) u_bf_d (.x_re(d_in_re), .x_im(d_in_im), .y_re(d_re), .y_im(d_im));

  always_comb begin
    y_re[0] = c_re[0];  y_im[0] = c_im[0];
    y_re[2] = c_re[1];  y_im[2] = c_im[1];
    y_re[1] = d_re[0];  y_im[1] = d_im[0];
    y_re[3] = d_re[1];  y_im[3] = d_im[1];
  end

endmodule
