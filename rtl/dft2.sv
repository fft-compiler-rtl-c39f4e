// dft2: 2-point DFT butterfly, y0 = x0 + x1 and y1 = x0 - x1, on complex
// words (Fig. 1(f) of the FFT compiler paper: one adder, one subtractor).
//
// Purely combinational. The outputs are one bit wider than the inputs, so
// the butterfly never overflows; any scaling is left to the user. The
// parameterised width is this design's choice.
module dft2 #(
  parameter int W = 16
) (
  input  logic signed [W-1:0] x_re [2],
  input  logic signed [W-1:0] x_im [2],
  output logic signed [W:0]   y_re [2],
  output logic signed [W:0]   y_im [2]
);

  always_comb begin
    y_re[0] = (W+1)'(x_re[0]) + (W+1)'(x_re[1]);
    y_im[0] = (W+1)'(x_im[0]) + (W+1)'(x_im[1]);
    y_re[1] = (W+1)'(x_re[0]) - (W+1)'(x_re[1]);
    y_im[1] = (W+1)'(x_im[0]) - (W+1)'(x_im[1]);
  end

endmodule
