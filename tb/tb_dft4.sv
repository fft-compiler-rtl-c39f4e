// tb_dft4: self-checking test of the combinational 4-point DFT. The
// reference evaluates y_k = sum_l x_l * (-j)^(k*l) directly as a matrix-
// vector product with integers, independent of the butterfly structure,
// and the outputs must match exactly.
module tb_dft4;
  localparam int W = 16;
  logic signed [W-1:0] x_re [4], x_im [4];
  logic signed [W+1:0] y_re [4], y_im [4];
  int checks = 0, failures = 0;

  dft4 #(.W(W)) dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int er, ei, m;
    for (int t = 0; t < 3000; t++) begin
      for (int i = 0; i < 4; i++) begin
        if (t < 16) begin
          x_re[i] = (t[i]) ? -16'sd32768 : 16'sd32767;
          x_im[i] = (t[i]) ? 16'sd32767 : -16'sd32768;
        end else begin
          x_re[i] = W'($urandom);
          x_im[i] = W'($urandom);
        end
      end
      #1;
      for (int k = 0; k < 4; k++) begin
        er = 0; ei = 0;
        for (int l = 0; l < 4; l++) begin
          m = (k * l) % 4;            // (-j)^m
          case (m)
            0: begin er += x_re[l]; ei += x_im[l]; end
            1: begin er += x_im[l]; ei -= x_re[l]; end
            2: begin er -= x_re[l]; ei -= x_im[l]; end
            default: begin er -= x_im[l]; ei += x_re[l]; end
          endcase
        end
        checks += 2;
        if (int'(y_re[k]) != er || int'(y_im[k]) != ei) begin
          failures++;
          $display("FAIL t=%0d k=%0d got (%0d,%0d) expected (%0d,%0d)",
                   t, k, y_re[k], y_im[k], er, ei);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
