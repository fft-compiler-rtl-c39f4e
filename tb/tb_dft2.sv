// tb_dft2: self-checking test of the 2-point butterfly. Random and extreme
// 16-bit inputs; expected outputs are computed here with plain integer
// arithmetic (x0 + x1, x0 - x1) and compared exactly.
module tb_dft2;
  localparam int W = 16;
  logic signed [W-1:0] x_re [2], x_im [2];
  logic signed [W:0]   y_re [2], y_im [2];
  int checks = 0, failures = 0;

  dft2 #(.W(W)) dut (.x_re(x_re), .x_im(x_im), .y_re(y_re), .y_im(y_im));

  task automatic check(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 2000; t++) begin
      if (t < 4) begin
        x_re[0] = (t[0]) ? -16'sd32768 : 16'sd32767;
        x_re[1] = (t[1]) ? -16'sd32768 : 16'sd32767;
        x_im[0] = x_re[1];
        x_im[1] = x_re[0];
      end else begin
        for (int i = 0; i < 2; i++) begin
          x_re[i] = W'($urandom);
          x_im[i] = W'($urandom);
        end
      end
      #1;
      check(int'(y_re[0]), int'(x_re[0]) + int'(x_re[1]), "y0.re");
      check(int'(y_im[0]), int'(x_im[0]) + int'(x_im[1]), "y0.im");
      check(int'(y_re[1]), int'(x_re[0]) - int'(x_re[1]), "y1.re");
      check(int'(y_im[1]), int'(x_im[0]) - int'(x_im[1]), "y1.im");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
