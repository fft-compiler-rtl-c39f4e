// tb_twiddle_rom: self-checking test of the twiddle lookup tables for
// radix 4, width 4 at N = 16 (all three lanes) and N = 256 (lane 3), radix 2,
// width 2 at N = 16 (lane 1), and radix 4, width 16 at N = 256 (all twelve
// lanes that have a table). Lane l in cycle group g carries input
// j = l mod R of DFT_R block c = g*W/R + l div R; the reference twiddle of
// iteration s is w_{R^(s+1)}^(j * floor(c / R^(K-1-s))), evaluated here in
// floating point; each table entry must be within 1 LSB of it (Q2.14).
module tb_twiddle_rom;
  import fft_pkg::*;
  int checks = 0, failures = 0;

  logic [0:0] st16;
  logic [1:0] gr16;
  tw_cplx_t   w16 [1:3];
  logic [1:0] st256;
  logic [5:0] gr256;
  tw_cplx_t   w256;
  logic [1:0] st2;
  logic [2:0] gr2;
  tw_cplx_t   w2;
  logic [1:0] stw;
  logic [3:0] grw;
  tw_cplx_t   ww [16];

  for (genvar j = 1; j <= 3; j++) begin : g16
    twiddle_rom #(.N(16), .LANE(j)) u (.stage(st16), .grp(gr16), .w(w16[j]));
  end
  twiddle_rom #(.N(256), .LANE(3)) u256 (.stage(st256), .grp(gr256), .w(w256));
  twiddle_rom #(.N(16), .R(2), .W(2), .LANE(1)) u2 (.stage(st2), .grp(gr2), .w(w2));
  for (genvar l = 0; l < 16; l++) begin : gw
    if (l % 4 != 0) begin : g_tab
      twiddle_rom #(.N(256), .R(4), .W(16), .LANE(l)) u (.stage(stw), .grp(grw), .w(ww[l]));
    end else begin : g_one
      assign ww[l] = '0;
    end
  end

  // lane l of cycle group g, width w, iteration s, K = k, lr = log2 of the radix
  task automatic check(input tw_cplx_t got, input int l, input int s, input int g, input int k,
                       input int lr, input int w);
    real ang, er, ei;
    int  q, j, c;
    j   = l % (1 << lr);
    c   = g * (w >> lr) + l / (1 << lr);
    q   = c / (1 << (lr * (k - 1 - s)));
    ang = 6.283185307179586 * real'(j * q) / real'(1 << (lr * (s + 1)));
    er  = $cos(ang) * 16384.0;
    ei  = -$sin(ang) * 16384.0;
    checks += 2;
    if ((real'(got.re) - er > 1.0) || (er - real'(got.re) > 1.0) ||
        (real'(got.im) - ei > 1.0) || (ei - real'(got.im) > 1.0)) begin
      failures++;
      $display("FAIL log2R=%0d W=%0d K=%0d lane %0d s=%0d g=%0d: got (%0d,%0d) expected (%f,%f)",
               lr, w, k, l, s, g, int'(got.re), int'(got.im), er, ei);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 2; s++) begin
      for (int c = 0; c < 4; c++) begin
        st16 = 1'(s); gr16 = 2'(c);
        #1;
        for (int j = 1; j <= 3; j++) check(w16[j], j, s, c, 2, 2, 4);
      end
    end
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < 64; c++) begin
        st256 = 2'(s); gr256 = 6'(c);
        #1;
        check(w256, 3, s, c, 4, 2, 4);
      end
    end
    for (int s = 0; s < 4; s++) begin
      for (int c = 0; c < 8; c++) begin
        st2 = 2'(s); gr2 = 3'(c);
        #1;
        check(w2, 1, s, c, 4, 1, 2);
      end
    end
    for (int s = 0; s < 4; s++) begin
      for (int g = 0; g < 16; g++) begin
        stw = 2'(s); grw = 4'(g);
        #1;
        for (int l = 0; l < 16; l++)
          if (l % 4 != 0) check(ww[l], l, s, g, 4, 2, 16);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
