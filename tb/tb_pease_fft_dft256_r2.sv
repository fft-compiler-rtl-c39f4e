// tb_pease_fft_dft256_r2: the same end-to-end test as tb_pease_fft, run on a
// radix-2 core of size 256 (two words per cycle, eight iterations).
//
// Vectors: an impulse, a constant, a single complex tone, then random
// vectors with complex magnitude up to 30000. Each vector is fed in radix-R
// digit-reversed order, W words per cycle. The first vectors are offered
// back to back (in_valid held high), the rest with random idle cycles. Each
// result word is compared with DFT_N(x)/N computed here in floating point;
// the error must stay within TOL LSBs per part.
// Timing checks: the first result group appears K*(N/W+2) cycles after the
// first input group, results come out on consecutive cycles, and with input
// always offered a new vector starts every K*(N/W+2)-2 cycles.
// Mechanisms counted (each must occur): recirculation of the kernel output
// into the kernel input, input held off (in_ready low while in_valid high)
// during recirculation, idle input cycles inside a vector, and a new vector
// entering while the previous result is still leaving.
module tb_pease_fft_dft256_r2;
  import fft_pkg::*;
  localparam int N   = 256;
  localparam int R   = 2;
  localparam int W   = 2;
  localparam int K   = 8;
  localparam int G   = N / W;
  localparam int NV  = 8;
  localparam int TOL = 2 * K + 1;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  in_valid, in_ready, out_valid, out_last;
  cplx_t in_data [W], out_data [W];

  real   xr [NV][N], xi [NV][N];
  int    checks = 0, failures = 0, max_err = 0;
  int    cyc = 0, ovec = 0, ogrp = 0;
  int    start_cyc [NV];
  int    first_out [NV];
  int    n_recirc = 0, n_stall = 0, n_idle = 0, n_overlap = 0;

  always #5 clk = ~clk;

  pease_fft #(.N(N), .R(R), .W(W)) dut (
    .clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready), .in_data(in_data),
    .out_valid(out_valid), .out_last(out_last), .out_data(out_data)
  );

  task automatic fail(input string msg);
    failures++;
    if (failures < 20) $display("FAIL %s", msg);
  endtask

  initial begin
    repeat (2 * NV * (K * (G + 2) + 3 * G) + 1000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // test vectors
  initial begin
    real a, p;
    for (int v = 0; v < NV; v++) begin
      for (int e = 0; e < N; e++) begin
        case (v)
          0: begin xr[v][e] = (e == 0) ? 30000.0 : 0.0; xi[v][e] = 0.0; end
          1: begin xr[v][e] = 20000.0; xi[v][e] = -10000.0; end
          2: begin
            p = 6.283185307179586 * 3.0 * real'(e) / real'(N);
            xr[v][e] = 29000.0 * $cos(p); xi[v][e] = 29000.0 * $sin(p);
          end
          default: begin
            a = 30000.0 * real'($urandom_range(0, 1000)) / 1000.0;
            p = 6.283185307179586 * real'($urandom_range(0, 9999)) / 10000.0;
            xr[v][e] = $floor(a * $cos(p)); xi[v][e] = $floor(a * $sin(p));
          end
        endcase
        xr[v][e] = $floor(xr[v][e]);
        xi[v][e] = $floor(xi[v][e]);
      end
    end
  end

  // driver: group g of vector v carries x[rev_R(Wg + l)] in lane l; inputs
  // change 1 time unit after the rising edge
  initial begin
    int idx;
    in_valid = 1'b0;
    for (int l = 0; l < W; l++) in_data[l] = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1;
    for (int v = 0; v < NV; v++) begin
      for (int g = 0; g < G; g++) begin
        if (v >= NV / 2 && $urandom_range(0, 2) == 0) begin
          in_valid = 1'b0;
          repeat ($urandom_range(1, 3)) @(posedge clk);
          #1;
        end
        in_valid = 1'b1;
        for (int l = 0; l < W; l++) begin
          idx = int'(digit_rev(W * g + l, K, $clog2(R)));
          in_data[l].re = data_t'($rtoi(xr[v][idx]));
          in_data[l].im = data_t'($rtoi(xi[v][idx]));
        end
        @(posedge clk iff in_ready);
        #1;
      end
    end
    in_valid = 1'b0;
  end

  // cycle counter, input monitor and mechanism counters, sampled mid-cycle
  int ivec = 0, igrp = 0, ovec_m = 0, ogrp_m = 0;
  always @(negedge clk) begin
    cyc++;
    if (rst_n) begin
      if (in_valid && in_ready) begin
        if (igrp == 0) start_cyc[ivec] = cyc;
        if (igrp == G - 1) begin igrp = 0; ivec++; end
        else igrp++;
      end
      if (out_valid) begin
        if (ogrp_m == 0) first_out[ovec_m] = cyc;
        if (ogrp_m == G - 1) begin ogrp_m = 0; ovec_m++; end
        else ogrp_m++;
      end
      if (dut.u_ctrl.sel_fb && dut.u_ctrl.wr_valid) n_recirc++;
      if (in_valid && !in_ready) n_stall++;
      if (in_valid && in_ready && out_valid) n_overlap++;
      if (!in_valid && ivec < NV && igrp != 0) n_idle++;
    end
  end

  // result checker
  initial begin
    real er, ei, ang, dr, di;
    int  k;
    @(posedge clk iff rst_n);
    while (ovec < NV) begin
      @(negedge clk);
      if (out_valid) begin
        for (int l = 0; l < W; l++) begin
          k = W * ogrp + l;
          er = 0.0; ei = 0.0;
          for (int e = 0; e < N; e++) begin
            ang = -6.283185307179586 * real'((k * e) % N) / real'(N);
            er += xr[ovec][e] * $cos(ang) - xi[ovec][e] * $sin(ang);
            ei += xr[ovec][e] * $sin(ang) + xi[ovec][e] * $cos(ang);
          end
          er = er / real'(N); ei = ei / real'(N);
          dr = real'(out_data[l].re) - er; if (dr < 0.0) dr = -dr;
          di = real'(out_data[l].im) - ei; if (di < 0.0) di = -di;
          if ($rtoi(dr) > max_err) max_err = $rtoi(dr);
          if ($rtoi(di) > max_err) max_err = $rtoi(di);
          checks++;
          if (dr > real'(TOL) || di > real'(TOL))
            fail($sformatf("vector %0d X[%0d]: got (%0d,%0d) expected (%f,%f)",
                           ovec, k, out_data[l].re, out_data[l].im, er, ei));
        end
        checks++;
        if (out_last != (ogrp == G - 1)) fail($sformatf("out_last at vector %0d group %0d", ovec, ogrp));
        if (ogrp == G - 1) begin ogrp = 0; ovec++; end
        else ogrp++;
      end else if (ogrp != 0) begin
        checks++;
        fail("result groups not on consecutive cycles");
      end
    end
    // latency of the first vector and gap between back-to-back vectors
    checks++;
    if (first_out[0] - start_cyc[0] != K * (G + 2))
      fail($sformatf("latency %0d, expected %0d", first_out[0] - start_cyc[0], K * (G + 2)));
    for (int v = 1; v < NV / 2; v++) begin
      checks++;
      if (start_cyc[v] - start_cyc[v-1] != K * (G + 2) - 2)
        fail($sformatf("gap %0d, expected %0d", start_cyc[v] - start_cyc[v-1], K * (G + 2) - 2));
    end
    $display("R=%0d W=%0d N=%0d vectors=%0d max_err=%0d LSB latency=%0d gap=%0d", R, W, N, NV, max_err,
             first_out[0] - start_cyc[0], start_cyc[1] - start_cyc[0]);
    $display("mechanisms: recirculated groups=%0d input stalls=%0d idle input cycles=%0d overlapped in/out=%0d",
             n_recirc, n_stall, n_idle, n_overlap);
    checks += 4;
    if (n_recirc != NV * G * (K - 1)) fail("recirculation count");
    if (n_stall == 0) fail("input never held off");
    if (n_idle == 0) fail("no idle input cycle");
    if (n_overlap == 0) fail("no overlap of input and output");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
