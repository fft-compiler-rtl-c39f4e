// stride_perm_check: test harness for one stride_perm of size N, stride R
// and width W, used by tb_stride_perm. It streams NV vectors of random words, the first ones
// back to back and later ones with random idle cycles between groups, and
// checks every output group against y[j*N/R + i] = z[Ri + j] computed here
// from the stored input. It also checks that out_last marks the last group,
// and that the first result appears N/W + 2 cycles after the first group.
module stride_perm_check
  import fft_pkg::*;
#(
  parameter int N  = 16,
  parameter int R  = 4,
  parameter int W  = 4,
  parameter int NV = 12
) (
  input  logic clk,
  input  logic rst_n,
  output int   checks,
  output int   failures,
  output logic done
);
  localparam int G = N / W;        // groups per vector
  localparam int Q = N / R;        // words per stride block

  logic  in_valid, out_valid, out_last;
  cplx_t in_data [W], out_data [W];
  cplx_t vec [NV][N];
  int    ovec, ogrp, cyc, first_in, first_out;

  stride_perm #(.N(N), .R(R), .W(W)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_data(in_data),
                            .out_valid(out_valid), .out_last(out_last), .out_data(out_data));

  initial begin
    checks = 0; failures = 0; done = 1'b0;
    in_valid = 1'b0;
    for (int l = 0; l < W; l++) in_data[l] = '0;
    for (int v = 0; v < NV; v++)
      for (int e = 0; e < N; e++) begin
        vec[v][e].re = data_t'($urandom);
        vec[v][e].im = data_t'($urandom);
      end
    @(posedge clk iff rst_n);
    for (int v = 0; v < NV; v++) begin
      for (int g = 0; g < G; g++) begin
        // idle cycles between groups for the second half of the vectors
        if (v >= NV / 2) begin
          in_valid <= 1'b0;
          repeat ($urandom_range(0, 2)) @(posedge clk);
        end
        in_valid <= 1'b1;
        for (int l = 0; l < W; l++) in_data[l] <= vec[v][W*g + l];
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    wait (ovec == NV);
    @(posedge clk);
    done = 1'b1;
  end

  // output checker
  initial begin
    ovec = 0; ogrp = 0; cyc = 0; first_in = -1; first_out = -1;
    forever begin
      @(negedge clk);                 // sample between clock edges
      cyc++;
      if (in_valid && first_in < 0) first_in = cyc;
      if (out_valid) begin
        if (first_out < 0) begin
          first_out = cyc;
          checks++;
          if (first_out - first_in != G + 2) begin
            failures++;
            $display("FAIL R=%0d W=%0d N=%0d latency %0d, expected %0d", R, W, N, first_out - first_in, G + 2);
          end
        end
        for (int l = 0; l < W; l++) begin
          int q, i, j;
          q = W * ogrp + l;
          j = q / Q;
          i = q % Q;
          checks++;
          if (out_data[l] != vec[ovec][R*i + j]) begin
            failures++;
            $display("FAIL R=%0d W=%0d N=%0d vec %0d y[%0d]: got %h expected z[%0d]=%h",
                     R, W, N, ovec, q, out_data[l], R*i + j, vec[ovec][R*i + j]);
          end
        end
        checks++;
        if (out_last != (ogrp == G - 1)) begin
          failures++;
          $display("FAIL R=%0d W=%0d N=%0d out_last wrong at group %0d", R, W, N, ogrp);
        end
        if (ogrp == G - 1) begin ogrp = 0; ovec++; end
        else ogrp++;
      end
    end
  end
endmodule
