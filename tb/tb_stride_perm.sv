// tb_stride_perm: self-checking test of the streaming stride permutation
// L_R^N at width W: R = W = 4 at N = 16 (the paper's size), 64 and 256,
// R = W = 2 at N = 16 and 256, and the wider cases R = 4, W = 16, N = 256,
// R = 2, W = 8, N = 64 and R = 2, W = 4, N = 16. Each is driven by a
// stride_perm_check harness (random data, back-to-back and gapped input,
// exact comparison, latency N/W + 2 cycles).
module tb_stride_perm;
  localparam int NI = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  int   c [NI], f [NI];
  logic d [NI];

  always #5 clk = ~clk;

  stride_perm_check #(.N(16),  .NV(12))              u0 (.clk(clk), .rst_n(rst_n), .checks(c[0]), .failures(f[0]), .done(d[0]));
  stride_perm_check #(.N(64),  .NV(8))               u1 (.clk(clk), .rst_n(rst_n), .checks(c[1]), .failures(f[1]), .done(d[1]));
  stride_perm_check #(.N(256), .NV(6))               u2 (.clk(clk), .rst_n(rst_n), .checks(c[2]), .failures(f[2]), .done(d[2]));
  stride_perm_check #(.N(16),  .R(2), .W(2), .NV(8)) u3 (.clk(clk), .rst_n(rst_n), .checks(c[3]), .failures(f[3]), .done(d[3]));
  stride_perm_check #(.N(256), .R(2), .W(2), .NV(4)) u4 (.clk(clk), .rst_n(rst_n), .checks(c[4]), .failures(f[4]), .done(d[4]));
  stride_perm_check #(.N(256), .R(4), .W(16), .NV(8)) u5 (.clk(clk), .rst_n(rst_n), .checks(c[5]), .failures(f[5]), .done(d[5]));
  stride_perm_check #(.N(64),  .R(2), .W(8), .NV(8)) u6 (.clk(clk), .rst_n(rst_n), .checks(c[6]), .failures(f[6]), .done(d[6]));
  stride_perm_check #(.N(16),  .R(2), .W(4), .NV(8)) u7 (.clk(clk), .rst_n(rst_n), .checks(c[7]), .failures(f[7]), .done(d[7]));

  function automatic int sum_c();
    int t = 0;
    for (int i = 0; i < NI; i++) t += c[i];
    return t;
  endfunction

  function automatic int sum_f();
    int t = 0;
    for (int i = 0; i < NI; i++) t += f[i];
    return t;
  endfunction

  function automatic bit all_done();
    for (int i = 0; i < NI; i++) if (!d[i]) return 1'b0;
    return 1'b1;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum_c(), sum_f() + 1);
    $finish;
  end

  initial begin
    @(posedge clk iff rst_n);
    while (!all_done()) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", sum_c(), sum_f());
    $finish;
  end
endmodule
