// tb_hr_ctrl: self-checking test of the horizontal-reuse controller for
// N = 64 (K = 3 iterations of 16 groups). The permutation is replaced by a
// cycle model written here: once 16 groups have been written, it returns 16
// groups on consecutive cycles starting 3 cycles after the last write. The
// test offers input vectors, back to back and then with random idle cycles,
// and checks, cycle by
// cycle, against counters kept here: the mux select, in_ready, the write
// strobe, the iteration and group that address the twiddles, and which
// returning groups are flagged as results (out_valid, out_last).
module tb_hr_ctrl;
  localparam int N = 64, K = 3, G = 16, NV = 6;
  logic       clk = 1'b0, rst_n = 1'b0;
  logic       in_valid, in_ready, fb_valid, sel_fb, wr_valid, out_valid, out_last;
  logic [1:0] stage;
  logic [3:0] grp;
  int checks = 0, failures = 0;
  int m_stage = 0, m_grp = 0;          // model of the kernel input counters
  int b_stage = 0, b_grp = 0;          // model of the returning group counters
  int pend = 0, delay = 0;             // permutation model
  int held = 0, results = 0, lasts = 0, stalls = 0, recirc = 0, sent = 0;

  always #5 clk = ~clk;

  hr_ctrl #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in_valid(in_valid), .in_ready(in_ready),
                        .fb_valid(fb_valid), .sel_fb(sel_fb), .wr_valid(wr_valid),
                        .stage(stage), .grp(grp), .out_valid(out_valid), .out_last(out_last));

  task automatic chk(input logic cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  // stimulus and checks, evaluated between clock edges
  initial begin
    in_valid = 1'b0; fb_valid = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    while (lasts < NV) begin
      @(negedge clk);
      in_valid = (sent < NV * G) && (sent < NV * G / 2 || $urandom_range(0, 3) != 0);
      fb_valid = (pend > 0) && (delay == 0);
      #1;
      chk(in_ready == (m_stage == 0), "in_ready");
      chk(sel_fb == (m_stage != 0), "sel_fb");
      chk(wr_valid == ((m_stage == 0) ? in_valid : (fb_valid && b_stage != K - 1)), "wr_valid");
      chk(int'(stage) == m_stage && int'(grp) == m_grp, "stage/grp");
      chk(out_valid == (fb_valid && b_stage == K - 1), "out_valid");
      chk(out_last == (fb_valid && b_stage == K - 1 && b_grp == G - 1), "out_last");
      if (in_valid && !in_ready) stalls++;
      if (wr_valid && sel_fb) recirc++;
      if (in_valid && in_ready) sent++;
      if (out_valid) results++;
      if (out_last) lasts++;
      if (out_valid && sel_fb) held++;
      @(posedge clk);
      // advance the models
      if (fb_valid) begin
        pend--;
        if (b_grp == G - 1) begin b_grp = 0; b_stage = (b_stage + 1) % K; end
        else b_grp++;
      end else if (delay > 0) delay--;
      if (wr_valid) begin
        if (m_grp == G - 1) begin
          m_grp = 0; m_stage = (m_stage + 1) % K;
          if (pend == 0) delay = 2;
          pend += G;
        end else m_grp++;
      end
    end
    chk(results == NV * G, "result group count");
    chk(stalls > 0, "input was held off while recirculating");
    chk(held > 0, "a result left while the next vector was recirculating");
    chk(recirc == NV * G * (K - 1), "recirculated group count");
    $display("vectors=%0d result groups=%0d recirculated groups=%0d input stalls=%0d results during recirculation=%0d",
             lasts, results, recirc, stalls, held);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
