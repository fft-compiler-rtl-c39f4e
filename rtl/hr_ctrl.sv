// hr_ctrl: controller of the horizontally reused Pease FFT loop.
//
// With horizontal reuse one kernel L_R^N (I (x) DFT_R) T_s is run K times
// (N = R^K); its output is fed back to its input. This block produces the
// control signal that picks, per W-word group, either a new input vector
// (iteration 0) or the recirculated data (iterations 1..K-1), plus the
// iteration number s and group number g that address the twiddle tables.
//
// Front side (kernel input): counter pair (fr_stage, fr_grp). While
// fr_stage = 0 the core is ready for input (in_ready) and each accepted input
// group is written; otherwise each valid group coming back from the
// permutation (fb_valid) is written, unless it is a result. After N/W
// groups fr_stage advances, and after iteration K-1 it returns to 0, so the next vector may enter while the
// last iteration of the previous one is still being read out.
// Back side (permutation output): counter pair (bk_stage, bk_grp) tags each
// group leaving the permutation. Groups of iteration K-1 are the result
// (out_valid, out_last); all others are recirculated.
// Ready/valid on the input with in_valid allowed to drop between groups is
// this design's choice; the paper only says a control signal must choose
// between recirculated and new data.
module hr_ctrl
#(
  parameter int N = 16,
  parameter int R = 4,                        // radix
  parameter int W = 4,                        // words per cycle
  localparam int K   = $clog2(N) / $clog2(R),
  localparam int G   = N / W,
  localparam int GW  = $clog2(G),
  localparam int STW = (K > 1) ? $clog2(K) : 1
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           in_valid,    // a new input group is offered
  output logic           in_ready,    // ... and is taken this cycle if both
  input  logic           fb_valid,    // a group leaves the permutation
  output logic           sel_fb,      // 1: kernel input is the feedback
  output logic           wr_valid,    // kernel input group is valid
  output logic [STW-1:0] stage,       // iteration of the kernel input group
  output logic [GW-1:0]  grp,         // group number of the kernel input
  output logic           out_valid,   // the leaving group is a result
  output logic           out_last     // ... and the last of its vector
);

  logic [STW-1:0] fr_stage, bk_stage;
  logic [GW-1:0]  fr_grp, bk_grp;

  always_comb begin
    in_ready  = (fr_stage == '0);
    sel_fb    = !in_ready;
    out_valid = fb_valid && (bk_stage == STW'(K - 1));
    out_last  = out_valid && (bk_grp == GW'(G - 1));
    // a returning group is recirculated only if it is not a result: the
    // next vector's first iteration may finish while the previous
    // vector's results are still leaving
    wr_valid  = sel_fb ? (fb_valid && !out_valid) : in_valid;
    stage     = fr_stage;
    grp       = fr_grp;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      fr_stage <= '0;
      fr_grp   <= '0;
      bk_stage <= '0;
      bk_grp   <= '0;
    end else begin
      if (wr_valid) begin
        fr_grp <= fr_grp + 1'b1;
        if (fr_grp == GW'(G - 1)) begin
          fr_stage <= (fr_stage == STW'(K - 1)) ? '0 : fr_stage + 1'b1;
        end
      end
      if (fb_valid) begin
        bk_grp <= bk_grp + 1'b1;
        if (bk_grp == GW'(G - 1)) begin
          bk_stage <= (bk_stage == STW'(K - 1)) ? '0 : bk_stage + 1'b1;
        end
      end
    end
  end

  // recirculated data is never dropped: a group of iterations 0..K-2 leaving
  // the permutation always finds the kernel input switched to feedback
  a_fb_taken: assert property (@(posedge clk) disable iff (!rst_n)
    (fb_valid && bk_stage != STW'(K - 1)) |-> sel_fb);

endmodule
