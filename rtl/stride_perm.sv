// stride_perm: streaming stride permutation y = L_R^N z followed by the
// output register (the "L_4^16" and "reg" blocks of Fig. 3 of the FFT
// compiler paper, for R = 4, W = 4 and N = 16).
//
// Function: a vector z of N complex words arrives W words per cycle, group
// g (g = 0 .. N/W-1) holding z[Wg .. Wg+W-1] in lanes 0..W-1. It leaves W
// words per cycle in the same layout with y[j*N/R + i] = z[R*i + j]: word j
// of every R-word block of z is gathered into the j-th R-th of y.
//
// How: W single-read single-write RAM banks, each split in two halves
// (double buffering), so one vector is written while the previous one is
// read. Word z[p], p = Wg + lane, is stored in bank (lane + g) mod W at row g
// of the current half. The skew makes every write group and every read
// group touch each bank exactly once, so one RAM port per bank per direction
// suffices. Output group h, lane l, is y[Wh + l] = z[p] with
// p = R*(i0 + l) + j, j = Wh div (N/R), i0 = Wh mod (N/R); these W words come
// from R consecutive input groups and land in W different banks. A W-way
// rotation places the words in front of the banks, and a W-way selection
// puts them back in lane order behind the banks. Needs N/R to be a multiple
// of W (N >= R*W), all three powers of two.
//
// Timing: in_valid may drop between groups. Once the last group of a
// vector is written, that half is read on the next N/W consecutive cycles;
// RAM read takes one cycle and the output register another, so out_valid
// rises 3 cycles after the last input group (latency N/W + 2 cycles from the
// first input group when groups arrive back to back). Vectors may follow
// each other with no gap. The writer must not fill a half that is still
// being read; the two halves make that impossible at up to one group per
// cycle, and an assertion checks it. out_last marks the last group.
// The banked, skewed memory organisation is this design's choice: the
// paper gives the permutation's function, not its insides.
module stride_perm
  import fft_pkg::*;
#(
  parameter int N = 16,                       // vector length, R^K, K >= 2
  parameter int R = 4,                        // stride of the permutation
  parameter int W = 4,                        // words per cycle
  localparam int G  = N / W,                  // groups per vector
  localparam int GW = (G > 1) ? $clog2(G) : 1,
  localparam int LW = $clog2(W)               // lane / bank index width
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  cplx_t in_data  [W],
  output logic  out_valid,
  output logic  out_last,
  output cplx_t out_data [W]
);

  localparam int CW = 2 * DATA_W;

  // ---------------- write side ----------------
  logic [GW-1:0] wr_cnt;
  logic          wr_half;
  logic [1:0]    full;                        // half holds a complete vector

  // ---------------- read side -----------------
  logic [GW-1:0] rd_cnt;
  logic          rd_half;
  logic          rd_en;
  logic          rd_v_q, rd_last_q;

  logic [GW:0]   waddr [W];
  logic [GW:0]   raddr [W];
  logic [CW-1:0] wdata [W];
  logic [CW-1:0] rdata [W];

  // lane/bank rotations are taken modulo W on unsigned LW-bit values
  logic [LW-1:0] wr_lane  [W];                // input lane stored in bank b
  logic [LW-1:0] rd_bank  [W];                // bank holding output lane l
  logic [LW-1:0] rd_bank_q[W];
  logic [GW-1:0] rd_row   [W];                // its row

  assign rd_en = full[rd_half];

  always_comb begin
    int q0, j, i0, p;
    q0 = int'(rd_cnt) * W;
    j  = q0 / (N / R);
    i0 = q0 % (N / R);
    for (int b = 0; b < W; b++) begin
      // bank b holds, in row g, the word of input lane (b - g) mod W
      wr_lane[b] = LW'(b) - LW'(wr_cnt);
      wdata[b]   = in_data[wr_lane[b]];
      waddr[b]   = {wr_half, wr_cnt};
      raddr[b]   = '0;
    end
    for (int l = 0; l < W; l++) begin
      // output lane l is z[p], stored in bank (p mod W + p div W) mod W
      p          = R * (i0 + l) + j;
      rd_row[l]  = GW'(p / W);
      rd_bank[l] = LW'(p % W) + LW'(p / W);
      raddr[rd_bank[l]] = {rd_half, rd_row[l]};
    end
  end

  for (genvar b = 0; b < W; b++) begin : g_bank
    ram_1r1w #(.W(CW), .D(2 * G)) u_bank (
      .clk   (clk),
      .we    (in_valid),
      .waddr (waddr[b]),
      .wdata (wdata[b]),
      .raddr (raddr[b]),
      .rdata (rdata[b])
    );
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      wr_half   <= 1'b0;
      rd_cnt    <= '0;
      rd_half   <= 1'b0;
      full      <= '0;
      rd_v_q    <= 1'b0;
      rd_last_q <= 1'b0;
      out_valid <= 1'b0;
      out_last  <= 1'b0;
    end else begin
      if (in_valid) begin
        wr_cnt <= (wr_cnt == GW'(G - 1)) ? '0 : wr_cnt + 1'b1;
        if (wr_cnt == GW'(G - 1)) begin
          full[wr_half] <= 1'b1;
          wr_half       <= ~wr_half;
        end
      end
      if (rd_en) begin
        rd_cnt <= (rd_cnt == GW'(G - 1)) ? '0 : rd_cnt + 1'b1;
        if (rd_cnt == GW'(G - 1)) begin
          full[rd_half] <= 1'b0;
          rd_half       <= ~rd_half;
        end
      end
      rd_v_q    <= rd_en;
      rd_last_q <= rd_en && (rd_cnt == GW'(G - 1));
      out_valid <= rd_v_q;
      out_last  <= rd_last_q;
    end
  end

  // output register: lane l comes from the bank it was read from
  always_ff @(posedge clk) begin
    rd_bank_q <= rd_bank;
    if (rd_v_q) begin
      for (int l = 0; l < W; l++) begin
        out_data[l] <= cplx_t'(rdata[rd_bank_q[l]]);
      end
    end
  end

  // a half may only be refilled after it has been read out completely
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
    (in_valid && wr_cnt == GW'(G - 1)) |-> !full[wr_half]);

endmodule
