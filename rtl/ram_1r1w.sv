// ram_1r1w: simple dual-port memory, one write port and one read port, both
// synchronous (read data appears the cycle after the address). This is the
// shape of an FPGA block RAM, the "hard memory macro" the streaming
// permutation is meant to map onto. Contents are not reset; only locations
// that were written are ever read. A read and a write of the same address
// in the same cycle return the old data.
module ram_1r1w #(
  parameter int W = 32,      // word width
  parameter int D = 8,       // depth in words
  localparam int AW = (D > 1) ? $clog2(D) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [W-1:0]  wdata,
  input  logic [AW-1:0] raddr,
  output logic [W-1:0]  rdata
);

  logic [W-1:0] mem [D];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
