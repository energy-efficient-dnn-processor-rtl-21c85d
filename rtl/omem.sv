// omem: output memory, one of the two ping-pong banks.
//
// A simple dual-port synchronous RAM: one write port and one read port,
// read data valid the cycle after re. A word holds the 12 16-bit output
// features that one partial sum of 12 output channels updates. With the
// default 256 words a bank stores 256 x 12 x 2 B = 6 KB, the document's
// OMEM size. A read of the address being written returns the old word.
// The contents start undefined; pingpong_accum clears a bank before use.
module omem
  import lp_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  act_t                     wdata [N_OUT],
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output act_t                     rdata [N_OUT]
);

  logic [N_OUT*ACT_W-1:0] mem [DEPTH];
  logic [N_OUT*ACT_W-1:0] wflat, rflat;

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      wflat[o*ACT_W +: ACT_W] = wdata[o];
      rdata[o] = rflat[o*ACT_W +: ACT_W];
    end
  end

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wflat;
    if (re) rflat <= mem[raddr];
  end

endmodule
