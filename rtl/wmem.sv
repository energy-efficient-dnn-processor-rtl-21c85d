// wmem: weight memory, one bank per activation lane.
//
// Bank b holds the weights of the channels that lane b serves. A word is
// one weight bit for the 12 outputs of a group (bit o = output channel o).
// In bank b, slot j (channel L + NL*j of that lane) starts at address
// j * wstride. Within a slot the words are ordered by output group, kernel
// row, kernel column and weight bit, LSB first, so the controller walks
// them with a single counter, offset. In one read every bank returns
// mem_b[slot_b * wstride + offset]. rd_data is valid the cycle after rd_en
// (synchronous read). The write port loads one word of one bank per cycle.
// 64 banks x 384 words x 12 bits = 36 KB, the document's WMEM size; the
// banking and word layout are this design's choice.
module wmem
  import lp_pkg::*;
#(
  parameter int unsigned BANK_DEPTH = 384
) (
  input  logic                          clk,
  // load port
  input  logic                          we,
  input  logic [$clog2(N_LANE)-1:0]     wbank,
  input  logic [$clog2(BANK_DEPTH)-1:0] waddr,
  input  wword_t                        wdata,
  // parallel read
  input  logic                          rd_en,
  input  logic [4:0]                    slot [N_LANE],
  input  logic [15:0]                   wstride,
  input  logic [15:0]                   offset,
  output wword_t                        rd_data [N_LANE]
);

  localparam int unsigned AW = $clog2(BANK_DEPTH);

  for (genvar b = 0; b < N_LANE; b++) begin : g_bank
    wword_t         mem [BANK_DEPTH];
    logic [15:0]    addr;

    assign addr = 16'(slot[b] * wstride) + offset;

    always_ff @(posedge clk) begin
      if (we && wbank == ($clog2(N_LANE))'(b)) mem[waddr] <= wdata;
      if (rd_en) rd_data[b] <= mem[AW'(addr)];
    end
  end

  a_waddr_range: assert property (@(posedge clk) we |-> 32'(waddr) < BANK_DEPTH)
    else $error("weight write beyond the bank");

endmodule
