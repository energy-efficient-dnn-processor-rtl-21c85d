// lpe: LUT-based processing engine.
//
// Holds the physical look-up table: 8 registers, each one a signed sum of
// the LPE's input activations. Twelve 8-to-1 multiplexers read the table in
// parallel, one per output channel, indexed by that channel's weight bits.
//
// 1b mode (binary weights, bit 1 = +a, bit 0 = -a): the table is built from
// 4 activations, entry j = a3 + sum_i(j[i] ? a_i : -a_i) for i = 0..2, i.e.
// the half of the 16 sign combinations whose weight MSB (a3's bit) is 1. The
// other half is the two's-complement negation of the mirrored entry:
// sum = -LUT[~w[2:0]]. That half is produced by a bitwise inverter and a
// multiplexer; the "+1" that completes the negation is returned as flag
// inv[o] and added as a carry by the cluster's add/sub tree.
//
// 2b..16b mode (one weight bit plane per cycle, bit 1 = +a, bit 0 = 0): the
// table holds all 8 combinations of 3 activations, entry j = sum_i j[i]*a_i,
// and is read with w[2:0]; w[3] is ignored and inv is 0.
//
// The entries are computed outside (by the cluster's trees during the
// A-step) and written through wr_en/wr_data; a write takes effect at the
// next clock edge. The read path is combinational.
// Entries are LUT_W = 18 bits wide, 2 bits wider than the document's 16b
// registers, so that a sum of four 16b activations cannot wrap.
module lpe
  import lp_pkg::*;
(
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 mode_1b,
  input  logic [LUT_N-1:0]     wr_en,
  input  lut_t                 wr_data [LUT_N],
  input  logic [3:0]           wsel    [N_OUT],   // weight bits of the 4 (or 3) lanes
  output lut_t                 out     [N_OUT],
  output logic [N_OUT-1:0]     inv
);

  lut_t lut_q [LUT_N];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int j = 0; j < LUT_N; j++) lut_q[j] <= '0;
    end else begin
      for (int j = 0; j < LUT_N; j++)
        if (wr_en[j]) lut_q[j] <= wr_data[j];
    end
  end

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      if (!mode_1b || wsel[o][3]) begin
        out[o] = lut_q[wsel[o][2:0]];
        inv[o] = 1'b0;
      end else begin
        out[o] = ~lut_q[~wsel[o][2:0]];
        inv[o] = 1'b1;
      end
    end
  end

endmodule
