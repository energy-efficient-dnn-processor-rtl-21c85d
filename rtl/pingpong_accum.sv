// pingpong_accum: ping-pong accumulation engine over the two OMEMs.
//
// acc_sel picks the bank that accumulates; the other bank belongs to the
// host read port (the finished layer's outputs). Swapping acc_sel between
// layers makes the two banks trade roles.
//
// Accumulation is a two-stage read-modify-write. Stage 0 (in_valid) reads
// the target word and turns each partial sum into a 16-bit feature: an
// arithmetic right shift by oshift, then saturation. Stage 1 adds it to the
// stored word with saturation and writes the sum back. A sum that reaches
// stage 1 right after a write to the same address takes the written value
// instead of the stale read (forwarding), so back-to-back partial sums to
// one address are exact. One partial sum per cycle is accepted.
//
// clear_start zeroes the accumulating bank, one word per cycle, while
// clear_busy is high; no partial sums may arrive meanwhile.
// The document names the engine and its two 6 KB OMEMs; the
// read-modify-write pipeline, saturation and clear are this design's
// choices.
module pingpong_accum
  import lp_pkg::*;
#(
  parameter int unsigned DEPTH = 256
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     acc_sel,
  input  logic [5:0]               oshift,
  // partial sums
  input  logic                     in_valid,
  input  logic [15:0]              in_addr,
  input  psum_t                    psum [N_OUT],
  // clear of the accumulating bank
  input  logic                     clear_start,
  output logic                     clear_busy,
  // host read of the other bank
  input  logic                     rd_en,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output act_t                     rd_data [N_OUT],
  // how often forwarding was used
  output logic [15:0]              fwd_count
);

  localparam int unsigned AW = $clog2(DEPTH);
  localparam logic signed [PSUM_W-1:0] FMAX = PSUM_W'(2**(ACT_W-1) - 1);
  localparam logic signed [PSUM_W-1:0] FMIN = -PSUM_W'(2**(ACT_W-1));

  function automatic act_t sat16(input psum_t v);
    if (v > FMAX)      return act_t'(FMAX);
    else if (v < FMIN) return act_t'(FMIN);
    else               return act_t'(v);
  endfunction

  // stage 0 -> stage 1 registers
  logic          s1_valid;
  logic [AW-1:0] s1_addr;
  act_t          s1_feat [N_OUT];
  // last write (for forwarding)
  logic          lw_valid;
  logic [AW-1:0] lw_addr;
  act_t          lw_data [N_OUT];
  // clear sequencer
  logic [AW:0]   clr_cnt;

  // bank ports
  logic          we   [2];
  logic [AW-1:0] waddr [2];
  act_t          wdata [N_OUT];
  logic          re   [2];
  logic [AW-1:0] raddr [2];
  act_t          rdata [2][N_OUT];
  act_t          sum   [N_OUT];
  logic          fwd;

  for (genvar k = 0; k < 2; k++) begin : g_bank
    omem #(.DEPTH(DEPTH)) u_omem (
      .clk, .we(we[k]), .waddr(waddr[k]), .wdata(wdata),
      .re(re[k]), .raddr(raddr[k]), .rdata(rdata[k])
    );
  end

  assign clear_busy = !clr_cnt[AW];
  assign fwd        = s1_valid && lw_valid && lw_addr == s1_addr;

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      act_t old;
      old     = fwd ? lw_data[o] : rdata[acc_sel][o];
      sum[o]  = sat16(PSUM_W'(old) + PSUM_W'(s1_feat[o]));
      wdata[o] = clear_busy ? act_t'(0) : sum[o];
    end
    for (int k = 0; k < 2; k++) begin
      logic mine;
      mine     = (k == 1) == acc_sel;
      we[k]    = mine && (clear_busy || s1_valid);
      waddr[k] = clear_busy ? clr_cnt[AW-1:0] : s1_addr;
      re[k]    = mine ? in_valid : rd_en;
      raddr[k] = mine ? AW'(in_addr) : rd_addr;
    end
    for (int o = 0; o < N_OUT; o++) rd_data[o] = rdata[!acc_sel][o];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s1_valid  <= 1'b0;
      s1_addr   <= '0;
      lw_valid  <= 1'b0;
      lw_addr   <= '0;
      clr_cnt   <= {1'b1, {AW{1'b0}}};
      fwd_count <= '0;
      for (int o = 0; o < N_OUT; o++) begin
        s1_feat[o] <= '0;
        lw_data[o] <= '0;
      end
    end else begin
      if (clear_start)     clr_cnt <= '0;
      else if (clear_busy) clr_cnt <= clr_cnt + 1'b1;
      s1_valid <= in_valid;
      if (in_valid) begin
        s1_addr <= AW'(in_addr);
        for (int o = 0; o < N_OUT; o++) s1_feat[o] <= sat16(psum[o] >>> oshift);
      end
      lw_valid <= s1_valid && !clear_busy;
      if (s1_valid) begin
        lw_addr <= s1_addr;
        for (int o = 0; o < N_OUT; o++) lw_data[o] <= sum[o];
      end
      if (fwd) fwd_count <= fwd_count + 1'b1;
    end
  end

  // no partial sums while a bank is being cleared
  a_no_acc_in_clear: assert property (@(posedge clk) disable iff (!rst_n) !(in_valid && clear_busy))
    else $error("partial sum arrived during a bank clear");

endmodule
