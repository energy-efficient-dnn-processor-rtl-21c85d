// lp_core: LUT-based PE core (LP core) of the DNN processor.
//
// One start processes one input coordinate (one pixel of a convolution
// layer, or the input vector of a fully-connected layer). It adds that
// coordinate's contribution to kh x kw output pixels and 12*cog_count
// output channels, kept in the accumulating OMEM.
//
// Data path (pipeline stages in brackets):
//   act_buffer  activations written by the host; nz_skipper marks
//               near-zero ones, which are never fetched. 64 lanes.
//   lpe_cluster x4   A-step: the LUTs of 16 LPEs are filled in 3 cycles.
//               B-step: per cycle each lane's 12 weight bits index the
//               LUTs and the trees sum 4 LPEs        [cycle 2]
//   wmem        36 KB of weights, one bank per lane   [cycle 1]
//   bit_serial_shifter  sums the 4 clusters and accumulates weight bit
//               planes                                [cycle 3]
//   pingpong_accum  adds 12 partial sums into a word of the accumulating
//               OMEM, with saturation                 [cycles 4-5]
//   lp_controller  sequences all of it.
//
// Host interface: act_we/act_ci/act_wdata load activations; w_we/w_bank/
// w_addr/w_wdata load weights; start/cmd launch the coordinate, and done
// pulses once its last partial sum is written. acc_sel picks the
// accumulating OMEM, clear_start zeroes it, and rd_en/rd_addr read the
// other OMEM (data the next cycle). Counters report blocked activations,
// rounds and forwarded accumulations. The pre-processing core and the
// network-on-chip are outside this module; these plain ports are where
// they connect.
// The organisation (4 clusters, 4 LPEs of 4 activations, 12 outputs, 36 KB
// WMEM, two 6 KB OMEMs) follows the document; the host protocol, the
// memory layouts and the pipeline registers are this design's choices.
module lp_core
  import lp_pkg::*;
#(
  parameter int unsigned ACT_DEPTH  = 1024,
  parameter int unsigned WBANK_DEPTH = 384,
  parameter int unsigned OMEM_DEPTH = 256
) (
  input  logic                           clk,
  input  logic                           rst_n,
  // activation load
  input  logic [3:0]                     thr_shift,
  input  logic                           act_we,
  input  logic [$clog2(ACT_DEPTH)-1:0]   act_ci,
  input  act_t                           act_wdata,
  // weight load
  input  logic                           w_we,
  input  logic [$clog2(N_LANE)-1:0]      w_bank,
  input  logic [$clog2(WBANK_DEPTH)-1:0] w_addr,
  input  wword_t                         w_wdata,
  // command
  input  logic                           start,
  input  cmd_t                           cmd_in,
  output logic                           busy,
  output logic                           done,
  // output memories
  input  logic                           acc_sel,
  input  logic                           clear_start,
  output logic                           clear_busy,
  input  logic                           rd_en,
  input  logic [$clog2(OMEM_DEPTH)-1:0]  rd_addr,
  output act_t                           rd_data [N_OUT],
  // statistics
  output logic [15:0]                    blocked_count,
  output logic [15:0]                    round_count,
  output logic [15:0]                    fwd_count
);

  cmd_t        cmd;
  logic        ab_restart, ab_fetch, ab_more, wblocked;
  act_t        lane_act   [N_LANE];
  logic [4:0]  lane_slot  [N_LANE];
  logic [N_LANE-1:0] lane_valid;
  logic        a_valid;
  logic [1:0]  a_cyc;
  logic        w_rd;
  logic [15:0] w_offset;
  btag_t       tag0, tag1, tag2;
  wword_t      wbits [N_LANE];
  tree_t       cl_y  [N_CLUSTER][N_OUT];
  logic [N_CLUSTER-1:0] cl_valid;
  logic        ps_valid;
  logic [15:0] ps_addr;
  psum_t       psum [N_OUT];

  lp_controller u_ctrl (
    .clk, .rst_n, .start, .cmd_in, .cmd, .busy, .done,
    .ab_restart, .ab_fetch, .ab_more,
    .a_valid, .a_cyc, .w_rd, .w_offset, .tag(tag0), .round_count
  );

  act_buffer #(.DEPTH(ACT_DEPTH)) u_abuf (
    .clk, .rst_n, .mode_1b(cmd.mode_1b), .thr_shift, .ci_count(cmd.ci_count),
    .we(act_we), .wci(act_ci), .wdata(act_wdata), .wblocked,
    .restart(ab_restart), .fetch(ab_fetch), .more(ab_more),
    .lane_act, .lane_slot, .lane_valid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) blocked_count <= '0;
    else if (act_we && wblocked) blocked_count <= blocked_count + 1'b1;
  end

  wmem #(.BANK_DEPTH(WBANK_DEPTH)) u_wmem (
    .clk, .we(w_we), .wbank(w_bank), .waddr(w_addr), .wdata(w_wdata),
    .rd_en(w_rd), .slot(lane_slot), .wstride(cmd.wstride), .offset(w_offset),
    .rd_data(wbits)
  );

  // tag pipeline alongside the weight read and the cluster register
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag1 <= '0;
      tag2 <= '0;
    end else begin
      tag1 <= tag0;
      tag2 <= tag1;
    end
  end

  for (genvar c = 0; c < N_CLUSTER; c++) begin : g_cl
    act_t   c_act [N_LPE*E_ACT];
    wword_t c_w   [N_LPE*E_ACT];
    for (genvar i = 0; i < N_LPE*E_ACT; i++) begin : g_lane
      assign c_act[i] = lane_act[c*N_LPE*E_ACT + i];
      assign c_w[i]   = wbits[c*N_LPE*E_ACT + i];
    end
    lpe_cluster u_cluster (
      .clk, .rst_n, .mode_1b(cmd.mode_1b),
      .a_valid, .a_cyc, .act(c_act),
      .b_valid(tag1.valid), .wbits(c_w),
      .y(cl_y[c]), .y_valid(cl_valid[c])
    );
  end

  bit_serial_shifter u_bss (
    .clk, .rst_n, .in_valid(cl_valid[0]), .tag(tag2), .cl_y,
    .out_valid(ps_valid), .out_addr(ps_addr), .psum
  );

  pingpong_accum #(.DEPTH(OMEM_DEPTH)) u_acc (
    .clk, .rst_n, .acc_sel, .oshift(cmd.oshift),
    .in_valid(ps_valid), .in_addr(ps_addr), .psum,
    .clear_start, .clear_busy,
    .rd_en, .rd_addr, .rd_data, .fwd_count
  );

endmodule
