// lpe_cluster: four LPEs sharing twelve 4-way add/sub trees.
//
// The cluster takes 16 activation lanes (LPE p owns lanes 4p..4p+3; in the
// 2b..16b mode lane 4p+3 is unused and must be 0) and works in two steps,
// both driven by the core controller:
//
// A-step (LUT update), a_valid with a_cyc = 0,1,2: the 12 trees compute the
// 32 table entries of the 4 LPEs, 12 per cycle, so the update takes 3
// cycles. Entry e = 8p + j is computed by tree e mod 12 in cycle e / 12.
// In 1b mode entry j of LPE p is a3 + sum_i(j[i] ? +a_i : -a_i); in the
// multi-bit mode it is sum_i(j[i] ? a_i : 0), i < 3.
//
// B-step (calculation), b_valid: every lane supplies one 12-bit weight word
// (bit o for output channel o). LPE p indexes its table with the 4 bits of
// its lanes for each output o; tree o adds the 4 LPE outputs plus the
// carries of the inverted (logical LUT) reads. The 12 sums are registered:
// y/y_valid follow b_valid by one cycle.
//
// A-step and B-step must not overlap since they share the trees; the
// controller leaves a cycle between them. Reuse of the trees for the LUT
// update follows the document; the per-cycle assignment of entries to
// trees is this design's choice.
module lpe_cluster
  import lp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        mode_1b,
  input  logic        a_valid,
  input  logic [1:0]  a_cyc,
  input  act_t        act   [N_LPE*E_ACT],
  input  logic        b_valid,
  input  wword_t      wbits [N_LPE*E_ACT],
  output tree_t       y     [N_OUT],
  output logic        y_valid
);

  localparam int unsigned N_ENT = N_LPE * LUT_N;   // 32 entries

  // LPE signals
  logic [LUT_N-1:0] lpe_wr_en   [N_LPE];
  lut_t             lpe_wr_data [N_LPE][LUT_N];
  logic [3:0]       lpe_wsel    [N_LPE][N_OUT];
  lut_t             lpe_out     [N_LPE][N_OUT];
  logic [N_OUT-1:0] lpe_inv     [N_LPE];

  // tree signals
  lut_t     tx   [N_OUT][4];
  tree_op_e top_ [N_OUT][4];
  logic [2:0] tcin [N_OUT];
  tree_t    ty   [N_OUT];

  // tree input selection: A-step entry or B-step accumulation
  always_comb begin
    for (int t = 0; t < N_OUT; t++) begin
      int unsigned e, p, j;
      e = 32'(a_cyc) * N_OUT + 32'(t);
      p = (e / LUT_N) % N_LPE;
      j = e % LUT_N;
      tcin[t] = '0;
      for (int s = 0; s < 4; s++) begin
        tx[t][s]   = '0;
        top_[t][s] = OP_ZERO;
      end
      if (a_valid) begin
        if (e < N_ENT) begin
          for (int s = 0; s < 4; s++) tx[t][s] = LUT_W'(act[p*E_ACT + 32'(s)]);
          for (int s = 0; s < 3; s++)
            top_[t][s] = j[s] ? OP_ADD : (mode_1b ? OP_SUB : OP_ZERO);
          top_[t][3] = mode_1b ? OP_ADD : OP_ZERO;
        end
      end else begin
        for (int p2 = 0; p2 < N_LPE; p2++) begin
          tx[t][p2]   = lpe_out[p2][t];
          top_[t][p2] = OP_ADD;
          tcin[t]     = tcin[t] + 3'(lpe_inv[p2][t]);
        end
      end
    end
  end

  for (genvar t = 0; t < N_OUT; t++) begin : g_tree
    addsub_tree4 #(.IN_W(LUT_W), .OUT_W(TREE_W)) u_tree (
      .x(tx[t]), .op(top_[t]), .cin(tcin[t]), .y(ty[t])
    );
  end

  // LUT write enables: entry e = 8p + j is produced by tree e%12 in cycle e/12
  always_comb begin
    for (int p = 0; p < N_LPE; p++) begin
      for (int j = 0; j < LUT_N; j++) begin
        int unsigned e;
        e = 32'(p) * LUT_N + 32'(j);
        lpe_wr_en[p][j]   = a_valid && (32'(a_cyc) == e / N_OUT);
        lpe_wr_data[p][j] = LUT_W'(ty[e % N_OUT]);
      end
      for (int o = 0; o < N_OUT; o++)
        for (int s = 0; s < 4; s++)
          lpe_wsel[p][o][s] = wbits[p*E_ACT + s][o];
    end
  end

  for (genvar p = 0; p < N_LPE; p++) begin : g_lpe
    lpe u_lpe (
      .clk, .rst_n, .mode_1b,
      .wr_en(lpe_wr_en[p]), .wr_data(lpe_wr_data[p]),
      .wsel(lpe_wsel[p]), .out(lpe_out[p]), .inv(lpe_inv[p])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      y_valid <= 1'b0;
      for (int o = 0; o < N_OUT; o++) y[o] <= '0;
    end else begin
      y_valid <= b_valid && !a_valid;
      if (b_valid && !a_valid)
        for (int o = 0; o < N_OUT; o++) y[o] <= ty[o];
    end
  end

  // the trees serve one step at a time
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n) !(a_valid && b_valid))
    else $error("A-step and B-step requested in the same cycle");

endmodule
