// act_buffer: input activation buffer of one input coordinate with
// near-zero skipping.
//
// The buffer holds the activations of every input channel of the current
// coordinate (up to DEPTH). As each one is written, an nz_skipper marks it
// kept or blocked. The LPE clusters read it in rounds, one activation per
// lane per round. Lane idx = 16c + 4p + s feeds slot s of LPE p of
// cluster c. Its logical number L is idx in 1b mode (64 lanes). In the
// 2b..16b mode L = 12c + 3p + s for s < 3 (48 lanes), and slot 3 gets
// nothing. Lane L serves channels L, L+NL, L+2NL, ... (NL = 64 or 48);
// slot j of lane L is channel L + NL*j.
//
// restart sets every lane's pointer to slot 0. fetch makes every lane take
// its next kept slot at or after its pointer, registers the activation
// (0 when the lane has nothing left), the slot number and a valid flag,
// and moves the pointer past it. Blocked activations are therefore never
// fetched, and neither are their weights (the slot number addresses them).
// more (combinational) tells whether any lane still has a kept channel.
// The number of rounds is the largest count of kept channels in a lane.
// Timing: a write takes one cycle; lane outputs are registered and valid
// the cycle after fetch; more reflects the pointers of the current cycle.
// Testing each activation against a shifted threshold as it enters follows
// the document. Letting each lane step over its blocked channels on its own
// is this design's way of dropping blocked activations and their weights
// without stalls or memory bank conflicts.
module act_buffer
  import lp_pkg::*;
#(
  parameter int unsigned DEPTH = 1024
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     mode_1b,
  input  logic [3:0]               thr_shift,
  input  logic [10:0]              ci_count,
  // write port
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] wci,
  input  act_t                     wdata,
  output logic                     wblocked,    // the written activation is blocked
  // read side
  input  logic                     restart,
  input  logic                     fetch,
  output logic                     more,
  output act_t                     lane_act   [N_LANE],
  output logic [4:0]               lane_slot  [N_LANE],
  output logic [N_LANE-1:0]        lane_valid
);

  localparam int unsigned SLOTS = (DEPTH + 47) / 48;   // slots of a lane in the 48-lane mode

  act_t              mem  [DEPTH];
  logic [DEPTH-1:0]  keep;
  logic [5:0]        ptr  [N_LANE];

  nz_skipper u_nz (.act(wdata), .thr_shift(thr_shift), .blocked(wblocked));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) keep <= '0;
    else if (we) keep[wci] <= !wblocked;
  end

  always_ff @(posedge clk) begin
    if (we) mem[wci] <= wdata;
  end

  // per-lane selection of the next kept slot. Each lane only ever looks at
  // its own channels, so every candidate is a fixed buffer entry: for lane
  // idx and slot j, channel idx + 64j in 1b mode and L + 48j in the
  // multi-bit mode (L its 48-lane number).
  logic        has     [N_LANE];
  logic [4:0]  sel     [N_LANE];
  act_t        sel_act [N_LANE];

  for (genvar idx = 0; idx < N_LANE; idx++) begin : g_lane
    localparam int unsigned S   = idx % E_ACT;
    localparam int unsigned LGM = (idx / (N_LPE * E_ACT)) * (N_LPE * E_ACT_MB)
                                  + ((idx / E_ACT) % N_LPE) * E_ACT_MB + S;
    logic [SLOTS-1:0] cand;
    act_t             cact [SLOTS];

    for (genvar j = 0; j < SLOTS; j++) begin : g_slot
      localparam int unsigned CH1 = idx + N_LANE * j;
      localparam int unsigned CHM = LGM + N_CLUSTER * N_LPE * E_ACT_MB * j;
      localparam int unsigned I1  = (CH1 < DEPTH) ? CH1 : 0;
      localparam int unsigned IM  = (CHM < DEPTH) ? CHM : 0;
      always_comb begin
        if (mode_1b) begin
          cand[j] = CH1 < DEPTH && CH1 < 32'(ci_count) && keep[I1];
          cact[j] = mem[I1];
        end else begin
          cand[j] = S < E_ACT_MB && CHM < DEPTH && CHM < 32'(ci_count) && keep[IM];
          cact[j] = mem[IM];
        end
        if (32'(j) < 32'(ptr[idx])) cand[j] = 1'b0;
      end
    end

    // lowest candidate slot
    always_comb begin
      has[idx]     = 1'b0;
      sel[idx]     = '0;
      sel_act[idx] = '0;
      for (int j = SLOTS - 1; j >= 0; j--) begin
        if (cand[j]) begin
          has[idx]     = 1'b1;
          sel[idx]     = 5'(j);
          sel_act[idx] = cact[j];
        end
      end
    end
  end

  always_comb begin
    more = 1'b0;
    for (int idx = 0; idx < N_LANE; idx++) more |= has[idx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lane_valid <= '0;
      for (int i = 0; i < N_LANE; i++) begin
        ptr[i]       <= '0;
        lane_act[i]  <= '0;
        lane_slot[i] <= '0;
      end
    end else if (restart) begin
      lane_valid <= '0;
      for (int i = 0; i < N_LANE; i++) ptr[i] <= '0;
    end else if (fetch) begin
      for (int i = 0; i < N_LANE; i++) begin
        lane_valid[i] <= has[i];
        lane_act[i]   <= has[i] ? sel_act[i] : '0;
        lane_slot[i]  <= sel[i];
        if (has[i]) ptr[i] <= 6'(sel[i]) + 6'd1;
        else        ptr[i] <= 6'(SLOTS);
      end
    end
  end

endmodule
