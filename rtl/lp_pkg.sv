// lp_pkg: shared sizes and types of the LUT-based PE core (LP core).
//
// The LP core computes convolution and fully-connected layers with
// look-up-table processing engines (LPEs). Every LPE holds an 8-entry table
// built from a few input activations; weights index that table instead of
// driving multipliers. Multi-bit weights are handled one bit plane per cycle.
// The numbers below are the document's organisation (4 clusters x 4 LPEs,
// 4 activations per table, 12 parallel outputs, 16b features); the word
// widths of sums are this design's choice, sized so that no sum overflows.
package lp_pkg;

  // organisation
  localparam int unsigned N_CLUSTER = 4;   // LPE clusters
  localparam int unsigned N_LPE     = 4;   // LPEs per cluster
  localparam int unsigned E_ACT     = 4;   // activations per LUT (1b mode)
  localparam int unsigned E_ACT_MB  = 3;   // activations per LUT (2b..16b mode)
  localparam int unsigned N_OUT     = 12;  // parallel outputs per LPE
  localparam int unsigned LUT_N     = 8;   // physical LUT entries
  localparam int unsigned N_LANE    = N_CLUSTER * N_LPE * E_ACT;  // 64 activation lanes

  // widths
  localparam int unsigned ACT_W  = 16;            // feature width
  localparam int unsigned LUT_W  = ACT_W + 2;     // sum of 4 activations
  localparam int unsigned TREE_W = LUT_W + 2;     // sum of 4 LUT outputs
  localparam int unsigned CSUM_W = TREE_W + 2;    // sum of 4 cluster outputs
  localparam int unsigned PSUM_W = CSUM_W + 18;   // after up to 16 weight bit planes
  localparam int unsigned MAX_NB = 16;            // widest weight

  typedef logic signed [ACT_W-1:0]  act_t;
  typedef logic signed [LUT_W-1:0]  lut_t;
  typedef logic signed [TREE_W-1:0] tree_t;
  typedef logic signed [CSUM_W-1:0] csum_t;
  typedef logic signed [PSUM_W-1:0] psum_t;
  typedef logic [N_OUT-1:0]         wword_t;      // one weight bit for 12 outputs

  // per-input operation of a 4-way add/sub tree
  typedef enum logic [1:0] {
    OP_ZERO = 2'd0,
    OP_ADD  = 2'd1,
    OP_SUB  = 2'd2
  } tree_op_e;

  // layer command given to the controller
  typedef struct packed {
    logic        mode_1b;    // 1: binary +-1 weights, 4 activations per LUT
    logic [4:0]  nb;         // weight bits, 1 in 1b mode, 2..16 otherwise
    logic [10:0] ci_count;   // input channels of this coordinate (1..1024)
    logic [7:0]  cog_count;  // groups of 12 output channels (1..)
    logic [3:0]  kw;         // kernel width  (1..15)
    logic [3:0]  kh;         // kernel height (1..15)
    logic [15:0] obase;      // OMEM word address of (cog 0, ky 0, kx 0)
    logic [15:0] rstride;    // OMEM address step per kernel row
    logic [15:0] cstride;    // OMEM address step per output-channel group
    logic [15:0] wstride;    // WMEM bank address step per lane slot
    logic [5:0]  oshift;     // arithmetic right shift of a partial sum
  } cmd_t;

  // tag travelling with a B-step operation down the pipeline
  typedef struct packed {
    logic        valid;
    logic        first;      // first bit plane of a partial sum
    logic        last;       // last bit plane of a partial sum
    logic [3:0]  bitpos;     // weight bit plane
    logic        msb_neg;    // this plane carries negative weight (2's complement MSB)
    logic [15:0] oaddr;      // OMEM word address of the partial sum
  } btag_t;

endpackage
