// addsub_tree4: 4-input adder tree with a per-input operation.
//
// y = sum_i op_i(x_i) + cin, where op_i adds x_i, subtracts it or drops it
// (tree_op_e). cin (0..4) is the count of carries that complete the
// two's-complement negations handed over by the LPEs. Two levels of
// adders, purely combinational. Inputs are sign-extended to the output
// width OUT_W, which the instantiating module chooses wide enough.
module addsub_tree4
  import lp_pkg::*;
#(
  parameter int unsigned IN_W  = LUT_W,
  parameter int unsigned OUT_W = TREE_W
) (
  input  logic signed [IN_W-1:0]  x   [4],
  input  tree_op_e                op  [4],
  input  logic [2:0]              cin,
  output logic signed [OUT_W-1:0] y
);

  logic signed [OUT_W-1:0] t [4];

  always_comb begin
    for (int i = 0; i < 4; i++) begin
      unique case (op[i])
        OP_ADD:  t[i] = OUT_W'(x[i]);
        OP_SUB:  t[i] = -OUT_W'(x[i]);
        default: t[i] = '0;
      endcase
    end
    y = (t[0] + t[1]) + (t[2] + t[3]) + OUT_W'($signed({1'b0, cin}));
  end

endmodule
