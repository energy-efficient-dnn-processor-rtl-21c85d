// bit_serial_shifter: cross-cluster sum and bit-serial weight accumulation.
//
// Each valid cycle brings the 12 tree sums of every cluster for one weight
// bit plane. Twelve 4-way adder trees add the clusters. The result is
// shifted left by the plane's bit position and added to the running
// partial sum, or subtracted for the MSB plane of a two's-complement
// weight (tag.msb_neg). Planes arrive LSB first; tag.first restarts the
// sum and tag.last releases it. In 1b mode a partial sum is a single plane
// at bit 0 (first = last = 1). The sum is registered: out_valid follows the
// input carrying tag.last by one cycle, and out_addr is that tag's OMEM
// address. LSB-to-MSB order follows the document; the MSB subtraction is
// the usual two's-complement rule.
module bit_serial_shifter
  import lp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  input  btag_t       tag,
  input  tree_t       cl_y [N_CLUSTER][N_OUT],
  output logic        out_valid,
  output logic [15:0] out_addr,
  output psum_t       psum [N_OUT]
);

  csum_t csum [N_OUT];
  psum_t acc_q [N_OUT];
  psum_t acc_d [N_OUT];

  for (genvar o = 0; o < N_OUT; o++) begin : g_sum
    tree_t    xs  [4];
    tree_op_e ops [4];
    for (genvar c = 0; c < N_CLUSTER; c++) begin : g_in
      assign xs[c]  = cl_y[c][o];
      assign ops[c] = OP_ADD;
    end
    addsub_tree4 #(.IN_W(TREE_W), .OUT_W(CSUM_W)) u_tree (
      .x(xs), .op(ops), .cin(3'd0), .y(csum[o])
    );
  end

  always_comb begin
    for (int o = 0; o < N_OUT; o++) begin
      psum_t term;
      term     = PSUM_W'(csum[o]) <<< tag.bitpos;
      acc_d[o] = (tag.first ? psum_t'(0) : acc_q[o]) + (tag.msb_neg ? -term : term);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_addr  <= '0;
      for (int o = 0; o < N_OUT; o++) begin
        acc_q[o] <= '0;
        psum[o]  <= '0;
      end
    end else begin
      out_valid <= in_valid && tag.last;
      if (in_valid) begin
        for (int o = 0; o < N_OUT; o++) acc_q[o] <= acc_d[o];
        if (tag.last) begin
          out_addr <= tag.oaddr;
          for (int o = 0; o < N_OUT; o++) psum[o] <= acc_d[o];
        end
      end
    end
  end

endmodule
