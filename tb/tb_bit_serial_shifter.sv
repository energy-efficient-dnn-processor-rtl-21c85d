// tb_bit_serial_shifter: self-checking test of the cross-cluster sum and
// the bit-serial accumulation. Random multi-bit weights (2..16 bits) and
// random cluster outputs per bit plane are fed LSB first; the released
// partial sum must equal sum_k csum_k * 2^k with the MSB plane negative,
// and appear exactly one cycle after the last plane. 1b mode (single plane,
// no negation) is covered too.
module tb_bit_serial_shifter;
  import lp_pkg::*;

  logic clk = 0, rst_n = 0, in_valid = 0;
  btag_t tag;
  tree_t cl_y [N_CLUSTER][N_OUT];
  logic out_valid;
  logic [15:0] out_addr;
  psum_t psum [N_OUT];
  int checks = 0, failures = 0;

  bit_serial_shifter dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v [N_OUT];
    int nb;
    bit m1b;
    tag = '0;
    for (int c = 0; c < N_CLUSTER; c++) for (int o = 0; o < N_OUT; o++) cl_y[c][o] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      m1b = it % 4 == 0;
      nb  = m1b ? 1 : 2 + int'($urandom % 15);
      for (int o = 0; o < N_OUT; o++) exp_v[o] = 0;
      for (int k = 0; k < nb; k++) begin
        @(negedge clk);
        for (int c = 0; c < N_CLUSTER; c++)
          for (int o = 0; o < N_OUT; o++) begin
            cl_y[c][o] = tree_t'($urandom);
            if (it % 9 == 5) cl_y[c][o] = (o % 2) ? tree_t'(2**(TREE_W-1) - 1) : tree_t'(-(2**(TREE_W-1)));
            exp_v[o] += ((!m1b && k == nb - 1) ? -1 : 1) * (longint'(cl_y[c][o]) <<< k);
          end
        in_valid   = 1;
        tag        = '0;
        tag.valid  = 1;
        tag.first  = k == 0;
        tag.last   = k == nb - 1;
        tag.bitpos = 4'(k);
        tag.msb_neg = !m1b && k == nb - 1;
        tag.oaddr  = 16'(it);
        #1;
        if (k != 0) begin checks++; if (out_valid) failures++; end
      end
      @(negedge clk);
      in_valid = 0;
      checks += 2;
      if (!out_valid) failures++;
      if (out_addr != 16'(it)) failures++;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (longint'(psum[o]) != exp_v[o]) begin
          failures++;
          if (failures < 10) $display("mismatch it=%0d nb=%0d o=%0d exp=%0d got=%0d", it, nb, o, exp_v[o], psum[o]);
        end
      end
      if (it % 3 == 0) @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
