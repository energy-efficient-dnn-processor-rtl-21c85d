// tb_lpe_cluster: self-checking test of an LPE cluster.
// For random activations (slot 3 of every LPE is 0 in the multi-bit mode)
// it runs the 3-cycle A-step, then several B-steps with random weight
// words, and compares each registered output (one cycle after b_valid) with
// the direct sum over the 16 (or 12) lanes: binary weights give +a / -a,
// multi-bit bit planes give a / 0.
module tb_lpe_cluster;
  import lp_pkg::*;

  logic clk = 0, rst_n = 0, mode_1b = 1;
  logic a_valid = 0, b_valid = 0;
  logic [1:0] a_cyc = 0;
  act_t act [N_LPE*E_ACT];
  wword_t wbits [N_LPE*E_ACT];
  tree_t y [N_OUT];
  logic y_valid;
  int checks = 0, failures = 0;

  lpe_cluster dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_v [N_OUT];
    for (int i = 0; i < 16; i++) begin act[i] = '0; wbits[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 100; it++) begin
      @(negedge clk);
      mode_1b = it % 2 == 0;
      for (int i = 0; i < 16; i++) begin
        act[i] = act_t'($urandom);
        if (it % 7 == 3) act[i] = (i % 3 == 0) ? -16'sd32768 : 16'sd32767;
        if (!mode_1b && i % 4 == 3) act[i] = '0;
      end
      for (int c = 0; c < 3; c++) begin
        a_valid = 1; a_cyc = 2'(c);
        @(negedge clk);
      end
      a_valid = 0;
      for (int r = 0; r < 6; r++) begin
        for (int i = 0; i < 16; i++) wbits[i] = wword_t'($urandom);
        for (int o = 0; o < N_OUT; o++) begin
          exp_v[o] = 0;
          for (int i = 0; i < 16; i++)
            if (mode_1b) exp_v[o] += wbits[i][o] ? longint'(act[i]) : -longint'(act[i]);
            else if (i % 4 != 3) exp_v[o] += wbits[i][o] ? longint'(act[i]) : 0;
        end
        b_valid = 1;
        @(negedge clk);
        b_valid = 0;
        checks++;
        if (!y_valid) failures++;
        for (int o = 0; o < N_OUT; o++) begin
          checks++;
          if (longint'(y[o]) != exp_v[o]) begin
            failures++;
            if (failures < 10) $display("mismatch it=%0d o=%0d exp=%0d got=%0d", it, o, exp_v[o], y[o]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
