// tb_lpe: self-checking test of one LPE.
// Fills the table with entries worked out here from 4 random activations,
// then reads it with random weight nibbles for all 12 outputs. In 1b mode
// out + inv must equal sum_i (w_i ? a_i : -a_i); in the multi-bit mode out
// must equal sum_{i<3} w_i * a_i. Covers both halves (physical and
// inverted) of the 1b table.
module tb_lpe;
  import lp_pkg::*;

  logic clk = 0, rst_n = 0, mode_1b;
  logic [LUT_N-1:0] wr_en;
  lut_t wr_data [LUT_N];
  logic [3:0] wsel [N_OUT];
  lut_t out [N_OUT];
  logic [N_OUT-1:0] inv;
  int checks = 0, failures = 0, n_inv = 0;

  lpe dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int a [4];
    longint exp_v, got;
    wr_en = '0;
    mode_1b = 1;
    for (int j = 0; j < LUT_N; j++) wr_data[j] = '0;
    for (int o = 0; o < N_OUT; o++) wsel[o] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 200; it++) begin
      mode_1b = it % 3 != 2;
      for (int i = 0; i < 4; i++) a[i] = $signed(16'($urandom));
      if (it % 5 == 0) for (int i = 0; i < 4; i++) a[i] = (i % 2) ? 32767 : -32768;
      @(negedge clk);
      for (int j = 0; j < LUT_N; j++) begin
        longint e;
        e = mode_1b ? a[3] : 0;
        for (int i = 0; i < 3; i++)
          e += j[i] ? a[i] : (mode_1b ? -a[i] : 0);
        wr_data[j] = lut_t'(e);
      end
      wr_en = '1;
      @(negedge clk);
      wr_en = '0;
      for (int r = 0; r < 4; r++) begin
        for (int o = 0; o < N_OUT; o++) wsel[o] = 4'($urandom);
        #1;
        for (int o = 0; o < N_OUT; o++) begin
          exp_v = 0;
          for (int i = 0; i < 4; i++) begin
            if (mode_1b) exp_v += wsel[o][i] ? a[i] : -a[i];
            else if (i < 3) exp_v += wsel[o][i] ? a[i] : 0;
          end
          got = longint'(out[o]) + longint'(inv[o]);
          n_inv += int'(inv[o]);
          checks++;
          if (got != exp_v) begin
            failures++;
            if (failures < 10) $display("mismatch mode=%0d w=%h exp=%0d got=%0d", mode_1b, wsel[o], exp_v, got);
          end
        end
      end
    end
    checks++;
    if (n_inv == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
