// tb_workloads: the layer shapes of the facial-emotion network and of an
// 8-bit recurrent layer, run through the LP core at its default sizes.
//
//   C2  binary 3x3 convolution, 64 -> 72 channels (64 used), on a 4x4 input
//       tile, near-zero threshold 4, activations drawn so that about a
//       third are near zero
//   C1  16-bit 7x7 convolution of 3 channels for one output group; the
//       kernel is split into row bands of 3, 3 and 1 rows because a band of
//       more than 3 rows of 16-bit weights exceeds one WMEM bank
//   FC2 binary 1024 -> 7 fully-connected layer (one coordinate, 16 rounds)
//   RNN 8-bit 256 -> 48 matrix-vector product (one gate of a recurrent layer)
// Every result is checked against the same arithmetic model as tb_lp_core,
// every command's cycle count against 2 + R*(4 + cog*kh*kw*nb) + 4, and the
// skip ratio and cycles of each workload are printed.
module tb_workloads;
  import lp_pkg::*;

  localparam int MAXCI = 1024, MAXCG = 6, MAXK = 49;

  logic clk = 0, rst_n = 0;
  logic [3:0] thr_shift = 2;
  logic act_we = 0;
  logic [9:0] act_ci = 0;
  act_t act_wdata = 0;
  logic w_we = 0;
  logic [5:0] w_bank = 0;
  logic [8:0] w_addr = 0;
  wword_t w_wdata = 0;
  logic start = 0;
  cmd_t cmd_in = '0;
  logic busy, done, acc_sel = 0, clear_start = 0, clear_busy, rd_en = 0;
  logic [7:0] rd_addr = 0;
  act_t rd_data [N_OUT];
  logic [15:0] blocked_count, round_count, fwd_count;

  int checks = 0, failures = 0;
  int acts [MAXCI];
  int wts  [MAXCI][MAXCG][MAXK][N_OUT];
  longint model [2][256][N_OUT];
  int n_skip_act = 0, n_1b = 0, n_mb = 0, n_msbneg = 0, n_allskip = 0, n_multi_round = 0,
      n_pingpong = 0, n_fwd = 0, n_conv = 0;
  int total_cycles = 0, total_acts = 0;

  lp_core dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 15) $display("FAIL %s", s); end
  endtask

  function automatic longint sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  function automatic bit is_kept(int v, int s);
    return !(v >= -(1 << s) && v < (1 << s));
  endfunction

  task automatic clear_bank(input bit b);
    @(negedge clk) acc_sel = b; clear_start = 1;
    @(negedge clk) clear_start = 0;
    while (clear_busy) @(negedge clk);
    for (int a = 0; a < 256; a++) for (int o = 0; o < N_OUT; o++) model[b][a][o] = 0;
  endtask

  // physical lane of channel ci
  function automatic int lane_of(int ci, bit m1b);
    int l;
    if (m1b) return ci % 64;
    l = ci % 48;
    return (l / 12) * 16 + ((l % 12) / 3) * 4 + l % 3;
  endfunction

  // run one coordinate: load activations/weights, start, check timing, update the model
  task automatic run(input bit m1b, input int nb, input int ci_n, input int cg, input int kh,
                     input int kw, input int obase, input int rstride, input int cstride,
                     input int oshift, input int thr, input int krow0 = 0, input int kwf = 0);
    int nl, wstride, rounds, cyc, b0, kfull;
    int len [64];
    int rank [MAXCI];
    thr_shift = 4'(thr);
    kfull = (kwf == 0) ? kw : kwf;
    nl = m1b ? 64 : 48;
    wstride = cg * kh * kw * nb;
    b0 = int'(blocked_count);
    // activations
    for (int ci = 0; ci < ci_n; ci++) begin
      @(negedge clk);
      act_we = 1; act_ci = 10'(ci); act_wdata = act_t'(acts[ci]);
    end
    @(negedge clk) act_we = 0;
    // weights
    for (int ci = 0; ci < ci_n; ci++)
      for (int g = 0; g < cg; g++)
        for (int k = 0; k < kh * kw; k++)
          for (int b = 0; b < nb; b++) begin
            wword_t wd;
            for (int o = 0; o < N_OUT; o++)
              wd[o] = m1b ? (wts[ci][g][krow0 * kfull + k][o] > 0) : wts[ci][g][krow0 * kfull + k][o][b];
            @(negedge clk);
            w_we = 1; w_bank = 6'(lane_of(ci, m1b));
            w_addr = 9'((ci / nl) * wstride + (g * kh * kw + k) * nb + b);
            w_wdata = wd;
          end
    @(negedge clk) w_we = 0;
    // model: each round gives one partial sum per output and kernel position,
    // which is shifted and saturated before it is accumulated
    rounds = 0;
    for (int l = 0; l < 64; l++) len[l] = 0;
    for (int ci = 0; ci < ci_n; ci++)
      if (is_kept(acts[ci], thr)) begin
        rank[ci] = len[ci % nl];
        len[ci % nl]++;
        if (len[ci % nl] > rounds) rounds = len[ci % nl];
      end else begin
        rank[ci] = -1;
        n_skip_act++;
      end
    for (int r = 0; r < rounds; r++)
      for (int g = 0; g < cg; g++)
        for (int ky = 0; ky < kh; ky++)
          for (int kx = 0; kx < kw; kx++)
            for (int o = 0; o < N_OUT; o++) begin
              longint p;
              int a;
              p = 0;
              for (int ci = 0; ci < ci_n; ci++)
                if (rank[ci] == r) p += longint'(acts[ci]) * wts[ci][g][(krow0 + ky) * kfull + kx][o];
              a = (obase + g * cstride + ky * rstride + kx) % 256;
              model[acc_sel][a][o] = sat(model[acc_sel][a][o] + sat(p >>> oshift));
            end
    // command
    @(negedge clk);
    cmd_in = '0;
    cmd_in.mode_1b = m1b; cmd_in.nb = 5'(nb); cmd_in.ci_count = 11'(ci_n);
    cmd_in.cog_count = 8'(cg); cmd_in.kh = 4'(kh); cmd_in.kw = 4'(kw);
    cmd_in.obase = 16'(obase); cmd_in.rstride = 16'(rstride); cmd_in.cstride = 16'(cstride);
    cmd_in.wstride = 16'(wstride); cmd_in.oshift = 6'(oshift);
    start = 1;
    @(negedge clk) start = 0;
    cyc = 0;
    while (!done && cyc < 100000) begin
      if (busy) cyc++;
      @(negedge clk);
    end
    chk(cyc == 2 + rounds * (4 + wstride) + 4, $sformatf("cycles %0d expected %0d", cyc, 2 + rounds * (4 + wstride) + 4));
    chk(int'(blocked_count) - b0 == ci_n - count_kept(ci_n, thr), "blocked counter");
    if (rounds == 0) n_allskip++;
    if (rounds > 1) n_multi_round++;
    if (m1b) n_1b++; else n_mb++;
    if (!m1b) n_msbneg++;
    if (kh * kw > 1 && rstride != 0) n_conv++;
    total_cycles += cyc;
    total_acts += ci_n;
  endtask

  function automatic int count_kept(int n, int thr);
    int k = 0;
    for (int i = 0; i < n; i++) if (is_kept(acts[i], thr)) k++;
    return k;
  endfunction

  // read the bank that is not accumulating and compare with the model
  task automatic check_bank(input bit b);
    acc_sel = !b;
    for (int a = 0; a < 256; a++) begin
      @(negedge clk) rd_en = 1; rd_addr = 8'(a);
      @(negedge clk) rd_en = 0;
      for (int o = 0; o < N_OUT; o++)
        chk(longint'(rd_data[o]) == model[b][a][o], $sformatf("bank %0d word %0d out %0d got %0d exp %0d", b, a, o, rd_data[o], model[b][a][o]));
    end
    n_pingpong++;
  endtask

  function automatic int rnd_act(int small_pct);
    if (int'($urandom % 100) < small_pct) return int'($urandom % 8) - 4;
    return int'($urandom % 4001) - 2000;
  endfunction

  task automatic report(input string name, input int skip0);
    $display("%s: activations %0d, skipped %0d (%0d%%), cycles %0d", name, total_acts,
             n_skip_act - skip0, total_acts ? (n_skip_act - skip0) * 100 / total_acts : 0, total_cycles);
    total_cycles = 0;
    total_acts = 0;
  endtask

  initial begin
    int s0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    clear_bank(0);
    clear_bank(1);
    // C2: binary 3x3 conv, 64 -> 6 groups of 12, 4x4 input tile, 6x6 output frame
    acc_sel = 0;
    s0 = n_skip_act;
    for (int ci = 0; ci < 64; ci++)
      for (int g = 0; g < 6; g++) for (int k = 0; k < 9; k++) for (int o = 0; o < N_OUT; o++)
        wts[ci][g][k][o] = ($urandom_range(1, 0) == 1) ? 1 : -1;
    for (int y = 0; y < 4; y++)
      for (int x = 0; x < 4; x++) begin
        for (int ci = 0; ci < 64; ci++) acts[ci] = rnd_act(34);
        run(1, 1, 64, 6, 3, 3, y * 6 + x, 6, 36, 3, 2);
      end
    report("C2", s0);
    check_bank(0);
    // C1: 16-bit 7x7 kernel of 3 channels, one output group, three row bands
    acc_sel = 1;
    s0 = n_skip_act;
    for (int ci = 0; ci < 3; ci++) begin
      acts[ci] = int'($urandom % 511) - 255;
      for (int k = 0; k < 49; k++) for (int o = 0; o < N_OUT; o++)
        wts[ci][0][k][o] = int'($urandom % 65536) - 32768;
    end
    run(0, 16, 3, 1, 3, 7, 0, 8, 0, 10, 2, 0, 7);
    run(0, 16, 3, 1, 3, 7, 24, 8, 0, 10, 2, 3, 7);
    run(0, 16, 3, 1, 1, 7, 48, 8, 0, 10, 2, 6, 7);
    report("C1 (one coordinate, 12 outputs)", s0);
    // FC2: binary 1024 -> 7 (one group of 12, 7 used)
    s0 = n_skip_act;
    for (int ci = 0; ci < 1024; ci++) begin
      acts[ci] = rnd_act(36);
      for (int o = 0; o < N_OUT; o++) wts[ci][0][0][o] = ($urandom_range(1, 0) == 1) ? 1 : -1;
    end
    run(1, 1, 1024, 1, 1, 1, 100, 0, 0, 4, 2);
    report("FC2", s0);
    // RNN gate: 8-bit 256 -> 48
    s0 = n_skip_act;
    for (int ci = 0; ci < 256; ci++) begin
      acts[ci] = rnd_act(20);
      for (int g = 0; g < 4; g++) for (int o = 0; o < N_OUT; o++)
        wts[ci][g][0][o] = int'($urandom % 256) - 128;
    end
    run(0, 8, 256, 4, 1, 1, 120, 0, 1, 8, 2);
    report("RNN 8b matvec", s0);
    check_bank(1);
    $display("mechanisms: skipped_acts=%0d 1b=%0d multibit=%0d multi_round=%0d conv_scatter=%0d pingpong=%0d",
             n_skip_act, n_1b, n_mb, n_multi_round, n_conv, n_pingpong);
    chk(n_skip_act > 0 && n_1b > 0 && n_mb > 0 && n_multi_round > 0 && n_conv > 0 && n_pingpong >= 2, "all workloads ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
