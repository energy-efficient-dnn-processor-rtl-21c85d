// tb_act_buffer: self-checking test of the activation buffer.
// Loads a random coordinate (about a third of the activations near zero)
// in both lane modes, then fetches rounds until 'more' drops. Each round is
// compared with a model that lists, per lane, the kept channels
// L, L+NL, ... in order; the number of rounds must equal the longest list,
// and the blocked flags must match the threshold rule.
module tb_act_buffer;
  import lp_pkg::*;

  localparam int DEPTH = 1024;
  logic clk = 0, rst_n = 0, mode_1b = 1;
  logic [3:0] thr_shift = 2;
  logic [10:0] ci_count = 0;
  logic we = 0;
  logic [9:0] wci = 0;
  act_t wdata = 0;
  logic wblocked, restart = 0, fetch = 0, more;
  act_t lane_act [N_LANE];
  logic [4:0] lane_slot [N_LANE];
  logic [N_LANE-1:0] lane_valid;
  int checks = 0, failures = 0, skipped = 0;

  act_buffer #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  initial begin
    int vals [DEPTH];
    bit kept [DEPTH];
    int n, nl, lg, rounds, maxlen;
    int pos [N_LANE];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 6; t++) begin
      mode_1b = t % 2 == 0;
      n = (t < 2) ? 50 : (t < 4 ? 1024 : 300);
      thr_shift = 4'(1 + t % 3);
      ci_count = 11'(n);
      for (int ci = 0; ci < n; ci++) begin
        @(negedge clk);
        vals[ci] = ($urandom % 3 == 0) ? int'($urandom % 16) - 8 : int'($signed(16'($urandom)));
        kept[ci] = !(vals[ci] >= -(1 << thr_shift) && vals[ci] < (1 << thr_shift));
        we = 1; wci = 10'(ci); wdata = act_t'(vals[ci]);
        #1 check(wblocked == !kept[ci], "blocked flag");
        if (!kept[ci]) skipped++;
      end
      @(negedge clk) we = 0;
      restart = 1;
      @(negedge clk) restart = 0;
      nl = mode_1b ? 64 : 48;
      maxlen = 0;
      for (int l = 0; l < nl; l++) begin
        int len;
        len = 0;
        for (int ci = l; ci < n; ci += nl) if (kept[ci]) len++;
        if (len > maxlen) maxlen = len;
      end
      for (int i = 0; i < N_LANE; i++) pos[i] = 0;
      rounds = 0;
      while (more && rounds < 40) begin
        fetch = 1;
        @(negedge clk) fetch = 0;
        rounds++;
        for (int i = 0; i < N_LANE; i++) begin
          int c, p, s, ch;
          bit found;
          c = i / 16; p = (i / 4) % 4; s = i % 4;
          found = 0;
          if (mode_1b || s < 3) begin
            lg = mode_1b ? i : c * 12 + p * 3 + s;
            for (ch = lg + nl * pos[i]; ch < n; ch += nl) if (kept[ch]) begin found = 1; break; end
          end
          check(lane_valid[i] == found, "lane valid");
          if (found) begin
            check(lane_act[i] == act_t'(vals[ch]), "lane act");
            check(int'(lane_slot[i]) == (ch - lg) / nl, "lane slot");
            pos[i] = (ch - lg) / nl + 1;
          end else begin
            check(lane_act[i] == 0, "idle lane zero");
            pos[i] = 99;
          end
        end
      end
      check(rounds == maxlen, $sformatf("rounds %0d vs %0d", rounds, maxlen));
    end
    check(skipped > 0, "some activations skipped");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
