// tb_lp_controller: self-checking test of the sequencer.
// A small model of the activation buffer answers 'more' for R rounds.
// For random commands the test checks the order fetch -> 3 A cycles
// (a_cyc 0,1,2) -> cog*kh*kw*nb B cycles, the WMEM offset counter, every
// tag field (first/last plane, bit position, negative MSB, OMEM address
// obase + cog*cstride + ky*rstride + kx), the round counter and the total
// busy time 2 + R*(4 + cog*kh*kw*nb) + DRAIN cycles, including R = 0
// (all activations blocked).
module tb_lp_controller;
  import lp_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  cmd_t cmd_in, cmd;
  logic busy, done, ab_restart, ab_fetch, ab_more, a_valid, w_rd;
  logic [1:0] a_cyc;
  logic [15:0] w_offset, round_count;
  btag_t tag;
  int checks = 0, failures = 0;
  int remaining = 0, rounds_req = 0;

  lp_controller #(.DRAIN(4)) dut (.*);

  always #5 clk = ~clk;
  assign ab_more = remaining > 0;
  always @(posedge clk) begin
    if (ab_restart) remaining <= rounds_req;
    else if (ab_fetch) remaining <= remaining - 1;
  end

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int nb, kw, kh, cg, nbcyc, cyc, bseen, aseen, fseen, rc0;
    cmd_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int it = 0; it < 60; it++) begin
      @(negedge clk);
      cmd_in = '0;
      cmd_in.mode_1b = it % 2 == 0;
      nb = cmd_in.mode_1b ? 1 : 2 + int'($urandom % 15);
      kw = 1 + int'($urandom % 3);
      kh = 1 + int'($urandom % 3);
      cg = 1 + int'($urandom % 3);
      cmd_in.nb = 5'(nb); cmd_in.kw = 4'(kw); cmd_in.kh = 4'(kh); cmd_in.cog_count = 8'(cg);
      cmd_in.obase = 16'($urandom); cmd_in.rstride = 16'($urandom % 64);
      cmd_in.cstride = 16'($urandom % 512);
      rounds_req = (it % 10 == 7) ? 0 : 1 + int'($urandom % 3);
      rc0 = int'(round_count);
      nbcyc = cg * kh * kw * nb;
      start = 1;
      @(negedge clk) start = 0;
      cyc = 0; bseen = 0; aseen = 0; fseen = 0;
      while (!done && cyc < 5000) begin
        if (busy) cyc++;
        if (ab_fetch) begin
          chk(bseen == fseen * nbcyc && aseen == fseen * 3, "fetch after full B-step");
          fseen++;
        end
        if (a_valid) begin
          chk(int'(a_cyc) == aseen % 3, "a_cyc order");
          aseen++;
        end
        if (w_rd) begin
          int k, b, kx, ky, cgi;
          k   = bseen % nbcyc;
          b   = k % nb;
          kx  = (k / nb) % kw;
          ky  = (k / nb / kw) % kh;
          cgi = k / nb / kw / kh;
          chk(aseen == fseen * 3, "B after A-step");
          chk(int'(w_offset) == k, "offset");
          chk(tag.valid && tag.first == (b == 0) && tag.last == (b == nb - 1), "first/last");
          chk(int'(tag.bitpos) == b, "bitpos");
          chk(tag.msb_neg == (!cmd_in.mode_1b && b == nb - 1), "msb_neg");
          chk(tag.oaddr == 16'(int'(cmd_in.obase) + cgi * int'(cmd_in.cstride)
                               + ky * int'(cmd_in.rstride) + kx), "oaddr");
          bseen++;
        end else chk(!tag.valid, "tag idle");
        @(negedge clk);
      end
      chk(done, "done");
      chk(fseen == rounds_req && bseen == rounds_req * nbcyc, "rounds");
      chk(int'(round_count) - rc0 == rounds_req, "round counter");
      chk(cyc == 2 + rounds_req * (4 + nbcyc) + 4, $sformatf("cycles %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
