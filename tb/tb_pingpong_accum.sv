// tb_pingpong_accum: self-checking test of the ping-pong accumulation
// engine. Clears both banks, accumulates random partial sums (shifted by a
// random oshift, saturated to 16 bits, added with saturation) into random
// and into repeated addresses, back to back and with gaps, so that the
// forwarding path is used. It then swaps the banks and reads every word
// through the host port against a model. Also checks that the host side
// is not disturbed by accumulation and that clearing takes DEPTH cycles.
module tb_pingpong_accum;
  import lp_pkg::*;

  localparam int D = 256;
  logic clk = 0, rst_n = 0, acc_sel = 0;
  logic [5:0] oshift = 0;
  logic in_valid = 0;
  logic [15:0] in_addr = 0;
  psum_t psum [N_OUT];
  logic clear_start = 0, clear_busy;
  logic rd_en = 0;
  logic [7:0] rd_addr = 0;
  act_t rd_data [N_OUT];
  logic [15:0] fwd_count;
  int checks = 0, failures = 0;
  longint model [2][D][N_OUT];

  pingpong_accum #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  function automatic longint sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return v;
  endfunction

  task automatic chk(input bit c, input string s);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s", s); end
  endtask

  task automatic clear_bank();
    int n;
    @(negedge clk) clear_start = 1;
    @(negedge clk) clear_start = 0;
    n = 0;
    while (clear_busy) begin @(negedge clk); n++; end
    chk(n == D, $sformatf("clear cycles %0d", n));
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int o = 0; o < N_OUT; o++) psum[o] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < 2; b++) begin
      acc_sel = b[0];
      clear_bank();
      for (int a = 0; a < D; a++) for (int o = 0; o < N_OUT; o++) model[b][a][o] = 0;
    end
    for (int phase = 0; phase < 4; phase++) begin
      acc_sel = phase[0];
      oshift = 6'(phase * 3);
      for (int r = 0; r < 600; r++) begin
        int a;
        @(negedge clk);
        a = (r % 4 == 1) ? int'(in_addr[7:0]) : int'($urandom % D);
        in_valid = ($urandom % 4) != 0;
        in_addr = 16'(a);
        for (int o = 0; o < N_OUT; o++) begin
          psum[o] = psum_t'($signed(32'($urandom))) >>> ($urandom % 20);
          if (in_valid)
            model[acc_sel][a][o] = sat(model[acc_sel][a][o] + sat(longint'(psum[o]) >>> oshift));
        end
      end
      @(negedge clk) in_valid = 0;
      repeat (3) @(negedge clk);
      // read back the bank just accumulated through the host port
      acc_sel = !acc_sel;
      for (int a = 0; a < D; a++) begin
        rd_en = 1; rd_addr = 8'(a);
        @(negedge clk) rd_en = 0;
        for (int o = 0; o < N_OUT; o++)
          chk(longint'(rd_data[o]) == model[!acc_sel][a][o], $sformatf("word %0d/%0d", a, o));
      end
    end
    chk(fwd_count > 0, "forwarding used");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
