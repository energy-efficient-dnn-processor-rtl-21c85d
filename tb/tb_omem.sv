// tb_omem: self-checking test of one OMEM bank.
// Random writes and reads against a model array: read data is checked the
// cycle after the read, including a read of the word being written in
// that same cycle, which must return the old contents.
module tb_omem;
  import lp_pkg::*;

  localparam int D = 256;
  logic clk = 0, we = 0, re = 0;
  logic [7:0] waddr = 0, raddr = 0;
  act_t wdata [N_OUT];
  act_t rdata [N_OUT];
  int checks = 0, failures = 0;
  act_t model [D][N_OUT];

  omem #(.DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    act_t expv [N_OUT];
    for (int o = 0; o < N_OUT; o++) wdata[o] = '0;
    for (int a = 0; a < D; a++) begin
      @(negedge clk);
      we = 1; waddr = 8'(a);
      for (int o = 0; o < N_OUT; o++) begin wdata[o] = act_t'($urandom); model[a][o] = wdata[o]; end
    end
    @(negedge clk) we = 0;
    for (int r = 0; r < 2000; r++) begin
      @(negedge clk);
      re = 1; raddr = 8'($urandom);
      we = $urandom_range(1, 0) == 0;
      waddr = (r % 5 == 0) ? raddr : 8'($urandom);
      for (int o = 0; o < N_OUT; o++) begin expv[o] = model[raddr][o]; wdata[o] = act_t'($urandom); end
      if (we) for (int o = 0; o < N_OUT; o++) model[waddr][o] = wdata[o];
      @(negedge clk);
      re = 0; we = 0;
      for (int o = 0; o < N_OUT; o++) begin
        checks++;
        if (rdata[o] != expv[o]) failures++;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
