// tb_wmem: self-checking test of the banked weight memory.
// Fills every word of every bank with a value derived from (bank, address)
// by a hash, then issues parallel reads with random per-lane slots, strides
// and offsets and checks each bank's word one cycle later.
module tb_wmem;
  import lp_pkg::*;

  localparam int BD = 384;
  logic clk = 0, we = 0, rd_en = 0;
  logic [5:0] wbank = 0;
  logic [8:0] waddr = 0;
  wword_t wdata = 0;
  logic [4:0] slot [N_LANE];
  logic [15:0] wstride = 0, offset = 0;
  wword_t rd_data [N_LANE];
  int checks = 0, failures = 0;

  wmem #(.BANK_DEPTH(BD)) dut (.*);

  always #5 clk = ~clk;

  function automatic wword_t hashw(int b, int a);
    return wword_t'((b * 977 + a * 131 + (a >> 3) * 7) ^ (b << 5));
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int addr [N_LANE];
    for (int i = 0; i < N_LANE; i++) slot[i] = '0;
    for (int b = 0; b < N_LANE; b++)
      for (int a = 0; a < BD; a++) begin
        @(negedge clk);
        we = 1; wbank = 6'(b); waddr = 9'(a); wdata = hashw(b, a);
      end
    @(negedge clk) we = 0;
    for (int r = 0; r < 300; r++) begin
      wstride = 16'(1 + $urandom % 24);
      offset  = 16'($urandom % 24);
      for (int i = 0; i < N_LANE; i++) begin
        slot[i] = 5'($urandom % 16);
        addr[i] = int'(slot[i]) * int'(wstride) + int'(offset);
        if (addr[i] >= BD) begin slot[i] = 0; addr[i] = int'(offset); end
      end
      rd_en = 1;
      @(negedge clk) rd_en = 0;
      for (int i = 0; i < N_LANE; i++) begin
        checks++;
        if (rd_data[i] != hashw(i, addr[i])) begin
          failures++;
          if (failures < 10) $display("mismatch bank %0d addr %0d", i, addr[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
