// tb_nz_skipper: exhaustive test of the near-zero detector for all 16-bit
// values and thresholds 2^0..2^6 (plus spot checks up to 2^15). An
// activation must be blocked exactly when -2^s <= a < 2^s.
module tb_nz_skipper;
  import lp_pkg::*;

  act_t act;
  logic [3:0] thr_shift;
  logic blocked;
  int checks = 0, failures = 0;

  nz_skipper dut (.*);

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < 16; s++) begin
      for (int v = -32768; v < 32768; v += (s < 7 ? 1 : 97)) begin
        logic exp_b;
        act = act_t'(v);
        thr_shift = 4'(s);
        #1;
        exp_b = (v >= -(1 << s)) && (v < (1 << s));
        checks++;
        if (blocked !== exp_b) begin
          failures++;
          if (failures < 10) $display("mismatch v=%0d s=%0d blocked=%0d", v, s, blocked);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
