// nz_skipper: near-zero detector for one activation.
//
// An activation is "near zero" when its magnitude is below the programmable
// threshold 2^thr_shift. The test is a right shift: the value (bitwise
// inverted first if negative) is shifted right by thr_shift and the
// activation is blocked when the result is zero. With thr_shift = 2
// (threshold 4) the values -4..3 are blocked. Blocked activations, and the
// weights that belong to them, are skipped by the activation buffer.
// Purely combinational. The shift-and-test follows the document; coding
// the threshold as a shift amount is this design's reading of it.
module nz_skipper
  import lp_pkg::*;
(
  input  act_t        act,
  input  logic [3:0]  thr_shift,
  output logic        blocked
);

  logic [ACT_W-1:0] mag;

  always_comb begin
    mag     = act[ACT_W-1] ? ~act : act;
    blocked = (mag >> thr_shift) == '0;
  end

endmodule
