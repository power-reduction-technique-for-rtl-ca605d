// scheme2_decision: "Module A" of the Scheme II encoder.
//
// From the per-flit counts of Ty, T2 and T4** pairs it picks odd, full or no
// inversion using the conditions derived from the link power model (coupling
// only, K1 = 1, K2 = 2):
//   odd  : 2(T2 - T4**) < 2Ty - W + 1   and  Ty > (W-1)/2
//   full : 2(T2 - T4**) > 2Ty - W + 1   and  T2 > T4**
// and no inversion otherwise. 2Ty - W + 1 is the coupling saved by odd
// inversion and 2(T2 - T4**) the coupling saved by full inversion.
// Scheme II signals both inversions with the same single flag line, and the
// receiver tells them apart with its own majority test on the received flit.
// That test can misread a full inversion, so this design only takes full
// inversion when full_decodable says the receiver will read it correctly; if
// it is blocked, odd inversion is taken when Ty > (W-1)/2 and none otherwise
// (this guard is this design's addition). Purely combinational.
module scheme2_decision #(
  parameter int W  = 32,
  parameter int CW = $clog2(W)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  input  logic          full_decodable,
  output logic          odd,
  output logic          full
);
  int d, ry;
  logic odd_c, full_c, odd_gain;

  always_comb begin
    d        = 2 * (int'(t2_cnt) - int'(t4_cnt));
    ry       = 2 * int'(ty_cnt) - W + 1;
    odd_gain = (2 * int'(ty_cnt)) > (W - 1);
    odd_c    = (d < ry) && odd_gain;
    full_c   = (d > ry) && (t2_cnt > t4_cnt);
    full     = full_c && full_decodable;
    odd      = odd_c || (full_c && !full_decodable && odd_gain);
  end
endmodule
