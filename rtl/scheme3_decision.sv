// scheme3_decision: decision module of the Scheme III encoder.
//
// From the per-flit counts of Ty, Te, T2 and T4** pairs it picks one of four
// actions (codes of noc_enc_pkg::inv_action_e):
//   even (01): Te > (W-1)/2, Te > Ty, 2(T2 - T4**) < 2Te - W + 1
//   full (11): 2(T2 - T4**) > 2Ty - W + 1, T2 > T4**, 2(T2 - T4**) > 2Te - W + 1
//   odd  (10): 2(T2 - T4**) < 2Ty - W + 1, Ty > (W-1)/2, Te < Ty
//   none (00): otherwise
// The terms are the coupling saved by each action: 2Ty - W + 1 for odd,
// 2Te - W + 1 for even, 2(T2 - T4**) for full. The inequalities are strict, as
// derived, so a tie between odd and even (Te == Ty) gives no inversion unless
// full wins. The three conditions exclude one another. Purely combinational.
module scheme3_decision
  import noc_enc_pkg::*;
#(
  parameter int W  = 32,
  parameter int CW = $clog2(W)
) (
  input  logic [CW-1:0] ty_cnt,
  input  logic [CW-1:0] te_cnt,
  input  logic [CW-1:0] t2_cnt,
  input  logic [CW-1:0] t4_cnt,
  output inv_action_e   action
);
  int d, ry, re;
  logic even_c, full_c, odd_c;

  always_comb begin
    d      = 2 * (int'(t2_cnt) - int'(t4_cnt));
    ry     = 2 * int'(ty_cnt) - W + 1;
    re     = 2 * int'(te_cnt) - W + 1;
    even_c = (re > 0) && (te_cnt > ty_cnt) && (d < re);
    full_c = (d > ry) && (t2_cnt > t4_cnt) && (d > re);
    odd_c  = (d < ry) && (ry > 0) && (te_cnt < ty_cnt);
    if (odd_c)       action = ACT_ODD;
    else if (even_c) action = ACT_EVEN;
    else if (full_c) action = ACT_FULL;
    else             action = ACT_NONE;
  end
endmodule
