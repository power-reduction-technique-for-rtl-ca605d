// e_block_s2: encoding logic E of Scheme II (odd, full or no inversion).
//
// x is the W-1 payload bits with a 0 on the inversion line W-1. Per adjacent
// line pair of x against the flit on the link (prev_link) three detectors run:
// ty_block (odd inversion helps), t2_block (Type II) and t4ss_block (T4**,
// hurt by full inversion). Three ones_counters give Ty, T2 and T4**, and
// scheme2_decision picks the action. Odd inversion flips lines 1,3,...,W-1,
// full inversion every line; either sets the inversion line to 1.
// The receiver separates odd from full by testing Ty > (W-1)/2 on the received
// flit. A second row of ty_blocks and a majority voter runs that same test on
// ~x (the flit full inversion would send) so that full inversion is only taken
// when the receiver will read it as full (this check is this design's own).
// Purely combinational.
module e_block_s2
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-2:0]  payload,
  input  logic [W-1:0]  prev_link,
  output logic [W-1:0]  enc,
  output inv_action_e   action
);
  localparam int CW = $clog2(W);
  localparam logic [W-1:0] ODD_MASK = ODD_LINES[W-1:0];

  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("e_block_s2: W must be even and at least 4");
  end

  logic [W-1:0]  x, xn;
  logic [W-2:0]  ty, tyn, t2, t4;
  logic [CW-1:0] ty_cnt, t2_cnt, t4_cnt;
  logic          full_decodable, odd, full;

  assign x  = {1'b0, payload};
  assign xn = ~x;

  for (genvar p = 0; p < W - 1; p++) begin : g_pair
    localparam int FL = (p % 2 == 0) ? p + 1 : p;
    localparam int KP = (p % 2 == 0) ? p : p + 1;
    ty_block u_ty (
      .prev_keep(prev_link[KP]), .prev_flip(prev_link[FL]),
      .cur_keep (x[KP]),         .cur_flip (x[FL]),
      .hit      (ty[p])
    );
    ty_block u_tyn (
      .prev_keep(prev_link[KP]), .prev_flip(prev_link[FL]),
      .cur_keep (xn[KP]),        .cur_flip (xn[FL]),
      .hit      (tyn[p])
    );
    t2_block   u_t2 (.prev(prev_link[p+1:p]), .cur(x[p+1:p]), .hit(t2[p]));
    t4ss_block u_t4 (.prev(prev_link[p+1:p]), .cur(x[p+1:p]), .hit(t4[p]));
  end

  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_t4 (.bits(t4), .count(t4_cnt));
  majority_voter #(.N(W - 1)) u_vote_full (.bits(tyn), .more_than_half(full_decodable));

  scheme2_decision #(.W(W), .CW(CW)) u_dec (
    .ty_cnt(ty_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt),
    .full_decodable(full_decodable), .odd(odd), .full(full)
  );

  always_comb begin
    if (full) begin
      enc    = ~x;
      action = ACT_FULL;
    end else if (odd) begin
      enc    = x ^ ODD_MASK;
      action = ACT_ODD;
    end else begin
      enc    = x;
      action = ACT_NONE;
    end
  end
endmodule
