// e_block_s3: encoding logic E of Scheme III (odd, even, full or no inversion).
//
// x is the W-2 payload bits with 0s on lines W-2 and W-1, which carry the
// two-bit action code. Per adjacent line pair of x against the flit on the
// link (prev_link) four detectors run: ty_block with the odd line flipped (Ty),
// ty_block with the even line flipped (Te), t2_block (T2) and t4ss_block
// (T4**). Four ones_counters feed scheme3_decision. The chosen mask is XORed
// onto x: odd lines for ACT_ODD, even lines for ACT_EVEN, all for ACT_FULL.
// As line W-1 is odd and line W-2 even (W even), the inversion writes the code
// itself: {line W-1, line W-2} = 10 odd, 01 even, 11 full, 00 none. Carrying
// the code on these two lines is this design's choice; the code values follow
// the decision module. Purely combinational.
module e_block_s3
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-3:0]  payload,
  input  logic [W-1:0]  prev_link,
  output logic [W-1:0]  enc,
  output inv_action_e   action
);
  localparam int CW = $clog2(W);
  localparam logic [W-1:0] ODD_MASK  = ODD_LINES[W-1:0];
  localparam logic [W-1:0] EVEN_MASK = EVEN_LINES[W-1:0];

  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("e_block_s3: W must be even and at least 4");
  end

  logic [W-1:0]  x;
  logic [W-2:0]  ty, te, t2, t4;
  logic [CW-1:0] ty_cnt, te_cnt, t2_cnt, t4_cnt;

  assign x = {2'b00, payload};

  for (genvar p = 0; p < W - 1; p++) begin : g_pair
    localparam int OL = (p % 2 == 0) ? p + 1 : p;  // odd line of the pair
    localparam int EL = (p % 2 == 0) ? p : p + 1;  // even line of the pair
    ty_block u_ty (
      .prev_keep(prev_link[EL]), .prev_flip(prev_link[OL]),
      .cur_keep (x[EL]),         .cur_flip (x[OL]),
      .hit      (ty[p])
    );
    ty_block u_te (
      .prev_keep(prev_link[OL]), .prev_flip(prev_link[EL]),
      .cur_keep (x[OL]),         .cur_flip (x[EL]),
      .hit      (te[p])
    );
    t2_block   u_t2 (.prev(prev_link[p+1:p]), .cur(x[p+1:p]), .hit(t2[p]));
    t4ss_block u_t4 (.prev(prev_link[p+1:p]), .cur(x[p+1:p]), .hit(t4[p]));
  end

  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_ty (.bits(ty), .count(ty_cnt));
  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_te (.bits(te), .count(te_cnt));
  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_t2 (.bits(t2), .count(t2_cnt));
  ones_counter #(.N(W - 1), .CW(CW)) u_cnt_t4 (.bits(t4), .count(t4_cnt));

  scheme3_decision #(.W(W), .CW(CW)) u_dec (
    .ty_cnt(ty_cnt), .te_cnt(te_cnt), .t2_cnt(t2_cnt), .t4_cnt(t4_cnt),
    .action(action)
  );

  always_comb begin
    unique case (action)
      ACT_ODD:  enc = x ^ ODD_MASK;
      ACT_EVEN: enc = x ^ EVEN_MASK;
      ACT_FULL: enc = ~x;
      default:  enc = x;
    endcase
  end
endmodule
