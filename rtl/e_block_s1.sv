// e_block_s1: encoding logic E of Scheme I (odd invert or not).
//
// The current flit x is the W-1 payload bits with a 0 on line W-1, the
// inversion line. For every adjacent line pair (W-1 pairs, the pair with the
// inversion line included) a ty_block compares x with the flit now on the
// link (prev_link, whose line W-1 is the previous inversion flag) and flags
// the pair if odd inversion would lower its coupling cost. A majority voter
// checks Ty > (W-1)/2, which is the approximate odd-invert condition (the
// self-transition terms are dropped). If it holds, the odd lines 1,3,...,W-1
// of x are flipped; since W is even this also sets the inversion line to 1.
// Purely combinational; the link register sits in ni_encoder.
module e_block_s1
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-2:0] payload,
  input  logic [W-1:0] prev_link,
  output logic [W-1:0] enc,
  output logic         odd
);
  localparam logic [W-1:0] ODD_MASK = ODD_LINES[W-1:0];

  if (W % 2 != 0 || W < 4) begin : g_bad_w
    $error("e_block_s1: W must be even and at least 4");
  end

  logic [W-1:0] x;
  logic [W-2:0] ty;

  assign x = {1'b0, payload};

  for (genvar p = 0; p < W - 1; p++) begin : g_pair
    // The odd line of pair (p, p+1) is the one odd inversion flips.
    localparam int FL = (p % 2 == 0) ? p + 1 : p;
    localparam int KP = (p % 2 == 0) ? p : p + 1;
    ty_block u_ty (
      .prev_keep(prev_link[KP]), .prev_flip(prev_link[FL]),
      .cur_keep (x[KP]),         .cur_flip (x[FL]),
      .hit      (ty[p])
    );
  end

  majority_voter #(.N(W - 1)) u_vote (.bits(ty), .more_than_half(odd));

  always_comb enc = odd ? (x ^ ODD_MASK) : x;
endmodule
