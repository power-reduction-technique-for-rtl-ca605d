// d_block_s2: decoding logic of Scheme II.
//
// Line W-1 of the received flit (link) says whether it was inverted; it does
// not say whether odd or full inversion was used. To find out, ty_blocks
// compare every adjacent line pair of the received flit with the previous
// received flit (prev_link) and a majority voter tests Ty > (W-1)/2. After an
// odd inversion that test always fails, because odd inversion turns every pair
// the sender's test counted into one it does not count; the sender only uses
// full inversion when the test passes. So with the flag set, voter 0 means odd
// lines are flipped back and voter 1 means every line is. Purely combinational.
module d_block_s2
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] link,
  input  logic [W-1:0] prev_link,
  output logic [W-2:0] payload
);
  localparam logic [W-1:0] ODD_MASK = ODD_LINES[W-1:0];

  logic [W-2:0] ty;
  logic         full_seen;
  logic [W-2:0] mask;

  for (genvar p = 0; p < W - 1; p++) begin : g_pair
    localparam int FL = (p % 2 == 0) ? p + 1 : p;
    localparam int KP = (p % 2 == 0) ? p : p + 1;
    ty_block u_ty (
      .prev_keep(prev_link[KP]), .prev_flip(prev_link[FL]),
      .cur_keep (link[KP]),      .cur_flip (link[FL]),
      .hit      (ty[p])
    );
  end

  majority_voter #(.N(W - 1)) u_vote (.bits(ty), .more_than_half(full_seen));

  always_comb begin
    if (!link[W-1])     mask = '0;
    else if (full_seen) mask = '1;
    else                mask = ODD_MASK[W-2:0];
    payload = link[W-2:0] ^ mask;
  end
endmodule
