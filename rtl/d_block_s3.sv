// d_block_s3: decoding logic of Scheme III.
//
// Lines W-1 and W-2 of the received flit hold the action code written by
// e_block_s3 (bit 1: odd lines flipped, bit 0: even lines flipped; 11 means
// both, i.e. full inversion). The decoder flips the same lines back and
// returns the W-2 payload bits. Purely combinational.
module d_block_s3
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] link,
  output logic [W-3:0] payload
);
  localparam logic [W-3:0] ODD_MASK  = ODD_LINES[W-3:0];
  localparam logic [W-3:0] EVEN_MASK = EVEN_LINES[W-3:0];

  always_comb
    payload = link[W-3:0] ^ (link[W-1] ? ODD_MASK : '0) ^ (link[W-2] ? EVEN_MASK : '0);
endmodule
