// d_block_s1: decoding logic of Scheme I.
//
// Line W-1 of the received flit is the inversion flag. When it is 1 the odd
// lines of the payload were flipped by the sender and are flipped back; when
// it is 0 the payload is taken as it is. Purely combinational.
module d_block_s1
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic [W-1:0] link,
  output logic [W-2:0] payload
);
  localparam logic [W-2:0] ODD_MASK = ODD_LINES[W-2:0];

  always_comb payload = link[W-2:0] ^ (link[W-1] ? ODD_MASK : '0);
endmodule
