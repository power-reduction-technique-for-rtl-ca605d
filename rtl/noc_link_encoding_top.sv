// noc_link_encoding_top: three encoded NoC links side by side, one per scheme.
//
// Each channel is a sending network interface (ni_encoder) driving W link
// wires into a receiving one (ni_decoder):
//   s1: Scheme I   - odd inversion or none, W-1 payload bits, 1 flag line
//   s2: Scheme II  - odd, full or none, W-1 payload bits, 1 flag line
//   s3: Scheme III - odd, even, full or none, W-2 payload bits, 2 code lines
// The encoding is end to end, so routers between the two interfaces would pass
// the W-bit flits unchanged; they are not modelled. The link wires and the
// action taken are brought out so that link switching can be measured.
// Timing per channel: payload in at edge n, on the link after edge n, decoded
// payload on sN_out_payload with sN_out_valid after edge n+1.
module noc_link_encoding_top
  import noc_enc_pkg::*;
#(
  parameter int W = 32
) (
  input  logic          clk,
  input  logic          rst_n,
  // Scheme I channel
  input  logic          s1_in_valid,
  input  logic [W-2:0]  s1_in_payload,
  output logic [W-1:0]  s1_link,
  output inv_action_e   s1_link_action,
  output logic          s1_out_valid,
  output logic [W-2:0]  s1_out_payload,
  // Scheme II channel
  input  logic          s2_in_valid,
  input  logic [W-2:0]  s2_in_payload,
  output logic [W-1:0]  s2_link,
  output inv_action_e   s2_link_action,
  output logic          s2_out_valid,
  output logic [W-2:0]  s2_out_payload,
  // Scheme III channel
  input  logic          s3_in_valid,
  input  logic [W-3:0]  s3_in_payload,
  output logic [W-1:0]  s3_link,
  output inv_action_e   s3_link_action,
  output logic          s3_out_valid,
  output logic [W-3:0]  s3_out_payload
);
  logic s1_link_valid, s2_link_valid, s3_link_valid;

  ni_encoder #(.W(W), .SCHEME(1)) u_enc1 (
    .clk, .rst_n, .in_valid(s1_in_valid), .in_payload(s1_in_payload),
    .link_valid(s1_link_valid), .link_data(s1_link), .link_action(s1_link_action)
  );
  ni_decoder #(.W(W), .SCHEME(1)) u_dec1 (
    .clk, .rst_n, .link_valid(s1_link_valid), .link_data(s1_link),
    .out_valid(s1_out_valid), .out_payload(s1_out_payload)
  );

  ni_encoder #(.W(W), .SCHEME(2)) u_enc2 (
    .clk, .rst_n, .in_valid(s2_in_valid), .in_payload(s2_in_payload),
    .link_valid(s2_link_valid), .link_data(s2_link), .link_action(s2_link_action)
  );
  ni_decoder #(.W(W), .SCHEME(2)) u_dec2 (
    .clk, .rst_n, .link_valid(s2_link_valid), .link_data(s2_link),
    .out_valid(s2_out_valid), .out_payload(s2_out_payload)
  );

  ni_encoder #(.W(W), .SCHEME(3)) u_enc3 (
    .clk, .rst_n, .in_valid(s3_in_valid), .in_payload(s3_in_payload),
    .link_valid(s3_link_valid), .link_data(s3_link), .link_action(s3_link_action)
  );
  ni_decoder #(.W(W), .SCHEME(3)) u_dec3 (
    .clk, .rst_n, .link_valid(s3_link_valid), .link_data(s3_link),
    .out_valid(s3_out_valid), .out_payload(s3_out_payload)
  );
endmodule
