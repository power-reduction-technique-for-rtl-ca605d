// ni_decoder: receiving network interface of an encoded link.
//
// Decodes each valid flit with the D block of the selected scheme
// (SCHEME = 1, 2 or 3). For Scheme II it also keeps the previous valid flit
// seen on the link, which that decoder compares the new flit with.
// Timing: a flit with link_valid = 1 at a rising edge gives out_valid = 1 and
// its payload on out_payload right after that edge (one cycle). Reset
// (rst_n low, synchronous) clears the previous-flit copy to all zeros, the
// value the sender's link register resets to.
module ni_decoder
  import noc_enc_pkg::*;
#(
  parameter int W      = 32,
  parameter int SCHEME = 3,
  localparam int PW    = payload_width(SCHEME, W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          link_valid,
  input  logic [W-1:0]  link_data,
  output logic          out_valid,
  output logic [PW-1:0] out_payload
);
  logic [PW-1:0] dec;

  if (SCHEME == 1) begin : g_s1
    d_block_s1 #(.W(W)) u_d (.link(link_data), .payload(dec));
  end else if (SCHEME == 2) begin : g_s2
    // Only Scheme II's decoder looks at the previous flit.
    logic [W-1:0] prev_q;
    always_ff @(posedge clk) begin
      if (!rst_n)          prev_q <= '0;
      else if (link_valid) prev_q <= link_data;
    end
    d_block_s2 #(.W(W)) u_d (.link(link_data), .prev_link(prev_q), .payload(dec));
  end else if (SCHEME == 3) begin : g_s3
    d_block_s3 #(.W(W)) u_d (.link(link_data), .payload(dec));
  end else begin : g_bad
    $error("ni_decoder: SCHEME must be 1, 2 or 3");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_payload <= '0;
    end else begin
      out_valid <= link_valid;
      if (link_valid) begin
        out_payload <= dec;
      end
    end
  end
endmodule
