// ni_encoder: sending network interface with coupling-aware link encoding.
//
// Each valid payload (in_valid, in_payload) is encoded by the E block of the
// selected scheme (SCHEME = 1, 2 or 3) against the flit now on the link and
// registered onto the link wires. The link register is both the line driver
// and the "previous encoded flit" input of the E block, so every decision is
// taken against what the wires really hold. In cycles without in_valid the
// link keeps its value, which costs no switching.
// Payload width PW is W-1 for Schemes I and II (one inversion flag line) and
// W-2 for Scheme III (two action-code lines).
// Timing: one flit per cycle, no back-pressure; a payload accepted at a rising
// edge is on link_data with link_valid = 1 right after that edge. link_action
// reports the inversion applied to the flit on the link. Reset (rst_n low,
// synchronous) clears the link to all zeros; the receiver resets its copy of
// the previous flit to the same value.
module ni_encoder
  import noc_enc_pkg::*;
#(
  parameter int W      = 32,
  parameter int SCHEME = 3,
  localparam int PW    = payload_width(SCHEME, W)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          in_valid,
  input  logic [PW-1:0] in_payload,
  output logic          link_valid,
  output logic [W-1:0]  link_data,
  output inv_action_e   link_action
);
  logic [W-1:0] enc;
  inv_action_e  action;

  if (SCHEME == 1) begin : g_s1
    logic odd;
    e_block_s1 #(.W(W)) u_e (.payload(in_payload), .prev_link(link_data), .enc(enc), .odd(odd));
    assign action = odd ? ACT_ODD : ACT_NONE;
  end else if (SCHEME == 2) begin : g_s2
    e_block_s2 #(.W(W)) u_e (.payload(in_payload), .prev_link(link_data), .enc(enc), .action(action));
  end else if (SCHEME == 3) begin : g_s3
    e_block_s3 #(.W(W)) u_e (.payload(in_payload), .prev_link(link_data), .enc(enc), .action(action));
  end else begin : g_bad
    $error("ni_encoder: SCHEME must be 1, 2 or 3");
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      link_valid  <= 1'b0;
      link_data   <= '0;
      link_action <= ACT_NONE;
    end else begin
      link_valid <= in_valid;
      if (in_valid) begin
        link_data   <= enc;
        link_action <= action;
      end
    end
  end

  if (SCHEME != 3) begin : g_flag_checks
    // Schemes I and II never use even inversion.
    a_no_even : assert property (@(posedge clk) disable iff (!rst_n)
      link_action != ACT_EVEN);
    // Their flag line is set exactly when an inversion was applied.
    a_flag : assert property (@(posedge clk) disable iff (!rst_n)
      link_valid |-> (link_data[W-1] == (link_action != ACT_NONE)));
  end else begin : g_code_checks
    // Scheme III: the two code lines equal the action applied.
    a_code : assert property (@(posedge clk) disable iff (!rst_n)
      link_valid |-> (link_data[W-1:W-2] == link_action));
  end
endmodule
