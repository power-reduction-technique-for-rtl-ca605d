// noc_enc_pkg: types and helpers shared by the coupling-aware link encoders.
//
// The link carries W wires numbered 0..W-1 from the LSB. Lines with an odd
// index are "odd lines", the rest "even lines". An inversion action flips a
// fixed set of lines of the outgoing flit:
//   ACT_NONE (00)  nothing
//   ACT_EVEN (01)  even lines 0,2,4,...
//   ACT_ODD  (10)  odd lines 1,3,5,...
//   ACT_FULL (11)  every line
// The two-bit codes are the ones used by the Scheme III decision module; bit 1
// says "odd lines flipped" and bit 0 "even lines flipped", so ACT_FULL is the
// union of the other two. payload_width() gives the payload carried per flit:
// one line is reserved for the inversion flag in Schemes I and II, two lines
// for the action code in Scheme III (this design's choice for Scheme III).
package noc_enc_pkg;

  typedef enum logic [1:0] {
    ACT_NONE = 2'b00,
    ACT_EVEN = 2'b01,
    ACT_ODD  = 2'b10,
    ACT_FULL = 2'b11
  } inv_action_e;

  // Line masks for links of up to MAX_W wires; a W-wire link takes the low W
  // bits. ODD_LINES has ones at the odd line indices, EVEN_LINES at the even.
  localparam int MAX_W = 1024;
  localparam logic [MAX_W-1:0] ODD_LINES  = {(MAX_W / 2){2'b10}};
  localparam logic [MAX_W-1:0] EVEN_LINES = {(MAX_W / 2){2'b01}};

  function automatic int payload_width(input int scheme, input int w);
    return (scheme == 3) ? w - 2 : w - 1;
  endfunction

endpackage
