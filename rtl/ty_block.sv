// ty_block: inversion-benefit detector for one pair of adjacent link lines.
//
// The pair has a line that a candidate inversion would flip (flip) and a line
// it would leave alone (keep). hit is 1 when flipping the current value of the
// flip line lowers the pair's coupling cost (weights Type I = 1, Type II = 2,
// Types III/IV = 0). Flipping one line of a pair always changes that cost by
// exactly one step, so hit = 0 means the inversion makes the pair worse.
// The benefit set is the one of the odd-inversion table: every Type II
// transition (it becomes Type I), a Type I transition in which the flip line
// switches (it becomes Type IV), and a Type I transition in which the keep line
// switches while both lines were equal before (it becomes Type III).
// With the odd line of a pair wired to flip this is the Ty block of the
// encoders; with the even line wired to flip it is the Te block of Scheme III
// (the even-inversion table is the odd one with the two lines swapped).
// Purely combinational.
module ty_block (
  input  logic prev_keep,
  input  logic prev_flip,
  input  logic cur_keep,
  input  logic cur_flip,
  output logic hit
);
  logic sw_keep, sw_flip;

  always_comb begin
    sw_keep = prev_keep ^ cur_keep;
    sw_flip = prev_flip ^ cur_flip;
    hit = (sw_keep & sw_flip & (prev_keep ^ prev_flip))      // Type II
        | (sw_flip & ~sw_keep)                                // Type I, flip line switches
        | (sw_keep & ~sw_flip & ~(prev_keep ^ prev_flip));    // Type I, keep line switches from equal lines
  end
endmodule
