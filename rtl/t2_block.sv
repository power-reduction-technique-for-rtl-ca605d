// t2_block: Type II transition detector for one pair of adjacent link lines.
//
// hit is 1 when both lines switch in opposite directions between the previous
// flit (prev) and the current flit (cur), e.g. 01 -> 10. Such a transition has
// weight 2 in the coupling activity and becomes Type IV under full inversion.
// Bit 0 of each vector is the lower-indexed line. Purely combinational.
module t2_block (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       hit
);
  always_comb hit = (prev[0] ^ cur[0]) & (prev[1] ^ cur[1]) & (prev[0] ^ prev[1]);
endmodule
