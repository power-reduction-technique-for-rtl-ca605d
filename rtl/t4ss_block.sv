// t4ss_block: T4** detector for one pair of adjacent link lines.
//
// hit is 1 for a Type IV transition (neither line switches) in which the two
// lines hold different values (01 -> 01 or 10 -> 10). Full inversion turns
// exactly these transitions into Type II, so they are the cost side of a full
// inversion (P'' ~ T1 + 2*T4**). Purely combinational.
module t4ss_block (
  input  logic [1:0] prev,
  input  logic [1:0] cur,
  output logic       hit
);
  always_comb hit = ~(prev[0] ^ cur[0]) & ~(prev[1] ^ cur[1]) & (prev[0] ^ prev[1]);
endmodule
