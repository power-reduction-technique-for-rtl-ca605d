// majority_voter: strict majority of N flag bits.
//
// more_than_half is 1 when more than half of the bits are set, i.e. the Ty
// condition Ty > (w-1)/2 when the N = W-1 pair flags of a W-line link are
// applied; a tie gives 0. Counts with a ones_counter, then compares 2*count
// with N. Purely combinational.
module majority_voter #(
  parameter int N = 31
) (
  input  logic [N-1:0] bits,
  output logic         more_than_half
);
  localparam int CW = $clog2(N + 1);
  logic [CW-1:0] count;

  ones_counter #(.N(N), .CW(CW)) u_cnt (.bits(bits), .count(count));

  always_comb more_than_half = ({1'b0, count, 1'b0} > (CW + 2)'(N));
endmodule
