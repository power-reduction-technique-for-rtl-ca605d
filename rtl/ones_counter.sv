// ones_counter: the "1s block" of the encoders; counts the ones in bits.
//
// N flag bits in, a $clog2(N+1)-bit count out. Written as a plain sum that
// synthesis turns into an adder tree. Purely combinational.
module ones_counter #(
  parameter int N  = 31,
  parameter int CW = $clog2(N + 1)
) (
  input  logic [N-1:0]  bits,
  output logic [CW-1:0] count
);
  always_comb begin
    count = '0;
    for (int i = 0; i < N; i++) count = count + CW'(bits[i]);
  end
endmodule
