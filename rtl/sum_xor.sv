// sum_xor -- sum generation stage of the adder ("Part 3").
//
// One two-input XOR per bit: s[i] = p[i] ^ c[i-1], where c[i-1] is the carry
// out of the position below and the carry into bit 0 is 0. The carry out of
// the top position becomes the extra sum bit s[N], so the N-bit adder returns
// an (N+1)-bit result. s[0] and s[N] are plain wires from p[0] and c[N-1]. Purely combinational.
module sum_xor #(
  parameter int unsigned N = 16
) (
  input  logic [N-1:0] p,  // bit propagates
  input  logic [N-1:0] c,  // carry out of each bit position
  output logic [N:0]   s   // sum, s[N] is the carry out
);
  always_comb begin
    s[0] = p[0];
    for (int i = 1; i < N; i++) s[i] = p[i] ^ c[i-1];
    s[N] = c[N-1];
  end
endmodule
