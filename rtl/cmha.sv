// cmha -- carry-maskable half adder for one bit position.
//
// A half adder built from the XOR-equivalent gate network u = NAND, w = OR,
// p = u AND w, with the generate output taken as the inverse of the shared
// NAND. The mask enters as a third NAND input: with m_x = 1 the cell is an
// ordinary half adder (p = a ^ b, g = a & b); with m_x = 0 the NAND output is
// forced high, so g = 0 and p = a | b. A masked bit therefore never starts a
// carry, and the sum stage downstream sees a | b as the bit's propagate.
//
// The NAND/OR/AND/INV network is the published half-adder structure; putting
// the mask on the NAND and choosing m_x = 1 as the exact setting are this
// design's choices. Purely combinational, no clock.
module cmha (
  input  logic a,    // operand bit A_i
  input  logic b,    // operand bit B_i
  input  logic m_x,  // 1: exact, 0: carry generation masked
  output logic p,    // propagate P_i
  output logic g     // generate G_i
);
  logic u;  // shared NAND, reused for the generate output
  logic w;  // OR half of the XOR-equivalent network

  always_comb begin
    u = ~(a & b & m_x);
    w = a | b;
    p = u & w;
    g = ~u;
  end
endmodule
