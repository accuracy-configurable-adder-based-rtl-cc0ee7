// cmha_group -- W carry-maskable half adders under one shared mask.
//
// Prepares propagate and generate for one W-bit slice of the operands (the
// "Part 1" stage of the adder). All W cells take the same m_x, so a whole
// slice switches between exact half-adder outputs (m_x = 1) and carry-free
// outputs p = a | b, g = 0 (m_x = 0). The default slice width of 4 is the one
// the adder is organised in. Purely combinational.
module cmha_group #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic         m_x,  // 1: exact, 0: masked
  output logic [W-1:0] p,
  output logic [W-1:0] g
);
  for (genvar i = 0; i < W; i++) begin : g_bit
    cmha u_cmha (
      .a   (a[i]),
      .b   (b[i]),
      .m_x (m_x),
      .p   (p[i]),
      .g   (g[i])
    );
  end
endmodule
