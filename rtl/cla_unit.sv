// cla_unit -- W-bit carry-lookahead unit (W = 4 by default).
//
// Computes every carry of the unit in parallel from the bit propagates and
// generates and the unit's carry-in, with no ripple between positions. Each
// carry is the flattened sum of products of C_i = G_i + P_i C_(i-1):
//   c[i] = G_i + P_i G_(i-1) + ... + P_i..P_1 G_0 + P_i..P_0 c_in
// so c[3] is the classic four-bit expression
//   G3 + P3G2 + P3P2G1 + P3P2P1G0 + P3P2P1P0 c_in.
// It also returns the group propagate pg = P_(W-1)..P_0 and the group generate
// gg (c[W-1] without its carry-in term), which a second-level unit of the same
// kind uses to look ahead across groups.
//
// c[i] is the carry out of position i. Purely combinational.
module cla_unit #(
  parameter int unsigned W = 4
) (
  input  logic [W-1:0] p,     // bit propagates
  input  logic [W-1:0] g,     // bit generates
  input  logic         c_in,  // carry into position 0
  output logic [W-1:0] c,     // carry out of each position
  output logic         pg,    // group propagate
  output logic         gg     // group generate
);
  always_comb begin
    logic term;
    for (int i = 0; i < W; i++) begin
      // carry-in term: all propagates from i down to 0
      term = c_in;
      for (int k = 0; k <= i; k++) term &= p[k];
      c[i] = term;
      // one product per generate: G_j and the propagates above it up to i
      for (int j = 0; j <= i; j++) begin
        term = g[j];
        for (int k = j + 1; k <= i; k++) term &= p[k];
        c[i] |= term;
      end
    end
  end

  // group outputs do not depend on c_in
  always_comb begin
    logic term;
    pg = &p;
    gg = 1'b0;
    for (int j = 0; j < W; j++) begin
      term = g[j];
      for (int k = j + 1; k < W; k++) term &= p[k];
      gg |= term;
    end
  end
endmodule
