// cla_network -- two-level carry-lookahead network ("Part 2").
//
// Splits the NG*GW propagates and generates into NG groups of GW bits. Each
// group has a first-level cla_unit that returns the carries inside the group
// and the group's propagate/generate. A second-level cla_unit (NG inputs)
// combines those into the carry out of every group; the carry out of group
// k-1 is the carry-in of group k's unit, and group 0's carry-in is 0. With the
// defaults (4 groups of 4) the second-level unit delivers C3, C7, C11 and C15,
// and the first-level units the remaining carries.
//
// Output c[i] is the carry out of bit i; c[0] is simply g[0], since the
// carry into bit 0 is 0. Both carry-ins tied to 0 follow the
// adder's figure for the first unit; for the second-level unit it is this
// design's choice (no carry-in is shown there). Purely combinational.
module cla_network #(
  parameter int unsigned GW = 4,  // bits per group
  parameter int unsigned NG = 4   // number of groups
) (
  input  logic [NG*GW-1:0] p,
  input  logic [NG*GW-1:0] g,
  output logic [NG*GW-1:0] c
);
  logic [NG-1:0] grp_p;    // PG of each group
  logic [NG-1:0] grp_g;    // GG of each group
  logic [NG-1:0] grp_c;    // carry out of each group (second level)
  logic [NG-1:0] grp_cin;  // carry into each group

  always_comb begin
    grp_cin[0] = 1'b0;
    for (int k = 1; k < NG; k++) grp_cin[k] = grp_c[k-1];
  end

  for (genvar k = 0; k < NG; k++) begin : g_grp
    logic [GW-1:0] cg;
    cla_unit #(.W(GW)) u_unit (
      .p    (p[k*GW +: GW]),
      .g    (g[k*GW +: GW]),
      .c_in (grp_cin[k]),
      .c    (cg),
      .pg   (grp_p[k]),
      .gg   (grp_g[k])
    );
    // carries inside the group come from the first level, the group's top
    // carry from the second level
    if (GW > 1) begin : g_low
      assign c[k*GW +: GW-1] = cg[GW-2:0];
    end
    assign c[k*GW + GW-1] = grp_c[k];
    // the unit's own top carry equals grp_c[k] and is not needed
    logic unused_top_c;
    assign unused_top_c = cg[GW-1];
  end

  logic unused_pg, unused_gg;
  cla_unit #(.W(NG)) u_top (
    .p    (grp_p),
    .g    (grp_g),
    .c_in (1'b0),
    .c    (grp_c),
    .pg   (unused_pg),
    .gg   (unused_gg)
  );
endmodule
