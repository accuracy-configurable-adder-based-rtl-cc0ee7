// tb_cla_unit -- exhaustive self-checking test of the 4-bit carry-lookahead
// unit. Every combination of p, g and c_in is applied. The reference is a
// plain ripple recurrence c[i] = g[i] | p[i] & c[i-1]; the group outputs are
// checked against their meaning: pg is 1 exactly when a carry-in would ripple
// through all four positions, gg when the unit produces a carry out with
// c_in = 0. Watchdog included.
`timescale 1ns/1ps
module tb_cla_unit;
  localparam int unsigned W = 4;
  logic [W-1:0] p, g, c;
  logic         c_in, pg, gg;
  int checks = 0, failures = 0;

  cla_unit #(.W(W)) dut (.p(p), .g(g), .c_in(c_in), .c(c), .pg(pg), .gg(gg));

  function automatic logic [W-1:0] ripple(logic [W-1:0] pp, logic [W-1:0] gg_in, logic ci);
    logic carry = ci;
    for (int i = 0; i < W; i++) begin
      carry = gg_in[i] | (pp[i] & carry);
      ripple[i] = carry;
    end
  endfunction

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_c, c_no_cin;
    logic exp_pg, exp_gg;
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      {c_in, p, g} = (2*W+1)'(v);
      #1;
      exp_c  = ripple(p, g, c_in);
      c_no_cin = ripple(p, g, 1'b0);
      exp_gg = c_no_cin[W-1];
      // propagate through all: no generate, carry-in 1 reaches the top
      exp_pg = (p == '1);
      checks++;
      if (c !== exp_c || pg !== exp_pg || gg !== exp_gg) begin
        failures++;
        if (failures <= 20) $display("FAIL p=%b g=%b cin=%b: c=%b pg=%b gg=%b expected c=%b pg=%b gg=%b",
                 p, g, c_in, c, pg, gg, exp_c, exp_pg, exp_gg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
