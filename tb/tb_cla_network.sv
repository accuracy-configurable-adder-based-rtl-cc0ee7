// tb_cla_network -- self-checking test of the two-level carry-lookahead
// network at its default 4 x 4 size. Random and hand-picked propagate /
// generate patterns (long propagate chains across all groups, a single
// generate at the bottom) are applied; every carry is compared with a
// bit-serial ripple recurrence with carry-in 0. Watchdog included.
`timescale 1ns/1ps
module tb_cla_network;
  localparam int unsigned GW = 4, NG = 4, N = GW * NG;
  logic [N-1:0] p, g, c;
  int checks = 0, failures = 0;

  cla_network #(.GW(GW), .NG(NG)) dut (.p(p), .g(g), .c(c));

  function automatic logic [N-1:0] ripple(logic [N-1:0] pp, logic [N-1:0] gi);
    logic carry = 1'b0;
    for (int i = 0; i < N; i++) begin
      carry = gi[i] | (pp[i] & carry);
      ripple[i] = carry;
    end
  endfunction

  task automatic apply(logic [N-1:0] pv, logic [N-1:0] gv);
    logic [N-1:0] exp_c;
    p = pv;
    g = gv;
    #1;
    exp_c = ripple(p, g);
    checks++;
    if (c !== exp_c) begin
      failures++;
      if (failures <= 20) $display("FAIL p=%h g=%h: c=%h expected %h", p, g, c, exp_c);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    apply('0, '0);
    apply('1, 16'h0001);        // carry from bit 0 runs to the top
    apply(16'hfffe, 16'h0001);
    apply(16'h7fff, 16'h0000);
    apply(16'hff0f, 16'h00f0);
    for (int j = 0; j < N; j++) apply('1 << j, N'(1) << j);
    for (int t = 0; t < 20000; t++) begin
      logic [N-1:0] pv, gv;
      pv = N'($urandom);
      gv = N'($urandom) & N'($urandom);
      // half-adder outputs never have p and g both set; mix both kinds
      if (t[0]) gv &= ~pv;
      apply(pv, gv);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
