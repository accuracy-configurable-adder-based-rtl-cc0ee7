// tb_cmha_group -- exhaustive self-checking test of a 4-bit carry-maskable
// half-adder slice. Every (a, b) pair is applied with the mask on and off;
// expected values are worked out per bit from the half-adder truth table
// (exact) or as p = a | b, g = 0 (masked). Watchdog included.
`timescale 1ns/1ps
module tb_cmha_group;
  localparam int unsigned W = 4;
  logic [W-1:0] a, b, p, g;
  logic         m_x;
  int checks = 0, failures = 0;

  cmha_group #(.W(W)) dut (.a(a), .b(b), .m_x(m_x), .p(p), .g(g));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] exp_p, exp_g;
    for (int m = 0; m < 2; m++) begin
      for (int v = 0; v < (1 << (2*W)); v++) begin
        m_x = 1'(m);
        {a, b} = (2*W)'(v);
        #1;
        for (int i = 0; i < W; i++) begin
          exp_p[i] = m_x ? (a[i] != b[i]) : (a[i] || b[i]);
          exp_g[i] = m_x ? (a[i] && b[i]) : 1'b0;
        end
        checks++;
        if (p !== exp_p || g !== exp_g) begin
          failures++;
          if (failures <= 20) $display("FAIL m_x=%b a=%h b=%h: p=%h g=%h expected p=%h g=%h",
                   m_x, a, b, p, g, exp_p, exp_g);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
