// tb_cmha -- exhaustive self-checking test of the carry-maskable half adder.
// All eight (a, b, m_x) combinations are applied; the expected outputs are
// the half-adder truth table when m_x = 1 and (p = a | b, g = 0) when m_x = 0.
// A watchdog ends the run with a failure if it does not finish in time.
`timescale 1ns/1ps
module tb_cmha;
  logic a, b, m_x, p, g;
  int checks = 0, failures = 0;

  cmha dut (.a(a), .b(b), .m_x(m_x), .p(p), .g(g));

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_p, exp_g;
    for (int v = 0; v < 8; v++) begin
      {m_x, a, b} = 3'(v);
      #1;
      if (m_x) begin
        exp_p = (a != b);
        exp_g = a && b;
      end else begin
        exp_p = a || b;
        exp_g = 1'b0;
      end
      checks++;
      if (p !== exp_p || g !== exp_g) begin
        failures++;
        if (failures <= 20) $display("FAIL m_x=%b a=%b b=%b: p=%b g=%b expected p=%b g=%b",
                 m_x, a, b, p, g, exp_p, exp_g);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
