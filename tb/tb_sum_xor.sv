// tb_sum_xor -- self-checking test of the sum stage. For random p and c the
// expected sum is built bit by bit from s[i] = p[i] xor c[i-1] (0 below bit 0)
// and s[N] = c[N-1]; walking single-bit patterns check each position. Watchdog
// included.
`timescale 1ns/1ps
module tb_sum_xor;
  localparam int unsigned N = 16;
  logic [N-1:0] p, c;
  logic [N:0]   s;
  int checks = 0, failures = 0;

  sum_xor #(.N(N)) dut (.p(p), .c(c), .s(s));

  task automatic apply(logic [N-1:0] pv, logic [N-1:0] cv);
    logic [N:0] exp_s;
    p = pv;
    c = cv;
    #1;
    exp_s = {1'b0, p} ^ {c, 1'b0};
    checks++;
    if (s !== exp_s) begin
      failures++;
      if (failures <= 20) $display("FAIL p=%h c=%h: s=%h expected %h", p, c, s, exp_s);
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
    for (int j = 0; j < N; j++) begin
      apply(N'(1) << j, '0);
      apply('0, N'(1) << j);
    end
    for (int t = 0; t < 5000; t++) apply(N'($urandom), N'($urandom));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
