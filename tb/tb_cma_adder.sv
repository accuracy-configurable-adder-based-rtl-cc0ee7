// tb_cma_adder -- end-to-end self-checking test of the 16-bit carry-maskable
// CLA adder at its default size (no parameter overrides).
//
// References, both independent of the lookahead structure:
//  * exact mode (all masks 1): s == a + b as integer arithmetic;
//  * masks set from the LSB upward (the low K groups approximate):
//      s == ((a >> 4K) + (b >> 4K)) << 4K  |  (a | b) & low_mask(4K)
//  * any mask pattern: a bit-serial ripple model in which a masked bit has
//    propagate a | b and no generate.
// Mechanisms counted, each of which must occur at least once: exact
// additions, each approximation level K = 1..3, a carry out of bit 15, a
// masked result that differs from the exact sum, a masked result that still
// equals it, a non-contiguous mask pattern, and a carry from an exact group
// running through a masked group above it.
// The error rate for each K under uniform random operands is measured and
// compared with the closed form 1 - (3/4)^(4K): a masked result is wrong
// exactly when some masked bit has a = b = 1. Watchdog included.
`timescale 1ns/1ps
module tb_cma_adder;
  localparam int unsigned N = 16, GW = 4, NG = 4;

  logic [N-1:0]  a, b;
  logic [NG-2:0] m_x;
  logic [N:0]    s;
  int checks = 0, failures = 0;

  // mechanism counters
  int n_exact = 0, n_carry_out = 0, n_err = 0, n_masked_ok = 0;
  int n_noncontig = 0, n_carry_into_masked = 0;
  int n_level[NG];

  cma_adder dut (.a(a), .b(b), .m_x(m_x), .s(s));

  // bit-serial model of the masked adder
  function automatic logic [N:0] ripple_model(logic [N-1:0] x, logic [N-1:0] y,
                                              logic [NG-2:0] m, output logic into_masked);
    logic carry = 1'b0;
    logic masked;
    into_masked = 1'b0;
    for (int i = 0; i < N; i++) begin
      masked = (i / GW < NG - 1) && !m[i / GW];
      if (masked && carry) into_masked = 1'b1;
      if (masked) begin
        ripple_model[i] = (x[i] | y[i]) ^ carry;
        carry           = (x[i] | y[i]) & carry;
      end else begin
        ripple_model[i] = x[i] ^ y[i] ^ carry;
        carry           = (x[i] & y[i]) | ((x[i] ^ y[i]) & carry);
      end
    end
    ripple_model[N] = carry;
  endfunction

  // masks for "low K groups approximate"
  function automatic logic [NG-2:0] level_mask(int k);
    return ~((NG-1)'((1 << k) - 1));
  endfunction

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y, logic [NG-2:0] m);
    logic [N:0]   exact, exp_s;
    logic         into_masked;
    int           k;
    logic         contiguous;
    a = x; b = y; m_x = m;
    #1;
    exact = {1'b0, x} + {1'b0, y};
    // is m of the form 1..10..0 ?
    k = 0;
    while (k < NG - 1 && !m[k]) k++;
    contiguous = (m == level_mask(k));
    checks++;
    if (contiguous) begin
      int sh = k * GW;
      logic [N:0] low = (N+1)'((1 << sh) - 1);
      exp_s = ((({1'b0, x} >> sh) + ({1'b0, y} >> sh)) << sh) | ({1'b0, x | y} & low);
      n_level[k]++;
    end else begin
      exp_s = ripple_model(x, y, m, into_masked);
      n_noncontig++;
      if (into_masked) n_carry_into_masked++;
    end
    if (s !== exp_s) begin
      failures++;
      if (failures <= 20) $display("FAIL a=%h b=%h m_x=%b: s=%h expected %h", x, y, m, s, exp_s);
    end
    // the general model must agree on every pattern too
    checks++;
    if (s !== ripple_model(x, y, m, into_masked)) begin
      failures++;
      if (failures <= 20) $display("FAIL (ripple model) a=%h b=%h m_x=%b: s=%h", x, y, m, s);
    end
    if (m == '1) n_exact++;
    if (s[N]) n_carry_out++;
    if (m != '1) begin
      if (s != exact) n_err++;
      else n_masked_ok++;
    end
  endtask

  initial begin
    #100ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NG; k++) n_level[k] = 0;

    // directed cases
    apply(16'hffff, 16'h0001, '1);   // carry through all 16 bits
    apply(16'hffff, 16'hffff, '1);
    apply(16'h0000, 16'h0000, '1);
    apply(16'h1234, 16'h4321, '1);
    apply(16'h000f, 16'h0001, 3'b110);  // carry of bits 3..0 is dropped
    apply(16'h0f0f, 16'h00f1, 3'b101);  // exact bits 3..0 carry into masked 7..4
    apply(16'h0505, 16'h0a0a, 3'b000);  // no overlap: approximate is exact

    // exhaustive sweep of the low byte, all mask patterns
    for (int m = 0; m < (1 << (NG-1)); m++)
      for (int v = 0; v < 65536; v += 7)
        apply({8'h5a, v[15:8]} ^ N'($urandom), {8'ha5, v[7:0]}, (NG-1)'(m));

    // random operands, every mask pattern
    for (int t = 0; t < 40000; t++)
      apply(N'($urandom), N'($urandom), (NG-1)'($urandom));

    // error rate per approximation level, uniform random operands
    for (int k = 1; k < NG; k++) begin
      int errs, trials;
      real er, er_model;
      longint ed_sum;
      errs = 0;
      trials = 20000;
      ed_sum = 0;
      for (int t = 0; t < trials; t++) begin
        logic [N:0] exact;
        apply(N'($urandom), N'($urandom), level_mask(k));
        exact = {1'b0, a} + {1'b0, b};
        if (s != exact) begin
          errs++;
          ed_sum += longint'(exact) - longint'(s);
        end
      end
      er       = real'(errs) / real'(trials);
      er_model = 1.0 - (0.75 ** (GW * k));
      $display("approximate bits %0d: error rate %.4f (closed form %.4f), mean error distance %.2f",
               GW * k, er, er_model, real'(ed_sum) / real'(trials));
      checks++;
      if (er < er_model - 0.02 || er > er_model + 0.02) begin
        failures++;
        $display("FAIL error rate for %0d masked groups out of range", k);
      end
    end

    // every mechanism must have happened
    checks++; if (n_exact == 0)             begin failures++; $display("FAIL no exact addition"); end
    for (int k = 1; k < NG; k++) begin
      checks++; if (n_level[k] == 0)        begin failures++; $display("FAIL level %0d never used", k); end
    end
    checks++; if (n_carry_out == 0)         begin failures++; $display("FAIL no carry out"); end
    checks++; if (n_err == 0)               begin failures++; $display("FAIL no approximation error"); end
    checks++; if (n_masked_ok == 0)         begin failures++; $display("FAIL no error-free masked sum"); end
    checks++; if (n_noncontig == 0)         begin failures++; $display("FAIL no non-contiguous mask"); end
    checks++; if (n_carry_into_masked == 0) begin failures++; $display("FAIL no carry into a masked group"); end
    $display("exact=%0d level1=%0d level2=%0d level3=%0d carry_out=%0d approx_err=%0d approx_ok=%0d noncontig=%0d carry_into_masked=%0d",
             n_exact, n_level[1], n_level[2], n_level[3], n_carry_out, n_err, n_masked_ok,
             n_noncontig, n_carry_into_masked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
