// cma_adder -- accuracy-configurable carry-maskable carry-lookahead adder.
//
// A 16-bit carry-lookahead adder (NG = 4 groups of GW = 4 bits) whose
// accuracy can be changed while it runs. It has three stages:
//   Part 1  cmha_group per 4-bit slice: propagate P and generate G.
//   Part 2  cla_network: four 4-bit CLA units plus one second-level unit
//           produce every carry C_15..C_0 in parallel.
//   Part 3  sum_xor: S_i = P_i ^ C_(i-1), S_16 = C_15.
// The low NG-1 slices each have a mask bit m_x[k]. With m_x[k] = 1 the slice
// adds exactly. With m_x[k] = 0 its half adders generate no carry and pass
// A | B as propagate, so with the slices below it also masked the slice's sum
// is A | B and no carry leaves it. All masks at 1 gives the exact sum; masking
// from the LSB upward trades accuracy of the low 4, 8 or 12 bits for less
// switching in the carry logic. The top slice has no mask and is always exact.
//
// Interface: a, b (16 bits), m_x (3 bits, m_x[0] for bits 3..0), s (17 bits,
// s[16] is the carry out). There is no carry-in. Purely combinational, no
// clock or reset: the result is valid one combinational delay after the
// inputs settle.
//
// The three-part structure, the 4-bit grouping, the masked slices and the
// 17-bit result follow the published circuit; the mask polarity and the way
// the mask gates the half adder are this design's choices.
module cma_adder #(
  parameter int unsigned GW = 4,  // bits per group
  parameter int unsigned NG = 4   // number of groups
) (
  input  logic [NG*GW-1:0] a,
  input  logic [NG*GW-1:0] b,
  input  logic [NG-2:0]    m_x,  // 1: slice exact, 0: slice approximate
  output logic [NG*GW:0]   s
);
  localparam int unsigned N = NG * GW;

  logic [N-1:0]  p, g, c;
  logic [NG-1:0] mask;  // per-group mask, top group always exact

  assign mask = {1'b1, m_x};

  // Part 1: carry-maskable half adders
  for (genvar k = 0; k < NG; k++) begin : g_part1
    cmha_group #(.W(GW)) u_cmha (
      .a   (a[k*GW +: GW]),
      .b   (b[k*GW +: GW]),
      .m_x (mask[k]),
      .p   (p[k*GW +: GW]),
      .g   (g[k*GW +: GW])
    );
  end

  // Part 2: two-level carry lookahead
  cla_network #(.GW(GW), .NG(NG)) u_part2 (
    .p (p),
    .g (g),
    .c (c)
  );

  // Part 3: sum XORs
  sum_xor #(.N(N)) u_part3 (
    .p (p),
    .c (c),
    .s (s)
  );
endmodule
