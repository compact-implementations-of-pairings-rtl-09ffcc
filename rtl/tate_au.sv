// tate_au: arithmetic unit computing the reduced Tate pairing on the
// supersingular curve y^2 + y = x^3 + x + 1 over F_2^163.
//
// It combines the register file (fifteen F_2^163 registers with neighbour
// swaps and per-register clock gating), the F_2^m core (T register and D
// chained MALUs) and the controller that sequences Miller's algorithm and the
// final exponentiation. Points P = (xP, yP) and Q = (xQ, yQ) are fed one
// coordinate at a time; the result e(P, Q) in F_2^652 comes out as four
// coordinates (c0 + c1 u) + (c2 + c3 u) w, u^2 = u + 1, w^2 = (u + 1) w + 1.
//
// Interface and timing: while in_ready is high the unit waits for a
// coordinate; pulse next with the coordinate on din (order xP, yP, xQ, yQ).
// After the computation out_valid rises with c0 on dout; each clock with next
// high moves on to c1, c2, c3. The unit then waits for the next points.
// One pairing takes about 3000 multiplications of ceil(163/D) clocks plus
// additions, copies and swaps (roughly 0.53 million clocks with D = 1).
//
// The structure (register file, core, controller, next-driven input and
// output) follows the document; the separate in_ready/out_valid status
// outputs are this design's choice.
module tate_au
  import tate_pkg::*;
#(
  parameter int unsigned D = 1        // number of MALUs
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [M-1:0] din,
  input  logic         next,
  output logic         in_ready,
  output logic [M-1:0] dout,
  output logic         out_valid
);
  logic [NREG-1:0] swap_en;
  logic            dup, core_go, core_mul, core_inc, core_mul_last;
  r0_sel_e         r0_sel;
  logic [M-1:0]    r0, r1, res;

  au_controller #(.N(NREG)) u_ctrl (
    .clk, .rst_n, .next, .in_ready, .out_valid,
    .core_go, .core_mul, .core_inc, .core_mul_last,
    .swap_en, .dup, .r0_sel
  );

  regfile #(.N(NREG), .D(D)) u_rf (
    .clk, .swap_en, .dup, .r0_sel, .res, .din, .r0, .r1
  );

  gf2m_core #(.D(D)) u_core (
    .clk, .rst_n, .go(core_go), .mul(core_mul), .inc(core_inc),
    .a(r0), .b(r1), .res, .mul_last(core_mul_last)
  );

  assign dout = r0;
endmodule
