// gf2m_core: the F_2^m arithmetic core (MALU wrapper with its control logic).
//
// Multiplication uses the shift-and-add method, most significant multiplier
// bit first. The multiplier A lives in register 1 of the register file, which
// shifts left by D bits every clock while the core consumes its top D bits;
// the multiplicand B is register 2. D MALUs are daisy-chained, so a product
// takes ceil(M/D) clocks; the partial product is kept in the T register.
// Addition (A + B, optionally + 1) takes one clock and goes through the first
// MALU only.
//
// Interface and timing: hold go high with mul selecting the operation; the
// result on res is final in the first clock of an addition and in clock
// ceil(M/D) of a multiplication, where mul_last is high (mul_last depends only
// on the internal clock counter, never combinationally on go or mul); the
// caller writes res into register 1 at that edge. While go is high and last is low during a
// multiplication, the caller must shift register 1 left by D. inc adds the
// constant 1 to the result. go must stay high until last.
//
// From the document: the T register, the chained MALUs, ceil(m/d) cycles per
// multiplication, A shifted each clock, and the choice d with m mod d = 1 that
// puts both results at the first MALU. For other D the product leaves MALU
// number ((M-1) mod D) and a multiplexer picks the result; the counter, the
// go/last handshake and the +1 input are this design's choices.
module gf2m_core
  import tate_pkg::*;
#(
  parameter int unsigned D = 1                  // number of MALUs
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         go,
  input  logic         mul,
  input  logic         inc,
  input  logic [M-1:0] a,        // register 1 (multiplier / first addend)
  input  logic [M-1:0] b,        // register 2
  output logic [M-1:0] res,
  output logic         mul_last   // final clock of a multiplication
);
  localparam int unsigned CYC  = (M + D - 1) / D;   // clocks per multiplication
  localparam int unsigned RTAP = (M - 1) % D;       // MALU holding the product
  localparam int unsigned CW   = $clog2(CYC + 1);

  logic [CW-1:0]  cnt;
  logic [M-1:0]   t_q;
  logic [M-1:0]   t_first;
  logic [M-1:0]   chain [D+1];
  logic [M-1:0]   prod;
  logic           last;

  // first clock of a multiplication starts from zero instead of T
  always_comb begin
    if (!mul)           t_first = a;
    else if (cnt == '0) t_first = '0;
    else                t_first = t_q;
  end
  assign chain[0] = t_first;

  for (genvar k = 0; k < D; k++) begin : g_malu
    malu u_malu (
      .t     (chain[k]),
      .b     (b),
      .a_bit (mul ? a[M-1-k] : 1'b1),
      .shift (mul),
      .y     (chain[k+1])
    );
  end

  assign prod = chain[RTAP+1];
  assign mul_last = (cnt == CW'(CYC - 1));
  assign last     = go && (!mul || mul_last);
  assign res  = ((mul && D > 1) ? prod : chain[1]) ^ M'(inc);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                 cnt <= '0;
    else if (go && mul && !last) cnt <= cnt + 1'b1;
    else                         cnt <= '0;
  end

  // T keeps no reset: it is always written before it is read.
  always_ff @(posedge clk) begin
    if (go && mul) t_q <= chain[D];
  end
endmodule
