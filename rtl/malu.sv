// malu: modular arithmetic logic unit for F_2^m, a pure XOR network.
//
// One MALU performs one step of bit-serial (MSB first) shift-and-add
// multiplication with interleaved reduction, or one addition:
//   shift = 1 : y = (t * z mod R) + a_bit * b     (multiplication step)
//   shift = 0 : y = t + a_bit * b                 (addition, a_bit = 1)
// Reducing t * z costs one XOR per non-leading term of R besides the constant
// term (three for z^163 + z^7 + z^6 + z^3 + 1), adding b costs m XORs.
// MALUs are chained, the y of one feeding the t of the next, to retire several
// multiplier bits per clock.  Purely combinational, no timing of its own.
// The role of the MALU (sum and modular reduction in F_2^m, built only of XOR
// gates) follows the document; the shift input, which lets the same network
// add without a shift, is this design's choice.
module malu
  import tate_pkg::*;
#(
  parameter int unsigned WIDTH = M,
  parameter logic [WIDTH-1:0] POLY_LOW = RED_LOW   // reduction polynomial without z^m
) (
  input  logic [WIDTH-1:0] t,
  input  logic [WIDTH-1:0] b,
  input  logic             a_bit,
  input  logic             shift,
  output logic [WIDTH-1:0] y
);
  logic [WIDTH-1:0] tz;

  always_comb begin
    if (shift) tz = {t[WIDTH-2:0], 1'b0} ^ (t[WIDTH-1] ? POLY_LOW : '0);
    else       tz = t;
    y = tz ^ (a_bit ? b : '0);
  end
endmodule
