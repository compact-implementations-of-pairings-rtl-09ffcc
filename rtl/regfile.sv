// regfile: register file with neighbour swaps in both directions.
//
// NREG registers of M bits form a ring. Register 1 (index 0) drives core input
// A and register 2 (index 1) drives core input B. Pair i is (i, i+1) and the
// last pair closes the ring (N-1, 0). In one clock any set of non-overlapping
// neighbour pairs can swap their contents, so a value moves one place in
// either direction per clock and reaches register 1 in at most N/2 clocks. Register 1 can also shift
// itself left by D bits (multiplication), take the core result or take the
// external input, which gives it the larger multiplexer; register 2 can take a
// copy of register 1 (dup).
//
// Every register has its own clock gate (clock_gate) and is clocked only in
// the clocks it is written; the data registers have no reset.
//
// Interface and timing: all controls are sampled at the rising edge of clk and
// the new contents appear after it. The caller must not enable two
// overlapping swaps, nor combine a swap that touches register 1 (pair 0 or
// the closing pair) with a write to register 1, nor a swap that touches
// register 2 with dup (asserted).
//
// From the document: the bidirectional neighbour-swap organisation on a ring
// (the register distance it uses is min(j-1, n-j+1)), fifteen
// registers, the wider multiplexer on register 1, reset-less registers and
// per-register clock gating. The dup path is this design's choice (it lets a
// value be duplicated without the core).
module regfile
  import tate_pkg::*;
#(
  parameter int unsigned N = NREG,   // number of registers
  parameter int unsigned D = 1       // shift of register 1 per multiplication clock
) (
  input  logic          clk,
  input  logic [N-1:0]  swap_en,     // swap_en[i]: exchange registers i and (i+1) mod N
  input  logic          dup,         // register 2 <- register 1
  input  r0_sel_e       r0_sel,
  input  logic [M-1:0]  res,         // core result
  input  logic [M-1:0]  din,         // external input
  output logic [M-1:0]  r0,
  output logic [M-1:0]  r1
);
  logic [M-1:0] q   [N];
  logic [M-1:0] nxt [N];
  logic [N-1:0] we;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      nxt[i] = q[i];
      we[i]  = 1'b0;
      if (swap_en[(i + N - 1) % N]) begin
        nxt[i] = q[(i + N - 1) % N];
        we[i]  = 1'b1;
      end
      if (swap_en[i]) begin
        nxt[i] = q[(i + 1) % N];
        we[i]  = 1'b1;
      end
    end
    if (!swap_en[0] && !swap_en[N-1]) begin
      unique case (r0_sel)
        R0_SHIFT: begin nxt[0] = q[0] << D; we[0] = 1'b1; end
        R0_RES:   begin nxt[0] = res;       we[0] = 1'b1; end
        R0_IN:    begin nxt[0] = din;       we[0] = 1'b1; end
        default:  ;
      endcase
      if (dup) begin
        nxt[1] = q[0];
        we[1]  = 1'b1;
      end
    end
  end

  for (genvar i = 0; i < N; i++) begin : g_reg
    logic         gclk;
    logic [M-1:0] r;
    clock_gate u_cg (.clk(clk), .en(we[i]), .gclk(gclk));
    always_ff @(posedge gclk) r <= nxt[i];
    assign q[i] = r;
  end

  assign r0 = q[0];
  assign r1 = q[1];

  // Rules for the caller.
  for (genvar i = 0; i < N; i++) begin : g_chk
    a_swap_overlap: assert property (@(posedge clk) !(swap_en[i] && swap_en[(i+1)%N]))
      else $error("regfile: overlapping swaps at %0d", i);
  end
  a_swap0_excl: assert property (@(posedge clk)
      !((swap_en[0] || swap_en[N-1]) && r0_sel != R0_HOLD))
    else $error("regfile: swap of register 1 combined with a write to it");
  a_swap0_dup: assert property (@(posedge clk) !(swap_en[0] && dup))
    else $error("regfile: dup combined with swap of registers 1/2");
  a_dup_excl: assert property (@(posedge clk) !(dup && swap_en[1]))
    else $error("regfile: dup combined with swap of registers 2/3");
endmodule
