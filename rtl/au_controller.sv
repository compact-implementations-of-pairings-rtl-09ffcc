// au_controller: the control FSM of the Tate pairing arithmetic unit.
//
// The controller steps through the program built by tate_pkg::build_program()
// (loading the points, the Miller loop with its doubling steps and single
// addition step, the inversions and the final exponentiation, then handing out
// the four coordinates of the result). Program instructions name variables,
// not registers: a tag array records which variable each register holds. For
// an arithmetic instruction the controller first moves operand a to register 1
// and operand b to register 2 by neighbour swaps on the register ring. A value
// moves one place per clock and everything it passes moves one place the other
// way, so recently used values gather near the core. a takes the shorter way
// round the ring; b moves in the same clocks as a whenever it can step
// forward with a swap that does not touch a's. Once a is in place, b takes
// the shorter way as well; going backward round the ring it passes through
// register 1, pushing a aside for one clock, which costs two extra clocks and
// is counted in the choice. Then the operation runs (during a
// multiplication, which leaves registers 3..15 idle, the operands of the next
// instruction are moved ahead: its a towards register 15 and its b towards
// register 3, one swap from their places):
//   COPY  b <- a   1 clock (register 2 <- register 1)
//   ADD   a <- a+b 1 clock
//   MUL   a <- a*b ceil(M/D) clocks
//   LOAD / STORE   wait for next
// Renaming, counter and jump instructions take one clock each.
//
// Interface and timing: in_ready is high while a LOAD waits; the coordinate on
// din is written when next is high in that clock. out_valid is high while a
// STORE holds a result coordinate in register 1; next high in that clock moves
// on. Coordinates go in as xP, yP, xQ, yQ and the result comes out as
// c0, c1, c2, c3 of (c0 + c1 u) + (c2 + c3 u) w; the unit then waits for the
// next pair of points.
//
// The document specifies the algorithm, the register count and the swap-based
// register file but not the FSM itself; this sequencer with its run-time
// placement of operands is this design's own way of producing the same
// sequence of swaps and field operations.
module au_controller
  import tate_pkg::*;
#(
  parameter int unsigned N = NREG
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          next,
  output logic          in_ready,
  output logic          out_valid,
  // core
  output logic          core_go,
  output logic          core_mul,
  output logic          core_inc,
  input  logic          core_mul_last,  // final clock of a multiplication
  // register file
  output logic [N-1:0]  swap_en,
  output logic          dup,
  output r0_sel_e       r0_sel
);
  localparam prog_t PROG = build_program();
  localparam int PW = $clog2(N);

  pc_t        pc, pc_nxt, ret_q;
  logic [7:0] cnt_q [2];
  var_t       tag_q [N];
  instr_t     ir, nir;
  logic [PW-1:0] pos_a, pos_b, pair_a, pair_b;
  logic          b_back;
  logic [PW-1:0] pos_na, pos_nb;
  logic          pf_a, pf_b;
  logic          advance;

  // the pair after pair p on the ring
  function automatic logic [PW-1:0] nxt_pair(logic [PW-1:0] p);
    return (32'(p) == N - 1) ? '0 : p + 1'b1;
  endfunction

  assign ir  = PROG[pc];
  assign nir = PROG[pc + 1'b1];

  // where do the operands sit, those of this instruction and of the next?
  always_comb begin
    pos_a  = '0;
    pos_b  = '0;
    pos_na = '0;
    pos_nb = '0;
    for (int i = 0; i < N; i++) begin
      if (tag_q[i] == ir.a)  pos_a  = PW'(i);
      if (tag_q[i] == ir.b)  pos_b  = PW'(i);
      if (tag_q[i] == nir.a) pos_na = PW'(i);
      if (tag_q[i] == nir.b) pos_nb = PW'(i);
    end
  end

  // operands of the next instruction worth moving ahead: not an operand of
  // this one, and (for a) not when the next b is this result, which a
  // waiting in register 15 would push away
  assign pf_a = is_data(nir.op) && nir.a != ir.a && nir.a != ir.b &&
                !(needs_b(nir.op) && nir.b == ir.a);
  assign pf_b = needs_b(nir.op) && nir.b != ir.a && nir.b != ir.b;

  always_comb begin
    swap_en   = '0;
    dup       = 1'b0;
    r0_sel    = R0_HOLD;
    core_go   = 1'b0;
    core_mul  = 1'b0;
    core_inc  = 1'b0;
    in_ready  = 1'b0;
    out_valid = 1'b0;
    advance   = 1'b0;
    pc_nxt    = pc + 1'b1;
    pair_a    = '0;
    pair_b    = '0;
    // b goes backward round the ring when that is shorter: forward costs
    // pos_b - 1 clocks, backward N - pos_b + 2 (a steps aside and back)
    b_back    = 32'(pos_b) - 1 > N + 2 - 32'(pos_b);
    if (is_data(ir.op)) begin
      if (needs_b(ir.op) && pos_b == '0 && pos_a == PW'(N - 1)) begin
        // b came round the ring and took a's place: b on to register 2 first
        swap_en[0] = 1'b1;
      end else if (pos_a != '0) begin
        // a towards register 1 along the shorter way round
        pair_a = (32'(pos_a) <= N / 2) ? pos_a - 1'b1 : pos_a;
        swap_en[pair_a] = 1'b1;
        // b in the same clock, along its shorter way but not yet through
        // register 1, when its swap is disjoint from a's
        pair_b = b_back ? pos_b : pos_b - 1'b1;
        if (needs_b(ir.op) && pos_b >= PW'(2) && 32'(pos_b) <= N - 2 &&
            pair_b != pair_a && pair_b != nxt_pair(pair_a) && nxt_pair(pair_b) != pair_a)
          swap_en[pair_b] = 1'b1;
      end else if (needs_b(ir.op) && pos_b != PW'(1)) begin
        // b to register 2: forward, or backward round the ring through
        // register 1 when that is shorter (a steps aside and back: two more)
        if (b_back)
          swap_en[pos_b] = 1'b1;
        else
          swap_en[pos_b - 1'b1] = 1'b1;
      end else begin
        unique case (ir.op)
          OP_COPY: begin
            dup     = 1'b1;
            advance = 1'b1;
          end
          OP_ADD, OP_MUL: begin
            core_go  = 1'b1;
            core_mul = (ir.op == OP_MUL);
            core_inc = ir.inc;
            if (ir.op == OP_ADD || core_mul_last) begin
              r0_sel  = R0_RES;
              advance = 1'b1;
            end else begin
              r0_sel  = R0_SHIFT;
              // registers 3..15 are idle during a multiplication: bring the
              // operands of the next instruction next to the core, its a to
              // register 15 and its b to register 3, without touching
              // registers 1 and 2
              if (pf_a && 32'(pos_na) >= 2 && 32'(pos_na) < N - 1)
                swap_en[pos_na] = 1'b1;
              if (pf_b && 32'(pos_nb) > 2 &&
                  !(pf_a && 32'(pos_na) >= 2 && 32'(pos_na) < N - 1 &&
                    (pos_nb - 1'b1 == pos_na || pos_nb - 1'b1 == pos_na + 1'b1 ||
                     pos_nb == pos_na)))
                swap_en[pos_nb - 1'b1] = 1'b1;
            end
          end
          OP_LOAD: begin
            in_ready = 1'b1;
            if (next) r0_sel = R0_IN;
            advance  = next;
          end
          default: begin   // OP_STORE
            out_valid = 1'b1;
            advance   = next;
          end
        endcase
      end
    end else begin
      advance = 1'b1;
      unique case (ir.op)
        OP_DJNZ: if (cnt_q[ir.cs] != '0) pc_nxt = ir.tgt;
        OP_JNEI: if (cnt_q[ir.cs] != ir.imm) pc_nxt = ir.tgt;
        OP_CALL, OP_JMP: pc_nxt = ir.tgt;
        OP_RET:  pc_nxt = ret_q;
        default: ;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc    <= '0;
      ret_q <= '0;
      cnt_q <= '{default: '0};
      for (int i = 0; i < N; i++) tag_q[i] <= var_t'(i);
    end else begin
      if (advance) pc <= pc_nxt;
      for (int i = 0; i < N; i++) begin
        if (swap_en[i]) begin
          tag_q[i]           <= tag_q[(i + 1) % N];
          tag_q[(i + 1) % N] <= tag_q[i];
        end
      end
      unique case (ir.op)
        OP_REN: begin
          for (int i = 0; i < N; i++) begin
            if (tag_q[i] == ir.a)      tag_q[i] <= ir.b;
            else if (tag_q[i] == ir.b) tag_q[i] <= ir.a;
          end
        end
        OP_SETC: cnt_q[ir.cs] <= ir.imm;
        OP_DJNZ: if (cnt_q[ir.cs] != '0) cnt_q[ir.cs] <= cnt_q[ir.cs] - 1'b1;
        OP_CALL: ret_q <= pc + 1'b1;
        default: ;
      endcase
    end
  end

  // program rules
  a_mul_distinct: assert property (@(posedge clk) disable iff (!rst_n)
      !(is_data(ir.op) && needs_b(ir.op) && ir.a == ir.b))
    else $error("au_controller: operands must be distinct variables");
endmodule
