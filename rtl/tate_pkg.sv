// tate_pkg: shared constants, types and the controller program of the Tate
// pairing arithmetic unit.
//
// Field: F_2^m with m = 163 and reduction polynomial z^163 + z^7 + z^6 + z^3 + 1
// (the field, curve y^2 + y = x^3 + x + 1 and tower extensions follow the
// document). Elements of F_2^4m are held as four F_2^m coordinates
// (c0 + c1*u) + (c2 + c3*u)*w with u^2 = u + 1 and w^2 = (u + 1)*w + 1.
//
// The controller runs a small program of field-level instructions on fifteen
// named variables. The program is built here at elaboration time by
// build_program(); the controller itself resolves where each variable sits in
// the register file and issues the swaps that bring operands to the core.
// The instruction set and the schedule are this design's own; the arithmetic
// they carry out (Miller loop with the doubling and addition formulas, the
// Itoh-Tsujii/Fermat inversion with 9 multiplications and 162 squarings, and
// the final exponentiation split M = (2^2m - 1)(2^m + 1 - 2^((m+1)/2)))
// follows the document.
package tate_pkg;

  // ---------------------------------------------------------------- field
  localparam int M = 163;
  // Low part of the reduction polynomial (z^7 + z^6 + z^3 + 1).
  localparam logic [M-1:0] RED_LOW = M'((1 << 7) | (1 << 6) | (1 << 3) | 1);
  // Bit index of the single add step in the Miller loop: l = 2^163 + 2^82 + 1.
  localparam int ADD_STEP_BIT = 82;
  // Number of Miller loop iterations: floor(log2 l) = 163 (i = 162 .. 0).
  localparam int LOOP_TOP = 162;
  // Squarings of F_2^4m in the final exponentiation: 2^((m+1)/2).
  localparam int FEXP_SQR = 82;

  // ---------------------------------------------------------------- register file
  localparam int NREG = 15;

  // Operation on register 1 (index 0), the one wired to core input A.
  typedef enum logic [1:0] {
    R0_HOLD  = 2'd0,   // keep (or take part in a swap)
    R0_SHIFT = 2'd1,   // shift left by the number of MALUs (multiplication)
    R0_RES   = 2'd2,   // write the core result
    R0_IN    = 2'd3    // write the external input coordinate
  } r0_sel_e;

  // ---------------------------------------------------------------- program
  typedef logic [3:0] var_t;
  typedef logic [8:0] pc_t;

  // Variable names. During the final exponentiation the same slots are reused
  // under other meanings (see build_program).
  localparam var_t XP = 4'd0,  YP = 4'd1,  XQ = 4'd2,  YQ = 4'd3;
  localparam var_t XV = 4'd4,  YV = 4'd5;
  localparam var_t F0 = 4'd6,  F1 = 4'd7,  F2 = 4'd8,  F3 = 4'd9;
  localparam var_t T0 = 4'd10, T1 = 4'd11, T2 = 4'd12, T3 = 4'd13, T4 = 4'd14;

  typedef enum logic [3:0] {
    OP_LOAD  = 4'd0,   // a <- input coordinate (waits for next)
    OP_STORE = 4'd1,   // output a (waits for next)
    OP_COPY  = 4'd2,   // b <- a
    OP_ADD   = 4'd3,   // a <- a + b (+1 if inc)
    OP_MUL   = 4'd4,   // a <- a * b (+1 if inc), a and b distinct
    OP_REN   = 4'd5,   // exchange the names a and b (no data moves)
    OP_SETC  = 4'd6,   // counter[cs] <- imm
    OP_DJNZ  = 4'd7,   // if counter[cs] != 0: counter[cs]--, jump to tgt
    OP_JNEI  = 4'd8,   // if counter[cs] != imm: jump to tgt
    OP_CALL  = 4'd9,   // return address <- pc + 1, jump to tgt
    OP_RET   = 4'd10,  // jump to return address
    OP_JMP   = 4'd11   // jump to tgt
  } op_e;

  typedef struct packed {
    op_e        op;
    var_t       a;
    var_t       b;
    logic       inc;
    logic       cs;
    logic [7:0] imm;
    pc_t        tgt;
  } instr_t;

  localparam int PROG_MAX = 512;
  typedef instr_t [PROG_MAX-1:0] prog_t;   // packed, for constant evaluation

  function automatic instr_t ins(op_e op, var_t a = '0, var_t b = '0, logic inc = 1'b0,
                                 logic cs = 1'b0, int imm = 0, int tgt = 0);
    instr_t r;
    r.op  = op;
    r.a   = a;
    r.b   = b;
    r.inc = inc;
    r.cs  = cs;
    r.imm = 8'(imm);
    r.tgt = pc_t'(tgt);
    return r;
  endfunction

  function automatic bit needs_b(op_e op);
    return op == OP_COPY || op == OP_ADD || op == OP_MUL;
  endfunction

  function automatic bit is_data(op_e op);
    return op == OP_LOAD || op == OP_STORE || needs_b(op);
  endfunction

  // p <- p * q in F_2^2m (Karatsuba, 3 multiplications), q kept, k scratch.
  localparam int M2_LEN = 10;
  function automatic instr_t seq_m2(int j, var_t p0, var_t p1, var_t q0, var_t q1, var_t k);
    case (j)
      0: return ins(OP_COPY, p0, k);
      1: return ins(OP_MUL, k, q0);        // p0 q0
      2: return ins(OP_ADD, p0, p1);       // p0 + p1
      3: return ins(OP_MUL, p1, q1);       // p1 q1
      4: return ins(OP_ADD, q0, q1);
      5: return ins(OP_MUL, p0, q0);       // (p0 + p1)(q0 + q1)
      6: return ins(OP_ADD, q0, q1);       // q0 restored
      7: return ins(OP_ADD, p0, k);        // u coefficient
      8: return ins(OP_ADD, p1, k);        // constant coefficient
      default: return ins(OP_REN, p0, p1);
    endcase
  endfunction

  // x <- x * y in F_2^4m (Karatsuba over F_2^2m), y destroyed, t0/t1/k scratch.
  localparam int M4_LEN = 3 * M2_LEN + 13;
  function automatic instr_t seq_m4(int j, var_t x0, var_t x1, var_t x2, var_t x3,
                                    var_t y0, var_t y1, var_t y2, var_t y3,
                                    var_t t0, var_t t1, var_t k);
    if (j < 4) begin
      case (j)
        0: return ins(OP_COPY, x2, t0);
        1: return ins(OP_COPY, x3, t1);
        2: return ins(OP_ADD, x2, x0);                              // a + b
        default: return ins(OP_ADD, x3, x1);
      endcase
    end
    if (j < 4 + M2_LEN)     return seq_m2(j - 4, t0, t1, y2, y3, k);               // b d
    if (j < 4 + 2 * M2_LEN) return seq_m2(j - 4 - M2_LEN, x0, x1, y0, y1, k);      // a c
    case (j - 4 - 2 * M2_LEN)
      0: return ins(OP_ADD, y2, y0);                                // c + d
      1: return ins(OP_ADD, y3, y1);
      default: ;
    endcase
    if (j < 6 + 3 * M2_LEN) return seq_m2(j - 6 - 2 * M2_LEN, x2, x3, y2, y3, k); // (a+b)(c+d)
    case (j - 6 - 3 * M2_LEN)
      0: return ins(OP_ADD, x2, x0);                                // + a c
      1: return ins(OP_ADD, x3, x1);
      2: return ins(OP_ADD, x2, t1);                                // + b d u
      3: return ins(OP_ADD, x3, t0);
      4: return ins(OP_ADD, x3, t1);
      5: return ins(OP_ADD, x0, t0);                                // a c + b d
      default: return ins(OP_ADD, x1, t1);
    endcase
  endfunction

  // F <- F^2 in F_2^4m, T4 scratch.
  localparam int SQ4_LEN = 12;
  function automatic instr_t seq_sq4(int j);
    case (j)
      0:  return ins(OP_COPY, F0, T4);
      1:  return ins(OP_MUL, F0, T4);
      2:  return ins(OP_COPY, F1, T4);
      3:  return ins(OP_MUL, F1, T4);
      4:  return ins(OP_COPY, F2, T4);
      5:  return ins(OP_MUL, F2, T4);
      6:  return ins(OP_COPY, F3, T4);
      7:  return ins(OP_MUL, F3, T4);
      8:  return ins(OP_ADD, F1, F3);
      9:  return ins(OP_ADD, F3, F2);
      10: return ins(OP_ADD, F0, F1);
      default: return ins(OP_ADD, F0, F2);
    endcase
  endfunction

  // F <- F * (g + u w) with g = T2 + T1 u (sparse line function value),
  // T0, T3, T4 scratch; T1 and T2 are left as they were.
  localparam int MULG_LEN = 27;
  function automatic instr_t seq_mulg(int j);
    case (j)
      0:  return ins(OP_COPY, F0, T0);
      1:  return ins(OP_ADD, T0, F1);      // a0 + a1
      2:  return ins(OP_ADD, T1, T2);      // g0 + g1
      3:  return ins(OP_COPY, T0, T4);
      4:  return ins(OP_MUL, T4, T1);      // p2
      5:  return ins(OP_ADD, T0, F3);
      6:  return ins(OP_COPY, F2, T3);
      7:  return ins(OP_ADD, T3, F3);      // b0 + b1
      8:  return ins(OP_ADD, T4, T3);
      9:  return ins(OP_MUL, T3, T1);      // q2
      10: return ins(OP_ADD, T0, T3);
      11: return ins(OP_ADD, T1, T2);      // g1 again
      12: return ins(OP_MUL, F0, T2);      // p0
      13: return ins(OP_ADD, T4, F0);      // new c1
      14: return ins(OP_COPY, F1, T3);
      15: return ins(OP_ADD, T3, F2);
      16: return ins(OP_MUL, F1, T1);      // p1
      17: return ins(OP_ADD, F0, F1);
      18: return ins(OP_ADD, F0, F3);      // new c0
      19: return ins(OP_MUL, F2, T2);      // q0
      20: return ins(OP_ADD, T0, F2);      // new c3
      21: return ins(OP_ADD, T3, F2);
      22: return ins(OP_MUL, F3, T1);      // q1
      23: return ins(OP_ADD, T3, F3);      // new c2
      24: return ins(OP_REN, F1, T4);
      25: return ins(OP_REN, F2, T3);
      default: return ins(OP_REN, F3, T0);
    endcase
  endfunction

  // Doubling step: line value g = T2 + T1 u, V <- 2V.
  localparam int DBL_LEN = 16;
  function automatic instr_t seq_dbl(int j);
    case (j)
      0:  return ins(OP_COPY, XV, T0);
      1:  return ins(OP_MUL, T0, XV, 1'b1);   // lambda = xV^2 + 1
      2:  return ins(OP_COPY, T0, T1);
      3:  return ins(OP_ADD, T1, XQ);         // g1 = lambda + xQ
      4:  return ins(OP_COPY, XQ, T2);
      5:  return ins(OP_ADD, T2, XV);
      6:  return ins(OP_MUL, T2, T0);
      7:  return ins(OP_ADD, T2, XQ);
      8:  return ins(OP_ADD, T2, YQ);
      9:  return ins(OP_ADD, T2, YV);         // g0
      10: return ins(OP_COPY, T0, T3);
      11: return ins(OP_MUL, T3, T0);         // x2V = lambda^2
      12: return ins(OP_ADD, XV, T3);
      13: return ins(OP_MUL, XV, T0);
      14: return ins(OP_ADD, YV, XV, 1'b1);   // y2V
      15: return ins(OP_REN, XV, T3);
      default: return ins(OP_REN, XV, T3);
    endcase
  endfunction

  // Addition step (before the inversion call): T0 <- xV + xP.
  // After the call (T1 = 1/T0): line value and V <- V + P.
  localparam int ADDP_LEN = 20;
  function automatic instr_t seq_addp(int j);
    case (j)
      0:  return ins(OP_COPY, YV, T0);
      1:  return ins(OP_ADD, T0, YP);
      2:  return ins(OP_MUL, T0, T1);         // lambda
      3:  return ins(OP_COPY, T0, T1);
      4:  return ins(OP_ADD, T1, XQ);         // g1
      5:  return ins(OP_COPY, XQ, T2);
      6:  return ins(OP_ADD, T2, XP);
      7:  return ins(OP_MUL, T2, T0);
      8:  return ins(OP_ADD, T2, XQ);
      9:  return ins(OP_ADD, T2, YQ);
      10: return ins(OP_ADD, T2, YP);         // g0
      11: return ins(OP_COPY, T0, T3);
      12: return ins(OP_MUL, T3, T0);
      13: return ins(OP_ADD, T3, XV);
      14: return ins(OP_ADD, T3, XP);         // x(V+P)
      15: return ins(OP_COPY, T3, YV);
      16: return ins(OP_ADD, YV, XP);
      17: return ins(OP_MUL, YV, T0);
      18: return ins(OP_ADD, YV, YP, 1'b1);   // y(V+P)
      19: return ins(OP_REN, XV, T3);
      default: return ins(OP_REN, XV, T3);
    endcase
  endfunction

  // Addition chain for a^(2^162 - 1), step c: exponent 2^k - 1 becomes
  // 2^(2k) - 1 (k squarings, one multiplication by the saved value) or, for an
  // "add one" step, 2^(k+1) - 1 (one squaring, one multiplication by a).
  localparam int INV_STEPS = 9;
  function automatic int chain_k(int c);
    case (c)
      0: return 1;   1: return 2;   2: return 1;   3: return 5;  4: return 10;
      5: return 20;  6: return 40;  7: return 1;   default: return 81;
    endcase
  endfunction
  function automatic bit chain_inc(int c);
    return c == 2 || c == 7;
  endfunction

  function automatic prog_t build_program();
    prog_t p;
    int n, l_sq4, l_mulg, l_inv, l_main, l_loop, j_main, j_skip;
    for (int i = 0; i < PROG_MAX; i++) p[i] = ins(OP_JMP);
    n = 0;
    j_main = n; p[n] = ins(OP_JMP); n++;

    // ---- subroutine: F <- F^2
    l_sq4 = n;
    for (int j = 0; j < SQ4_LEN; j++) begin p[n] = seq_sq4(j); n++; end
    p[n] = ins(OP_RET); n++;

    // ---- subroutine: F <- F * (T2 + T1 u + u w)
    l_mulg = n;
    for (int j = 0; j < MULG_LEN; j++) begin p[n] = seq_mulg(j); n++; end
    p[n] = ins(OP_RET); n++;

    // ---- subroutine: T1 <- 1 / T0 (Fermat), T0 kept, T2/T3 scratch
    l_inv = n;
    p[n] = ins(OP_COPY, T0, T1); n++;
    for (int c = 0; c < INV_STEPS; c++) begin
      if (!chain_inc(c)) begin p[n] = ins(OP_COPY, T1, T2); n++; end
      p[n] = ins(OP_SETC, '0, '0, 1'b0, 1'b1, chain_k(c) - 1); n++;
      p[n] = ins(OP_COPY, T1, T3); n++;
      p[n] = ins(OP_MUL, T1, T3); n++;
      p[n] = ins(OP_DJNZ, '0, '0, 1'b0, 1'b1, 0, n - 2); n++;
      p[n] = ins(OP_MUL, T1, chain_inc(c) ? T0 : T2); n++;
    end
    p[n] = ins(OP_COPY, T1, T3); n++;
    p[n] = ins(OP_MUL, T1, T3); n++;
    p[n] = ins(OP_RET); n++;

    // ---- main program
    l_main = n;
    p[j_main].tgt = pc_t'(l_main);
    p[n] = ins(OP_LOAD, XP); n++;
    p[n] = ins(OP_LOAD, YP); n++;
    p[n] = ins(OP_LOAD, XQ); n++;
    p[n] = ins(OP_LOAD, YQ); n++;
    // F <- 1, V <- P
    p[n] = ins(OP_COPY, XP, F1); n++;
    p[n] = ins(OP_ADD, F1, XP); n++;
    p[n] = ins(OP_COPY, F1, F2); n++;
    p[n] = ins(OP_COPY, F1, F3); n++;
    p[n] = ins(OP_COPY, F1, F0); n++;
    p[n] = ins(OP_ADD, F0, F1, 1'b1); n++;
    p[n] = ins(OP_COPY, XP, XV); n++;
    p[n] = ins(OP_COPY, YP, YV); n++;
    // Miller loop, i = 162 .. 0
    p[n] = ins(OP_SETC, '0, '0, 1'b0, 1'b0, LOOP_TOP); n++;
    l_loop = n;
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_sq4); n++;
    for (int j = 0; j < DBL_LEN; j++) begin p[n] = seq_dbl(j); n++; end
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_mulg); n++;
    j_skip = n; p[n] = ins(OP_JNEI, '0, '0, 1'b0, 1'b0, ADD_STEP_BIT); n++;
    p[n] = ins(OP_COPY, XV, T0); n++;
    p[n] = ins(OP_ADD, T0, XP); n++;
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_inv); n++;
    for (int j = 0; j < ADDP_LEN; j++) begin p[n] = seq_addp(j); n++; end
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_mulg); n++;
    p[j_skip].tgt = pc_t'(n);
    p[n] = ins(OP_DJNZ, '0, '0, 1'b0, 1'b0, 0, l_loop); n++;

    // ---- final exponentiation
    // N = a^2 + a b (u + 1) + b^2 in (XP, YP), with F = a + b w
    p[n] = ins(OP_COPY, F0, XP); n++;
    p[n] = ins(OP_COPY, F1, YP); n++;
    for (int j = 0; j < M2_LEN; j++) begin p[n] = seq_m2(j, XP, YP, F2, F3, T0); n++; end
    p[n] = ins(OP_ADD, YP, XP); n++;
    p[n] = ins(OP_REN, XP, YP); n++;
    for (int h = 0; h < 2; h++) begin
      p[n] = ins(OP_COPY, (h != 0) ? F2 : F0, XQ); n++;
      p[n] = ins(OP_COPY, XQ, T0); n++;
      p[n] = ins(OP_MUL, XQ, T0); n++;
      p[n] = ins(OP_COPY, (h != 0) ? F3 : F1, YQ); n++;
      p[n] = ins(OP_COPY, YQ, T0); n++;
      p[n] = ins(OP_MUL, YQ, T0); n++;
      p[n] = ins(OP_ADD, XQ, YQ); n++;
      p[n] = ins(OP_ADD, XP, XQ); n++;
      p[n] = ins(OP_ADD, YP, YQ); n++;
    end
    // norm of N down to F_2^m: c0^2 + c0 c1 + c1^2 in T0
    p[n] = ins(OP_COPY, XP, T0); n++;
    p[n] = ins(OP_MUL, T0, YP); n++;
    p[n] = ins(OP_COPY, XP, XQ); n++;
    p[n] = ins(OP_COPY, XQ, YQ); n++;
    p[n] = ins(OP_MUL, XQ, YQ); n++;
    p[n] = ins(OP_ADD, T0, XQ); n++;
    p[n] = ins(OP_COPY, YP, XQ); n++;
    p[n] = ins(OP_COPY, XQ, YQ); n++;
    p[n] = ins(OP_MUL, XQ, YQ); n++;
    p[n] = ins(OP_ADD, T0, XQ); n++;
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_inv); n++;
    // 1/N = ((c0 + c1) + c1 u) / norm
    p[n] = ins(OP_ADD, XP, YP); n++;
    p[n] = ins(OP_MUL, XP, T1); n++;
    p[n] = ins(OP_MUL, YP, T1); n++;
    // F1 = conj(F^2) / N = F^(2^2m - 1)
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_sq4); n++;
    p[n] = ins(OP_ADD, F0, F2); n++;
    p[n] = ins(OP_ADD, F0, F3); n++;
    p[n] = ins(OP_ADD, F1, F2); n++;
    for (int j = 0; j < M2_LEN; j++) begin p[n] = seq_m2(j, F0, F1, XP, YP, T0); n++; end
    for (int j = 0; j < M2_LEN; j++) begin p[n] = seq_m2(j, F2, F3, XP, YP, T0); n++; end
    // keep F1 in (XP, YP, XQ, YQ)
    p[n] = ins(OP_COPY, F0, XP); n++;
    p[n] = ins(OP_COPY, F1, YP); n++;
    p[n] = ins(OP_COPY, F2, XQ); n++;
    p[n] = ins(OP_COPY, F3, YQ); n++;
    // F <- conj(F1^(2^82))
    p[n] = ins(OP_SETC, '0, '0, 1'b0, 1'b0, FEXP_SQR - 1); n++;
    p[n] = ins(OP_CALL, '0, '0, 1'b0, 1'b0, 0, l_sq4); n++;
    p[n] = ins(OP_DJNZ, '0, '0, 1'b0, 1'b0, 0, n - 1); n++;
    p[n] = ins(OP_ADD, F0, F2); n++;
    p[n] = ins(OP_ADD, F0, F3); n++;
    p[n] = ins(OP_ADD, F1, F2); n++;
    // Frobenius F1^(2^m) in (XV, YV, T2, T3)
    p[n] = ins(OP_COPY, XP, XV); n++;
    p[n] = ins(OP_ADD, XV, YP); n++;
    p[n] = ins(OP_ADD, XV, XQ); n++;
    p[n] = ins(OP_COPY, YP, YV); n++;
    p[n] = ins(OP_ADD, YV, XQ); n++;
    p[n] = ins(OP_ADD, YV, YQ); n++;
    p[n] = ins(OP_COPY, XQ, T2); n++;
    p[n] = ins(OP_COPY, XQ, T3); n++;
    p[n] = ins(OP_ADD, T3, YQ); n++;
    // result = F1 * F1^(2^m) * conj(F1^(2^82))
    for (int j = 0; j < M4_LEN; j++) begin
      p[n] = seq_m4(j, XP, YP, XQ, YQ, XV, YV, T2, T3, T0, T1, T4); n++;
    end
    for (int j = 0; j < M4_LEN; j++) begin
      p[n] = seq_m4(j, XP, YP, XQ, YQ, F0, F1, F2, F3, T0, T1, T4); n++;
    end
    p[n] = ins(OP_STORE, XP); n++;
    p[n] = ins(OP_STORE, YP); n++;
    p[n] = ins(OP_STORE, XQ); n++;
    p[n] = ins(OP_STORE, YQ); n++;
    p[n] = ins(OP_JMP, '0, '0, 1'b0, 1'b0, 0, l_main); n++;
    return p;
  endfunction

endpackage
