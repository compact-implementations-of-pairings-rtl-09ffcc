// tb_tate_au: end-to-end test of the Tate pairing arithmetic unit at its
// default parameters (one MALU, fifteen registers, m = 163).
//
// Two random points P, Q on y^2 + y = x^3 + x + 1 are built (x random, y by
// the half trace), and the unit computes e(P, Q) and e(2P, Q). Checks:
//   - both results equal the behavioural reference pairing of tate_ref_pkg;
//   - bilinearity: e(2P, Q) = e(P, Q)^2 (a check on the mathematics that does
//     not depend on the reference model);
//   - the result is an l-th root of unity, l = 2^163 + 2^82 + 1;
//   - every multiplication takes exactly ceil(163/D) clocks and each pairing
//     runs exactly 3002 multiplications (163 x 14 in the Miller loop, 181 in
//     the addition step with its inversion, 539 in the final exponentiation);
//   - each pairing, from the first coordinate in to the first out, stays within
//     5 % of the 514,677 clocks budgeted for the one-MALU architecture.
// The input and output handshakes are exercised with random gaps on next, and
// the test counts that swaps, copies, additions, the addition step, both
// inversions, input waits and output waits all occurred.
module tb_tate_au;
  import tate_pkg::*;
  import tate_ref_pkg::*;

  logic         clk = 1'b0, rst_n = 1'b0;
  logic [M-1:0] din;
  logic         next;
  logic         in_ready, out_valid;
  logic [M-1:0] dout;

  int checks = 0, failures = 0;
  longint cycles = 0;

  tate_au dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycles++;

  // ---------------------------------------------------------------- watchdog
  initial begin
    #(10 * 3_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- event counters
  int n_swap = 0, n_dup = 0, n_add = 0, n_mul = 0, n_addstep = 0, n_inv = 0;
  int n_in_wait = 0, n_out_wait = 0, n_mul_bad = 0, mul_len = 0;
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ctrl.swap_en != '0) n_swap++;
    if (dut.u_ctrl.dup) n_dup++;
    if (dut.u_core.go && !dut.u_core.mul) n_add++;
    if (dut.u_core.go && dut.u_core.mul) begin
      mul_len++;
      if (dut.u_core.mul_last) begin
        n_mul++;
        if (mul_len != M) n_mul_bad++;   // ceil(163 / 1)
        mul_len = 0;
      end
    end
    if (dut.u_ctrl.ir.op == OP_JNEI && dut.u_ctrl.cnt_q[0] == ADD_STEP_BIT) n_addstep++;
    // the last step of the inversion chain loads its squaring counter with 80
    if (dut.u_ctrl.ir.op == OP_SETC && dut.u_ctrl.ir.cs && dut.u_ctrl.ir.imm == 8'd80) n_inv++;
    if (in_ready && !next) n_in_wait++;
    if (out_valid && !next) n_out_wait++;
  end

  task automatic send(input logic [M-1:0] v);
    repeat ($urandom_range(0, 3)) @(posedge clk) #1;
    while (!in_ready) @(posedge clk) #1;
    din = v; next = 1'b1;
    @(posedge clk) #1;
    next = 1'b0;
  endtask

  task automatic recv(output logic [M-1:0] v);
    while (!out_valid) @(posedge clk) #1;
    repeat ($urandom_range(0, 3)) @(posedge clk) #1;
    v = dout; next = 1'b1;
    @(posedge clk) #1;
    next = 1'b0;
  endtask

  task automatic pairing(input fe_t xp, yp, xq, yq, output f4_t r, output longint cyc);
    longint c0;
    int m0;
    logic [M-1:0] v;
    send(xp); c0 = cycles; m0 = n_mul;
    send(yp); send(xq); send(yq);
    recv(v); cyc = cycles - c0; r.c0 = v;
    recv(v); r.c1 = v;
    recv(v); r.c2 = v;
    recv(v); r.c3 = v;
    checks++;
    if (n_mul - m0 != 3002) begin
      failures++;
      $display("FAIL multiplications per pairing %0d, expected 3002", n_mul - m0);
    end
  endtask

  function automatic fe_t rand_fe();
    fe_t r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  task automatic check_eq(string what, f4_t got, f4_t exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s\n  got %h\n  exp %h", what, got, exp);
    end
  endtask

  initial begin
    fe_t xp, yp, xq, yq, x2p, y2p;
    f4_t r1, r2, ref1, ref2, one;
    longint cyc1, cyc2;
    din = '0; next = 1'b0;
    repeat (3) @(posedge clk) #1;
    rst_n = 1'b1;
    do xp = rand_fe(); while (!point_from_x(xp, yp));
    do xq = rand_fe(); while (!point_from_x(xq, yq));
    point_double(xp, yp, x2p, y2p);

    pairing(xp, yp, xq, yq, r1, cyc1);
    ref1 = tate(xp, yp, xq, yq);
    check_eq("e(P,Q) against reference", r1, ref1);
    pairing(x2p, y2p, xq, yq, r2, cyc2);
    ref2 = tate(x2p, y2p, xq, yq);
    check_eq("e(2P,Q) against reference", r2, ref2);
    check_eq("bilinearity e(2P,Q) = e(P,Q)^2", r2, f4_mul(r1, r1));
    one = f4_one();
    check_eq("e(P,Q)^l = 1", f4_pow(r1, 656'(L_ORDER)), one);
    checks++;
    if (r1 == one) begin failures++; $display("FAIL degenerate pairing"); end

    $display("pairing cycles: %0d and %0d (D = 1)", cyc1, cyc2);
    // latency budget of the one-MALU architecture: 21,681 swap clocks, 4,322
    // addition clocks and 2,998 multiplications of 163 clocks = 514,677;
    // this schedule is allowed 5 % more
    checks++;
    if (cyc1 > 540_410 || cyc2 > 540_410) begin
      failures++;
      $display("FAIL pairing takes more than 540,410 clocks");
    end
    $display("events: swaps %0d copies %0d additions %0d multiplications %0d", n_swap, n_dup, n_add, n_mul);
    checks++; if (n_mul_bad != 0) begin failures++; $display("FAIL %0d multiplications with wrong length", n_mul_bad); end
    checks++; if (n_swap == 0)   begin failures++; $display("FAIL no swap"); end
    checks++; if (n_dup == 0)    begin failures++; $display("FAIL no copy"); end
    checks++; if (n_add == 0)    begin failures++; $display("FAIL no addition"); end
    checks++; if (n_addstep != 2) begin failures++; $display("FAIL addition steps %0d, expected 2", n_addstep); end
    checks++; if (n_inv != 4)     begin failures++; $display("FAIL inversions %0d, expected 4", n_inv); end
    checks++; if (n_in_wait == 0) begin failures++; $display("FAIL input never waited"); end
    checks++; if (n_out_wait == 0) begin failures++; $display("FAIL output never waited"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
