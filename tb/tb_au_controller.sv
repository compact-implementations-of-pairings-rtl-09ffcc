// tb_au_controller: runs the controller's whole pairing program against a
// behavioural datapath written in the testbench: fifteen registers updated
// from swap_en / dup / r0_sel, and a core whose multiplication takes a short
// fixed number of clocks (LAT) and returns the reference product. The four
// output coordinates are compared with the reference pairing, so every
// instruction, operand placement, rename, counter loop, call and return of the
// program is exercised. Also checked: swaps are only between ring neighbours
// (and the pair that closes the ring is used), at
// most two happen in one clock and they never overlap, copies and results only hit registers 1 and 2, and the
// number of multiplications per pairing is 3002.
module tb_au_controller;
  import tate_pkg::*;
  import tate_ref_pkg::*;

  localparam int LAT = 3;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          next = 1'b0, in_ready, out_valid;
  logic          core_go, core_mul, core_inc, core_mul_last;
  logic [NREG-1:0] swap_en;
  logic          dup;
  r0_sel_e       r0_sel;
  int checks = 0, failures = 0;

  au_controller #(.N(NREG)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * 400000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------ datapath model
  fe_t regs [NREG];
  fe_t cap_a, cap_b;
  fe_t din = '0;
  int  mcnt = 0, n_mul = 0, n_swap = 0, n_wrap = 0, n_ren = 0, n_call = 0, n_bad = 0;

  assign core_mul_last = (mcnt == LAT - 1);

  always @(posedge clk) if (rst_n) begin
    fe_t nx [NREG];
    fe_t a_now;
    nx = regs;
    a_now = (core_go && core_mul && mcnt == 0) ? regs[0] : cap_a;
    if (core_go && core_mul && mcnt == 0) begin cap_a = regs[0]; cap_b = regs[1]; end
    for (int i = 0; i < NREG; i++) if (swap_en[i]) begin
      nx[i] = regs[(i+1)%NREG]; nx[(i+1)%NREG] = regs[i];
      n_swap++;
      if (swap_en[(i+1)%NREG]) n_bad++;
      if (i == NREG - 1) n_wrap++;
    end
    if ($countones(swap_en) > 2) n_bad++;
    if (dup) nx[1] = regs[0];
    unique case (r0_sel)
      R0_IN:  nx[0] = din;
      R0_RES: nx[0] = (core_mul ? gf_mul(a_now, regs[1]) : regs[0] ^ regs[1]) ^ fe_t'(core_inc);
      default: ;
    endcase
    if (r0_sel == R0_RES && core_mul) n_mul++;
    if (core_go && core_mul) mcnt = core_mul_last ? 0 : mcnt + 1;
    if (dut.ir.op == OP_REN) n_ren++;
    if (dut.ir.op == OP_CALL) n_call++;
    regs <= nx;
  end

  task automatic send(input fe_t v);
    while (!in_ready) @(posedge clk) #1;
    din = v; next = 1'b1;
    @(posedge clk) #1;
    next = 1'b0;
  endtask

  task automatic recv(output fe_t v);
    while (!out_valid) @(posedge clk) #1;
    v = regs[0]; next = 1'b1;
    @(posedge clk) #1;
    next = 1'b0;
  endtask

  function automatic fe_t rnd();
    fe_t r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    fe_t xp, yp, xq, yq;
    f4_t r, ref_r;
    for (int i = 0; i < NREG; i++) regs[i] = '0;
    repeat (2) @(posedge clk) #1;
    rst_n = 1'b1;
    do xp = rnd(); while (!point_from_x(xp, yp));
    do xq = rnd(); while (!point_from_x(xq, yq));
    send(xp); send(yp); send(xq); send(yq);
    recv(r.c0); recv(r.c1); recv(r.c2); recv(r.c3);
    ref_r = tate(xp, yp, xq, yq);
    checks++;
    if (r !== ref_r) begin
      failures++;
      $display("FAIL pairing\n  got %h\n  exp %h", r, ref_r);
    end
    checks++;
    if (n_mul != 3002) begin failures++; $display("FAIL %0d multiplications", n_mul); end
    checks++;
    if (n_bad != 0) begin failures++; $display("FAIL %0d illegal swap patterns", n_bad); end
    checks++;
    if (n_swap == 0 || n_wrap == 0 || n_ren == 0 || n_call == 0) begin
      failures++;
      $display("FAIL swaps %0d (across the ring %0d) renames %0d calls %0d",
               n_swap, n_wrap, n_ren, n_call);
    end
    $display("swaps %0d (across the ring %0d) renames %0d calls %0d", n_swap, n_wrap, n_ren, n_call);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
