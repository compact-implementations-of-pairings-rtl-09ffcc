// tb_tate_au_malus: the pairing unit built with several MALUs, in each of the
// core widths the architecture is usually quoted for: D = 2, 3, 4, 6, 8, 16
// and 32. The instances run side by side on the same inputs and each computes
// one pairing, compared with the reference. This covers every position the
// product can leave the MALU chain from (163 mod D = 1, 1, 3, 1, 3, 3, 3, so
// products leave MALU 0 or 2, sums always MALU 0). Every multiplication must
// take ceil(163/D) clocks and the pairing 3002 multiplications. The clocks
// left over once the multiplications are taken out (operand moves, additions,
// control) may only grow with D, since shorter multiplications hide fewer of
// the operand moves made during them, and by no more than 3 %.
module tb_tate_au_malus;
  import tate_pkg::*;
  import tate_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  localparam int NCFG = 7;
  logic [NCFG-1:0] done = '0;
  longint rest [NCFG];
  fe_t xp, yp, xq, yq;
  f4_t ref_r;
  logic have_ref = 1'b0;

  always #5 clk = ~clk;

  initial begin
    #(10 * 1_000_000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic fe_t rnd();
    fe_t r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  function automatic int unsigned cfg_d(int g);
    case (g)
      0: return 2;
      1: return 3;
      2: return 4;
      3: return 6;
      4: return 8;
      5: return 16;
      default: return 32;
    endcase
  endfunction

  for (genvar g = 0; g < NCFG; g++) begin : g_d
    localparam int unsigned D = cfg_d(g);
    logic [M-1:0] din = '0, dout;
    logic next = 1'b0, in_ready, out_valid;
    int n_mul = 0, mlen = 0, n_bad = 0;
    longint cyc = 0;

    tate_au #(.D(D)) dut (.clk, .rst_n, .din, .next, .in_ready, .dout, .out_valid);

    always @(posedge clk) if (rst_n) begin
      cyc++;
      if (dut.u_core.go && dut.u_core.mul) begin
        mlen++;
        if (dut.u_core.mul_last) begin
          n_mul++;
          if (mlen != (M + D - 1) / D) n_bad++;
          mlen = 0;
        end
      end
    end

    initial begin
      fe_t v [4];
      f4_t r;
      wait (have_ref);
      v = '{xp, yp, xq, yq};
      for (int i = 0; i < 4; i++) begin
        while (!in_ready) @(posedge clk) #1;
        din = v[i]; next = 1'b1;
        @(posedge clk) #1;
        next = 1'b0;
      end
      for (int i = 0; i < 4; i++) begin
        while (!out_valid) @(posedge clk) #1;
        v[i] = dout; next = 1'b1;
        @(posedge clk) #1;
        next = 1'b0;
      end
      r = {v[3], v[2], v[1], v[0]};
      checks++;
      if (r !== ref_r) begin failures++; $display("FAIL D=%0d pairing", D); end
      checks++;
      if (n_mul != 3002 || n_bad != 0) begin
        failures++;
        $display("FAIL D=%0d: %0d multiplications, %0d of wrong length", D, n_mul, n_bad);
      end
      rest[g] = cyc - longint'(3002) * ((M + D - 1) / D);
      $display("D=%0d: %0d clocks, %0d outside multiplications", D, cyc, rest[g]);
      done[g] = 1'b1;
    end
  end

  initial begin
    do xp = rnd(); while (!point_from_x(xp, yp));
    do xq = rnd(); while (!point_from_x(xq, yq));
    ref_r = tate(xp, yp, xq, yq);
    repeat (2) @(posedge clk) #1;
    rst_n = 1'b1;
    have_ref = 1'b1;
    wait (done == '1);
    for (int g = 1; g < NCFG; g++) begin
      checks++;
      if (rest[g] < rest[g-1] || rest[g] * 100 > rest[0] * 103) begin
        failures++;
        $display("FAIL D=%0d spends %0d clocks outside multiplications, D=%0d %0d",
                 cfg_d(g), rest[g], cfg_d(g-1), rest[g-1]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
