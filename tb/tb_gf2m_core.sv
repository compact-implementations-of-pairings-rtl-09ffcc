// tb_gf2m_core: checks the F_2^m core with 1, 2, 3 and 4 MALUs.
// Each instance gets its own register-1 model that shifts left by D while a
// multiplication runs and takes the result in the final clock. Checks products
// (with and without +1) against the reference multiplication, sums, and the
// latency: ceil(163/D) clocks per multiplication, one per addition.
module tb_gf2m_core;
  import tate_pkg::*;
  import tate_ref_pkg::gf_mul;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;
  logic [3:0] done = '0;

  always #5 clk = ~clk;

  initial begin
    #(10 * 200000);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  for (genvar g = 0; g < 4; g++) begin : g_d
    localparam int unsigned D = g + 1;
    logic         go = 1'b0, mul = 1'b0, inc = 1'b0, mul_last;
    logic [M-1:0] a, b, res;

    gf2m_core #(.D(D)) dut (.clk, .rst_n, .go, .mul, .inc, .a, .b, .res, .mul_last);

    initial begin
      logic [M-1:0] x, y, expv;
      int cyc;
      @(posedge rst_n);
      for (int n = 0; n < 40; n++) begin
        x = rnd(); y = rnd();
        @(posedge clk) #1;
        a = x; b = y; mul = (n % 2 == 0); inc = (n % 3 == 0); go = 1'b1;
        expv = (mul ? gf_mul(x, y) : x ^ y) ^ M'(inc);
        cyc = 1;
        // register-1 model: shift by D, take the result at the end
        while (mul && !mul_last) begin
          @(posedge clk) #1;
          a = a << D;
          cyc++;
        end
        #1;
        checks++;
        if (res !== expv) begin
          failures++;
          $display("FAIL D=%0d mul=%b inc=%b res=%h exp=%h", D, mul, inc, res, expv);
        end
        checks++;
        if (cyc != (mul ? (M + D - 1) / D : 1)) begin
          failures++;
          $display("FAIL D=%0d latency %0d", D, cyc);
        end
        @(posedge clk) #1;
        go = 1'b0;
      end
      done[g] = 1'b1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    wait (done == '1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
