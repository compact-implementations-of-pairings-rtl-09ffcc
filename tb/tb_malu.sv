// tb_malu: checks the MALU against the reference field arithmetic.
// Multiplication step: y = t*z mod R + a_bit*b; addition: y = t + a_bit*b.
// Random operands plus operands whose leading bit is set (reduction active).
module tb_malu;
  import tate_pkg::*;
  import tate_ref_pkg::gf_mul;

  logic [M-1:0] t, b, y, expv;
  logic         a_bit, shift;
  int checks = 0, failures = 0;

  malu dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [M-1:0] rnd();
    logic [M-1:0] r;
    for (int i = 0; i < M; i += 32) r[i +: 32] = $urandom;
    return r;
  endfunction

  initial begin
    for (int n = 0; n < 400; n++) begin
      t = rnd(); b = rnd(); a_bit = $urandom; shift = $urandom;
      if (n % 4 == 0) t[M-1] = 1'b1;
      #1;
      expv = shift ? gf_mul(t, M'(2)) : t;
      if (a_bit) expv ^= b;
      checks++;
      if (y !== expv) begin
        failures++;
        $display("FAIL t=%h b=%h a=%b s=%b y=%h exp=%h", t, b, a_bit, shift, y, expv);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
