// tb_regfile: random legal operations on the register file against a model:
// sets of non-overlapping neighbour swaps (the pair that closes the ring,
// registers 15 and 1, included), dup, shift of register 1 by D, and
// writes of the result and the input into register 1. After every clock all
// fifteen registers are compared with the model. Controls change just after
// the rising edge, as the clock gates require.
module tb_regfile;
  import tate_pkg::*;

  localparam int unsigned N = NREG;
  localparam int unsigned D = 2;

  logic          clk = 1'b0;
  logic [N-1:0]  swap_en = '0;
  logic          dup = 1'b0;
  r0_sel_e       r0_sel = R0_HOLD;
  logic [M-1:0]  res, din, r0, r1;
  logic [M-1:0]  model [N];
  int checks = 0, failures = 0;
  int n_swaps = 0, n_multi = 0, n_wrap = 0;

  regfile #(.N(N), .D(D)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #(10 * 20000);
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
    logic [M-1:0] nxt [N];
    int k;
    // fill every register through register 1 and swaps
    for (int i = 0; i < N; i++) begin
      @(posedge clk) #1;
      swap_en = '0; r0_sel = R0_IN; din = rnd();
      model[0] = din;
      @(posedge clk) #1;
      r0_sel = R0_HOLD;
      for (int j = 0; j < N - 1 - i; j++) begin
        swap_en = '0; swap_en[j] = 1'b1;
        @(posedge clk) #1;
      end
      swap_en = '0;
    end
    // the model after filling: value loaded i-th travelled to N-1-i
    @(posedge clk) #1;
    for (int i = 0; i < N; i++) model[i] = dut.q[i];
    for (int n = 0; n < 3000; n++) begin
      swap_en = '0; dup = 1'b0; r0_sel = R0_HOLD; res = rnd(); din = rnd();
      for (int i = 0; i < N; i++) nxt[i] = model[i];
      case ($urandom % 4)
        0, 1: begin   // a random set of disjoint swaps
          k = 0;
          for (int i = 0; i < N; i++)
            if ((i == 0 || !swap_en[i-1]) && (i < N - 1 || !swap_en[0]) &&
                ($urandom % 3 == 0)) begin
              swap_en[i] = 1'b1; k++;
            end
          if (k > 1) n_multi++;
          n_swaps += k;
        end
        2: begin
          r0_sel = r0_sel_e'($urandom % 4);
          if (!swap_en[1]) dup = $urandom;
        end
        default: begin
          swap_en[$urandom % N] = 1'b1;
          n_swaps++;
        end
      endcase
      for (int i = 0; i < N; i++)
        if (swap_en[i]) begin nxt[i] = model[(i+1)%N]; nxt[(i+1)%N] = model[i]; end
      if (swap_en[N-1]) n_wrap++;
      if (!swap_en[0] && !swap_en[N-1]) begin
        case (r0_sel)
          R0_SHIFT: nxt[0] = model[0] << D;
          R0_RES:   nxt[0] = res;
          R0_IN:    nxt[0] = din;
          default: ;
        endcase
        if (dup) nxt[1] = model[0];
      end
      @(posedge clk) #1;
      for (int i = 0; i < N; i++) model[i] = nxt[i];
      for (int i = 0; i < N; i++) begin
        checks++;
        if (dut.q[i] !== model[i]) begin
          failures++;
          if (failures < 10) $display("FAIL step %0d register %0d", n, i);
        end
      end
      checks++;
      if (r0 !== model[0] || r1 !== model[1]) failures++;
    end
    checks++;
    if (n_multi == 0) begin failures++; $display("FAIL no parallel swaps"); end
    checks++;
    if (n_wrap == 0) begin failures++; $display("FAIL no swap across the ring"); end
    $display("swaps %0d, clocks with several swaps %0d", n_swaps, n_multi);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
