// Testbench for lfsr61: checks the output bit sequence against the recurrence of
// p(x) = x^61 + x^5 + x^2 + x + 1, kept in an independent bit history, checks that the
// polynomial is irreducible (hence, 2^61-1 being prime, primitive) by testing
// x^(2^61) = x mod p, and checks seed loading, hold without step, and the zero seed.
module tb_lfsr61;
  import stm_cipher_pkg::*;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  load = 1'b0, step = 1'b0;
  lfsr_t seed = '0, state;
  logic  lsb;
  int    checks = 0, failures = 0;

  lfsr61 dut (.clk, .rst_n, .load_i(load), .seed_i(seed), .step_i(step), .lsb_o(lsb), .state_o(state));

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // multiply two polynomials of degree < 61 modulo p over GF(2)
  function automatic logic [60:0] mulmod(input logic [60:0] a, input logic [60:0] b);
    logic [61:0] aa;
    logic [60:0] r;
    aa = {1'b0, a};
    r  = '0;
    for (int i = 0; i < 61; i++) begin
      if (b[i]) r ^= aa[60:0];
      aa = aa << 1;
      if (aa[61]) aa ^= 62'h2000000000000027;
    end
    return r;
  endfunction

  bit hist[$];

  initial begin
    logic [60:0] xp;
    xp = 61'd2;
    for (int i = 0; i < 61; i++) xp = mulmod(xp, xp);
    check(xp == 61'd2, "x^(2^61) == x mod p (primitive feedback polynomial)");

    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    seed = 61'h0badc0ffee12345; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(state == 61'h0badc0ffee12345, "seed loaded");
    // hold
    repeat (3) @(negedge clk);
    check(state == 61'h0badc0ffee12345, "state held without step");
    // the first 61 output bits are the seed bits, LSB first
    for (int k = 0; k < 600; k++) begin
      hist.push_back(lsb);
      if (k < 61) check(lsb == seed[k], "output bit equals seed bit");
      else check(lsb == (hist[k-61] ^ hist[k-60] ^ hist[k-59] ^ hist[k-56]), "recurrence");
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
      if (k % 7 == 0) @(negedge clk);   // idle cycles in between
    end
    // zero seed is replaced by 1
    seed = '0; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(state == 61'd1, "zero seed replaced by 1");
    step = 1'b1;
    @(negedge clk);
    step = 1'b0;
    check(state == {1'b1, 60'd0}, "feedback of state 1 enters the top bit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
