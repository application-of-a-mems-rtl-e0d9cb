// Testbench for chaotic_generator: loads two keys and compares 32 keystream bytes of
// each with values from an independent arbitrary-precision model of the perturbed map
// (x(i+1) = floor(x~(i) * floor(2^128/d) / 2^64), d = gamma or 1-gamma, LSB XOR LFSR).
// The second key has an all-zero LFSR seed. It checks the 131-cycle key set-up, that the
// state holds while step is low, and that both map branches and LFSR flips occur.
module tb_chaotic_generator;
  import stm_cipher_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0, step = 1'b0;
  seed_t      seed = '0;
  logic       ready, left, flip;
  logic [7:0] ks;
  int         checks = 0, failures = 0, n_left = 0, n_right = 0, n_flip = 0;

  localparam logic [255:0] KS1 = 256'h381d9b26af70d4f94734b152ca3a61ddd63c758f55e1c7c8bfce609c1163a67f;
  localparam logic [255:0] KS2 = 256'h84a269a961723f593bdd07f8698985ab5fb5d4b118055a9af2eff38e40d84de9;

  chaotic_generator dut (.clk, .rst_n, .seed_load_i(load), .seed_i(seed), .ready_o(ready),
                         .step_i(step), .ks_o(ks), .left_branch_o(left), .lsb_flip_o(flip));

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic session(input seed_t s, input logic [255:0] exp_ks);
    int cycles;
    @(negedge clk);
    seed = s; load = 1'b1;
    @(negedge clk);
    load = 1'b0; seed = '0;
    cycles = 0;
    while (!ready) begin @(negedge clk); cycles++; end
    check(cycles == 131, $sformatf("key set-up took %0d cycles", cycles));
    for (int i = 0; i < 32; i++) begin
      logic [7:0] held;
      check(ks == exp_ks[255 - 8*i -: 8], $sformatf("byte %0d: %h expected %h", i, ks, exp_ks[255 - 8*i -: 8]));
      if (left) n_left++; else n_right++;
      if (flip) n_flip++;
      // hold for a cycle on every third byte
      if (i % 3 == 2) begin
        held = ks;
        @(negedge clk);
        check(ks == held, "keystream holds while step is low");
      end
      step = 1'b1;
      @(negedge clk);
      step = 1'b0;
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!ready, "not ready after reset");
    session('{gamma: 64'h6a3f2c1b9d8e7f01, x0: 64'h1234567890abcdef, y0: 61'h0badc0ffee12345}, KS1);
    session('{gamma: 64'h1c71c71c71c71c72, x0: 64'hf00dfeedcafe1234, y0: 61'h0}, KS2);
    check(n_left > 5 && n_right > 5 && n_flip > 5, "both branches and LFSR flips exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
