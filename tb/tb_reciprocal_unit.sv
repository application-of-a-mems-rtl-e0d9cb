// Testbench for reciprocal_unit: for edge and random divisors d it checks that the result
// q satisfies q*d <= 2^128 < (q+1)*d (or saturation for d = 1), using wide arithmetic in
// the testbench, and that the unit is busy for exactly 129 cycles before done.
module tb_reciprocal_unit;
  import stm_cipher_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   start = 1'b0;
  frac_t  d = '0;
  logic   busy, done;
  recip_t q;
  int     checks = 0, failures = 0;

  reciprocal_unit dut (.clk, .rst_n, .start_i(start), .divisor_i(d), .busy_o(busy), .done_o(done), .recip_o(q));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic run(input frac_t dv);
    int cycles;
    logic [200:0] lo, hi, two128;
    two128 = 201'(1) << 128;
    @(negedge clk);
    d = dv; start = 1'b1;
    @(negedge clk);
    start = 1'b0; d = '0;   // the divisor must have been captured
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == 129, $sformatf("latency %0d", cycles));
    if (dv == 64'd1) check(q == '1, "saturation for d = 1");
    else begin
      lo = 201'(q) * 201'(dv);
      hi = (201'(q) + 1) * 201'(dv);
      check(lo <= two128 && hi > two128, $sformatf("1/d for d=%h gave %h", dv, q));
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(64'd1);
    run(64'd2);
    run(64'd3);
    run(64'h8000000000000000);
    run(64'hffffffffffffffff);
    run(64'h6a3f2c1b9d8e7f01);
    for (int i = 0; i < 40; i++) begin
      frac_t r;
      r = {$urandom, $urandom} >> ($urandom % 60);
      if (r == 0) r = 64'd5;
      run(r);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
