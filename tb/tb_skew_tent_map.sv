// Testbench for skew_tent_map: with the reciprocals computed here by wide division, it
// checks f(x) bit-exactly against the fixed-point definition (x*r truncated to Q0.64,
// saturated below 1) and, independently, against the real-valued map
// x/gamma or (1-x)/(1-gamma) to a relative error of 1e-9. It also checks the branch
// flag, loading x0, stepping, and holding the state.
module tb_skew_tent_map;
  import stm_cipher_pkg::*;

  logic   clk = 1'b0, rst_n = 1'b0;
  logic   load = 1'b0, step = 1'b0;
  frac_t  x0 = '0, xt = '0, gamma = '0, xo, xn;
  recip_t rg = '0, r1 = '0;
  logic   left;
  int     checks = 0, failures = 0, n_left = 0, n_right = 0;

  localparam frac_t GS [4] = '{64'h6a3f2c1b9d8e7f01, 64'h8000000000000000, 64'h1c71c71c71c71c72, 64'hf000000000000000};

  skew_tent_map dut (.clk, .rst_n, .load_i(load), .x0_i(x0), .step_i(step), .x_tilde_i(xt),
                     .gamma_i(gamma), .recip_g_i(rg), .recip_1mg_i(r1),
                     .x_o(xo), .x_next_o(xn), .left_branch_o(left));

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

  function automatic recip_t wide_recip(input frac_t dv);
    logic [200:0] q;
    q = (201'(1) << 128) / 201'(dv);
    return (q >= (201'(1) << 128)) ? '1 : q[127:0];
  endfunction

  function automatic real to_real(input frac_t v);
    return real'(v[63:11]) / (2.0 ** 53);
  endfunction

  task automatic set_gamma(input frac_t g);
    gamma = g;
    rg    = wide_recip(g);
    r1    = wide_recip(-g);
  endtask

  task automatic check_map(input frac_t x);
    logic [255:0] p;
    frac_t exp_v;
    real fx, got;
    bit lb;
    lb = (x <= gamma);
    if (lb) p = 256'(x) * 256'(rg);
    else    p = ((256'(1) << 64) - 256'(x)) * 256'(r1);
    exp_v = (p >> 64) >= (256'(1) << 64) ? '1 : p[127:64];
    check(xn == exp_v, $sformatf("f(%h) = %h, expected %h", x, xn, exp_v));
    check(left == lb, "branch flag");
    if (lb) n_left++; else n_right++;
    fx  = lb ? to_real(x) / to_real(gamma) : (1.0 - to_real(x)) / (1.0 - to_real(gamma));
    got = to_real(xn);
    if (fx > 1e-6)
      check((got - fx) / fx < 1e-9 && (fx - got) / fx < 1e-9,
            $sformatf("real map: got %f expected %f", got, fx));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    foreach (GS[j]) begin
      set_gamma(GS[j]);
      // load x0 = gamma (boundary: saturates just below 1)
      @(negedge clk); x0 = GS[j]; load = 1'b1;
      @(negedge clk); load = 1'b0;
      check(xo == GS[j], "x0 loaded");
      check_map(xo);
      check(xn == '1, "f(gamma) saturates below 1");
      // iterate the map through its own output, flipping the LSB every other step
      for (int i = 0; i < 60; i++) begin
        @(negedge clk);
        xt   = (i % 2 == 1) ? xn ^ 64'd1 : xn;
        step = 1'b1;
        @(negedge clk);
        step = 1'b0;
        check(xo == xt, "state takes x_tilde on step");
        check_map(xo);
        if (xo == '1 || xo == '0) begin   // leave the end points
          x0 = {$urandom, $urandom}; load = 1'b1;
          @(negedge clk); load = 1'b0;
        end
      end
      // hold without step
      xt = ~xo;
      @(negedge clk);
      check(xo != xt, "state holds without step");
      // random points
      for (int i = 0; i < 50; i++) begin
        @(negedge clk);
        x0 = {$urandom, $urandom}; load = 1'b1;
        @(negedge clk); load = 1'b0;
        #1 check_map(xo);
      end
    end
    check(n_left > 20 && n_right > 20, "both branches exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
