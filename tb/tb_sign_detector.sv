// Testbench for sign_detector: positive and zero samples give 1, negative ones 0, one
// clock after the input, for edge values and random samples.
module tb_sign_detector;

  localparam int W = 26;

  logic                clk = 1'b0, rst_n = 1'b0;
  logic                iv = 1'b0, bv, b;
  logic signed [W-1:0] din = '0;
  int                  checks = 0, failures = 0, ones = 0;

  sign_detector #(.W(W)) dut (.clk, .rst_n, .in_valid_i(iv), .in_i(din), .bit_valid_o(bv), .bit_o(b));

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

  task automatic one(input int v);
    @(negedge clk);
    iv = 1'b1; din = W'(v);
    @(negedge clk);
    iv = 1'b0;
    check(bv && (b == (v >= 0)), $sformatf("sign of %0d gave %0d", v, b));
    if (b) ones++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    one(0); one(1); one(-1); one(2**(W-1) - 1); one(-(2**(W-1)));
    for (int i = 0; i < 200; i++) one(int'($urandom % (2**W)) - 2**(W-1));
    check(ones > 60 && ones < 145, "both values produced");
    @(negedge clk);
    check(!bv, "no bit without input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
