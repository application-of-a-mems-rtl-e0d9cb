// Testbench for dc_filter: a reference model of the running-mean high-pass filter, written
// with 64-bit integers, predicts every output for random samples around an offset. A long
// constant input must then be removed almost completely (the mean settles), and a step in
// the offset must first appear at the output and then decay.
module tb_dc_filter;

  localparam int IN_W = 9, FRAC = 16, SHIFT = 8, OUT_W = IN_W + FRAC + 1;

  logic                    clk = 1'b0, rst_n = 1'b0;
  logic                    iv = 1'b0, ov;
  logic signed [IN_W-1:0]  din = '0;
  logic signed [OUT_W-1:0] dout;
  int                      checks = 0, failures = 0;
  longint                  mean = 0;

  dc_filter #(.IN_W(IN_W), .FRAC(FRAC), .SHIFT(SHIFT)) dut (
    .clk, .rst_n, .in_valid_i(iv), .in_i(din), .out_valid_o(ov), .out_o(dout));

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic sample(input int v, input bit check_exact);
    longint d, q;
    @(negedge clk);
    iv = 1'b1; din = IN_W'(v);
    d = longint'(v) * 65536 - mean;
    // floor division by 2^SHIFT, as an arithmetic shift does
    q = (d >= 0) ? d / 256 : -((-d + 255) / 256);
    mean = mean + q;
    @(negedge clk);
    iv = 1'b0;
    check(ov, "valid follows input");
    if (check_exact) check(longint'(dout) == d, $sformatf("output %0d expected %0d", dout, d));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 600; i++) sample(40 + int'($urandom % 61) - 30, 1'b1);
    for (int i = 0; i < 3000; i++) sample(-37, i % 50 == 0);
    check(dout < 512 && dout > -512, $sformatf("constant input removed, residue %0d", dout));
    sample(63, 1'b1);
    check(dout > 99 * 65536, "offset step passes through");
    for (int i = 0; i < 4000; i++) sample(63, 1'b0);
    check(dout < 512 && dout > -512, "new offset removed");
    @(negedge clk);
    check(!ov, "no output without input");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
