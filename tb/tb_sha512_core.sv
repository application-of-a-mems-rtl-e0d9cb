// Testbench for sha512_core: the FIPS 180-4 example messages "abc" (one block) and the
// 896-bit "abcdefghbcdefghi..." message (two blocks, the second chained), padded here,
// against their published digests. Also checks the 81-cycle block latency and that
// ready is low while a block is processed.
module tb_sha512_core;

  logic          clk = 1'b0, rst_n = 1'b0;
  logic          start = 1'b0, first = 1'b0, ready, done;
  logic [1023:0] blk = '0;
  logic [511:0]  dig;
  int            checks = 0, failures = 0;

  localparam logic [511:0] D_ABC = 512'hddaf35a193617abacc417349ae20413112e6fa4e89a97ea20a9eeee64b55d39a2192992a274fc1a836ba3c23a3feebbd454d4423643ce80e2a9ac94fa54ca49f;
  localparam logic [511:0] D_TWO = 512'h8e959b75dae313da8cf4f72814fc143f8f7779c6eb9f7fa17299aeadb6889018501d289e4900f7e4331b99dec4b5433ac7d329eeb6dd26545e96e55b874be909;

  sha512_core dut (.clk, .rst_n, .start_i(start), .first_i(first), .block_i(blk),
                   .ready_o(ready), .done_o(done), .digest_o(dig));

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

  task automatic hash_block(input logic [1023:0] b, input bit f);
    int cycles;
    @(negedge clk);
    blk = b; first = f; start = 1'b1;
    @(negedge clk);
    start = 1'b0; blk = '0;
    check(!ready, "busy after start");
    cycles = 0;
    while (!done) begin @(negedge clk); cycles++; end
    check(cycles == 81, $sformatf("block latency %0d", cycles));
    check(ready, "ready again when done");
  endtask

  initial begin
    string m;
    logic [2047:0] two;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    hash_block({"abc", 8'h80, 864'd0, 128'd24}, 1'b1);
    check(dig == D_ABC, $sformatf("SHA-512(abc) = %h", dig));
    m = "abcdefghbcdefghicdefghijdefghijkefghijklfghijklmghijklmnhijklmnoijklmnopjklmnopqklmnopqrlmnopqrsmnopqrstnopqrstu";
    two = '0;
    for (int i = 0; i < 112; i++) two[2047 - 8*i -: 8] = m[i];
    two[2047 - 8*112 -: 8] = 8'h80;
    two[127:0] = 128'd896;
    hash_block(two[2047:1024], 1'b1);
    hash_block(two[1023:0], 1'b0);
    check(dig == D_TWO, "SHA-512 of the two-block message");
    // the first flag restarts the chain
    hash_block({"abc", 8'h80, 864'd0, 128'd24}, 1'b1);
    check(dig == D_ABC, "first block restarts from H0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
