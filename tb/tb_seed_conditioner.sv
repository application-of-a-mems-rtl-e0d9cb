// Testbench for seed_conditioner: 1024 raw bits forming the message bytes
// (37*i + 11) mod 256, i = 0..127, most significant bit first, with idle cycles in
// between. The key must be cut from SHA-512 of those 128 bytes (digest computed with a
// standard SHA-512 implementation). Checks that no bit is taken while hashing, the busy
// flag, the two hashed blocks, and a second request with the same bits. A second instance
// with MSG_BLOCKS = 2 hashes the 256-byte message built the same way (three blocks).
module tb_seed_conditioner;
  import stm_cipher_pkg::*;

  localparam logic [511:0] DIG2 = 512'h00086aa6fcb4bb59f284fe8079038293aa2c430c4c635663cc04239e5c13d38d97eaf425edf0aab91cfaec9915a6e297efe64dbda38d3886862ab5232b1e7160;
  localparam logic [511:0] DIG = 512'h0b4815d35f9d07b1a30de2790e1be2a720234295cd7b4d9e9af51719ff90019f1fe6d4e402a7dcc4177085023dc460ab743dad9b2c1dda42662bda5d3b2e155b;

  logic  clk = 1'b0, rst_n = 1'b0;
  logic  req = 1'b0, rv = 1'b0, rb = 1'b0, rready, busy, kv, hashed;
  seed_t key;
  int    checks = 0, failures = 0, n_hashed = 0, n_keys = 0;
  logic  req2 = 1'b0, rv2 = 1'b0, rb2 = 1'b0, rready2, busy2, kv2, hashed2;
  seed_t key2;
  int    n_hashed2 = 0;

  seed_conditioner dut (.clk, .rst_n, .key_req_i(req), .raw_valid_i(rv), .raw_i(rb),
                        .raw_ready_o(rready), .busy_o(busy), .key_valid_o(kv), .key_o(key),
                        .block_hashed_o(hashed));

  seed_conditioner #(.MSG_BLOCKS(2)) dut2 (.clk, .rst_n, .key_req_i(req2), .raw_valid_i(rv2), .raw_i(rb2),
                        .raw_ready_o(rready2), .busy_o(busy2), .key_valid_o(kv2), .key_o(key2),
                        .block_hashed_o(hashed2));

  always @(posedge clk) if (rst_n && hashed2) n_hashed2++;

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && hashed) n_hashed++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic one_key();
    int k, waited;
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    check(busy && rready, "gathering after request");
    k = 0;
    while (k < 1024) begin
      logic [7:0] byte_v;
      byte_v = 8'((k / 8) * 37 + 11);
      rv = 1'b1; rb = byte_v[7 - k % 8];
      @(negedge clk);
      k++;
      rv = 1'b0;
      if (k % 13 == 0) @(negedge clk);
    end
    check(!rready, "no raw bits taken while hashing");
    // extra bits offered while hashing are ignored
    rv = 1'b1; rb = 1'b1;
    waited = 0;
    while (!kv && waited < 400) begin @(negedge clk); waited++; end
    rv = 1'b0;
    check(kv, "key produced");
    check(waited < 170, $sformatf("two blocks hashed in %0d cycles", waited));
    check(key.gamma == DIG[511:448], "gamma from digest bits 511:448");
    check(key.x0 == DIG[447:384], "x0 from digest bits 447:384");
    check(key.y0 == DIG[383:323], "y0 from digest bits 383:323");
    @(negedge clk);
    check(!busy, "idle after key");
    n_keys++;
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!busy && !rready, "idle after reset");
    one_key();
    one_key();
    check(n_hashed == 4, $sformatf("%0d blocks hashed", n_hashed));
    // two message blocks: bits are taken only while raw_ready is high
    @(negedge clk);
    req2 = 1'b1;
    @(negedge clk);
    req2 = 1'b0;
    begin
      int k;
      k = 0;
      while (k < 2048) begin
        logic [7:0] byte_v;
        byte_v = 8'((k / 8) * 37 + 11);
        rv2 = 1'b1; rb2 = byte_v[7 - k % 8];
        @(negedge clk);
        k++;
        rv2 = 1'b0;
        while (!rready2 && !kv2 && k < 2048) @(negedge clk);
      end
    end
    while (!kv2) @(negedge clk);
    check(key2.gamma == DIG2[511:448] && key2.x0 == DIG2[447:384] && key2.y0 == DIG2[383:323],
          "key from a two-block message");
    check(n_hashed2 == 3, $sformatf("%0d blocks hashed for two message blocks", n_hashed2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
