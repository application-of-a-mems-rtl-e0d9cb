// End-to-end testbench of stm_lfsr_cryptosystem at its default parameters.
//
// Pseudo-noise accelerometer samples produce a first key; the transmitter encrypts a byte
// stream with gaps and the testbench loops its ciphertext into the receiver. A second key
// request is made while the stream is running; when the new key arrives both ends re-key,
// stall the sender for the reciprocal set-up, and continue with the new keystream.
// Every ciphertext byte is compared with plaintext XOR the keystream of an independent
// model of the whole chain (filter, sign, SHA-512, perturbed skew tent map), and every
// received byte with the plaintext. Counted mechanisms: keys produced, SHA-512 blocks,
// raw bits, re-key stalls, idle gaps, both map branches, LFSR flips, back-to-back bytes.
module tb_stm_lfsr_cryptosystem;
  import stm_cipher_pkg::*;

  localparam logic [1023:0] KS1 = 1024'h0e29d6c10cf8f0fc05fff191e67d0238ebefb2c5ebdce80dd9bd02b605592d273ab3c84503b86a05abd1827a040070984fdb9e61e04f225c1d1cb3e6684f14cfb135e4b0f766e7aed60a42de289f9fe5df2f571f9e1387d2636be4e1bb6fc9ff5597ce5ea4b37422c4f1557a70d562772b755e8079deca8ab3b84e4e97b807d2;
  localparam logic [1023:0] KS2 = 1024'h3b4c20672b801beccb31c867fc1192f6930f836ad406b3fb7444e893e1b72eca8b280865a26211b71ab3f95f6da93367a93064803edd9793acedc1a46a59c7f48e41c7b3dc4e3e21245d3cee85220ae06da52a0d9f29d144fda20316b44656e5030b9bd1f78db48b4424d763a2755030b7b39154370454515c3974d258e63262;
  localparam seed_t KEY1 = '{gamma: 64'h8615421177a46398, x0: 64'h82861e53ba46eaf9, y0: 61'h0d89e1dc105c4ed4};
  localparam seed_t KEY2 = '{gamma: 64'h2e6a1b046a387cd4, x0: 64'h990fa2d854f7025e, y0: 61'h034a3325d8885596};

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              sv = 1'b0, req = 1'b0;
  logic signed [7:0] xs_v = '0, ys_v = '0;
  logic              kbusy, kv, tx_ready, rx_ready, tx_iv = 1'b0, tx_ov, rx_ov;
  logic [7:0]        tx_id = '0, tx_od, rx_od;
  logic              rawv, hashed, left, flip;
  seed_t             key;

  int checks = 0, failures = 0;
  int n_keys = 0, n_blocks = 0, n_raw = 0, n_stall = 0, n_gap = 0, n_left = 0, n_right = 0;
  int n_flip = 0, n_b2b = 0, n_rx = 0, sess = 0;
  int sent [2] = '{0, 0};
  bit last_sent = 1'b0;
  logic [7:0] exp_ct [$], exp_pt [$];

  stm_lfsr_cryptosystem dut (
    .clk, .rst_n,
    .sample_valid_i(sv), .x_sample_i(xs_v), .y_sample_i(ys_v),
    .key_req_i(req), .key_busy_o(kbusy), .key_valid_o(kv), .key_o(key),
    .tx_ready_o(tx_ready), .tx_valid_i(tx_iv), .tx_data_i(tx_id), .tx_valid_o(tx_ov), .tx_data_o(tx_od),
    .rx_ready_o(rx_ready), .rx_valid_i(tx_ov), .rx_data_i(tx_od), .rx_valid_o(rx_ov), .rx_data_o(rx_od),
    .raw_valid_o(rawv), .block_hashed_o(hashed), .tx_left_branch_o(left), .tx_lsb_flip_o(flip));

  always #5 clk = ~clk;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic logic signed [7:0] xsamp(input int k);
    logic [31:0] h;
    h = 32'(k) * 32'h9E3779B1;
    return 8'((int'($signed(h[27:20])) >>> 1) + 30);
  endfunction

  function automatic logic signed [7:0] ysamp(input int k);
    logic [31:0] h;
    h = 32'(k) * 32'h85EBCA77;
    return 8'($signed(h[26:19])) >>> 1;
  endfunction

  // monitors
  always @(posedge clk) if (rst_n) begin
    if (kv) begin
      n_keys++;
      check(key == (sess == 0 ? KEY1 : KEY2), $sformatf("key %0d", sess + 1));
      sess++;
    end
    if (hashed) n_blocks++;
    if (rawv) n_raw++;
    if (tx_ov) begin
      check(exp_ct.size() > 0 && tx_od == exp_ct.pop_front(), "ciphertext byte");
    end
    if (rx_ov) begin
      check(exp_pt.size() > 0 && rx_od == exp_pt.pop_front(), "receiver recovers plaintext");
      n_rx++;
    end
  end

  // sender: one byte when want is set and the transmitter is ready
  task automatic send_byte();
    logic [7:0] p, k;
    int s;
    while (!tx_ready) begin
      if (sess > 0) n_stall++;
      tx_iv = 1'b0;
      @(negedge clk);
    end
    s = sess - 1;
    p = 8'($urandom);
    k = (s == 0) ? KS1[1023 - 8*sent[0] -: 8] : KS2[1023 - 8*sent[1] -: 8];
    sent[s]++;
    exp_ct.push_back(p ^ k);
    exp_pt.push_back(p);
    if (left) n_left++; else n_right++;
    if (flip) n_flip++;
    if (last_sent) n_b2b++;
    tx_iv = 1'b1; tx_id = p;
    @(negedge clk);
    tx_iv = 1'b0;
    last_sent = 1'b1;
  endtask

  task automatic idle(input int n);
    repeat (n) begin @(negedge clk); n_gap++; end
    last_sent = 1'b0;
  endtask

  task automatic feed_samples(input int k0);
    for (int k = k0; k < k0 + 1024; k++) begin
      sv = 1'b1; xs_v = xsamp(k); ys_v = ysamp(k);
      @(negedge clk);
      sv = 1'b0;
      if (k % 3 == 0) @(negedge clk);
    end
  endtask

  initial begin
    int start_cycle;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!tx_ready && !rx_ready, "cipher ends wait for a key after reset");
    // first key
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    check(kbusy, "key generation busy");
    feed_samples(0);
    while (!tx_ready) @(negedge clk);
    // first stream: bursts of back-to-back bytes and gaps
    for (int i = 0; i < 40; i++) begin
      send_byte();
      if (i % 4 == 3) idle(1 + i % 3);
    end
    // second key requested while the stream continues at a low rate
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    fork
      feed_samples(1024);
      begin
        while (sess < 2) begin
          send_byte();
          idle(40);
        end
      end
    join
    // after re-key: 64 bytes at full rate
    for (int i = 0; i < 64; i++) send_byte();
    idle(4);
    check(exp_ct.size() == 0 && exp_pt.size() == 0, "every byte came through");
    check(sent[0] <= 128 && sent[1] == 64, $sformatf("bytes per key: %0d, %0d", sent[0], sent[1]));
    check(n_rx == sent[0] + sent[1], "receiver output count");
    check(n_keys == 2, $sformatf("keys: %0d", n_keys));
    check(n_blocks == 4, $sformatf("SHA-512 blocks: %0d", n_blocks));
    check(n_raw == 2048, $sformatf("raw bits: %0d", n_raw));
    check(n_stall > 50, $sformatf("re-key stall cycles: %0d", n_stall));
    check(n_gap > 0, $sformatf("idle cycles: %0d", n_gap));
    check(n_b2b > 60, $sformatf("back-to-back bytes: %0d", n_b2b));
    check(n_left > 0 && n_right > 0, $sformatf("map branches: %0d left, %0d right", n_left, n_right));
    check(n_flip > 0, $sformatf("LFSR flips: %0d", n_flip));
    $display("mechanisms: keys=%0d sha_blocks=%0d raw_bits=%0d stall=%0d gaps=%0d b2b=%0d left=%0d right=%0d flips=%0d bytes=%0d+%0d",
             n_keys, n_blocks, n_raw, n_stall, n_gap, n_b2b, n_left, n_right, n_flip, sent[0], sent[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
