// Testbench for seed_generator: feeds deterministic pseudo-noise sample pairs (X with a DC
// offset of +30 LSB, Y without) and checks the two keys produced against an independent
// model of the chain: X - Y, the running-mean filter, the sign, 1024 bits per key packed
// MSB first, SHA-512, key cut from the digest. Every raw bit is also compared with the
// model's bit. Samples 0..1023 feed the first key,
// 1024..2047 the second; the filter state carries over.
module tb_seed_generator;
  import stm_cipher_pkg::*;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              sv = 1'b0, req = 1'b0, busy, kv, rawv, rawb, hashed;
  logic signed [7:0] xs_v = '0, ys_v = '0;
  seed_t             key;

  localparam logic [2047:0] RAW = 2048'hc7cfddf8f8fbb71f1f76e3e3ecdc7c7d9b8f8f9373f1e2ee7e3c5dcfc78bb9f8f1733e1e2e67c3c5ccf878b9970f1772e1e2ec5c3c5d8b878bb170f1666e3e3ccdc7c399b8f873371e0e66e3c1ccdc78399b87173370e2e66c1c5ccd838b99b0f173261e2e6cc7c7c998f8f9331f1e2663e3c4cc7c78998f871371f0e26e3c1c4dc78389b8f071370e0e66e1c1cdd8b879bb170f3662e1e6cc5c3cd98b87933171f2662e3c4cc5c78998b8f1331f0e2663e1c4cc7878b99f0f1732e1e2e65c3c5ccb878b9170f1762e1e2cc5c3c598b878b3170f0662e1e4cc5c38998b8f173370e2e66e1c5ccdc78b99b0f173361e2e64c3c5cc9878b9970f1722e1e2e45c3c;
  int                checks = 0, failures = 0, n_raw = 0, n_ones = 0;

  seed_generator dut (.clk, .rst_n, .sample_valid_i(sv), .x_sample_i(xs_v), .y_sample_i(ys_v),
                      .key_req_i(req), .busy_o(busy), .key_valid_o(kv), .key_o(key),
                      .raw_valid_o(rawv), .raw_bit_o(rawb), .block_hashed_o(hashed));

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n && rawv) begin
    if (n_raw < 2048) check(rawb == RAW[2047 - n_raw], $sformatf("raw bit %0d", n_raw));
    n_raw++;
    n_ones += int'(rawb);
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

  task automatic make_key(input int k0, input seed_t exp_key);
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    for (int k = k0; k < k0 + 1024; k++) begin
      sv = 1'b1; xs_v = xsamp(k); ys_v = ysamp(k);
      @(negedge clk);
      sv = 1'b0;
      if (k % 5 == 0) @(negedge clk);
    end
    while (!kv) @(negedge clk);
    check(key == exp_key, $sformatf("key %h expected %h", key, exp_key));
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    make_key(0,    '{gamma: 64'h8615421177a46398, x0: 64'h82861e53ba46eaf9, y0: 61'h0d89e1dc105c4ed4});
    make_key(1024, '{gamma: 64'h2e6a1b046a387cd4, x0: 64'h990fa2d854f7025e, y0: 61'h034a3325d8885596});
    check(n_raw == 2048, $sformatf("%0d raw bits used", n_raw));
    check(n_ones > 800 && n_ones < 1250, $sformatf("DC removed: %0d ones of 2048", n_ones));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
