// Testbench for stream_cipher: a transmitter and a receiver instance get the same key.
// Plaintext bytes with gaps in the valid stream are encrypted; each ciphertext byte is
// compared with plaintext XOR the keystream of an independent model, must appear exactly
// one clock after its input, and the receiver must return the plaintext. A re-key in the
// middle restarts both ends, with the ready signal low during the set-up.
module tb_stream_cipher;
  import stm_cipher_pkg::*;

  logic       clk = 1'b0, rst_n = 1'b0;
  logic       load = 1'b0;
  seed_t      key = '0;
  logic       tx_ready, rx_ready, tx_iv = 1'b0, tx_ov, rx_ov;
  logic [7:0] tx_id = '0, tx_od, rx_od;
  int         checks = 0, failures = 0;

  localparam logic [255:0] KS1 = 256'h381d9b26af70d4f94734b152ca3a61ddd63c758f55e1c7c8bfce609c1163a67f;
  localparam logic [255:0] KS2 = 256'h84a269a961723f593bdd07f8698985ab5fb5d4b118055a9af2eff38e40d84de9;

  stream_cipher u_tx (.clk, .rst_n, .key_load_i(load), .key_i(key), .ready_o(tx_ready),
                      .in_valid_i(tx_iv), .in_data_i(tx_id), .out_valid_o(tx_ov), .out_data_o(tx_od),
                      .left_branch_o(), .lsb_flip_o());
  stream_cipher u_rx (.clk, .rst_n, .key_load_i(load), .key_i(key), .ready_o(rx_ready),
                      .in_valid_i(tx_ov), .in_data_i(tx_od), .out_valid_o(rx_ov), .out_data_o(rx_od),
                      .left_branch_o(), .lsb_flip_o());

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
    @(negedge clk);
    key = s; load = 1'b1;
    @(negedge clk);
    load = 1'b0;
    check(!tx_ready && !rx_ready, "not ready during key set-up");
    while (!tx_ready) @(negedge clk);
    check(rx_ready, "both ends ready together");
    for (int i = 0; i < 32; i++) begin
      logic [7:0] p;
      p = 8'($urandom);
      tx_iv = 1'b1; tx_id = p;
      @(negedge clk);
      tx_iv = 1'b0; tx_id = 8'h00;
      check(tx_ov && tx_od == (p ^ exp_ks[255 - 8*i -: 8]), $sformatf("ciphertext %0d", i));
      @(negedge clk);
      check(rx_ov && rx_od == p, $sformatf("receiver recovers byte %0d", i));
      check(!tx_ov, "no output without input");
      // back-to-back on odd bytes: the next byte is sent while rx is decrypting
    end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    session('{gamma: 64'h6a3f2c1b9d8e7f01, x0: 64'h1234567890abcdef, y0: 61'h0badc0ffee12345}, KS1);
    session('{gamma: 64'h1c71c71c71c71c72, x0: 64'hf00dfeedcafe1234, y0: 61'h0}, KS2);
    // full rate: a burst of 16 back-to-back bytes, decrypted by the receiver in turn
    session('{gamma: 64'h6a3f2c1b9d8e7f01, x0: 64'h1234567890abcdef, y0: 61'h0badc0ffee12345}, KS1);
    begin
      logic [7:0] sent [16];
      int got;
      got = 0;
      fork
        begin
          for (int i = 0; i < 16; i++) begin
            sent[i] = 8'($urandom);
            tx_iv = 1'b1; tx_id = sent[i];
            @(negedge clk);
          end
          tx_iv = 1'b0;
        end
        begin
          repeat (2) @(negedge clk);
          while (got < 16) begin
            check(rx_ov && rx_od == sent[got], $sformatf("burst byte %0d", got));
            got++;
            @(negedge clk);
          end
        end
      join
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
