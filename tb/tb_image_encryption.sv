// Workload testbench: image encryption and key sensitivity.
//
// The full cryptosystem (default parameters) makes a key from pseudo-noise samples and
// then encrypts a 128 x 128 synthetic 8-bit grey image, one pixel per clock, with the
// ciphertext looped into the receiver. Checked:
//   - rate: 16384 pixels enter in 16384 consecutive clocks (8 bits per clock);
//   - the receiver returns every pixel;
//   - the encrypted image is uncorrelated with the original (|r| < 0.03) and between
//     horizontally adjacent pixels (|r| < 0.03), while the original is strongly correlated;
//   - the encrypted histogram is flat (chi-square over 256 bins below 350 for 255 degrees
//     of freedom), the original's is not;
//   - the keystream bits are balanced (monobit: |ones - n/2| < 3.29 sqrt(n)/2).
// Key sensitivity: two extra cipher ends are loaded with the same key and with keys that
// differ in the least significant bit of gamma, of x0 or of y0; over 2048 keystream bytes
// the two keystreams must differ in 45..55 % of their bits.
module tb_image_encryption;
  import stm_cipher_pkg::*;

  localparam int ROWS = 128, COLS = 128, NPIX = ROWS * COLS, NSENS = 2048;

  logic              clk = 1'b0, rst_n = 1'b0;
  logic              sv = 1'b0, req = 1'b0;
  logic signed [7:0] xs_v = '0, ys_v = '0;
  logic              kbusy, kv, tx_ready, rx_ready, tx_iv = 1'b0, tx_ov, rx_ov;
  logic [7:0]        tx_id = '0, tx_od, rx_od;
  seed_t             key;

  int checks = 0, failures = 0;
  logic [7:0] img [NPIX];
  logic [7:0] enc [NPIX];
  int n_enc = 0, n_dec = 0, dec_bad = 0, first_in = -1, last_in = -1, cyc = 0;

  stm_lfsr_cryptosystem dut (
    .clk, .rst_n,
    .sample_valid_i(sv), .x_sample_i(xs_v), .y_sample_i(ys_v),
    .key_req_i(req), .key_busy_o(kbusy), .key_valid_o(kv), .key_o(key),
    .tx_ready_o(tx_ready), .tx_valid_i(tx_iv), .tx_data_i(tx_id), .tx_valid_o(tx_ov), .tx_data_o(tx_od),
    .rx_ready_o(rx_ready), .rx_valid_i(tx_ov), .rx_data_i(tx_od), .rx_valid_o(rx_ov), .rx_data_o(rx_od),
    .raw_valid_o(), .block_hashed_o(), .tx_left_branch_o(), .tx_lsb_flip_o());

  // key-sensitivity pair: a reference end and one with a 1-bit key change
  logic  s_load = 1'b0, s_valid = 1'b0, s_ready_a, s_ready_b, s_ov_a, s_ov_b;
  seed_t s_key_a = '0, s_key_b = '0;
  logic [7:0] s_od_a, s_od_b;

  stream_cipher u_a (.clk, .rst_n, .key_load_i(s_load), .key_i(s_key_a), .ready_o(s_ready_a),
                     .in_valid_i(s_valid), .in_data_i(8'h00), .out_valid_o(s_ov_a), .out_data_o(s_od_a),
                     .left_branch_o(), .lsb_flip_o());
  stream_cipher u_b (.clk, .rst_n, .key_load_i(s_load), .key_i(s_key_b), .ready_o(s_ready_b),
                     .in_valid_i(s_valid), .in_data_i(8'h00), .out_valid_o(s_ov_b), .out_data_o(s_od_b),
                     .left_branch_o(), .lsb_flip_o());

  always #5 clk = ~clk;

  initial begin
    #5000000;
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

  always @(posedge clk) begin
    cyc++;
    if (rst_n && tx_iv && tx_ready) begin
      if (first_in < 0) first_in = cyc;
      last_in = cyc;
    end
    if (rst_n && tx_ov) begin enc[n_enc] = tx_od; n_enc++; end
    if (rst_n && rx_ov) begin
      if (rx_od != img[n_dec]) dec_bad++;
      n_dec++;
    end
  end

  function automatic real corr(input int which);
    // 0: original vs encrypted; 1: encrypted, horizontal neighbours; 2: original, neighbours
    real sa = 0, sb = 0, saa = 0, sbb = 0, sab = 0, a, b, n = 0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin
        if (which == 0) begin a = img[r*COLS+c]; b = enc[r*COLS+c]; end
        else begin
          if (c == COLS - 1) continue;
          if (which == 1) begin a = enc[r*COLS+c]; b = enc[r*COLS+c+1]; end
          else            begin a = img[r*COLS+c]; b = img[r*COLS+c+1]; end
        end
        sa += a; sb += b; saa += a*a; sbb += b*b; sab += a*b; n += 1;
      end
    return (sab/n - (sa/n)*(sb/n)) / ($sqrt(saa/n - (sa/n)**2) * $sqrt(sbb/n - (sb/n)**2));
  endfunction

  function automatic real chi2(input bit of_enc);
    int h [256];
    real x = 0, e;
    foreach (h[i]) h[i] = 0;
    for (int i = 0; i < NPIX; i++) h[of_enc ? enc[i] : img[i]]++;
    e = real'(NPIX) / 256.0;
    foreach (h[i]) x += (h[i] - e) * (h[i] - e) / e;
    return x;
  endfunction

  task automatic sensitivity(input seed_t ka, input seed_t kb, input string what);
    int diff = 0, got = 0;
    real frac;
    @(negedge clk);
    s_key_a = ka; s_key_b = kb; s_load = 1'b1;
    @(negedge clk);
    s_load = 1'b0;
    while (!(s_ready_a && s_ready_b)) @(negedge clk);
    for (int i = 0; i <= NSENS; i++) begin
      s_valid = (i < NSENS);
      @(negedge clk);
      if (s_ov_a && s_ov_b) begin diff += $countones(s_od_a ^ s_od_b); got++; end
    end
    s_valid = 1'b0;
    check(got == NSENS, "one keystream byte per input byte");
    frac = real'(diff) / real'(8 * NSENS);
    $display("key sensitivity, %s: %0.4f of keystream bits differ", what, frac);
    if (ka == kb) check(diff == 0, "same key gives the same keystream");
    else check(frac > 0.45 && frac < 0.55, $sformatf("sensitivity to %s", what));
  endtask

  initial begin
    real r0, r1, r2, c_enc, c_img;
    int ones;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++)
        img[r*COLS+c] = 8'(40 + (r + c) / 2 + (r * c) / 256);
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // key from the seed generator
    @(negedge clk);
    req = 1'b1;
    @(negedge clk);
    req = 1'b0;
    for (int k = 0; k < 1024; k++) begin
      sv = 1'b1; xs_v = xsamp(k); ys_v = ysamp(k);
      @(negedge clk);
    end
    sv = 1'b0;
    while (!tx_ready) @(negedge clk);
    // the image at full rate
    for (int i = 0; i < NPIX; i++) begin
      tx_iv = 1'b1; tx_id = img[i];
      @(negedge clk);
    end
    tx_iv = 1'b0;
    repeat (4) @(negedge clk);
    check(last_in - first_in + 1 == NPIX, $sformatf("%0d pixels took %0d clocks", NPIX, last_in - first_in + 1));
    check(n_enc == NPIX && n_dec == NPIX, "every pixel encrypted and decrypted");
    check(dec_bad == 0, $sformatf("%0d decrypted pixels differ", dec_bad));
    r0 = corr(0); r1 = corr(1); r2 = corr(2);
    c_enc = chi2(1'b1); c_img = chi2(1'b0);
    ones = 0;
    for (int i = 0; i < NPIX; i++) ones += $countones(enc[i] ^ img[i]);
    $display("correlation original/encrypted %0.4f, encrypted neighbours %0.4f, original neighbours %0.4f",
             r0, r1, r2);
    $display("histogram chi-square: encrypted %0.1f, original %0.1f; keystream ones %0d of %0d",
             c_enc, c_img, ones, 8 * NPIX);
    check(r0 < 0.03 && r0 > -0.03, "original and encrypted uncorrelated");
    check(r1 < 0.03 && r1 > -0.03, "encrypted neighbours uncorrelated");
    check(r2 > 0.9, "original neighbours correlated");
    check(c_enc < 350.0, "encrypted histogram flat");
    check(c_img > 1000.0, "original histogram not flat");
    check(ones > 4 * NPIX - 597 && ones < 4 * NPIX + 597, "keystream monobit");
    // key sensitivity around the generated key
    sensitivity(key, key, "no change");
    sensitivity(key, '{gamma: key.gamma ^ 64'd1, x0: key.x0, y0: key.y0}, "gamma LSB");
    sensitivity(key, '{gamma: key.gamma, x0: key.x0 ^ 64'd1, y0: key.y0}, "x0 LSB");
    sensitivity(key, '{gamma: key.gamma, x0: key.x0, y0: key.y0 ^ 61'd1}, "y0 LSB");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
