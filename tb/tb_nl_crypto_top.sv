// End-to-end testbench for nl_crypto_top at its default size (8 x 8 weight
// matrix, 8-bit plaintext, 12-bit ciphertext, 16-bit recovered words), with no
// parameter overridden.  It runs:
//   1. key A: forward weights a signed permutation of scale -2^7, reverse
//      weights the inverse permutation of scale -2^11, random XOR mask.  The
//      recovered stream must equal the plaintext exactly; every ciphertext word
//      must equal the masked forward transform and appear XW + 5 + k clocks
//      after the last plaintext word of its block.  Back-to-back and gapped
//      input are both used.
//   2. the same ciphertext, replayed through the external ciphertext input
//      (loopback = 0): again the plaintext must come back.
//   3. key B: random forward and reverse weights and a new mask, loaded in a
//      second key-load phase; ciphertext and recovered words must match the
//      fixed-point model floor(sum W x / 2^(width-1)) bit for bit.
// Each mechanism (key load, back-to-back blocks, input gaps, masking, key
// change, external ciphertext path, exact round trip) is counted and must occur.
module tb_nl_crypto_top;
  localparam int unsigned N = 8, XW = 8;
  localparam int unsigned PME = 11, ZE = 12, PMD = 15, ZD = 16, KIW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic enc_stage = 1'b0, dec_stage = 1'b0;
  logic enc_c1, enc_c2, enc_wr1_n, enc_mask_load;
  logic [KIW+N-1:0] enc_ld_addr, dec_ld_addr;
  logic [PME-1:0] enc_ld_data;
  logic [ZE-1:0] enc_mask, dec_mask;
  logic dec_c1, dec_c2, dec_wr1_n, dec_mask_load;
  logic [PMD-1:0] dec_ld_data;
  logic plain_valid, cipher_valid, loopback, ext_cipher_valid, rec_valid;
  logic [XW-1:0] plain_data;
  logic [ZE-1:0] cipher_data, ext_cipher_data;
  logic [ZD-1:0] rec_data;

  nl_crypto_top dut (.*);

  int we_ [N][N];        // forward weights
  int wd_ [N][N];        // reverse weights
  logic [ZE-1:0] mask;
  int checks = 0, failures = 0, cycle = 0;
  int exp_cd [$], exp_cc [$], exp_r [$];
  logic [ZE-1:0] cipher_log [$];
  logic [XW-1:0] blk [N];
  int cipher_words = 0, rec_words = 0, sent_words = 0;
  int n_keyload = 0, n_b2b = 0, n_gap = 0, n_masked = 0, n_keychange = 0;
  int n_ext = 0, n_exact = 0;
  bit exact_mode = 0, log_cipher = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  function automatic int fwd(input int k, input logic [XW-1:0] x [N]);
    longint acc = 0;
    for (int j = 0; j < N; j++) acc += longint'(we_[k][j]) * longint'($signed(x[j]));
    return int'(acc >>> (XW - 1));
  endfunction

  function automatic int rev(input int k, input int h [N]);
    longint acc = 0;
    for (int j = 0; j < N; j++) acc += longint'(wd_[k][j]) * longint'(h[j]);
    return int'(acc >>> (ZE - 1));
  endfunction

  // ---------------- monitors ----------------
  always @(posedge clk) begin
    if (rst_n && cipher_valid) begin
      cipher_words++;
      if (log_cipher) cipher_log.push_back(cipher_data);
      if (mask != '0) n_masked++;
      checks += 2;
      if (exp_cd.size() == 0) begin
        failures += 2; $display("unexpected ciphertext word");
      end else begin
        if (cipher_data !== ZE'(exp_cd[0])) begin
          failures++; $display("cipher %0d: %0h expected %0h", cipher_words, cipher_data, ZE'(exp_cd[0]));
        end
        if (cycle != exp_cc[0]) begin
          failures++; $display("cipher %0d at cycle %0d expected %0d", cipher_words, cycle, exp_cc[0]);
        end
        void'(exp_cd.pop_front()); void'(exp_cc.pop_front());
      end
    end
    if (rst_n && rec_valid) begin
      rec_words++;
      checks++;
      if (exp_r.size() == 0) begin
        failures++; $display("unexpected recovered word");
      end else begin
        if (int'($signed(rec_data)) != exp_r[0]) begin
          failures++; $display("recovered %0d: %0d expected %0d", rec_words, $signed(rec_data), exp_r[0]);
        end else if (exact_mode) n_exact++;
        void'(exp_r.pop_front());
      end
    end
  end

  // ---------------- key loading ----------------
  task automatic load_keys();
    enc_c2 = 0; dec_c2 = 0; enc_c1 = 1; dec_c1 = 1;
    fork
      for (int k = 0; k < N; k++)
        for (int a = 0; a < 2**N; a++) begin
          int pm = 0;
          for (int j = 0; j < N; j++) if (a[j]) pm += we_[k][j];
          enc_wr1_n = 0; enc_ld_addr = {KIW'(k), N'(a)}; enc_ld_data = PME'(pm);
          @(negedge clk);
        end
      for (int k = 0; k < N; k++)
        for (int a = 0; a < 2**N; a++) begin
          int pm = 0;
          for (int j = 0; j < N; j++) if (a[j]) pm += wd_[k][j];
          dec_wr1_n = 0; dec_ld_addr = {KIW'(k), N'(a)}; dec_ld_data = PMD'(pm);
          @(negedge clk);
        end
    join
    enc_wr1_n = 1; dec_wr1_n = 1;
    enc_mask_load = 1; dec_mask_load = 1; enc_mask = mask; dec_mask = mask;
    @(negedge clk);
    enc_mask_load = 0; dec_mask_load = 0;
    enc_c1 = 0; dec_c1 = 0; enc_c2 = 1; dec_c2 = 1;
    n_keyload++;
  endtask

  // ---------------- plaintext stream ----------------
  task automatic stream(input int nblk, input int gap_pct);
    for (int b = 0; b < nblk; b++) begin
      for (int j = 0; j < N; j++) begin
        bit gapped = 0;
        while ($urandom_range(0, 99) < gap_pct) begin
          plain_valid = 0; gapped = 1; @(negedge clk);
        end
        if (gapped) n_gap++;
        else if (j == 0 && b > 0) n_b2b++;
        blk[j] = XW'($urandom);
        plain_valid = 1; plain_data = blk[j]; sent_words++;
        if (j == N - 1) begin
          int h [N];
          for (int k = 0; k < N; k++) begin
            h[k] = fwd(k, blk);
            exp_cd.push_back(h[k] ^ int'(mask));
            exp_cc.push_back(cycle + XW + 5 + k);
          end
          for (int k = 0; k < N; k++) begin
            int hk [N];
            for (int i = 0; i < N; i++) hk[i] = int'($signed(ZE'(h[i])));
            exp_r.push_back(exact_mode ? int'($signed(blk[k])) : rev(k, hk));
          end
        end
        @(negedge clk);
      end
    end
    plain_valid = 0;
    repeat (XW + ZE + 3 * N + 8) @(negedge clk);
  endtask

  initial begin
    int perm [N];
    enc_c1 = 0; enc_c2 = 0; enc_wr1_n = 1; enc_ld_addr = '0; enc_ld_data = '0;
    dec_c1 = 0; dec_c2 = 0; dec_wr1_n = 1; dec_ld_addr = '0; dec_ld_data = '0;
    enc_mask_load = 0; dec_mask_load = 0; enc_mask = '0; dec_mask = '0;
    plain_valid = 0; plain_data = '0; loopback = 1;
    ext_cipher_valid = 0; ext_cipher_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- key A: signed permutation, exact inverse ----
    for (int i = 0; i < N; i++) perm[i] = i;
    for (int i = N - 1; i > 0; i--) begin
      int r, t;
      r = $urandom_range(0, i); t = perm[i];
      perm[i] = perm[r]; perm[r] = t;
    end
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        we_[k][j] = (j == perm[k]) ? -128 : 0;       // h_k = -x_perm[k]
        wd_[j][k] = (j == perm[k]) ? -2048 : 0;      // x_j = -h_k
      end
    mask = ZE'($urandom) | ZE'(1);
    load_keys();
    exact_mode = 1; log_cipher = 1;
    stream(40, 0);
    stream(40, 15);
    log_cipher = 0;

    // ---- same ciphertext through the external input ----
    loopback = 0;
    begin
      int nlog;
      nlog = cipher_log.size();
      // expected recovered words: the plaintext of the logged blocks
      // (already verified through loopback); rebuild them from the model
      for (int b = 0; b < nlog / N; b++) begin
        for (int j = 0; j < N; j++) begin
          for (int k = 0; k < N; k++) begin
            if (perm[k] == j) exp_r.push_back(-int'($signed(cipher_log[b * N + k] ^ mask)));
          end
        end
      end
      for (int i = 0; i < nlog; i++) begin
        ext_cipher_valid = 1; ext_cipher_data = cipher_log[i]; n_ext++;
        @(negedge clk);
      end
      ext_cipher_valid = 0;
    end
    repeat (ZE + 3 * N + 8) @(negedge clk);
    loopback = 1;

    // ---- key B: random weights, new mask ----
    exact_mode = 0;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) begin
        we_[k][j] = $urandom_range(0, 255) - 128;
        wd_[k][j] = $urandom_range(0, 4095) - 2048;
      end
    mask = ZE'($urandom) | ZE'(2);
    load_keys();
    n_keychange++;
    stream(60, 10);

    // ---- mechanism coverage and totals ----
    checks++;
    if (exp_cd.size() != 0 || exp_r.size() != 0) begin
      failures++; $display("outputs missing: %0d cipher, %0d recovered", exp_cd.size(), exp_r.size());
    end
    checks++;
    if (cipher_words != sent_words) begin failures++; $display("cipher words %0d of %0d", cipher_words, sent_words); end
    $display("mechanisms: keyload=%0d back_to_back=%0d gaps=%0d masked=%0d keychange=%0d ext=%0d exact=%0d",
             n_keyload, n_b2b, n_gap, n_masked, n_keychange, n_ext, n_exact);
    checks += 7;
    if (n_keyload == 0)   begin failures++; $display("no key load"); end
    if (n_b2b == 0)       begin failures++; $display("no back-to-back blocks"); end
    if (n_gap == 0)       begin failures++; $display("no input gaps"); end
    if (n_masked == 0)    begin failures++; $display("no masked words"); end
    if (n_keychange == 0) begin failures++; $display("no key change"); end
    if (n_ext == 0)       begin failures++; $display("no external ciphertext"); end
    if (n_exact == 0)     begin failures++; $display("no exact round trip"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
