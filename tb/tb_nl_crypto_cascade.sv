// Testbench for nl_crypto_top with two encryption stages in cascade
// (STAGES = 2): 8-bit plaintext, 12-bit words between the stages, 16-bit
// ciphertext.  Decryption undoes stage 1 first, then stage 0.
//   1. Exact key: every stage a signed permutation of scale -2^(w-1), with
//      w the operand width of that network, and a random mask per stage.
//      The recovered stream must equal the plaintext.
//   2. Random weights in every forward and reverse network, with new masks.
//      Ciphertext and recovered words must match a fixed-point model of the
//      whole chain bit for bit.  The model includes the truncation to 12 bits
//      between the two decryption stages.
// In both runs every ciphertext word is also checked against the model.  The
// stage-select load path is used for all four networks and all four masks.
module tb_nl_crypto_cascade;
  localparam int unsigned N = 8, XW = 8, S = 2;
  localparam int unsigned ZE = 16, PME = 15, PMD = 19, ZD = 16, KIW = 3;
  localparam int XWS [S] = '{8, 12};    // operand width of encryption stage s
  localparam int ZWS [S] = '{12, 16};   // output width of encryption stage s

  logic clk = 1'b0, rst_n = 1'b0;
  logic enc_stage, dec_stage;
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

  nl_crypto_top #(.STAGES(S)) dut (.*);

  int we_ [S][N][N];
  int wd_ [S][N][N];
  int mk [S];
  int checks = 0, failures = 0, cipher_words = 0, rec_words = 0, sent = 0;
  int n_exact = 0;
  int exp_c [$], exp_r [$];
  bit exact_mode;

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint wrap(input longint v, input int w);
    longint m;
    m = v & ((longint'(1) << w) - 1);
    return (m >= (longint'(1) << (w - 1))) ? m - (longint'(1) << w) : m;
  endfunction

  // one network: floor(sum W x / 2^(w-1)), w = operand width
  function automatic void net(input int wt [N][N], input longint x [N], input int w,
                              output longint y [N]);
    for (int k = 0; k < N; k++) begin
      longint acc;
      acc = 0;
      for (int j = 0; j < N; j++) acc += longint'(wt[k][j]) * x[j];
      y[k] = acc >>> (w - 1);
    end
  endfunction

  always @(posedge clk) begin
    if (rst_n && cipher_valid) begin
      cipher_words++; checks++;
      if (exp_c.size() == 0 || longint'($signed(cipher_data)) != longint'(exp_c[0])) begin
        failures++; $display("cipher %0d wrong", cipher_words);
      end
      if (exp_c.size() != 0) void'(exp_c.pop_front());
    end
    if (rst_n && rec_valid) begin
      rec_words++; checks++;
      if (exp_r.size() == 0 || int'($signed(rec_data)) != exp_r[0]) begin
        failures++;
        $display("recovered %0d: %0d expected %0d", rec_words, $signed(rec_data),
                 (exp_r.size() != 0) ? exp_r[0] : 0);
      end else if (exact_mode) n_exact++;
      if (exp_r.size() != 0) void'(exp_r.pop_front());
    end
  end

  task automatic load_all();
    enc_c2 = 0; dec_c2 = 0;
    for (int s = 0; s < S; s++) begin
      enc_stage = 1'(s); dec_stage = 1'(s);
      enc_c1 = 1; dec_c1 = 1;
      for (int k = 0; k < N; k++)
        for (int a = 0; a < 2**N; a++) begin
          int pe, pd;
          pe = 0; pd = 0;
          for (int j = 0; j < N; j++) if (a[j]) begin pe += we_[s][k][j]; pd += wd_[s][k][j]; end
          enc_wr1_n = 0; enc_ld_addr = {KIW'(k), N'(a)}; enc_ld_data = PME'(pe);
          dec_wr1_n = 0; dec_ld_addr = {KIW'(k), N'(a)}; dec_ld_data = PMD'(pd);
          @(negedge clk);
        end
      enc_wr1_n = 1; dec_wr1_n = 1;
      @(negedge clk);
      enc_c1 = 0; dec_c1 = 0;
      enc_mask_load = 1; dec_mask_load = 1; enc_mask = ZE'(mk[s]); dec_mask = ZE'(mk[s]);
      @(negedge clk);
      enc_mask_load = 0; dec_mask_load = 0;
    end
    enc_c2 = 1; dec_c2 = 1;
  endtask

  task automatic run(input int nblk);
    for (int b = 0; b < nblk; b++) begin
      longint x [N], h0 [N], g [N], h1 [N], c [N], u1 [N], r1 [N], t [N], u0 [N], r0 [N];
      for (int j = 0; j < N; j++) begin
        plain_data = XW'($urandom);
        x[j] = longint'($signed(plain_data));
        plain_valid = 1; sent++;
        @(negedge clk);
      end
      // forward chain
      net(we_[0], x, XWS[0], h0);
      for (int k = 0; k < N; k++) g[k] = wrap(wrap(h0[k], ZWS[0]) ^ longint'(mk[0]), ZWS[0]);
      net(we_[1], g, XWS[1], h1);
      for (int k = 0; k < N; k++) begin
        c[k] = wrap(wrap(h1[k], ZWS[1]) ^ longint'(mk[1]), ZWS[1]);
        exp_c.push_back(int'(c[k]));
      end
      // reverse chain
      for (int k = 0; k < N; k++) u1[k] = wrap(c[k] ^ longint'(mk[1]), ZWS[1]);
      net(wd_[1], u1, ZWS[1], r1);
      for (int k = 0; k < N; k++) t[k] = wrap(r1[k], XWS[1]);
      for (int k = 0; k < N; k++) u0[k] = wrap(t[k] ^ longint'(mk[0]), ZWS[0]);
      net(wd_[0], u0, ZWS[0], r0);
      for (int k = 0; k < N; k++) begin
        exp_r.push_back(int'(wrap(r0[k], ZD)));
        checks++;
        if (exact_mode && r0[k] != x[k]) begin
          failures++; $display("model: exact key does not invert");
        end
      end
    end
    plain_valid = 0;
    repeat (200) @(negedge clk);
  endtask

  initial begin
    int perm [N];
    enc_stage = 0; dec_stage = 0;
    enc_c1 = 0; enc_c2 = 0; enc_wr1_n = 1; enc_ld_addr = '0; enc_ld_data = '0;
    dec_c1 = 0; dec_c2 = 0; dec_wr1_n = 1; dec_ld_addr = '0; dec_ld_data = '0;
    enc_mask_load = 0; dec_mask_load = 0; enc_mask = '0; dec_mask = '0;
    plain_valid = 0; plain_data = '0; loopback = 1;
    ext_cipher_valid = 0; ext_cipher_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---- exact key ----
    exact_mode = 1;
    for (int s = 0; s < S; s++) begin
      for (int i = 0; i < N; i++) perm[i] = i;
      for (int i = N - 1; i > 0; i--) begin
        int r, tmp;
        r = $urandom_range(0, i); tmp = perm[i]; perm[i] = perm[r]; perm[r] = tmp;
      end
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++) begin
          we_[s][k][j] = (j == perm[k]) ? -(1 << (XWS[s] - 1)) : 0;
          wd_[s][j][k] = (j == perm[k]) ? -(1 << (ZWS[s] - 1)) : 0;
        end
      mk[s] = int'($urandom) & ((1 << ZWS[s]) - 1);
    end
    load_all();
    run(40);

    // ---- random key ----
    exact_mode = 0;
    for (int s = 0; s < S; s++) begin
      for (int k = 0; k < N; k++)
        for (int j = 0; j < N; j++) begin
          we_[s][k][j] = $urandom_range(0, (1 << XWS[s]) - 1) - (1 << (XWS[s] - 1));
          wd_[s][k][j] = $urandom_range(0, (1 << ZWS[s]) - 1) - (1 << (ZWS[s] - 1));
        end
      mk[s] = int'($urandom) & ((1 << ZWS[s]) - 1);
    end
    load_all();
    run(40);

    checks += 3;
    if (cipher_words != sent) begin failures++; $display("cipher words %0d of %0d", cipher_words, sent); end
    if (exp_c.size() != 0 || exp_r.size() != 0) begin failures++; $display("outputs missing"); end
    if (n_exact == 0) begin failures++; $display("no exact round trip"); end
    $display("cascade: cipher=%0d recovered=%0d exact=%0d", cipher_words, rec_words, n_exact);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
