// Self-checking testbench for psne_network at its default size (8 neurons of
// 8 inputs, 8-bit words and weights).  A random weight matrix is loaded (one
// table per neuron, written to all processing units at once), then a word
// stream is applied: first back to back, then with random gaps, then with
// extreme operands under an extreme key.  Each output word k of a block must
// equal floor(sum_j W_kj * X_j / 2^7) and appear XW + 4 + k clocks after the
// block's last input word.  With c2 = 0 the network must ignore its input.
module tb_psne_network;
  localparam int unsigned N = 8, XW = 8, WW = 8;
  localparam int unsigned PMW = 11, ZW = 12, KIW = 3;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c1, c2, wr1_n;
  logic [KIW+N-1:0] ld_addr;
  logic [PMW-1:0] ld_data;
  logic in_valid, out_valid;
  logic [XW-1:0] in_data;
  logic [ZW-1:0] out_data;

  int w [N][N];
  int checks = 0, failures = 0, cycle = 0, words = 0, exp_words = 0;
  int exp_d [$], exp_c [$];
  logic [XW-1:0] blk [N];

  psne_network #(.N(N), .XW(XW), .WW(WW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      words++;
      checks += 2;
      if (exp_d.size() == 0) begin
        failures += 2; $display("unexpected output word");
      end else begin
        if (int'($signed(out_data)) != exp_d[0]) begin
          failures++; $display("word %0d: %0d expected %0d", words, $signed(out_data), exp_d[0]);
        end
        if (cycle != exp_c[0]) begin
          failures++; $display("word %0d at cycle %0d expected %0d", words, cycle, exp_c[0]);
        end
        void'(exp_d.pop_front()); void'(exp_c.pop_front());
      end
    end
  end

  task automatic load_key(input bit extreme);
    c2 = 0; c1 = 1;
    for (int k = 0; k < N; k++)
      for (int j = 0; j < N; j++) w[k][j] = extreme ? -128 : $urandom_range(0, 255) - 128;
    for (int k = 0; k < N; k++) begin
      for (int a = 0; a < 2**N; a++) begin
        int pm;
        pm = 0;
        for (int j = 0; j < N; j++) if (a[j]) pm += w[k][j];
        wr1_n = 0; ld_addr = {KIW'(k), N'(a)}; ld_data = PMW'(pm);
        @(negedge clk);
      end
    end
    wr1_n = 1;
    @(negedge clk);
    c1 = 0; c2 = 1;
  endtask

  // gap_pct: chance (in %) of an idle cycle before each word
  task automatic stream(input int nblk, input int gap_pct, input bit extreme);
    for (int b = 0; b < nblk; b++) begin
      for (int j = 0; j < N; j++) begin
        while ($urandom_range(0, 99) < gap_pct) begin
          in_valid = 0; @(negedge clk);
        end
        blk[j]   = extreme ? XW'(($urandom_range(0, 1) == 1) ? 8'h80 : 8'h7f) : XW'($urandom);
        in_valid = 1; in_data = blk[j];
        if (j == N - 1) begin
          for (int k = 0; k < N; k++) begin
            longint acc;
            acc = 0;
            for (int jj = 0; jj < N; jj++) acc += longint'(w[k][jj]) * longint'($signed(blk[jj]));
            exp_d.push_back(int'(acc >>> (XW - 1)));
            exp_c.push_back(cycle + XW + 4 + k);
          end
          exp_words += N;
        end
        @(negedge clk);
      end
    end
    in_valid = 0;
    repeat (XW + N + 4) @(negedge clk);
  endtask

  initial begin
    c1 = 0; c2 = 0; wr1_n = 1; ld_addr = '0; ld_data = '0;
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_key(0);
    stream(100, 0, 0);
    stream(60, 20, 0);
    // input while c2 = 0 must be ignored
    c2 = 0;
    for (int t = 0; t < 3 * N; t++) begin
      in_valid = 1; in_data = XW'($urandom); @(negedge clk);
    end
    in_valid = 0; c2 = 1;
    repeat (XW + N + 4) @(negedge clk);
    stream(20, 0, 0);
    load_key(1);
    stream(30, 0, 1);
    checks++;
    if (words != exp_words || exp_d.size() != 0) begin
      failures++; $display("words %0d of %0d", words, exp_words);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
