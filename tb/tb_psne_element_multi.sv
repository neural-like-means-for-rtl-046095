// Self-checking testbench for psne_element with two neurons sharing one
// operand pipeline, each with its own activation table (N = 4 inputs, 6-bit
// operands and weights).  Neuron 0 uses f(z) = sat6(z >>> 1), neuron 1 the
// non-monotone f(z) = (5z + 3) mod 64, so a table written to the wrong neuron
// or read at the wrong address shows.  Results are compared with
// floor(sum_j W_kj X_j / 2^5) and must appear XW + 2 clocks after the operands.
module tb_psne_element_multi;
  localparam int unsigned N = 4, XW = 6, WW = 6, YW = 6, K = 2;
  localparam int unsigned PMW = 8, ZW = 9, TAW = 9, LAW = 10, LDW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c1, c2, wr1_n, wr2_n;
  logic [LAW-1:0] ld_addr;
  logic [LDW-1:0] ld_data;
  logic in_valid, out_valid;
  logic [N-1:0][XW-1:0] x;
  logic [K-1:0][YW-1:0] y;
  logic [K-1:0][ZW-1:0] z;

  int w [K][N];
  int s_sum [K];
  int checks = 0, failures = 0, cycle = 0, results = 0, sent = 0;
  int exp_z [$], exp_y [$], exp_c [$];

  psne_element #(.N(N), .XW(XW), .WW(WW), .YW(YW), .K(K), .USE_FA(1'b1)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int act(input int k, input int zz);
    int t;
    if (k == 0) begin
      t = zz >>> 1;
      if (t > 31) t = 31;
      if (t < -32) t = -32;
      return t;
    end
    t = (5 * zz + 3) & 63;
    return (t > 31) ? t - 64 : t;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      results++;
      checks++;
      if (cycle != exp_c[0]) begin
        failures++; $display("result %0d at cycle %0d expected %0d", results, cycle, exp_c[0]);
      end
      void'(exp_c.pop_front());
      for (int k = 0; k < K; k++) begin
        checks += 2;
        if (int'($signed(z[k])) != exp_z[0]) begin
          failures++; $display("result %0d neuron %0d: z=%0d expected %0d", results, k, $signed(z[k]), exp_z[0]);
        end
        if (int'($signed(y[k])) != exp_y[0]) begin
          failures++; $display("result %0d neuron %0d: y=%0d expected %0d", results, k, $signed(y[k]), exp_y[0]);
        end
        void'(exp_z.pop_front()); void'(exp_y.pop_front());
      end
    end
  end

  initial begin
    c1 = 0; c2 = 0; wr1_n = 1; wr2_n = 1; ld_addr = '0; ld_data = '0;
    in_valid = 0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    for (int k = 0; k < K; k++) begin
      s_sum[k] = 0;
      for (int j = 0; j < N; j++) begin
        w[k][j] = $urandom_range(0, 63) - 32;
        s_sum[k] += w[k][j];
      end
    end
    c1 = 1;
    for (int k = 0; k < K; k++) begin
      for (int a = 0; a < 2**N; a++) begin
        int pm;
        pm = 0;
        for (int j = 0; j < N; j++) if (a[j]) pm += w[k][j];
        wr1_n = 0; ld_addr = {1'(k), TAW'(a)}; ld_data = LDW'(pm);
        @(negedge clk);
      end
      for (int a = 0; a < 2**ZW; a++) begin
        wr1_n = 1; wr2_n = 0; ld_addr = {1'(k), TAW'(a)};
        ld_data = LDW'(act(k, int'($signed(ZW'(a))) - s_sum[k]));
        @(negedge clk);
      end
      wr2_n = 1;
    end
    @(negedge clk);
    c1 = 0; c2 = 1;
    for (int b = 0; b < 400; b++) begin
      for (int j = 0; j < N; j++) x[j] = XW'($urandom);
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        for (int k = 0; k < K; k++) begin
          int acc, zt;
          acc = 0;
          for (int j = 0; j < N; j++) acc += w[k][j] * int'($signed(x[j]));
          zt = acc >>> (XW - 1);
          exp_z.push_back(int'($signed(ZW'(zt + s_sum[k]))));
          exp_y.push_back(act(k, zt));
        end
        exp_c.push_back(cycle + XW + 2);
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (XW + 4) @(negedge clk);
    checks++;
    if (results != sent) begin failures++; $display("results %0d of %0d", results, sent); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
