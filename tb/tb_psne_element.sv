// Self-checking testbench for psne_element at its default size (N = 8 inputs,
// 8-bit operands and weights).  For each of two keys (random weights, then the
// extreme weight -128 everywhere) it writes the 2^N macro-partial products and
// the activation table f(z) = sat8(z >>> 2), streams random operand blocks
// (with idle gaps, and including all-extreme operands), and compares z and y
// with the scalar product worked out here:
//   Z = floor(sum_j W_j * X_j / 2^7),  z = Z + sum_j W_j,  y = f(Z).
// Every result must appear exactly XW + 2 clocks after its operands.
module tb_psne_element;
  localparam int unsigned N = 8, XW = 8, WW = 8, YW = 8;
  localparam int unsigned PMW = 11, ZW = 12, LAW = 13, LDW = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c1, c2, wr1_n, wr2_n;
  logic [LAW-1:0] ld_addr;
  logic [LDW-1:0] ld_data;
  logic in_valid, out_valid;
  logic [N-1:0][XW-1:0] x;
  logic [YW-1:0] y;
  logic [ZW-1:0] z;

  int w [N];
  int s_sum;
  int checks = 0, failures = 0, cycle = 0, results = 0, sent = 0;
  int exp_z [$], exp_y [$], exp_c [$];

  psne_element #(.N(N), .XW(XW), .WW(WW), .YW(YW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int act(input int zz);
    int t;
    t = zz >>> 2;
    if (t > 127) t = 127;
    if (t < -128) t = -128;
    return t;
  endfunction

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      results++;
      checks += 3;
      if (exp_z.size() == 0) begin
        failures += 3; $display("unexpected result");
      end else begin
        if (int'($signed(z)) != exp_z[0]) begin
          failures++; $display("result %0d: z=%0d expected %0d", results, $signed(z), exp_z[0]);
        end
        if (int'($signed(y)) != exp_y[0]) begin
          failures++; $display("result %0d: y=%0d expected %0d", results, $signed(y), exp_y[0]);
        end
        if (cycle != exp_c[0]) begin
          failures++; $display("result %0d at cycle %0d expected %0d", results, cycle, exp_c[0]);
        end
        void'(exp_z.pop_front()); void'(exp_y.pop_front()); void'(exp_c.pop_front());
      end
    end
  end

  task automatic load_key(input bit extreme);
    s_sum = 0;
    for (int j = 0; j < N; j++) begin
      w[j] = extreme ? -128 : $urandom_range(0, 255) - 128;
      s_sum += w[j];
    end
    c2 = 0; c1 = 1;
    for (int a = 0; a < 2**N; a++) begin
      int pm;
      pm = 0;
      for (int j = 0; j < N; j++) if (a[j]) pm += w[j];
      wr1_n = 0; wr2_n = 1; ld_addr = LAW'(a); ld_data = LDW'(pm);
      @(negedge clk);
    end
    for (int a = 0; a < 2**ZW; a++) begin
      int zs;
      zs = int'($signed(ZW'(a)));
      wr1_n = 1; wr2_n = 0; ld_addr = LAW'(a); ld_data = LDW'(act(zs - s_sum));
      @(negedge clk);
    end
    wr1_n = 1; wr2_n = 1;
    @(negedge clk);
    c1 = 0; c2 = 1;
  endtask

  task automatic stream(input int nblk, input bit extreme);
    for (int b = 0; b < nblk; b++) begin
      longint acc;
      int zt;
      acc = 0;
      for (int j = 0; j < N; j++) begin
        x[j] = extreme ? XW'((b % 2) ? 8'h80 : 8'h7f) : XW'($urandom);
        acc += longint'(w[j]) * longint'($signed(x[j]));
      end
      zt = int'(acc >>> (XW - 1));
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        exp_z.push_back(int'($signed(ZW'(zt + s_sum))));
        exp_y.push_back(act(zt));
        exp_c.push_back(cycle + XW + 2);
        sent++;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (XW + 4) @(negedge clk);
  endtask

  initial begin
    c1 = 0; c2 = 0; wr1_n = 1; wr2_n = 1; ld_addr = '0; ld_data = '0;
    in_valid = 0; x = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    load_key(0);
    stream(300, 0);
    stream(20, 1);
    load_key(1);
    stream(40, 1);
    stream(100, 0);
    checks++;
    if (results != sent || exp_z.size() != 0) begin
      failures++; $display("results %0d of %0d", results, sent);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
