// Self-checking testbench for psne_p2s_sub: blocks of K results arrive every K
// clocks (back to back) or with idle gaps between them; each must leave as K
// consecutive words, in neuron order, equal to RgY_k - S_k, starting the cycle
// after the block is presented.
module tb_psne_p2s_sub;
  localparam int unsigned K  = 4;
  localparam int unsigned ZW = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [K-1:0][ZW-1:0] in_z, sub_s;
  logic [ZW-1:0] out_data;
  logic [ZW-1:0] expq [$];
  int checks = 0, failures = 0, words = 0, cycle = 0, exp_words = 0;

  psne_p2s_sub #(.K(K), .ZW(ZW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      words++;
      checks++;
      if (expq.size() == 0 || out_data !== expq[0]) begin
        failures++;
        $display("word %0d: got %0d", words, $signed(out_data));
      end
      if (expq.size() != 0) void'(expq.pop_front());
    end
  end

  initial begin
    in_valid = 0; in_z = '0;
    for (int k = 0; k < K; k++) sub_s[k] = ZW'($urandom_range(0, 1000) - 500);
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int b = 0; b < 60; b++) begin
      for (int k = 0; k < K; k++) begin
        in_z[k] = ZW'($urandom_range(0, 3000) - 1500);
        expq.push_back(ZW'($signed(in_z[k]) - $signed(sub_s[k])));
      end
      exp_words += K;
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      // first word must be on the output now
      checks++;
      if (!out_valid) begin failures++; $display("block %0d: no output in next cycle", b); end
      repeat (K - 1) @(negedge clk);
      if (b >= 30) repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    repeat (K + 2) @(negedge clk);
    checks++;
    if (words != exp_words) begin failures++; $display("word count %0d of %0d", words, exp_words); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
