// Self-checking testbench for psne_s2p: a random word stream, with random
// gaps and with long back-to-back runs, must come out as blocks of N words in
// arrival order, one out_valid pulse per block, one cycle after the N-th word.
module tb_psne_s2p;
  localparam int unsigned N  = 4;
  localparam int unsigned XW = 8;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid, out_valid;
  logic [XW-1:0] in_data;
  logic [N-1:0][XW-1:0] out_x;
  logic [XW-1:0] sent [$];
  int checks = 0, failures = 0, blocks = 0, back_to_back = 0;
  int last_word_cycle = -10, cycle = 0;

  psne_s2p #(.N(N), .XW(XW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Monitor: compare every block with the words sent.
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      blocks++;
      checks++;
      if (cycle != last_word_cycle + 1) begin
        failures++; $display("block %0d late: cycle %0d, last word %0d", blocks, cycle, last_word_cycle);
      end
      for (int j = 0; j < N; j++) begin
        checks++;
        if (sent.size() == 0 || out_x[j] !== sent[0]) begin
          failures++; $display("block %0d word %0d wrong", blocks, j);
        end
        if (sent.size() != 0) void'(sent.pop_front());
      end
      if (in_valid) back_to_back++;
    end
  end

  initial begin
    int n_sent;
    n_sent = 0;
    in_valid = 0; in_data = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      in_valid = (t < 200) ? 1'b1 : ($urandom_range(0, 2) != 0);
      in_data  = XW'($urandom);
      @(posedge clk);
      if (in_valid) begin
        sent.push_back(in_data);
        n_sent++;
        if (n_sent % N == 0) last_word_cycle = cycle;
      end
      @(negedge clk);
    end
    in_valid = 0;
    repeat (4) @(negedge clk);
    checks++;
    if (blocks != n_sent / N) begin failures++; $display("block count %0d", blocks); end
    checks++;
    if (back_to_back == 0) begin failures++; $display("no back-to-back blocks seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
