// Self-checking testbench for otp_mask: with the reset mask the data passes
// unchanged; after a mask is loaded every word is XORed with it, one clock
// later; masking twice with the same mask restores the data.
module tb_otp_mask;
  localparam int unsigned W = 12;

  logic clk = 1'b0, rst_n = 1'b0;
  logic mask_load, in_valid, out_valid;
  logic [W-1:0] mask_in, in_data, out_data;
  logic [W-1:0] m;
  int checks = 0, failures = 0;

  otp_mask #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    mask_load = 0; mask_in = '0; in_valid = 0; in_data = '0; m = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      logic [W-1:0] d;
      logic v;
      if (t % 150 == 50) begin
        mask_load = 1; mask_in = W'($urandom);
        @(negedge clk);
        m = mask_in; mask_load = 0;
      end
      d = W'($urandom); v = ($urandom_range(0, 3) != 0);
      in_data = d; in_valid = v;
      @(negedge clk);
      checks++;
      if (out_valid !== v) begin failures++; $display("valid wrong at %0d", t); end
      if (v) begin
        checks++;
        if (out_data !== (d ^ m)) begin failures++; $display("data wrong at %0d", t); end
        checks++;
        if ((out_data ^ m) !== d) begin failures++; $display("unmask wrong at %0d", t); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
