// Self-checking testbench for psne_table_ram: fills every word with random
// data through the write port, then reads random addresses (and re-writes some
// words) and compares with a shadow copy kept by the testbench.  Also checks
// that the read port is combinational (data visible in the cycle after the
// write edge, without another clock).
module tb_psne_table_ram;
  localparam int unsigned AW = 8;
  localparam int unsigned DW = 11;

  logic          clk = 1'b0;
  logic          we;
  logic [AW-1:0] waddr, raddr;
  logic [DW-1:0] wdata, rdata;
  logic [DW-1:0] shadow [2**AW];
  int checks = 0, failures = 0;

  psne_table_ram #(.AW(AW), .DW(DW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_read(input logic [AW-1:0] a);
    raddr = a;
    #1;
    checks++;
    if (rdata !== shadow[a]) begin
      failures++;
      $display("read mismatch at %0d: got %0h expected %0h", a, rdata, shadow[a]);
    end
  endtask

  initial begin
    we = 0; waddr = '0; wdata = '0; raddr = '0;
    @(negedge clk);
    for (int a = 0; a < 2**AW; a++) begin
      we = 1; waddr = AW'(a); wdata = DW'($urandom); shadow[a] = wdata;
      @(negedge clk);
    end
    we = 0;
    for (int a = 0; a < 2**AW; a++) check_read(AW'(a));
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      if ($urandom_range(0, 2) == 0) begin
        we = 1; waddr = AW'($urandom); wdata = DW'($urandom);
        @(posedge clk); shadow[waddr] = wdata; #1;
        we = 0;
        check_read(waddr);           // written word is visible right away
      end
      check_read(AW'($urandom));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
