// Self-checking testbench for psne_pu with two neurons sharing the unit.
// Random tables are written for both neurons; random operands and previous
// partial results are then applied, and the registered outputs are compared
// with Z_i = floor(Z_{i-1} / 2) + P_M[address], where the address is bit BIT of
// every operand.  c2 = 0 must hold the registers and drop out_valid.
module tb_psne_pu;
  localparam int unsigned N   = 4;
  localparam int unsigned K   = 2;
  localparam int unsigned XW  = 6;
  localparam int unsigned BIT = 2;
  localparam int unsigned PMW = 9;
  localparam int unsigned ZW  = 10;

  logic clk = 1'b0, rst_n = 1'b0;
  logic c2, we, wsel;
  logic [N-1:0] waddr;
  logic [PMW-1:0] wdata;
  logic in_valid, out_valid;
  logic [N-1:0][XW-1:0] in_x, out_x;
  logic [K-1:0][ZW-1:0] in_z, out_z;
  logic [PMW-1:0] tbl [K][2**N];
  int checks = 0, failures = 0;

  psne_pu #(.N(N), .K(K), .XW(XW), .BIT(BIT), .PMW(PMW), .ZW(ZW)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [ZW-1:0] model(input logic [N-1:0][XW-1:0] x,
                                          input logic [ZW-1:0] z, input int k);
    logic [N-1:0] a;
    int zi, pm;
    for (int j = 0; j < N; j++) a[j] = x[j][BIT];
    zi = int'($signed(z));
    pm = int'($signed(tbl[k][a]));
    return ZW'((zi >>> 1) + pm);
  endfunction

  initial begin
    logic [N-1:0][XW-1:0] xs;
    logic [K-1:0][ZW-1:0] zs;
    c2 = 0; we = 0; wsel = 0; waddr = '0; wdata = '0;
    in_valid = 0; in_x = '0; in_z = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < K; k++) begin
      for (int a = 0; a < 2**N; a++) begin
        we = 1; wsel = 1'(k); waddr = N'(a); wdata = PMW'($urandom);
        tbl[k][a] = wdata;
        @(negedge clk);
      end
    end
    we = 0;
    c2 = 1;
    for (int t = 0; t < 400; t++) begin
      xs = {N{XW'($urandom)}};
      for (int j = 0; j < N; j++) xs[j] = XW'($urandom);
      for (int k = 0; k < K; k++) zs[k] = ZW'($urandom);
      in_x = xs; in_z = zs;
      in_valid = ($urandom_range(0, 3) != 0);
      c2 = (t < 350) ? 1'b1 : ($urandom_range(0, 1) == 1);
      @(posedge clk); #1;
      checks++;
      if (out_valid !== (in_valid && c2)) begin
        failures++; $display("out_valid wrong at t=%0d", t);
      end
      if (in_valid && c2) begin
        for (int k = 0; k < K; k++) begin
          checks++;
          if (out_z[k] !== model(xs, zs[k], k)) begin
            failures++;
            $display("t=%0d neuron %0d: z=%0d expected %0d", t, k,
                     $signed(out_z[k]), $signed(model(xs, zs[k], k)));
          end
        end
        checks++;
        if (out_x !== xs) begin failures++; $display("operands not passed on"); end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
