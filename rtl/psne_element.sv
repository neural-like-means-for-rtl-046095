// Parallel-streaming neural-like element: Y = f_a( sum_{j=1..N} W_j * X_j ).
//
// N operands of n = XW bits arrive together, as parallel two's-complement
// words, and are latched in the input registers Rg_X1..Rg_XN.  A chain of XW
// identical processing units (psne_pu) then builds the scalar product one bit
// position per clock, least significant bit first, from tables of
// macro-partial products (RAM P_M, one per PU, all with the same contents).
// The result addresses the activation table RAM f_a, whose output is the
// element's output Y.
//
// K neurons may share the element's operand pipeline (each with its own
// tables and adders): K = 1 is the single element, K = N the layer of the
// network built on it (psne_network).  With USE_FA = 0 the activation is the
// identity (no f_a table; y is z cut to YW bits), which is what the linear
// neurons of the encryption network need.
//
// Signed operands: every PU adds, so the pipeline treats its operands as
// unsigned.  The input register inverts each operand's sign bit, which turns
// the two's-complement value X into U = X + 2^(n-1).  The pipeline therefore
// delivers Z' = floor(sum W_j X_j / 2^(n-1)) + S with S = sum_j W_j.  The
// activation table, addressed by Z' read as a ZW-bit two's-complement number,
// is written with f(Z' - S), so no separate correction is needed; without the
// table, the network's subtractor removes S.  This handling of the sign bit is
// this design's choice; the architecture keeps all PUs identical but does not
// say how the sign bit's weight is applied.
//
// Loading (before operation): with c1 = 1 the load registers RgA and RgD
// capture ld_addr = {neuron, table address} and ld_data every clock.  With
// wr1_n = 0 the word then held in RgD is written, one clock later, at address
// RgA of that neuron's RAM P_M in all PUs at once; with wr2_n = 0 it is
// written into the neuron's RAM f_a.  Address k-1 receives the k-th
// macro-partial product; the P_M word at address a is the sum of the W_j whose
// bit j-1 of a is 1.  During loading c2 = 0 keeps the operand registers idle.
// For operation set c1 = 0, wr1_n = wr2_n = 1 and c2 = 1.
//
// Timing: one block of N operands can be taken every clock.  y/z appear
// XW + 2 clocks after the clock edge that takes x (input register, XW PUs,
// output register), with out_valid high for that one cycle.
module psne_element
  import psne_pkg::*;
#(
  parameter int unsigned N  = psne_pkg::N_INPUTS,
  parameter int unsigned XW = psne_pkg::DATA_BITS,
  parameter int unsigned WW = psne_pkg::WEIGHT_BITS,
  parameter int unsigned YW = psne_pkg::DATA_BITS,
  parameter int unsigned K  = 1,
  parameter bit          USE_FA = 1'b1,
  localparam int unsigned PMW = pm_width(WW, N),
  localparam int unsigned ZW  = PMW + 1,
  localparam int unsigned KIW = idx_width(K),
  localparam int unsigned TAW = (USE_FA && ZW > N) ? ZW : N,
  localparam int unsigned LAW = KIW + TAW,
  localparam int unsigned LDW = (USE_FA && YW > PMW) ? YW : PMW
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // control and load interface
  input  logic                 c1,      // 1: load registers RgA/RgD active
  input  logic                 c2,      // 1: operand registers active
  input  logic                 wr1_n,   // 0: write RAM P_M
  input  logic                 wr2_n,   // 0: write RAM f_a
  input  logic [LAW-1:0]       ld_addr, // {neuron, table address}
  input  logic [LDW-1:0]       ld_data,
  // data path
  input  logic                 in_valid,
  input  logic [N-1:0][XW-1:0] x,
  output logic                 out_valid,
  output logic [K-1:0][YW-1:0] y,
  output logic [K-1:0][ZW-1:0] z        // Z' = Z + S, the f_a address of y
);

  // ---------------- load registers ----------------
  logic [LAW-1:0] rg_a;
  logic [LDW-1:0] rg_d;
  logic           wr_pm_q, wr_fa_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg_a    <= '0;
      rg_d    <= '0;
      wr_pm_q <= 1'b0;
      wr_fa_q <= 1'b0;
    end else begin
      wr_pm_q <= c1 && !wr1_n;
      wr_fa_q <= c1 && !wr2_n;
      if (c1) begin
        rg_a <= ld_addr;
        rg_d <= ld_data;
      end
    end
  end

  // ---------------- input registers Rg_X ----------------
  logic                 x_valid;
  logic [N-1:0][XW-1:0] x_reg;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_valid <= 1'b0;
      x_reg   <= '0;
    end else begin
      x_valid <= in_valid && c2;
      if (in_valid && c2) begin
        for (int j = 0; j < N; j++) x_reg[j] <= x[j] ^ (XW'(1) << (XW - 1));
      end
    end
  end

  // ---------------- PU pipeline ----------------
  logic [XW:0]                    v;
  logic [XW:0][N-1:0][XW-1:0]     xs;
  logic [XW:0][K-1:0][ZW-1:0]     zs;

  assign v[0]  = x_valid;
  assign xs[0] = x_reg;
  assign zs[0] = '0;

  for (genvar i = 0; i < XW; i++) begin : g_pu
    psne_pu #(.N(N), .K(K), .XW(XW), .BIT(i), .PMW(PMW), .ZW(ZW)) u_pu (
      .clk       (clk),
      .rst_n     (rst_n),
      .c2        (c2),
      .we        (wr_pm_q),
      .wsel      (rg_a[LAW-1:TAW]),
      .waddr     (rg_a[N-1:0]),
      .wdata     (rg_d[PMW-1:0]),
      .in_valid  (v[i]),
      .in_x      (xs[i]),
      .in_z      (zs[i]),
      .out_valid (v[i+1]),
      .out_x     (xs[i+1]),
      .out_z     (zs[i+1])
    );
  end

  // ---------------- activation table RAM f_a ----------------
  logic [K-1:0][YW-1:0] fa;

  for (genvar k = 0; k < K; k++) begin : g_act
    if (USE_FA) begin : g_table
      psne_table_ram #(.AW(ZW), .DW(YW)) u_fa (
        .clk   (clk),
        .we    (wr_fa_q && (rg_a[LAW-1:TAW] == KIW'(k))),
        .waddr (rg_a[ZW-1:0]),
        .wdata (rg_d[YW-1:0]),
        .raddr (zs[XW][k]),
        .rdata (fa[k])
      );
    end else begin : g_linear
      assign fa[k] = YW'($signed(zs[XW][k]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      y         <= '0;
      z         <= '0;
    end else begin
      out_valid <= v[XW];
      if (v[XW]) begin
        y <= fa;
        z <= zs[XW];
      end
    end
  end

endmodule
