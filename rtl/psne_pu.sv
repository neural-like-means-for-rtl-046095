// Processing unit (PU) of the parallel-streaming neural-like element.
//
// A scalar product Z = sum_j W_j * X_j is computed one operand bit position per
// PU, least significant bit first.  This PU looks at bit BIT of all N operands;
// those N bits, taken together, address a table holding the macro-partial
// product P_M = sum of the W_j whose operand bit is 1 (2^N words, written
// before operation).  The PU then forms the recurrence
//
//     Z_i = Z_{i-1} / 2 + P_M        (Z_0 = 0)
//
// where the halving is an arithmetic right shift, so the result leaving the
// last PU is floor(sum_j W_j * U_j / 2^(n-1)) for unsigned n-bit operands U_j.
// The operands are passed on unchanged (the pipeline's buffer memory), so the
// PU of the next bit finds them one clock later.
//
// K neurons may share one PU: they see the same operands and address, and each
// has its own table and adder.  K = 1 is the single neural element; K = N is
// the network, where every neuron of the layer rides the same pipeline.
//
// Timing: one clock per PU; the critical path is register -> table read ->
// adder -> register, as in the architecture.  Data is taken when in_valid and
// c2 (operand registers enabled) are both high.  Writes to the tables use the
// we/wsel/waddr/wdata port, which is driven from the shared load registers.
module psne_pu
  import psne_pkg::*;
#(
  parameter int unsigned N   = psne_pkg::N_INPUTS,
  parameter int unsigned K   = 1,
  parameter int unsigned XW  = psne_pkg::DATA_BITS,
  parameter int unsigned BIT = 0,
  parameter int unsigned PMW = pm_width(psne_pkg::WEIGHT_BITS, psne_pkg::N_INPUTS),
  parameter int unsigned ZW  = PMW + 1,
  localparam int unsigned KIW = idx_width(K)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   c2,        // 1: operand registers active (run mode)
  // table write port
  input  logic                   we,
  input  logic [KIW-1:0]         wsel,      // neuron whose table is written
  input  logic [N-1:0]           waddr,
  input  logic [PMW-1:0]         wdata,
  // pipeline input (from the previous PU or the input registers)
  input  logic                   in_valid,
  input  logic [N-1:0][XW-1:0]   in_x,
  input  logic [K-1:0][ZW-1:0]   in_z,
  // pipeline output (registers of this PU)
  output logic                   out_valid,
  output logic [N-1:0][XW-1:0]   out_x,
  output logic [K-1:0][ZW-1:0]   out_z
);

  logic [N-1:0]          addr;
  logic [K-1:0][PMW-1:0] pm;
  logic [K-1:0][ZW-1:0]  z_next;

  // Bit BIT of every operand forms the table address.
  always_comb begin
    for (int j = 0; j < N; j++) addr[j] = in_x[j][BIT];
  end

  for (genvar k = 0; k < K; k++) begin : g_neuron
    psne_table_ram #(.AW(N), .DW(PMW)) u_pm (
      .clk   (clk),
      .we    (we && (wsel == KIW'(k))),
      .waddr (waddr),
      .wdata (wdata),
      .raddr (addr),
      .rdata (pm[k])
    );

    always_comb begin
      z_next[k] = ZW'(($signed(in_z[k]) >>> 1) + ZW'($signed(pm[k])));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_x     <= '0;
      out_z     <= '0;
    end else begin
      out_valid <= in_valid && c2;
      if (in_valid && c2) begin
        out_x <= in_x;
        out_z <= z_next;
      end
    end
  end

endmodule
