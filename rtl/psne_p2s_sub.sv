// Output registers RgY1..RgYK and subtractor Sub of the parallel-stream
// network: parallel-to-serial conversion of the K scalar products and forming
// of the output stream.
//
// When in_valid is high, the K results of the last processing unit (the
// registers RgZ1..RgZK) are copied into RgY1..RgYK.  They then leave one per
// clock, in neuron order, each reduced by its neuron's subtrahend S_k:
// out_data = RgY_k - S_k.  In this design the pipeline works on offset-binary
// operands, and S_k = sum_j W_kj removes the offset, so the output is the
// signed scalar product (see psne_network).  That role of the subtractor is
// this design's reading; the architecture shows the subtractor at the output
// but does not say what it subtracts.
//
// Timing: out_valid is high for K consecutive cycles starting the cycle after
// in_valid.  A new block must not arrive earlier than K clocks after the
// previous one; the network guarantees this because its input converter
// delivers one block per K words.  An assertion checks it.
module psne_p2s_sub
  import psne_pkg::*;
#(
  parameter int unsigned K  = psne_pkg::N_INPUTS,
  parameter int unsigned ZW = acc_width(psne_pkg::WEIGHT_BITS, psne_pkg::N_INPUTS),
  localparam int unsigned CW = idx_width(K)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [K-1:0][ZW-1:0] in_z,
  input  logic [K-1:0][ZW-1:0] sub_s,    // subtrahends S_1..S_K
  output logic                 out_valid,
  output logic [ZW-1:0]        out_data
);

  logic [K-1:0][ZW-1:0] rg_y;
  logic [CW-1:0]        idx;
  logic                 busy;
  logic                 c3;              // parallel load of RgY

  assign c3 = in_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rg_y <= '0;
      idx  <= '0;
      busy <= 1'b0;
    end else if (c3) begin
      rg_y <= in_z;
      idx  <= '0;
      busy <= 1'b1;
    end else if (busy) begin
      idx  <= (idx == CW'(K - 1)) ? '0 : idx + 1'b1;
      busy <= (idx != CW'(K - 1));
    end
  end

  assign out_valid = busy;
  assign out_data  = ZW'($signed(rg_y[idx]) - $signed(sub_s[idx]));

  // A block may only be loaded when the previous one has been sent (or is
  // sending its last word in this cycle).
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> (!busy || idx == CW'(K - 1)));

endmodule
