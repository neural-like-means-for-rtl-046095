// Parallel-stream neural network for stream encryption (and, loaded with the
// reverse transformation, decryption): one layer of N linear neurons, each
// with N inputs, built around one pipeline of XW processing units.
//
// Data path, in stream order:
//   in_data (one XW-bit two's-complement word per clock)
//   -> RgIn1..RgInN (psne_s2p): every N words form one block X_1..X_N
//   -> the neural-like element (psne_element with K = N neurons and a linear
//      activation): its operand registers invert the sign bits (offset binary,
//      U_j = X_j + 2^(XW-1)); PU_1..PU_XW each hold one macro-partial-product
//      table per neuron and apply Z_i = Z_{i-1}/2 + P_M for one bit position,
//      LSB first, all neurons sharing the operand pipeline; the element's
//      output registers are RgZ1..RgZN
//   -> RgY1..RgYN and Sub (psne_p2s_sub): the N results leave one per clock
//      as out_data_k = Z'_k - S_k.
// With S_k = sum_j W_kj, out_data_k = floor(sum_j W_kj * X_j / 2^(XW-1)): the
// weights are read as fixed-point numbers with XW-1 fraction bits of the
// operand scale, and the result is truncated toward minus infinity.
//
// Key loading (c1 = 1, c2 = 0): ld_addr = {neuron k, table address a},
// ld_data = sum of W_kj over the bits j set in a.  With wr1_n = 0 the word is
// written, one clock after it is presented, into the table of neuron k in all
// PUs at once.  When the all-ones address is written, the word (which then
// equals sum_j W_kj) is also kept as neuron k's subtrahend S_k.  For operation
// set c1 = 0, wr1_n = 1, c2 = 1.  With c2 = 0 no input is accepted.
//
// Timing: throughput one word per clock with no stall.  The k-th result of a
// block (k = 0..N-1) leaves XW + 4 + k clocks after the clock edge that stores
// the block's last input word.  Output words have ZW = WW + log2(N) + 1 bits.
//
// Taking the subtrahend from the table write is this design's choice, as is the
// offset-binary treatment of the sign bit; the third control input of the
// original structure is generated inside psne_p2s_sub as the block strobe.
module psne_network
  import psne_pkg::*;
#(
  parameter int unsigned N  = psne_pkg::N_INPUTS,
  parameter int unsigned XW = psne_pkg::DATA_BITS,
  parameter int unsigned WW = psne_pkg::WEIGHT_BITS,
  localparam int unsigned PMW = pm_width(WW, N),
  localparam int unsigned ZW  = PMW + 1,
  localparam int unsigned KIW = idx_width(N)
) (
  input  logic               clk,
  input  logic               rst_n,
  // control and key-load interface
  input  logic               c1,        // 1: load registers RgA/RgD active
  input  logic               c2,        // 1: operand registers active (run)
  input  logic               wr1_n,     // 0: write RAM P_M
  input  logic [KIW+N-1:0]   ld_addr,   // {neuron, table address}
  input  logic [PMW-1:0]     ld_data,
  // data stream
  input  logic               in_valid,
  input  logic [XW-1:0]      in_data,
  output logic               out_valid,
  output logic [ZW-1:0]      out_data
);

  // ---------------- subtrahends S_k ----------------
  // Kept when the all-ones table word of neuron k (= sum_j W_kj) is loaded.
  logic [N-1:0][ZW-1:0] sub_s;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sub_s <= '0;
    end else if (c1 && !wr1_n && (ld_addr[N-1:0] == '1)) begin
      for (int k = 0; k < N; k++) begin
        if (ld_addr[KIW+N-1:N] == KIW'(k)) sub_s[k] <= ZW'($signed(ld_data));
      end
    end
  end

  // ---------------- serial-to-parallel input ----------------
  logic                 blk_valid;
  logic [N-1:0][XW-1:0] blk_x;

  psne_s2p #(.N(N), .XW(XW)) u_in (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid && c2),
    .in_data   (in_data),
    .out_valid (blk_valid),
    .out_x     (blk_x)
  );

  // ---------------- N linear neurons on one PU pipeline ----------------
  logic                 z_valid;
  logic [N-1:0][ZW-1:0] z_lin, z_fa;

  psne_element #(.N(N), .XW(XW), .WW(WW), .YW(ZW), .K(N), .USE_FA(1'b0)) u_layer (
    .clk       (clk),
    .rst_n     (rst_n),
    .c1        (c1),
    .c2        (c2),
    .wr1_n     (wr1_n),
    .wr2_n     (1'b1),
    .ld_addr   (ld_addr),
    .ld_data   (ld_data),
    .in_valid  (blk_valid),
    .x         (blk_x),
    .out_valid (z_valid),
    .y         (z_lin),
    .z         (z_fa)
  );

  // ---------------- parallel-to-serial output and subtractor ----------------
  psne_p2s_sub #(.K(N), .ZW(ZW)) u_out (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (z_valid),
    .in_z      (z_lin),
    .sub_s     (sub_s),
    .out_valid (out_valid),
    .out_data  (out_data)
  );

endmodule
