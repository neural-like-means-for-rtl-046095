// Real-time stream cipher built from parallel-stream neural networks, with
// STAGES encryption blocks in cascade (default 1).
//
// Encryption module, h = F(X, key):  the plaintext stream (XW-bit words) passes
// through a psne_network that applies the forward linear transformation with
// weight matrix W (N x N).  The hidden-layer output words are XOR-masked with
// the mask part of the key (otp_mask).  With STAGES > 1 the masked words of
// stage s are the operands of stage s + 1, which has its own weights and mask.
// The last stage's output is the ciphertext stream cipher_data.
//
// Decryption module, X~ = F'(h, key):  the stages are undone in reverse order.
// Each stage unmasks with its mask and passes the words through a psne_network
// loaded with the reverse transformation.  Its operands are as wide as that
// stage's ciphertext words, so it has that many processing units and weights
// of that width.  Between decryption stages, the recovered words are cut back
// to the operand width of the encryption stage they came from.  The output of
// the last decryption stage (ZD bits) is the recovered data.
//
// A key whose reverse weight matrices undo the forward ones within the
// fixed-point format recovers the plaintext exactly.  One example is a signed
// permutation of scale -2^(w-1) for every stage, with w the operand width of
// that network.
//
// Widths at the defaults (N = 8, XW = WW = 8, STAGES = 1): 12-bit ciphertext,
// 16-bit recovered words.  Stage s > 0 of the cascade takes operands and
// weights of 8 + 4s bits and gives 12 + 4s bits (psne_pkg::stage_*).
//
// Key loading: each side has one load port.  enc_stage / dec_stage selects the
// stage that c1 and wr1_n address (see psne_network for the protocol) and that
// a mask_load pulse loads.  The decryption side reads either the local
// ciphertext (loopback = 1) or an external stream (ext_cipher_*), so the two
// modules can also be used at the two ends of a channel.
//
// Using the same network structure for decryption, with wider operands, is
// this design's choice: only the encrypting structure is given in detail, and
// the cascade is described only as a possibility.
//
// Timing: one word per clock in and out on both sides, no stall.  With
// STAGES = 1, the first ciphertext word of a block comes XW + 5 clocks after
// the block's last plaintext word (network XW + 4, mask 1).  Each stage adds N
// clocks to gather a block plus its own pipeline.
module nl_crypto_top
  import psne_pkg::*;
#(
  parameter int unsigned N      = psne_pkg::N_INPUTS,
  parameter int unsigned XW     = psne_pkg::DATA_BITS,
  parameter int unsigned WW     = psne_pkg::WEIGHT_BITS,
  parameter int unsigned STAGES = 1,
  localparam int unsigned SIW = idx_width(STAGES),
  localparam int unsigned KIW = idx_width(N),
  localparam int unsigned ZE  = stage_zw(STAGES - 1, XW, WW, N),  // ciphertext width
  localparam int unsigned PME = pm_width(stage_ww(STAGES - 1, XW, WW, N), N),
  localparam int unsigned PMD = pm_width(ZE, N),
  localparam int unsigned ZD  = acc_width(stage_zw(0, XW, WW, N), N)  // recovered width
) (
  input  logic             clk,
  input  logic             rst_n,
  // encryption key and control
  input  logic [SIW-1:0]   enc_stage,
  input  logic             enc_c1,
  input  logic             enc_c2,
  input  logic             enc_wr1_n,
  input  logic [KIW+N-1:0] enc_ld_addr,
  input  logic [PME-1:0]   enc_ld_data,
  input  logic             enc_mask_load,
  input  logic [ZE-1:0]    enc_mask,
  // decryption key and control
  input  logic [SIW-1:0]   dec_stage,
  input  logic             dec_c1,
  input  logic             dec_c2,
  input  logic             dec_wr1_n,
  input  logic [KIW+N-1:0] dec_ld_addr,
  input  logic [PMD-1:0]   dec_ld_data,
  input  logic             dec_mask_load,
  input  logic [ZE-1:0]    dec_mask,
  // plaintext in, ciphertext out
  input  logic             plain_valid,
  input  logic [XW-1:0]    plain_data,
  output logic             cipher_valid,
  output logic [ZE-1:0]    cipher_data,
  // ciphertext source of the decryption module
  input  logic             loopback,
  input  logic             ext_cipher_valid,
  input  logic [ZE-1:0]    ext_cipher_data,
  // recovered data
  output logic             rec_valid,
  output logic [ZD-1:0]    rec_data
);

  // Stream between stages, in the widest format used anywhere.
  localparam int unsigned SW = (ZD > ZE) ? ZD : ZE;

  // ---------------- encryption module ----------------
  logic [STAGES:0]         ev;
  logic [STAGES:0][SW-1:0] ed;

  assign ev[0] = plain_valid;
  assign ed[0] = SW'(plain_data);

  for (genvar s = 0; s < STAGES; s++) begin : g_enc
    localparam int unsigned SXW = stage_xw(s, XW, WW, N);
    localparam int unsigned SWW = stage_ww(s, XW, WW, N);
    localparam int unsigned SZW = stage_zw(s, XW, WW, N);
    localparam int unsigned SPM = pm_width(SWW, N);

    logic           sel, h_valid, m_valid;
    logic [SZW-1:0] h_data,  m_data;

    assign sel = (enc_stage == SIW'(s));

    psne_network #(.N(N), .XW(SXW), .WW(SWW)) u_net (
      .clk       (clk),
      .rst_n     (rst_n),
      .c1        (enc_c1 && sel),
      .c2        (enc_c2),
      .wr1_n     (enc_wr1_n || !sel),
      .ld_addr   (enc_ld_addr),
      .ld_data   (enc_ld_data[SPM-1:0]),
      .in_valid  (ev[s]),
      .in_data   (ed[s][SXW-1:0]),
      .out_valid (h_valid),
      .out_data  (h_data)
    );

    otp_mask #(.W(SZW)) u_mask (
      .clk       (clk),
      .rst_n     (rst_n),
      .mask_load (enc_mask_load && sel),
      .mask_in   (enc_mask[SZW-1:0]),
      .in_valid  (h_valid),
      .in_data   (h_data),
      .out_valid (m_valid),
      .out_data  (m_data)
    );

    assign ev[s+1] = m_valid;
    assign ed[s+1] = SW'(m_data);
  end

  assign cipher_valid = ev[STAGES];
  assign cipher_data  = ed[STAGES][ZE-1:0];

  // ---------------- decryption module ----------------
  // dv/dd[s+1] enter the stage that undoes encryption stage s; dv/dd[s]
  // leave it.
  logic [STAGES:0]         dv;
  logic [STAGES:0][SW-1:0] dd;

  assign dv[STAGES] = loopback ? cipher_valid : ext_cipher_valid;
  assign dd[STAGES] = SW'(loopback ? cipher_data : ext_cipher_data);

  for (genvar s = 0; s < STAGES; s++) begin : g_dec
    localparam int unsigned SXW = stage_xw(s, XW, WW, N);   // width to restore
    localparam int unsigned SZW = stage_zw(s, XW, WW, N);   // ciphertext width
    localparam int unsigned SPM = pm_width(SZW, N);
    localparam int unsigned SRW = acc_width(SZW, N);        // network output

    logic           sel, u_valid, r_valid;
    logic [SZW-1:0] u_data;
    logic [SRW-1:0] r_data;

    assign sel = (dec_stage == SIW'(s));

    otp_mask #(.W(SZW)) u_mask (
      .clk       (clk),
      .rst_n     (rst_n),
      .mask_load (dec_mask_load && sel),
      .mask_in   (dec_mask[SZW-1:0]),
      .in_valid  (dv[s+1]),
      .in_data   (dd[s+1][SZW-1:0]),
      .out_valid (u_valid),
      .out_data  (u_data)
    );

    psne_network #(.N(N), .XW(SZW), .WW(SZW)) u_net (
      .clk       (clk),
      .rst_n     (rst_n),
      .c1        (dec_c1 && sel),
      .c2        (dec_c2),
      .wr1_n     (dec_wr1_n || !sel),
      .ld_addr   (dec_ld_addr),
      .ld_data   (dec_ld_data[SPM-1:0]),
      .in_valid  (u_valid),
      .in_data   (u_data),
      .out_valid (r_valid),
      .out_data  (r_data)
    );

    assign dv[s] = r_valid;
    if (s == 0) begin : g_last
      assign dd[s] = SW'($signed(r_data));
    end else begin : g_inner
      assign dd[s] = SW'(r_data[SXW-1:0]);
    end
  end

  assign rec_valid = dv[0];
  assign rec_data  = dd[0][ZD-1:0];

endmodule
