// One-time-pad masking block: XOR of the hidden-layer output stream with the
// mask part of the key.
//
// The same block masks on the encryption side and unmasks on the decryption
// side, since (h ^ m) ^ m = h.  The mask is a W-bit key register, loaded while
// mask_load is high; it is reset to zero (masking off).  Holding one mask word
// for the whole stream, rather than a fresh word per data word, is this
// design's choice: the mask is described only as part of the key, with its
// bit width among the parameters that set the key's lifetime.
//
// Timing: one register stage; out_valid/out_data follow in_valid/in_data by
// one clock.
module otp_mask #(
  parameter int unsigned W = 12
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         mask_load,
  input  logic [W-1:0] mask_in,
  input  logic         in_valid,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  output logic [W-1:0] out_data
);

  logic [W-1:0] mask;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mask      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (mask_load) mask <= mask_in;
      out_valid <= in_valid;
      if (in_valid) out_data <= in_data ^ mask;
    end
  end

endmodule
