// Input registers RgIn1..RgInN of the parallel-stream network: serial-to-
// parallel conversion of the incoming word stream.
//
// Words arrive one per clock when in_valid is high (gaps are allowed).  The
// j-th word of a block is stored in register j-1; when the N-th word has been
// stored, out_valid is high for one cycle and out_x holds the whole block.  The
// next block may begin in that same cycle: the registers are read by the first
// processing unit at the edge that stores the new block's first word, so a
// continuous stream of one word per clock is converted without a stall.
//
// Timing: out_valid rises in the cycle after the clock edge that stores the
// N-th word.  Block framing restarts at reset.
module psne_s2p
  import psne_pkg::*;
#(
  parameter int unsigned N  = psne_pkg::N_INPUTS,
  parameter int unsigned XW = psne_pkg::DATA_BITS,
  localparam int unsigned CW = idx_width(N)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [XW-1:0]        in_data,
  output logic                 out_valid,
  output logic [N-1:0][XW-1:0] out_x
);

  logic [CW-1:0] cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt       <= '0;
      out_valid <= 1'b0;
      out_x     <= '0;
    end else begin
      out_valid <= in_valid && (cnt == CW'(N - 1));
      if (in_valid) begin
        out_x[cnt] <= in_data;
        cnt        <= (cnt == CW'(N - 1)) ? '0 : cnt + 1'b1;
      end
    end
  end

endmodule
