// Table memory of the neural-like element: used for RAM P_M (the 2^N
// macro-partial products of one neuron) and for RAM f_a (the tabulated
// activation function).
//
// The architecture writes the tables once, before operation, through its
// address and data load registers (RgA, RgD), and afterwards only reads them,
// with the read inside the pipeline clock period (register delay + RAM read +
// add).  This module therefore has a synchronous write port and an
// asynchronous (combinational) read port.  Giving the write and read paths
// separate address inputs, instead of one address bus shared between the load
// registers and the operand registers, is this design's choice; it replaces the
// tri-state switching of the original structure with no change in behaviour.
//
// Interface: we/waddr/wdata write mem[waddr] <= wdata on the rising clock
// edge; rdata = mem[raddr] in the same cycle.  The contents are not reset;
// they are undefined until written.
module psne_table_ram #(
  parameter int unsigned AW = 8,   // address bits, 2^AW words
  parameter int unsigned DW = 11   // data bits
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  assign rdata = mem[raddr];

endmodule
