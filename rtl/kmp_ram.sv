// kmp_ram: simple dual-port block RAM, one write port and one read port.
//
// The core keeps the protein, the peptide and the peptide's failure table
// in local block RAM, as the published accelerator does.  This module is
// the plain inferable description of such a RAM; its organisation and read
// behaviour are this design's choice.  A write happens on port A when we is
// high; on port B the data appears on rdata one clock after raddr is
// presented (registered read, as in an FPGA block RAM).  Reading and
// writing the same address in one clock returns the old contents.  The
// contents are not reset.
module kmp_ram #(
  parameter int unsigned DW    = 8,
  parameter int unsigned DEPTH = 65536,
  localparam int unsigned AW   = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  logic [DW-1:0] wdata,
  input  logic [AW-1:0] raddr,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
