// output_memory: block RAM holding the memorized outputs of the circuits.
//
// Each word holds the concatenated outputs of one computation in its upper
// DW-1 bits and a valid bit in its LSB: '1' means that the output for the
// input that maps to this address has been saved, '0' that it is missing.
// The default size, 2048 x 9 bits, is one 18 kb block RAM.
//
// Interface: a simple dual-port RAM with one write port (we/waddr/wdata) and
// one read port (raddr -> rdata).
// Timing: the read is synchronous; rdata shows the word at raddr one cycle
// after raddr is presented (read-first if the same word is written in that
// cycle).  The contents are not reset: the memo logic clears the valid bits
// with a refresh sweep.
// The word layout (valid bit in the LSB) follows the design description;
// the port arrangement is this design's own choice.
module output_memory
  import reloc_pkg::*;
#(
  parameter int unsigned AW = OM_AW,
  parameter int unsigned DW = OM_DW
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
    rdata <= mem[raddr];
  end

endmodule
