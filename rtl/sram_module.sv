// sram_module: one local memory module of a processing element.
//
// The reference configuration gives every PE two 512K x 32-bit memory
// modules that together supply the 64-bit FPGA-memory datapath.  This is
// a synchronous single-port RAM: on each clock edge it either writes
// 'wdata' at 'addr' (we high) or reads 'addr'; 'rdata' holds the word read
// (or the old contents on a write) from the next cycle.  The one-cycle read
// latency is this design's choice; the document only names the part size.
module sram_module #(
  parameter int unsigned AW = 19,
  parameter int unsigned DW = 32
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [DW-1:0] wdata,
  output logic [DW-1:0] rdata
);

  logic [DW-1:0] mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
