// bin_addr_gen: hash bin address of a basis-relative point by table look-up.
//
// The hash function equalises the bin occupancy: a point (u, v) maps to
// (1 - exp(-(u^2 + v^2) / 3 sigma^2), atan2(v, u)), which is then quantised
// to one of 2^BIN_W hash bins (8K in the reference configuration).  As in
// the document this is a table look-up: one BIN_W-bit bin address per
// possible (u, v), written through the load port before use.  The exact
// quantisation lives only in the table contents.
//
// Lookup timing: (u, v) with in_valid on one edge gives the bin address
// with out_valid from the next cycle.  Widths and latency are this design's
// own choices; the bin count follows the document.
module bin_addr_gen #(
  parameter int unsigned UV_W  = 8,
  parameter int unsigned BIN_W = 13
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load
  input  logic              we,
  input  logic [2*UV_W-1:0] waddr,     // {u, v}
  input  logic [BIN_W-1:0]  wdata,
  // lookup
  input  logic              in_valid,
  input  logic [UV_W-1:0]   u,
  input  logic [UV_W-1:0]   v,
  output logic              out_valid,
  output logic [BIN_W-1:0]  bin
);

  logic [BIN_W-1:0] table_mem [2**(2*UV_W)];

  always_ff @(posedge clk) begin
    if (we) table_mem[waddr] <= wdata;
    bin <= table_mem[{u, v}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

endmodule
