// coord_transformer: basis-relative coordinates of a scene point by table look-up.
//
// For the chosen basis pair every scene point (x, y) must be expressed in
// the coordinate frame spanned by the basis, (u, v).  That needs a
// subtraction, a dot and a cross product and a division; here, as in the
// document, it is a single table look-up.  The table has one (u, v) entry
// per possible (x, y) and is written for the current basis through the
// load port (we/waddr/wdata) before a probe starts; the table contents are
// computed off-chip.
//
// Lookup timing: (x, y) with in_valid on one edge gives (u, v) with
// out_valid from the next cycle (one registered read).  Coordinate widths
// and the latency are this design's own choices.
module coord_transformer #(
  parameter int unsigned XY_W = 8,
  parameter int unsigned UV_W = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  // table load
  input  logic              we,
  input  logic [2*XY_W-1:0] waddr,     // {x, y}
  input  logic [2*UV_W-1:0] wdata,     // {u, v}
  // lookup
  input  logic              in_valid,
  input  logic [XY_W-1:0]   x,
  input  logic [XY_W-1:0]   y,
  output logic              out_valid,
  output logic [UV_W-1:0]   u,
  output logic [UV_W-1:0]   v
);

  logic [2*UV_W-1:0] table_mem [2**(2*XY_W)];
  logic [2*UV_W-1:0] rd;

  always_ff @(posedge clk) begin
    if (we) table_mem[waddr] <= wdata;
    rd <= table_mem[{x, y}];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) out_valid <= 1'b0;
    else        out_valid <= in_valid;
  end

  assign {u, v} = rd;

endmodule
