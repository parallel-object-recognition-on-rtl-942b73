// preproc_module: pre-processing module, from scene points to hash bin addresses.
//
// Holds the S scene feature points of the current scene and, for one probe,
// produces the stream of hash bin addresses the PEs must read:
//   probe_ctrl         -> index of the next non-basis scene point, slice tag
//   scene buffer       -> its coordinates (x, y)          (1 cycle)
//   coord_transformer  -> basis-relative (u, v)           (1 cycle)
//   bin_addr_gen       -> hash bin address                (1 cycle)
// The slice number and the last/plast flags travel alongside in a 3-stage
// shift register, so each output word is (valid, last, plast, slice, bin).
// One word leaves per cycle for (S-2)*T cycles, starting 3 cycles after
// 'start'.  The scene buffer and both tables are written through their
// load ports before a probe.  The split into transformer and bin address
// generator, each a table look-up, follows the document; the scene buffer,
// the load ports and the latencies are this design's own choices.
module preproc_module #(
  parameter int unsigned S     = 256,
  parameter int unsigned T     = 64,
  parameter int unsigned XY_W  = 8,
  parameter int unsigned UV_W  = 8,
  parameter int unsigned BIN_W = 13
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // control
  input  logic                              start,
  input  logic [$clog2(S)-1:0]              basis_a,
  input  logic [$clog2(S)-1:0]              basis_b,
  output logic                              issuing,
  // scene buffer load: data = {x, y}
  input  logic                              scene_we,
  input  logic [$clog2(S)-1:0]              scene_addr,
  input  logic [2*XY_W-1:0]                 scene_data,
  // co-ordinate transformer table load
  input  logic                              ct_we,
  input  logic [2*XY_W-1:0]                 ct_addr,
  input  logic [2*UV_W-1:0]                 ct_data,
  // bin address generator table load
  input  logic                              bg_we,
  input  logic [2*UV_W-1:0]                 bg_addr,
  input  logic [BIN_W-1:0]                  bg_data,
  // bin address stream
  output logic                              out_valid,
  output logic                              out_last,
  output logic                              out_plast,
  output logic [(T > 1 ? $clog2(T) : 1)-1:0] out_slice,
  output logic [BIN_W-1:0]                  out_bin,
  output logic                              skipped
);

  localparam int unsigned SW = $clog2(S);
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned TAG_W = TW + 2;

  logic              iv, il, ipl;
  logic [SW-1:0]     iidx;
  logic [TW-1:0]     islice;

  probe_ctrl #(.S(S), .T(T)) u_ctrl (
    .clk, .rst_n, .start, .basis_a, .basis_b,
    .busy(issuing), .done(),
    .issue_valid(iv), .issue_idx(iidx), .issue_slice(islice),
    .issue_last(il), .issue_plast(ipl), .skipped
  );

  // scene point buffer
  logic [2*XY_W-1:0] scene_mem [S];
  logic [2*XY_W-1:0] xy;
  logic              xy_valid;

  always_ff @(posedge clk) begin
    if (scene_we) scene_mem[scene_addr] <= scene_data;
    xy <= scene_mem[iidx];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) xy_valid <= 1'b0;
    else        xy_valid <= iv;
  end

  logic            uv_valid;
  logic [UV_W-1:0] u, v;

  coord_transformer #(.XY_W(XY_W), .UV_W(UV_W)) u_ct (
    .clk, .rst_n,
    .we(ct_we), .waddr(ct_addr), .wdata(ct_data),
    .in_valid(xy_valid), .x(xy[2*XY_W-1:XY_W]), .y(xy[XY_W-1:0]),
    .out_valid(uv_valid), .u, .v
  );

  bin_addr_gen #(.UV_W(UV_W), .BIN_W(BIN_W)) u_bg (
    .clk, .rst_n,
    .we(bg_we), .waddr(bg_addr), .wdata(bg_data),
    .in_valid(uv_valid), .u, .v,
    .out_valid, .bin(out_bin)
  );

  // slice tag and flags follow the three lookup stages
  logic [2:0][TAG_W-1:0] tag_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) tag_q <= '0;
    else        tag_q <= {tag_q[1:0], {il, ipl, islice}};
  end

  assign {out_last, out_plast, out_slice} = tag_q[2] & {TAG_W{out_valid}};

endmodule
