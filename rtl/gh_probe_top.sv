// gh_probe_top: parallel geometric-hashing probe engine.
//
// Geometric hashing recognises known objects in a scene by voting: for a
// chosen basis pair of scene points every other scene point is hashed to a
// bin of a precomputed table, and every (model, basis) pair recorded in
// that bin gets a vote.  Here each hash bin is stored as a bit vector with
// one bit per (model, basis) UID (the bit-level hash table), so a probe is
// a regular stream of wide memory reads and one counter per UID, with no
// contention for bins or vote boxes.
//
// Structure (all default sizes are the reference configuration):
//   preproc_module    scene buffer, probe sequencer, co-ordinate and bin
//                     address look-up tables               (1 FPGA)
//   bin_addr_bus      broadcast of (slice, bin) to all PEs
//   pe[0..P-1]        local memory (two 512K x 32 modules) + PE FPGA with
//                     N = 64 vote boxes and local maximum logic
//   global_max_finder comparator tree over the P local maxima (1 FPGA)
// P*N = 1920 UIDs are voted at a time; the 122880 UIDs of the table are
// covered by T = 64 time slices of S-2 = 254 scene points each.  PE p,
// slice j, vote box b holds UID  p*N*T + j*N + b.
//
// Interface: load the scene buffer, both look-up tables and the hash table
// memories through the *_we ports, then pulse 'start' with the basis pair.
// 'busy' is high until 'done' pulses; gmax_vote/gmax_uid then give the
// winning vote count and UID.  From the 'start' edge to 'done' a probe
// takes (S-2)*T cycles of voting plus 14 cycles of pipeline, last register
// scan and global maximum: 16270 cycles, 1.627 ms at 10 MHz, with the
// defaults.  Load ports and handshake are this design's own.
// ENTRY_W = 1 is the basic one-bit table; a larger value gives every UID a
// multi-bit entry (a pair recorded up to 2^ENTRY_W - 1 times in a bin).
module gh_probe_top
  import gh_pkg::*;
#(
  parameter int unsigned P      = DEF_P,
  parameter int unsigned N      = DEF_N,
  parameter int unsigned MUX    = DEF_MUX,
  parameter int unsigned T      = DEF_T,
  parameter int unsigned S      = DEF_S,
  parameter int unsigned BIN_W  = DEF_BIN_W,
  parameter int unsigned XY_W   = DEF_XY_W,
  parameter int unsigned UV_W   = DEF_UV_W,
  parameter int unsigned VOTE_W = DEF_VOTE_W,
  parameter int unsigned ENTRY_W = DEF_ENTRY_W,
  localparam int unsigned SW    = $clog2(S),
  localparam int unsigned TW    = (T > 1) ? $clog2(T) : 1,
  localparam int unsigned PW    = (P > 1) ? $clog2(P) : 1,
  localparam int unsigned LUW   = TW + $clog2(N),
  localparam int unsigned UIDW  = PW + LUW
) (
  input  logic                         clk,
  input  logic                         rst_n,
  // probe control
  input  logic                         start,
  input  logic [SW-1:0]                basis_a,
  input  logic [SW-1:0]                basis_b,
  output logic                         busy,
  output logic                         done,
  output logic [VOTE_W-1:0]            gmax_vote,
  output logic [UIDW-1:0]              gmax_uid,
  // scene buffer load, data = {x, y}
  input  logic                         scene_we,
  input  logic [SW-1:0]                scene_addr,
  input  logic [2*XY_W-1:0]            scene_data,
  // co-ordinate transformer table load, addr = {x, y}, data = {u, v}
  input  logic                         ct_we,
  input  logic [2*XY_W-1:0]            ct_addr,
  input  logic [2*UV_W-1:0]            ct_data,
  // bin address generator table load, addr = {u, v}
  input  logic                         bg_we,
  input  logic [2*UV_W-1:0]            bg_addr,
  input  logic [BIN_W-1:0]             bg_data,
  // hash table load, addr = {slice, bin}, one word per PE
  input  logic                         hm_we,
  input  logic [TW+BIN_W-1:0]          hm_addr,
  input  logic [P-1:0][N*ENTRY_W-1:0]  hm_data
);

  // ------------------------------------------------------ pre-processing
  logic          pp_valid, pp_last, pp_plast;
  logic [TW-1:0] pp_slice;
  logic [BIN_W-1:0] pp_bin;
  logic          go;

  assign go = start & ~busy;

  preproc_module #(.S(S), .T(T), .XY_W(XY_W), .UV_W(UV_W), .BIN_W(BIN_W)) u_pre (
    .clk, .rst_n,
    .start(go), .basis_a, .basis_b, .issuing(),
    .scene_we, .scene_addr, .scene_data,
    .ct_we, .ct_addr, .ct_data,
    .bg_we, .bg_addr, .bg_data,
    .out_valid(pp_valid), .out_last(pp_last), .out_plast(pp_plast),
    .out_slice(pp_slice), .out_bin(pp_bin), .skipped()
  );

  // ------------------------------------------------ bin address broadcast
  logic [P-1:0]              b_valid, b_last, b_plast;
  logic [P-1:0][TW-1:0]      b_slice;
  logic [P-1:0][BIN_W-1:0]   b_bin;

  bin_addr_bus #(.P(P), .SLICE_W(TW), .BIN_W(BIN_W)) u_bus (
    .clk, .rst_n,
    .in_valid(pp_valid), .in_last(pp_last), .in_plast(pp_plast),
    .in_slice(pp_slice), .in_bin(pp_bin),
    .out_valid(b_valid), .out_last(b_last), .out_plast(b_plast),
    .out_slice(b_slice), .out_bin(b_bin)
  );

  // ------------------------------------------------ processing elements
  logic [P-1:0][VOTE_W-1:0] l_vote;
  logic [P-1:0][LUW-1:0]    l_uid;
  logic [P-1:0]             l_done, l_upd;

  for (genvar p = 0; p < P; p++) begin : g_pe
    pe #(.N(N), .MUX(MUX), .T(T), .BIN_W(BIN_W), .VOTE_W(VOTE_W), .ENTRY_W(ENTRY_W)) u_pe (
      .clk, .rst_n, .clear(go),
      .bus_valid(b_valid[p]), .bus_last(b_last[p]), .bus_plast(b_plast[p]),
      .bus_slice(b_slice[p]), .bus_bin(b_bin[p]),
      .hm_we, .hm_addr, .hm_data(hm_data[p]),
      .lmax_vote(l_vote[p]), .lmax_uid(l_uid[p]),
      .done(l_done[p]), .lmax_updated(l_upd[p])
    );
  end

  // ------------------------------------------------- post-processing
  global_max_finder #(.P(P), .VOTE_W(VOTE_W), .LUW(LUW)) u_post (
    .clk, .rst_n, .in_done(&l_done),
    .lmax_vote(l_vote), .lmax_uid(l_uid),
    .done, .gmax_vote, .gmax_uid
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    busy <= 1'b0;
    else if (go)   busy <= 1'b1;
    else if (done) busy <= 1'b0;
  end

  // All PEs see the same bus words, so they must finish together.
  a_pes_in_step: assert property (@(posedge clk) disable iff (!rst_n)
    (|l_done) |-> (&l_done))
    else $error("gh_probe_top: PEs finished in different cycles");

endmodule
