// pe_fpga: the FPGA of one processing element (vote boxes and local maximum).
//
// Every clock a valid N-entry word of the bit-level hash table arrives
// from the PE's memory: entry b (ENTRY_W bits, one in the basic table) is
// the entry of UID (slice, b) in the hash bin just probed.  N vote boxes
// add up their entry.  With the word
// flagged 'last' a slice is complete; each vote box moves its count into
// its register and starts the next slice from zero.
//
// The registers are then scanned for the local maximum in MUX cycles
// (8 in the reference design) instead of with one N-input comparator tree:
// N/MUX multiplexers, each over MUX adjacent registers, feed an
// N/MUX-input comparator tree; in scan cycle k multiplexer g delivers
// register g*MUX + k.  The tree's maximum is compared with the running
// local maximum and replaces it if larger.  The scan of one slice overlaps
// the voting of the next, which takes S-2 >= MUX cycles (checked by an
// assertion).  The local UID of a vote box is slice*N + g*MUX + k.
//
// Interface/timing: 'clear' starts a probe.  A word with 'plast' set ends
// the probe; MUX cycles after the clock edge that takes it, 'done' pulses and lmax_vote/lmax_uid hold
// the PE's maximum (strictly-larger updates: among equal votes the one
// scanned first is kept).  The structure (64 vote boxes with registers,
// eight 8-to-1 muxes, 8-input comparator tree, local max update) follows
// the document; the scan order, tie rule and handshake are this design's.
module pe_fpga #(
  parameter int unsigned N       = 64,
  parameter int unsigned MUX     = 8,
  parameter int unsigned T       = 64,
  parameter int unsigned VOTE_W  = 8,
  parameter int unsigned ENTRY_W = 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  input  logic                                   valid,
  input  logic                                   last,
  input  logic                                   plast,
  input  logic [(T > 1 ? $clog2(T) : 1)-1:0]      slice,
  input  logic [N*ENTRY_W-1:0]                   bits,
  output logic [VOTE_W-1:0]                      lmax_vote,
  output logic [(T > 1 ? $clog2(T) : 1)+$clog2(N)-1:0] lmax_uid,
  output logic                                   done,
  output logic                                   lmax_updated
);

  localparam int unsigned TW  = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned G   = N / MUX;              // multiplexers
  localparam int unsigned KW  = $clog2(MUX);
  localparam int unsigned GW  = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned LUW = TW + $clog2(N);

  // ---------------------------------------------------------------- voting
  logic [N-1:0][VOTE_W-1:0] held;
  logic                     snap;

  assign snap = valid & last;

  for (genvar b = 0; b < N; b++) begin : g_vb
    vote_box #(.VOTE_W(VOTE_W), .ENTRY_W(ENTRY_W)) u_vb (
      .clk, .rst_n, .clear, .valid, .entry(bits[b*ENTRY_W +: ENTRY_W]), .last, .held(held[b])
    );
  end

  // ------------------------------------------------------------------ scan
  logic          scan_active, scan_final;
  logic [KW-1:0] scan_k;
  logic [TW-1:0] scan_slice;
  logic          scan_end;

  assign scan_end = scan_active && (scan_k == KW'(MUX - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scan_active <= 1'b0;
      scan_final  <= 1'b0;
      scan_k      <= '0;
      scan_slice  <= '0;
      done        <= 1'b0;
    end else if (clear) begin
      scan_active <= 1'b0;
      scan_final  <= 1'b0;
      scan_k      <= '0;
      done        <= 1'b0;
    end else begin
      done <= scan_end & scan_final;
      if (snap) begin
        scan_active <= 1'b1;
        scan_k      <= '0;
        scan_slice  <= slice;
        scan_final  <= plast;
      end else if (scan_end) begin
        scan_active <= 1'b0;
      end else if (scan_active) begin
        scan_k <= scan_k + 1'b1;
      end
    end
  end

  // -------------------------------------------- multiplexers and the tree
  logic [G-1:0][VOTE_W-1:0] mux_out;

  for (genvar g = 0; g < G; g++) begin : g_mux
    mux8to1 #(.W(VOTE_W), .IN(MUX)) u_mux (
      .din(held[g*MUX +: MUX]), .sel(scan_k), .dout(mux_out[g])
    );
  end

  logic [VOTE_W-1:0] tree_max;
  logic [GW-1:0]     tree_idx;

  comparator_tree #(.IN(G), .VW(VOTE_W)) u_tree (
    .vals(mux_out), .max_val(tree_max), .max_idx(tree_idx)
  );

  logic [LUW-1:0] cand_uid;
  assign cand_uid = LUW'({scan_slice, tree_idx[$clog2(N)-KW-1:0], scan_k});

  local_max_update #(.VW(VOTE_W), .UW(LUW)) u_lmax (
    .clk, .rst_n, .clear,
    .cand_valid(scan_active), .cand_vote(tree_max), .cand_uid,
    .max_vote(lmax_vote), .max_uid(lmax_uid), .updated(lmax_updated)
  );

  // A new slice must not overwrite the registers before they are scanned.
  a_scan_done: assert property (@(posedge clk) disable iff (!rst_n)
    (!clear && snap) |-> (!scan_active || scan_end))
    else $error("pe_fpga: slice shorter than the %0d-cycle register scan", MUX);

endmodule
