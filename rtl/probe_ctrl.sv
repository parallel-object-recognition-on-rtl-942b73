// probe_ctrl: sequencer of one probe.
//
// The vote boxes of the whole design cover only P*N UIDs at a time, so a
// probe is run as T time slices.  In every slice each of the S-2 scene
// points that are not part of the basis is looked up once, one per clock,
// and the PEs count votes for the UIDs of that slice.  This module counts
// slices (outer loop) and scene points (inner loop) and issues the scene
// index to read.  The two basis points are skipped without a bubble: the
// point counter i = 0..S-3 is mapped to the scene index
//   idx = i, +1 if idx >= min(basis), +1 again if idx >= max(basis).
// Each issued index carries its slice number and the flags 'last' (final
// point of the slice) and 'plast' (final point of the probe).
//
// Interface: a 'start' pulse while idle begins a probe with the basis pair
// (basis_a, basis_b), which must differ.  'busy' is high while indices are
// issued; one index per cycle for exactly (S-2)*T cycles, then 'done'
// pulses once.  The slice-outer ordering follows the document's execution
// time (S-2)*t; the handshake is this design's own.
module probe_ctrl #(
  parameter int unsigned S = 256,
  parameter int unsigned T = 64
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              start,
  input  logic [$clog2(S)-1:0]              basis_a,
  input  logic [$clog2(S)-1:0]              basis_b,
  output logic                              busy,
  output logic                              done,
  output logic                              issue_valid,
  output logic [$clog2(S)-1:0]              issue_idx,
  output logic [(T > 1 ? $clog2(T) : 1)-1:0] issue_slice,
  output logic                              issue_last,
  output logic                              issue_plast,
  output logic                              skipped     // an index past a basis point was issued
);

  localparam int unsigned SW = $clog2(S);
  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1;

  logic [SW-1:0] lo, hi, pt;
  logic [TW-1:0] slice;
  logic [SW:0]   idx_a, idx_b;
  logic          at_last_pt, at_last_slice;

  assign at_last_pt    = (pt == SW'(S - 3));
  assign at_last_slice = (slice == TW'(T - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      pt    <= '0;
      slice <= '0;
      lo    <= '0;
      hi    <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          pt    <= '0;
          slice <= '0;
          lo    <= (basis_a < basis_b) ? basis_a : basis_b;
          hi    <= (basis_a < basis_b) ? basis_b : basis_a;
        end
      end else if (at_last_pt) begin
        pt <= '0;
        if (at_last_slice) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          slice <= slice + 1'b1;
        end
      end else begin
        pt <= pt + 1'b1;
      end
    end
  end

  always_comb begin
    idx_a = {1'b0, pt};
    if (idx_a >= {1'b0, lo}) idx_a = idx_a + 1'b1;
    idx_b = idx_a;
    if (idx_b >= {1'b0, hi}) idx_b = idx_b + 1'b1;
  end

  assign issue_valid = busy;
  assign issue_idx   = idx_b[SW-1:0];
  assign issue_slice = slice;
  assign issue_last  = busy & at_last_pt;
  assign issue_plast = busy & at_last_pt & at_last_slice;
  assign skipped     = busy & (idx_b != {1'b0, pt});

  a_basis_distinct: assert property (@(posedge clk) disable iff (!rst_n)
    (!busy && start) |-> (basis_a != basis_b))
    else $error("probe_ctrl: basis points must differ");

endmodule
