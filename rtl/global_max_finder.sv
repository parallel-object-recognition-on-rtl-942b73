// global_max_finder: post-processing module, the maximum over all PEs.
//
// Every PE reports its local maximum vote and the local UID it belongs to.
// A comparator tree over the P local maxima (log2 P levels) selects the
// largest vote; the global UID is the winning PE's index times N*T plus its
// local UID, i.e. {pe_index, local_uid}.  Equal votes resolve to the lower
// PE index, which is also the lower global UID.
// Timing: the inputs are sampled when 'in_done' is high (all PEs finish in
// the same cycle); one cycle later 'done' pulses and gmax_vote/gmax_uid
// hold the result until the next one.  The comparator tree over the local
// maxima follows the document; the registered output and tie rule are this
// design's own.
module global_max_finder #(
  parameter int unsigned P      = 30,
  parameter int unsigned VOTE_W = 8,
  parameter int unsigned LUW    = 12
) (
  input  logic                                      clk,
  input  logic                                      rst_n,
  input  logic                                      in_done,
  input  logic [P-1:0][VOTE_W-1:0]                  lmax_vote,
  input  logic [P-1:0][LUW-1:0]                     lmax_uid,
  output logic                                      done,
  output logic [VOTE_W-1:0]                         gmax_vote,
  output logic [(P > 1 ? $clog2(P) : 1)+LUW-1:0]    gmax_uid
);

  localparam int unsigned PW = (P > 1) ? $clog2(P) : 1;

  logic [VOTE_W-1:0] tmax;
  logic [PW-1:0]     tidx;

  comparator_tree #(.IN(P), .VW(VOTE_W)) u_tree (
    .vals(lmax_vote), .max_val(tmax), .max_idx(tidx)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      done      <= 1'b0;
      gmax_vote <= '0;
      gmax_uid  <= '0;
    end else begin
      done <= in_done;
      if (in_done) begin
        gmax_vote <= tmax;
        gmax_uid  <= {tidx, lmax_uid[tidx]};
      end
    end
  end

endmodule
