// local_max_update: running maximum of the candidates from the comparator tree.
//
// Holds the largest vote seen since 'clear' and the UID it belongs to.  A
// candidate (cand_valid high) replaces the held value only when its vote is
// strictly larger, so among equal votes the earliest candidate is kept.
// 'clear' (start of a probe) resets the maximum to vote 0, UID 0.
// Timing: the update takes effect on the clock edge of the candidate.
// The compare-and-update follows the document; the tie rule is this
// design's choice.
module local_max_update #(
  parameter int unsigned VW = 8,
  parameter int unsigned UW = 12
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          clear,
  input  logic          cand_valid,
  input  logic [VW-1:0] cand_vote,
  input  logic [UW-1:0] cand_uid,
  output logic [VW-1:0] max_vote,
  output logic [UW-1:0] max_uid,
  output logic          updated
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      max_vote <= '0;
      max_uid  <= '0;
      updated  <= 1'b0;
    end else if (clear) begin
      max_vote <= '0;
      max_uid  <= '0;
      updated  <= 1'b0;
    end else begin
      updated <= 1'b0;
      if (cand_valid && cand_vote > max_vote) begin
        max_vote <= cand_vote;
        max_uid  <= cand_uid;
        updated  <= 1'b1;
      end
    end
  end

endmodule
