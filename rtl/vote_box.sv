// vote_box: one vote box of a processing element, with its holding register.
//
// Each vote box belongs to one (model, basis) UID of the current time
// slice.  Every valid hash-table word delivers its entry for that UID; the
// box adds it up.  In the basic table the entry is one bit and the box
// counts the '1's; a table that records several copies of a pair in a bin
// stores their number in ENTRY_W bits (up to 2^ENTRY_W - 1 copies), and
// the counter becomes an adder of that width.  On the word marked 'last' (the final scene point of
// the slice) the finished count, including that last bit, is copied into
// the holding register 'held' and the counter restarts from zero, so the
// next slice can vote while the register is being scanned for the local
// maximum.  'clear' (start of a probe) zeroes the counter.
//
// Timing: count and register update on the rising clock edge in which
// valid is high; 'held' shows the slice total from the following cycle.
// Counting the entries (and the multi-bit variant) and registering the
// votes follow the document; the
// counter restart on 'last' and the clear input are this design's choices.
module vote_box #(
  parameter int unsigned VOTE_W  = 8,
  parameter int unsigned ENTRY_W = 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clear,
  input  logic              valid,
  input  logic [ENTRY_W-1:0] entry,
  input  logic              last,
  output logic [VOTE_W-1:0] held
);

  logic [VOTE_W-1:0] cnt;
  logic [VOTE_W-1:0] cnt_next;

  assign cnt_next = cnt + VOTE_W'(entry);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt  <= '0;
      held <= '0;
    end else if (clear) begin
      cnt  <= '0;
    end else if (valid) begin
      if (last) begin
        held <= cnt_next;
        cnt  <= '0;
      end else begin
        cnt  <= cnt_next;
      end
    end
  end

  // The counter must not wrap: S-2 votes have to fit in VOTE_W bits.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n)
    (valid && !clear) |-> ({1'b0, cnt} + (VOTE_W+1)'(entry) <= (VOTE_W+1)'({VOTE_W{1'b1}})))
    else $error("vote_box: vote counter overflow");

endmodule
