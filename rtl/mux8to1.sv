// mux8to1: one of the eight 8-to-1 multiplexers of a processing element.
//
// It connects one of eight adjacent vote-box registers to an input of the
// comparator tree; the select counts through 0..7 while the registers of a
// finished slice are scanned.  Purely combinational.  The number of inputs
// is a parameter (8 in the document); the vote width is this design's own.
module mux8to1 #(
  parameter int unsigned W  = 8,
  parameter int unsigned IN = 8
) (
  input  logic [IN-1:0][W-1:0]     din,
  input  logic [$clog2(IN)-1:0]    sel,
  output logic [W-1:0]             dout
);

  always_comb begin
    dout = '0;
    for (int unsigned i = 0; i < IN; i++) begin
      if (sel == ($clog2(IN))'(i)) dout = din[i];
    end
  end

endmodule
