// bin_addr_bus: broadcast of the generated bin addresses to all PEs.
//
// With only tens of PEs the document distributes each hash bin address
// directly over a shared bus rather than through a tree.  This module is
// that bus: one register stage that takes the tagged address word from the
// pre-processing module and drives an identical registered copy to each of
// the P processing elements (one register per PE keeps the fan-out of each
// driver to one load, as a real board would drive one bus segment).
// Word fields: valid, last (final scene point of a slice), plast (final
// scene point of the probe), the slice number and the bin address.
// Timing: one cycle from input to every output.  The register stage is
// this design's choice.
module bin_addr_bus #(
  parameter int unsigned P       = 30,
  parameter int unsigned SLICE_W = 6,
  parameter int unsigned BIN_W   = 13
) (
  input  logic                            clk,
  input  logic                            rst_n,
  input  logic                            in_valid,
  input  logic                            in_last,
  input  logic                            in_plast,
  input  logic [SLICE_W-1:0]              in_slice,
  input  logic [BIN_W-1:0]                in_bin,
  output logic [P-1:0]                    out_valid,
  output logic [P-1:0]                    out_last,
  output logic [P-1:0]                    out_plast,
  output logic [P-1:0][SLICE_W-1:0]       out_slice,
  output logic [P-1:0][BIN_W-1:0]         out_bin
);

  for (genvar p = 0; p < P; p++) begin : g_seg
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[p] <= 1'b0;
        out_last[p]  <= 1'b0;
        out_plast[p] <= 1'b0;
        out_slice[p] <= '0;
        out_bin[p]   <= '0;
      end else begin
        out_valid[p] <= in_valid;
        out_last[p]  <= in_valid & in_last;
        out_plast[p] <= in_valid & in_plast;
        out_slice[p] <= in_slice;
        out_bin[p]   <= in_bin;
      end
    end
  end

endmodule
