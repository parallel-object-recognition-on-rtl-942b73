// pe: one processing element, a PE FPGA with its local hash-table memory.
//
// Each PE owns a vertical strip of the bit-level hash table: for all 2^BIN_W
// hash bins, the N*T UIDs  pe_index*N*T ... (pe_index+1)*N*T-1  (a
// 8K x 4K-bit sub-table in the reference configuration).  The strip is
// stored column-major in two memory modules side by side (low and high
// half of the N-bit word): word address = slice * 2^BIN_W + bin, so the
// N-bit column of slice 0 for all bins comes first, then slice 1, and so
// on.  For every (slice, bin) word on the bin-address bus the PE reads one
// N-bit word and hands it to its FPGA, which votes and keeps the local
// maximum.
//
// Timing: one cycle of memory read latency between the bus word and the
// vote; 'done' and the local maximum follow the FPGA's timing.  While
// hm_we is high the memories are written at hm_addr instead (table load
// before a probe; no probe may run then).  The column-major layout and the
// two 32-bit modules per PE follow the document; the load port is this
// design's own.  With ENTRY_W > 1 (up to 2^ENTRY_W - 1 copies of a pair in
// a bin) every UID takes ENTRY_W bits and the memory word grows to
// N*ENTRY_W bits, as the document describes for that variant.
module pe #(
  parameter int unsigned N      = 64,
  parameter int unsigned MUX    = 8,
  parameter int unsigned T      = 64,
  parameter int unsigned BIN_W  = 13,
  parameter int unsigned VOTE_W = 8,
  parameter int unsigned MEMS   = 2,
  parameter int unsigned ENTRY_W = 1
) (
  input  logic                                   clk,
  input  logic                                   rst_n,
  input  logic                                   clear,
  // bin-address bus
  input  logic                                   bus_valid,
  input  logic                                   bus_last,
  input  logic                                   bus_plast,
  input  logic [(T > 1 ? $clog2(T) : 1)-1:0]      bus_slice,
  input  logic [BIN_W-1:0]                       bus_bin,
  // hash table load
  input  logic                                   hm_we,
  input  logic [(T > 1 ? $clog2(T) : 1)+BIN_W-1:0] hm_addr,
  input  logic [N*ENTRY_W-1:0]                   hm_data,
  // local maximum
  output logic [VOTE_W-1:0]                      lmax_vote,
  output logic [(T > 1 ? $clog2(T) : 1)+$clog2(N)-1:0] lmax_uid,
  output logic                                   done,
  output logic                                   lmax_updated
);

  localparam int unsigned TW = (T > 1) ? $clog2(T) : 1;
  localparam int unsigned AW = TW + BIN_W;
  localparam int unsigned DW = N * ENTRY_W / MEMS;

  logic [AW-1:0] addr;
  logic [N*ENTRY_W-1:0] word;

  assign addr = hm_we ? hm_addr : {bus_slice, bus_bin};

  for (genvar m = 0; m < MEMS; m++) begin : g_mem
    sram_module #(.AW(AW), .DW(DW)) u_mem (
      .clk, .we(hm_we), .addr, .wdata(hm_data[m*DW +: DW]), .rdata(word[m*DW +: DW])
    );
  end

  logic          rd_valid, rd_last, rd_plast;
  logic [TW-1:0] rd_slice;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      rd_last  <= 1'b0;
      rd_plast <= 1'b0;
      rd_slice <= '0;
    end else begin
      rd_valid <= bus_valid & ~hm_we;
      rd_last  <= bus_last;
      rd_plast <= bus_plast;
      rd_slice <= bus_slice;
    end
  end

  pe_fpga #(.N(N), .MUX(MUX), .T(T), .VOTE_W(VOTE_W), .ENTRY_W(ENTRY_W)) u_fpga (
    .clk, .rst_n, .clear,
    .valid(rd_valid), .last(rd_last), .plast(rd_plast), .slice(rd_slice),
    .bits(word),
    .lmax_vote, .lmax_uid, .done, .lmax_updated
  );

endmodule
