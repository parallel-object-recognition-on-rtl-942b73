// tb_pe: one processing element with BIN_W = 7 (128 bin_seq) and T = 4
// slices.  The hash-table strip is loaded with random words through the
// load port (address = slice * 128 + bin); a probe then sends random bin_seq
// on the bus, and the testbench counts the votes from its own copy of the
// strip and checks the local maximum, its UID and the completion time.
module tb_pe;
  localparam int N = 64, T = 4, BW = 7, NB = 1 << BW, L = 30;
  logic clk = 0, rst_n = 0, clear = 0;
  logic bus_valid = 0, bus_last = 0, bus_plast = 0;
  logic [1:0] bus_slice = 0;
  logic [BW-1:0] bus_bin = 0;
  logic hm_we = 0;
  logic [BW+1:0] hm_addr = 0;
  logic [N-1:0] hm_data = 0;
  logic [7:0] lmax_vote;
  logic [7:0] lmax_uid;
  logic done, lmax_updated;
  int checks = 0, failures = 0;
  logic [N-1:0] strip [T][NB];
  int votes [T][N];

  pe #(.N(N), .MUX(8), .T(T), .BIN_W(BW), .VOTE_W(8), .MEMS(2)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int hot_bin);
    int bin_seq [L];
    int bm, bu, cyc;
    for (int j = 0; j < T; j++) for (int b = 0; b < N; b++) votes[j][b] = 0;
    for (int i = 0; i < L; i++) bin_seq[i] = (i % 3 == 0) ? hot_bin : $urandom_range(0, NB - 1);
    clear <= 1; @(posedge clk); clear <= 0;
    for (int j = 0; j < T; j++)
      for (int i = 0; i < L; i++) begin
        bus_valid <= 1; bus_slice <= 2'(j); bus_bin <= BW'(bin_seq[i]);
        bus_last <= (i == L - 1); bus_plast <= (i == L - 1 && j == T - 1);
        for (int b = 0; b < N; b++) votes[j][b] += strip[j][bin_seq[i]][b];
        @(posedge clk);
      end
    bus_valid <= 0; bus_last <= 0; bus_plast <= 0;
    bm = 0; bu = 0;
    for (int j = 0; j < T; j++)
      for (int k = 0; k < 8; k++)
        for (int g = 0; g < N / 8; g++)
          if (votes[j][g*8+k] > bm) begin bm = votes[j][g*8+k]; bu = j*N + g*8 + k; end
    cyc = 0;
    while (!done && cyc < 50) begin @(posedge clk); #1; cyc++; end
    checks++;
    if (cyc != 9) begin failures++; $display("FAIL done %0d cycles after last bus word, expected 9", cyc); end
    checks++;
    if (lmax_vote != 8'(bm) || lmax_uid != 8'(bu)) begin
      failures++;
      $display("FAIL local max %0d uid %0d, expected %0d uid %0d", lmax_vote, lmax_uid, bm, bu);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int j = 0; j < T; j++)
      for (int b = 0; b < NB; b++) begin
        strip[j][b] = {$urandom, $urandom} & {$urandom, $urandom};
        hm_we <= 1; hm_addr <= {2'(j), BW'(b)}; hm_data <= strip[j][b];
        @(posedge clk);
      end
    // a UID recorded in the hot bin only: it wins every probe through that bin
    strip[3][9][17] = 1'b1;
    hm_we <= 1; hm_addr <= {2'(3), BW'(9)}; hm_data <= strip[3][9];
    @(posedge clk);
    hm_we <= 0;
    @(posedge clk);
    probe(9);
    probe(100);
    probe(9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
