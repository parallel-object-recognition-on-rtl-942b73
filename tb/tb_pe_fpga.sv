// tb_pe_fpga: drives a PE FPGA (N = 64, 8-to-1 muxes, T = 6 slices) with
// random hash-table words, slices as short as the 8-cycle register scan,
// and idle gaps.  The testbench counts the votes of every UID itself and
// checks the local maximum vote, its UID (first maximum in scan order:
// slice, then mux select k, then mux g), and that 'done' comes 8 cycles
// after the last word.  Three probes, separated by 'clear'.
module tb_pe_fpga;
  localparam int N = 64, MUX = 8, T = 6, G = N / MUX;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, last = 0, plast = 0;
  logic [2:0] slice = 0;
  logic [N-1:0] bits = 0;
  logic [7:0] lmax_vote;
  logic [8:0] lmax_uid;
  logic done, lmax_updated;
  int checks = 0, failures = 0, n_upd = 0, n_done = 0;
  int votes [T][N];

  pe_fpga #(.N(N), .MUX(MUX), .T(T), .VOTE_W(8)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    if (rst_n && lmax_updated) n_upd++;
    if (rst_n && done) n_done++;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_probe(input int plant_uid, input int gaps);
    int len, bm, bu, dcount;
    for (int j = 0; j < T; j++) for (int b = 0; b < N; b++) votes[j][b] = 0;
    clear <= 1; @(posedge clk); clear <= 0;
    for (int j = 0; j < T; j++) begin
      if (plant_uid >= 0) len = (plant_uid / N == j) ? 60 : $urandom_range(MUX, 40);
      else len = (j % 2) ? MUX : $urandom_range(MUX, 60);
      for (int i = 0; i < len; i++) begin
        logic [N-1:0] w;
        if (gaps) while ($urandom_range(0, 4) == 0) begin
          valid <= 0; last <= 0; plast <= 0; @(posedge clk);
        end
        w = {$urandom, $urandom} & {$urandom, $urandom};   // density 1/4
        if (plant_uid >= 0 && plant_uid / N == j) w[plant_uid % N] = 1'b1;
        for (int b = 0; b < N; b++) votes[j][b] += w[b];
        valid <= 1; bits <= w; slice <= 3'(j);
        last <= (i == len - 1); plast <= (i == len - 1 && j == T - 1);
        @(posedge clk);
      end
    end
    valid <= 0; last <= 0; plast <= 0;
    // reference maximum in scan order
    bm = 0; bu = 0;
    for (int j = 0; j < T; j++)
      for (int k = 0; k < MUX; k++)
        for (int g = 0; g < G; g++)
          if (votes[j][g*MUX+k] > bm) begin bm = votes[j][g*MUX+k]; bu = j*N + g*MUX + k; end
    dcount = 0;
    while (!done && dcount < 50) begin @(posedge clk); #1; dcount++; end
    checks++;
    if (dcount != MUX) begin
      failures++; $display("FAIL done after %0d cycles, expected %0d", dcount, MUX);
    end
    #1;
    checks++;
    if (lmax_vote != 8'(bm) || lmax_uid != 9'(bu)) begin
      failures++;
      $display("FAIL local max %0d uid %0d, expected %0d uid %0d", lmax_vote, lmax_uid, bm, bu);
    end
    if (plant_uid >= 0) begin
      checks++;
      if (lmax_uid != 9'(plant_uid)) begin
        failures++; $display("FAIL planted uid %0d not found (got %0d)", plant_uid, lmax_uid);
      end
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_probe(-1, 0);
    run_probe(5 * N + 13, 1);
    run_probe(2 * N + 63, 0);
    run_probe(-1, 1);
    repeat (2) @(posedge clk);
    checks++;
    if (n_upd == 0 || n_done != 4) begin
      failures++; $display("FAIL updates=%0d dones=%0d", n_upd, n_done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
