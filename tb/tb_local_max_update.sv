// tb_local_max_update: a random candidate stream; the held maximum and its
// UID must match a running maximum kept by the testbench (earliest wins on
// ties), and 'clear' must reset it.
module tb_local_max_update;
  logic clk = 0, rst_n = 0, clear = 0, cand_valid = 0;
  logic [7:0]  cand_vote;
  logic [11:0] cand_uid;
  logic [7:0]  max_vote;
  logic [11:0] max_uid;
  logic        updated;
  int checks = 0, failures = 0, n_upd = 0;
  int unsigned rv, ru;

  local_max_update #(.VW(8), .UW(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cand_vote = 0; cand_uid = 0;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int round = 0; round < 4; round++) begin
      clear <= 1; @(posedge clk); clear <= 0;
      rv = 0; ru = 0;
      for (int i = 0; i < 300; i++) begin
        cand_valid <= ($urandom_range(0, 3) != 0);
        cand_vote  <= 8'($urandom_range(0, 40 + 50 * round));
        cand_uid   <= 12'(i);
        @(posedge clk);
        if (cand_valid && cand_vote > 8'(rv)) begin rv = cand_vote; ru = cand_uid; end
        #1;
        checks++;
        if (max_vote != 8'(rv) || max_uid != 12'(ru)) begin
          failures++;
          $display("FAIL max=%0d/%0d expected %0d/%0d", max_vote, max_uid, rv, ru);
        end
        if (updated) n_upd++;
      end
    end
    cand_valid <= 0;
    checks++;
    if (n_upd == 0) begin failures++; $display("FAIL no update seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
