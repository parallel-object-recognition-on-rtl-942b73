// tb_probe_ctrl: runs probes with several basis pairs (adjacent, at the ends,
// given in either order) at S = 256, T = 4 and checks the issued index
// sequence, the slice tags and flags, and the (S-2)*T cycle count.
module tb_probe_ctrl;
  localparam int S = 256, T = 4;
  logic clk = 0, rst_n = 0, start = 0;
  logic [7:0] basis_a = 0, basis_b = 0;
  logic busy, done, issue_valid, issue_last, issue_plast, skipped;
  logic [7:0] issue_idx;
  logic [1:0] issue_slice;
  int checks = 0, failures = 0, n_skipped = 0;

  probe_ctrl #(.S(S), .T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int a, input int b);
    int exp_idx, cycles = 0, errs = 0;
    basis_a <= 8'(a); basis_b <= 8'(b); start <= 1;
    @(posedge clk); start <= 0;
    for (int j = 0; j < T; j++) begin
      exp_idx = 0;
      for (int i = 0; i < S - 2; i++) begin
        while (exp_idx == a || exp_idx == b) exp_idx++;
        #1;
        if (!issue_valid || issue_idx != 8'(exp_idx) || issue_slice != 2'(j) ||
            issue_last != (i == S - 3) || issue_plast != (i == S - 3 && j == T - 1)) begin
          errs++;
          if (errs < 5) $display("FAIL basis %0d,%0d slice %0d point %0d: idx %0d expected %0d",
                                 a, b, j, i, issue_idx, exp_idx);
        end
        if (skipped) n_skipped++;
        exp_idx++;
        cycles++;
        @(posedge clk);
      end
    end
    #1;
    checks++;
    if (errs != 0) failures++;
    checks++;
    if (!done || busy || issue_valid) begin
      failures++;
      $display("FAIL done=%0d busy=%0d after %0d cycles (expected %0d)", done, busy, cycles, (S-2)*T);
    end
    @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    probe(0, 1);
    probe(255, 254);
    probe(10, 200);
    probe(77, 3);
    probe(128, 129);
    checks++;
    if (n_skipped == 0) begin failures++; $display("FAIL skip never seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
