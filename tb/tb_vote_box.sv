// tb_vote_box: random bit streams into one vote box; the slice totals moved
// to the holding register are compared with a count kept by the testbench.
// Also checks that 'clear' restarts the count and that idle cycles do not
// count.
module tb_vote_box;
  logic clk = 0, rst_n = 0, clear = 0, valid = 0, bit_in = 0, last = 0;
  logic [7:0] held;
  int checks = 0, failures = 0;
  int unsigned ref_cnt;

  vote_box #(.VOTE_W(8)) dut (.clk, .rst_n, .clear, .valid, .entry(bit_in), .last, .held);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic slice(input int len, input int density);
    ref_cnt = 0;
    for (int i = 0; i < len; i++) begin
      // random idle cycles in between
      while ($urandom_range(0, 3) == 0) begin
        valid <= 0; bit_in <= $urandom_range(0, 1); last <= 0;
        @(posedge clk);
      end
      valid  <= 1;
      bit_in <= ($urandom_range(0, 99) < density);
      last   <= (i == len - 1);
      @(posedge clk);
      if (bit_in) ref_cnt++;
    end
    valid <= 0; last <= 0;
    @(posedge clk);
    checks++;
    if (held != 8'(ref_cnt)) begin
      failures++;
      $display("FAIL len=%0d held=%0d expected=%0d", len, held, ref_cnt);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int s = 0; s < 40; s++) slice($urandom_range(1, 254), $urandom_range(0, 100));
    slice(254, 100);   // all ones: maximum count
    // partial slice, then clear, then a fresh slice
    for (int i = 0; i < 10; i++) begin
      valid <= 1; bit_in <= 1; last <= 0; @(posedge clk);
    end
    valid <= 0; clear <= 1; @(posedge clk); clear <= 0;
    slice(20, 50);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
