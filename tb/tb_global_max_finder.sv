// tb_global_max_finder: 30 random local maxima (many ties in half of the
// rounds); the registered result must be the largest vote with
// UID = {pe index, local uid} of the lowest-index PE holding it.
module tb_global_max_finder;
  localparam int P = 30;
  logic clk = 0, rst_n = 0, in_done = 0;
  logic [P-1:0][7:0]  lmax_vote;
  logic [P-1:0][11:0] lmax_uid;
  logic done;
  logic [7:0]  gmax_vote;
  logic [16:0] gmax_uid;
  int checks = 0, failures = 0;

  global_max_finder #(.P(P), .VOTE_W(8), .LUW(12)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bm, bp;
    logic [P-1:0][7:0]  vq;
    logic [P-1:0][11:0] uq;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 200; r++) begin
      for (int p = 0; p < P; p++) begin
        vq[p] = 8'($urandom_range(0, (r % 2) ? 255 : 4));
        uq[p] = 12'($urandom);
      end
      lmax_vote <= vq; lmax_uid <= uq;
      bm = -1; bp = 0;
      for (int p = 0; p < P; p++) if (int'(vq[p]) > bm) begin bm = vq[p]; bp = p; end
      in_done <= 1; @(posedge clk); in_done <= 0;
      // inputs change while idle: the result must hold
      lmax_vote[0] <= 8'hFF;
      #1;
      checks++;
      if (!done || gmax_vote != 8'(bm) || gmax_uid != {5'(bp), uq[bp]}) begin
        failures++;
        $display("FAIL got %0d uid %h, expected %0d uid %h", gmax_vote, gmax_uid, bm, {5'(bp), uq[bp]});
      end
      @(posedge clk); #1;
      checks++;
      if (done || gmax_vote != 8'(bm)) begin failures++; $display("FAIL result not held"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
