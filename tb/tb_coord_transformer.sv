// tb_coord_transformer: loads the full (x, y) -> (u, v) table with a
// rotation-and-scale pattern computed here, then looks up random points
// back to back and checks (u, v) and the one-cycle latency.
module tb_coord_transformer;
  logic clk = 0, rst_n = 0, we = 0, in_valid = 0, out_valid;
  logic [15:0] waddr = 0, wdata = 0;
  logic [7:0]  x = 0, y = 0, u, v;
  int checks = 0, failures = 0;

  coord_transformer #(.XY_W(8), .UV_W(8)) dut (.*);

  always #5 clk = ~clk;

  // table pattern: u = x + y, v = y - x (a 45-degree rotation, scaled)
  function automatic logic [15:0] uv_of(logic [7:0] xx, logic [7:0] yy);
    return {8'(xx + yy), 8'(yy - xx)};
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] px [40];
    logic [7:0] py [40];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 65536; i++) begin
      we <= 1; waddr <= 16'(i); wdata <= uv_of(8'(i >> 8), 8'(i)); @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 40; i++) begin px[i] = 8'($urandom); py[i] = 8'($urandom); end
    for (int i = 0; i < 40; i++) begin
      in_valid <= 1;
      x <= px[i]; y <= py[i];
      @(posedge clk); #1;
      begin
        checks++;
        if (!out_valid || {u, v} != uv_of(px[i], py[i])) begin
          failures++;
          $display("FAIL (%0d,%0d) -> (%0d,%0d) valid=%0d", px[i], py[i], u, v, out_valid);
        end
      end
    end
    in_valid <= 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("FAIL out_valid stuck"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
