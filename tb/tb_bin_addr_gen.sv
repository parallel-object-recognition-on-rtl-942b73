// tb_bin_addr_gen: loads the (u, v) -> bin table with a polar-style
// quantisation computed here (radius band and angle sector, 8K bins), then
// looks up random points back to back and checks bin and latency.
module tb_bin_addr_gen;
  logic clk = 0, rst_n = 0, we = 0, in_valid = 0, out_valid;
  logic [15:0] waddr = 0;
  logic [12:0] wdata = 0, bin;
  logic [7:0]  u = 0, v = 0;
  int checks = 0, failures = 0;

  bin_addr_gen #(.UV_W(8), .BIN_W(13)) dut (.*);

  always #5 clk = ~clk;

  // 64 radius bands x 128 angle sectors, computed with integer arithmetic
  // on signed (u, v): band from u*u + v*v, sector from the octant and ratio.
  function automatic logic [12:0] bin_of(logic [7:0] uu, logic [7:0] vv);
    int su = $signed(uu), sv = $signed(vv);
    int r2 = su * su + sv * sv;            // 0 .. 32768
    int band = (r2 >> 9) & 63;
    int oct  = ((su < 0) ? 4 : 0) + ((sv < 0) ? 2 : 0) + ((su * su < sv * sv) ? 1 : 0);
    int fine = (su == 0 && sv == 0) ? 0 : ((su < 0 ? -su : su) * 16 / ((su < 0 ? -su : su) + (sv < 0 ? -sv : sv) + 1)) & 15;
    return 13'({band[5:0], oct[2:0], fine[3:0]});
  endfunction

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] pu [40];
    logic [7:0] pv [40];
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 65536; i++) begin
      we <= 1; waddr <= 16'(i); wdata <= bin_of(8'(i >> 8), 8'(i)); @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 40; i++) begin pu[i] = 8'($urandom); pv[i] = 8'($urandom); end
    for (int i = 0; i < 40; i++) begin
      in_valid <= 1;
      u <= pu[i]; v <= pv[i];
      @(posedge clk); #1;
      begin
        checks++;
        if (!out_valid || bin != bin_of(pu[i], pv[i])) begin
          failures++;
          $display("FAIL (%0d,%0d) -> %0d expected %0d", pu[i], pv[i], bin, bin_of(pu[i], pv[i]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
