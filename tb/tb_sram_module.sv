// tb_sram_module: writes random words at random addresses of a full-size
// 512K x 32 module and reads them back with one cycle of latency.
module tb_sram_module;
  logic clk = 0, we = 0;
  logic [18:0] addr = 0;
  logic [31:0] wdata = 0, rdata;
  logic [18:0] a [64];
  logic [31:0] d [64];
  int checks = 0, failures = 0;

  sram_module #(.AW(19), .DW(32)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      a[i] = (i == 0) ? 19'h0 : (i == 1) ? 19'h7FFFF : 19'(i * 8191 + $urandom_range(0, 100));
      d[i] = $urandom;
    end
    for (int i = 0; i < 64; i++) begin
      we <= 1; addr <= a[i]; wdata <= d[i]; @(posedge clk);
    end
    we <= 0;
    for (int i = 0; i < 64; i++) begin
      addr <= a[i]; @(posedge clk); #1;
      checks++;
      if (rdata != d[i]) begin
        failures++;
        $display("FAIL addr=%h rdata=%h expected=%h", a[i], rdata, d[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
