// tb_mux8to1: every select value with random data; the output must be the
// selected input.
module tb_mux8to1;
  logic [7:0][7:0] din;
  logic [2:0] sel;
  logic [7:0] dout;
  int checks = 0, failures = 0;

  mux8to1 #(.W(8), .IN(8)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 200; r++) begin
      for (int i = 0; i < 8; i++) din[i] = 8'($urandom);
      sel = 3'($urandom);
      #1;
      checks++;
      if (dout !== din[sel]) begin
        failures++;
        $display("FAIL sel=%0d dout=%0d expected=%0d", sel, dout, din[sel]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
