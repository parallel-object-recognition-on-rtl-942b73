// tb_bin_addr_bus: random tagged words into a 30-drop bus; every drop must
// show the word one cycle later, with last/plast only on valid words.
module tb_bin_addr_bus;
  localparam int P = 30;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_last = 0, in_plast = 0;
  logic [5:0] in_slice = 0;
  logic [12:0] in_bin = 0;
  logic [P-1:0] out_valid, out_last, out_plast;
  logic [P-1:0][5:0] out_slice;
  logic [P-1:0][12:0] out_bin;
  int checks = 0, failures = 0;

  bin_addr_bus #(.P(P), .SLICE_W(6), .BIN_W(13)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic v, l, pl; logic [5:0] s; logic [12:0] b;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    for (int i = 0; i < 300; i++) begin
      v = 1'($urandom); l = 1'($urandom); pl = 1'($urandom); s = 6'($urandom); b = 13'($urandom);
      in_valid <= v; in_last <= l; in_plast <= pl; in_slice <= s; in_bin <= b;
      @(posedge clk); #1;
      for (int p = 0; p < P; p++) begin
        checks++;
        if (out_valid[p] != v || out_last[p] != (v & l) || out_plast[p] != (v & pl) ||
            (v && (out_slice[p] != s || out_bin[p] != b))) begin
          failures++;
          $display("FAIL drop %0d word %0d", p, i);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
