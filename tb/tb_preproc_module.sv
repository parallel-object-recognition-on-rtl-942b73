// tb_preproc_module: a 16-point scene, T = 3 slices, 4-bit coordinates and
// 256 bins.  The scene buffer and both look-up tables are loaded with
// patterns computed here; a probe must then emit, for every slice, the bin
// of each non-basis scene point in scene order, tagged with the slice and
// last/plast flags, one per cycle, the first 3 cycles after 'start'.
module tb_preproc_module;
  localparam int S = 16, T = 3, XW = 4, UW = 4, BW = 8;
  logic clk = 0, rst_n = 0, start = 0;
  logic [3:0] basis_a = 0, basis_b = 0;
  logic issuing, skipped;
  logic scene_we = 0; logic [3:0] scene_addr = 0; logic [7:0] scene_data = 0;
  logic ct_we = 0; logic [7:0] ct_addr = 0; logic [7:0] ct_data = 0;
  logic bg_we = 0; logic [7:0] bg_addr = 0; logic [7:0] bg_data = 0;
  logic out_valid, out_last, out_plast;
  logic [1:0] out_slice;
  logic [7:0] out_bin;
  int checks = 0, failures = 0, n_skip = 0;
  logic [7:0] scene [S];

  preproc_module #(.S(S), .T(T), .XY_W(XW), .UV_W(UW), .BIN_W(BW)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && skipped) n_skip++;

  function automatic logic [7:0] uv_of(logic [7:0] xy);   // {u, v}
    return {4'(xy[7:4] ^ xy[3:0]), 4'(xy[7:4] + 2 * xy[3:0])};
  endfunction
  function automatic logic [7:0] bin_of(logic [7:0] uv);
    return 8'(uv * 37 + 11);
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic probe(input int a, input int b);
    int lat = 0, errs = 0, idx;
    basis_a <= 4'(a); basis_b <= 4'(b); start <= 1;
    @(posedge clk); start <= 0; #1;
    while (!out_valid && lat < 20) begin @(posedge clk); #1; lat++; end
    checks++;
    if (lat != 3) begin failures++; $display("FAIL first word %0d cycles after start", lat); end
    for (int j = 0; j < T; j++) begin
      idx = 0;
      for (int i = 0; i < S - 2; i++) begin
        while (idx == a || idx == b) idx++;
        if (!out_valid || out_bin != bin_of(uv_of(scene[idx])) || out_slice != 2'(j) ||
            out_last != (i == S - 3) || out_plast != (i == S - 3 && j == T - 1)) begin
          errs++;
          $display("FAIL slice %0d point %0d (scene %0d): bin %0d expected %0d", j, i, idx,
                   out_bin, bin_of(uv_of(scene[idx])));
        end
        idx++;
        @(posedge clk); #1;
      end
    end
    checks++;
    if (errs != 0 || out_valid) begin failures++; $display("FAIL stream: %0d errors, valid after end %0d", errs, out_valid); end
    repeat (2) @(posedge clk);
  endtask

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 256; i++) begin
      ct_we <= 1; ct_addr <= 8'(i); ct_data <= uv_of(8'(i));
      bg_we <= 1; bg_addr <= 8'(i); bg_data <= bin_of(8'(i));
      if (i < S) begin
        scene[i] = 8'($urandom);
        scene_we <= 1; scene_addr <= 4'(i); scene_data <= scene[i];
      end else scene_we <= 0;
      @(posedge clk);
    end
    ct_we <= 0; bg_we <= 0; scene_we <= 0;
    @(posedge clk);
    probe(0, 15);
    probe(7, 3);
    probe(14, 15);
    checks++;
    if (n_skip == 0) begin failures++; $display("FAIL basis skip never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
