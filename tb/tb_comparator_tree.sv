// tb_comparator_tree: random and tie-heavy vote vectors into an 8-input and
// a 30-input (non power of two) tree; maximum and lowest index of the
// maximum are compared with a linear search.
module tb_comparator_tree;
  logic [7:0][7:0]  v8;
  logic [7:0]       m8;
  logic [2:0]       i8;
  logic [29:0][7:0] v30;
  logic [7:0]       m30;
  logic [4:0]       i30;
  int checks = 0, failures = 0;

  comparator_tree #(.IN(8),  .VW(8)) dut8  (.vals(v8),  .max_val(m8),  .max_idx(i8));
  comparator_tree #(.IN(30), .VW(8)) dut30 (.vals(v30), .max_val(m30), .max_idx(i30));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int unsigned bm, bi;
    for (int r = 0; r < 500; r++) begin
      int range = (r % 2) ? 255 : 3;     // odd rounds: wide values, even: many ties
      for (int i = 0; i < 8; i++)  v8[i]  = 8'($urandom_range(0, range));
      for (int i = 0; i < 30; i++) v30[i] = 8'($urandom_range(0, range));
      #1;
      bm = 0; bi = 0;
      for (int i = 0; i < 8; i++) if (v8[i] > bm) begin bm = v8[i]; bi = i; end
      checks++;
      if (m8 != 8'(bm) || i8 != 3'(bi)) begin
        failures++;
        $display("FAIL 8: max=%0d idx=%0d expected %0d/%0d", m8, i8, bm, bi);
      end
      bm = 0; bi = 0;
      for (int i = 0; i < 30; i++) if (v30[i] > bm) begin bm = v30[i]; bi = i; end
      checks++;
      if (m30 != 8'(bm) || i30 != 5'(bi)) begin
        failures++;
        $display("FAIL 30: max=%0d idx=%0d expected %0d/%0d", m30, i30, bm, bi);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
