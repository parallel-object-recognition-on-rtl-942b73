// tb_gh_recognition_s200: the recognition test of tb_gh_recognition with a
// 200-point scene (the same 1024-model database, one planted model and 184
// clutter points).  The probe length is fixed when the engine is built, so
// this instance of gh_probe_top is built with S = 200; everything else keeps
// its default size.  Checks, as there: the engine's maximum equals the
// testbench's own vote count, the planted model and basis win, and the probe
// takes (S-2)*T + 14 = 198*64 + 14 = 12686 cycles.
module tb_gh_recognition_s200;
  import gh_pkg::*;
  localparam int P = DEF_P, N = DEF_N, T = DEF_T, S = 200, BIN_W = DEF_BIN_W;
  localparam int M = 1024, NF = 16, PAIRS = NF * (NF - 1) / 2;
  localparam int UIDS = M * PAIRS, NB = 1 << BIN_W;
  localparam int TRUE_MODEL = 617;
  localparam real SCALE = 32.0;      // (u, v) quantisation steps per unit

  `include "gh_recognition_tb_body.svh"

  // watchdog: loading and the probe take about 33000 cycles
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  gh_probe_top #(.S(S)) dut (.*);
endmodule
