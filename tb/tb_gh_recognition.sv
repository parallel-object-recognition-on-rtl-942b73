// tb_gh_recognition: object recognition with a real geometric-hashing table,
// at the default sizes of gh_probe_top (256-point scene).  The body is in
// gh_recognition_tb_body.svh, shared with tb_gh_recognition_s200.
//
// Database: 1024 models of 16 feature points drawn from a unit Gaussian.
// For every unordered point pair (i < j) of a model, the basis frame has its
// origin at point i and its unit x axis at point j; every other point is
// transformed into that frame, its (u, v) quantised to 8 bits (step 1/32)
// and hashed with the equalising function
//     r = 1 - exp(-(u^2 + v^2) / 3),  a = atan2(v, u)
// into bin  floor(64 r) * 128 + floor(128 (a + pi) / 2 pi)  of 8K bins.
// UID = model * 120 + pair index, giving the 122880 UIDs of the table.
//
// Scene: model 617 rotated, scaled and shifted onto the 8-bit (x, y) grid,
// plus S - 16 = 240 Gaussian clutter points, in random order.  The basis is the scene
// image of the model's points 0 and 1.  The testbench writes the scene, the
// co-ordinate table entries of the scene points for that basis, the bin
// table entries of the resulting (u, v), and the hash-table words of every
// bin the scene reaches.  It checks that the probe returns the maximum of
// its own vote count, that this maximum is the true (model 617, pair (0, 1))
// with at least 10 of its 14 possible votes and no other pair ties it, and
// that the probe takes (S-2)*T + 14 cycles.
module tb_gh_recognition;
  import gh_pkg::*;
  localparam int P = DEF_P, N = DEF_N, T = DEF_T, S = DEF_S, BIN_W = DEF_BIN_W;
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

  gh_probe_top dut (.*);
endmodule
