// tb_gh_probe_full: end-to-end probes through gh_probe_top.
//
// Builds a synthetic database and scene inside the testbench:
//  * S scene points with distinct coordinates; the co-ordinate transformer
//    and bin address generator tables are written only at the entries the
//    scene uses ((u, v) = a fixed permutation of (x, y), bin = a hash of
//    (u, v)), so several scene points can share a bin;
//  * hash-table words for every (PE, slice, bin) the probe reads, with
//    random bits of density 1/4 from a hash of (PE, slice, bin, lane);
//  * in the first probe, one planted UID recorded in every bin the scene
//    reaches, so it must win with S-2 votes.
// The testbench counts all P*N*T votes itself and checks the global
// maximum, its UID (ties: lowest PE, then slice, mux select, mux index),
// and the probe time against (S-2)*T plus a small pipeline constant.  It
// also counts how often each mechanism of the design happened: basis
// skips, slice hand-overs to the vote registers, register scans running
// while the next slice votes, and local maximum updates.
module tb_gh_probe_full;
  import gh_pkg::*;
  localparam int P = DEF_P, N = DEF_N, MUX = DEF_MUX, T = DEF_T, S = DEF_S;
  localparam int BIN_W = DEF_BIN_W, XY_W = DEF_XY_W, UV_W = DEF_UV_W, VOTE_W = DEF_VOTE_W;
`include "gh_probe_tb_body.svh"

  gh_probe_top dut (.*);
endmodule
