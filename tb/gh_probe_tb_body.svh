// Shared body of the end-to-end testbenches of gh_probe_top.  The including
// module defines the localparams P, N, MUX, T, S, BIN_W, XY_W, UV_W, VOTE_W
// and instantiates gh_probe_top as 'dut' after this text.

  localparam int SW   = $clog2(S);
  localparam int TW   = (T > 1) ? $clog2(T) : 1;
  localparam int PW   = (P > 1) ? $clog2(P) : 1;
  localparam int LUW  = TW + $clog2(N);
  localparam int UIDW = PW + LUW;
  localparam int NB   = 1 << BIN_W;
  localparam int G    = N / MUX;
  localparam int XYM  = (1 << (2 * XY_W)) - 1;
  localparam int UVM  = (1 << (2 * UV_W)) - 1;

  logic clk = 0, rst_n = 0, start = 0;
  logic [SW-1:0] basis_a = 0, basis_b = 0;
  logic busy, done;
  logic [VOTE_W-1:0] gmax_vote;
  logic [UIDW-1:0]   gmax_uid;
  logic scene_we = 0; logic [SW-1:0] scene_addr = 0; logic [2*XY_W-1:0] scene_data = 0;
  logic ct_we = 0; logic [2*XY_W-1:0] ct_addr = 0; logic [2*UV_W-1:0] ct_data = 0;
  logic bg_we = 0; logic [2*UV_W-1:0] bg_addr = 0; logic [BIN_W-1:0] bg_data = 0;
  logic hm_we = 0; logic [TW+BIN_W-1:0] hm_addr = 0; logic [P-1:0][N-1:0] hm_data = '0;

  int checks = 0, failures = 0;
  int n_skip = 0, n_handover = 0, n_overlap = 0, n_update = 0, n_done = 0;
  int pt_bin [S];
  int votes [P][T][N];

  always #50 clk = ~clk;     // 10 MHz

  always @(posedge clk) if (rst_n) begin
    if (dut.u_pre.u_ctrl.skipped) n_skip++;
    if (dut.g_pe[0].u_pe.u_fpga.snap) n_handover++;
    if (dut.g_pe[0].u_pe.u_fpga.scan_active && dut.g_pe[0].u_pe.u_fpga.valid) n_overlap++;
    if (|dut.l_upd) n_update++;
    if (done) n_done++;
  end

  initial begin
    repeat (4 * (S - 2) * T + 2 * S * T + 2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] h32(int a, int b, int c, int d);
    logic [31:0] x;
    x = 32'(a) * 32'h9E3779B1 ^ 32'(b) * 32'h85EBCA77 ^ 32'(c) * 32'hC2B2AE3D ^ 32'(d) * 32'h27D4EB2F;
    x = x ^ (x >> 15); x = x * 32'h2C1B3C6D;
    x = x ^ (x >> 12); x = x * 32'h297A2D39;
    x = x ^ (x >> 15);
    return x;
  endfunction

  // hash-table word of PE p, slice j, bin b; density 1/4, plus the planted UID
  function automatic logic [N-1:0] word_of(int p, int j, int b, int seed, int plant);
    logic [N-1:0] w;
    for (int c = 0; c < (N + 31) / 32; c++) begin
      logic [31:0] r;
      r = h32(p, j, b, 4 * c + 16 * seed) & h32(p, j, b, 4 * c + 1 + 16 * seed);
      for (int k = 0; k < 32; k++) if (32 * c + k < N) w[32 * c + k] = r[k];
    end
    if (plant >= 0 && plant / (N * T) == p && (plant / N) % T == j) w[plant % N] = 1'b1;
    return w;
  endfunction

  function automatic int xy_of(int i);  return (i * 40503 + 12345) & XYM;  endfunction
  function automatic int uv_of(int xy); return ((xy * 3) ^ 23100) & UVM;    endfunction
  function automatic int bin_of(int uv);
    logic [31:0] x = 32'(uv) * 32'h9E3779B1;
    return int'(x >> 13) & (NB - 1);
  endfunction

  task automatic run_probe(input int a, input int b, input int seed, input int plant);
    int bm, bu, cyc, errs;
    logic [P-1:0][N-1:0] hd;
    // hash-table words of every bin this scene reaches
    for (int j = 0; j < T; j++)
      for (int i = 0; i < S; i++) begin
        for (int p = 0; p < P; p++) hd[p] = word_of(p, j, pt_bin[i], seed, plant);
        hm_we <= 1; hm_addr <= (TW + BIN_W)'(j * NB + pt_bin[i]); hm_data <= hd;
        @(posedge clk);
      end
    hm_we <= 0;
    // reference votes
    for (int p = 0; p < P; p++) for (int j = 0; j < T; j++) for (int k = 0; k < N; k++) votes[p][j][k] = 0;
    for (int i = 0; i < S; i++) begin
      if (i == a || i == b) continue;
      for (int p = 0; p < P; p++)
        for (int j = 0; j < T; j++) begin
          logic [N-1:0] w = word_of(p, j, pt_bin[i], seed, plant);
          for (int k = 0; k < N; k++) votes[p][j][k] += int'(w[k]);
        end
    end
    bm = 0; bu = 0;
    for (int p = 0; p < P; p++)
      for (int j = 0; j < T; j++)
        for (int k = 0; k < MUX; k++)
          for (int g = 0; g < G; g++)
            if (votes[p][j][g*MUX+k] > bm) begin bm = votes[p][j][g*MUX+k]; bu = p*N*T + j*N + g*MUX + k; end
    // run it
    @(posedge clk);
    basis_a <= SW'(a); basis_b <= SW'(b); start <= 1;
    @(posedge clk); start <= 0; #1;
    cyc = 0;
    while (!done && cyc < 2 * (S - 2) * T + 100) begin @(posedge clk); #1; cyc++; end
    // every PE's local maximum vote
    errs = 0;
    for (int p = 0; p < P; p++) begin
      int pm = 0;
      for (int j = 0; j < T; j++) for (int k = 0; k < N; k++) if (votes[p][j][k] > pm) pm = votes[p][j][k];
      if (dut.l_vote[p] != VOTE_W'(pm)) begin
        errs++;
        if (errs < 4) $display("FAIL PE %0d local max %0d, expected %0d", p, dut.l_vote[p], pm);
      end
    end
    checks++;
    if (errs != 0) failures++;
    checks++;
    if (gmax_vote != VOTE_W'(bm) || gmax_uid != UIDW'(bu)) begin
      failures++;
      $display("FAIL global max %0d uid %0d, expected %0d uid %0d", gmax_vote, gmax_uid, bm, bu);
    end
    if (plant >= 0) begin
      checks++;
      if (gmax_uid != UIDW'(plant) || gmax_vote != VOTE_W'(S - 2)) begin
        failures++; $display("FAIL planted UID %0d not found with %0d votes", plant, S - 2);
      end
    end
    checks++;
    if (cyc < (S - 2) * T || cyc > (S - 2) * T + 20) begin
      failures++; $display("FAIL probe took %0d cycles, expected (S-2)*T = %0d plus at most 20", cyc, (S - 2) * T);
    end
    $display("probe basis (%0d,%0d): %0d cycles = %0.3f ms at 10 MHz, (S-2)*T = %0d; max %0d votes, UID %0d",
             a, b, cyc, cyc * 1.0e-4, (S - 2) * T, gmax_vote, gmax_uid);
    errs = 0;
    @(posedge clk); #1;
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    // scene buffer and the table entries the scene uses
    for (int i = 0; i < S; i++) begin
      int xy, uv;
      xy = xy_of(i);
      uv = uv_of(xy);
      pt_bin[i] = bin_of(uv);
      scene_we <= 1; scene_addr <= SW'(i); scene_data <= (2 * XY_W)'(xy);
      ct_we <= 1; ct_addr <= (2 * XY_W)'(xy); ct_data <= (2 * UV_W)'(uv);
      bg_we <= 1; bg_addr <= (2 * UV_W)'(uv); bg_data <= BIN_W'(pt_bin[i]);
      @(posedge clk);
    end
    scene_we <= 0; ct_we <= 0; bg_we <= 0;
    run_probe(0, 1, 0, (P - 1) * N * T + (T / 2) * N + 5);
    run_probe(S - 1, 3, 1, -1);
    run_probe(S / 2, S / 2 - 1, 2, -1);
    checks++;
    if (n_done != 3) begin failures++; $display("FAIL %0d probes completed, expected 3", n_done); end
    $display("mechanisms: basis skips %0d, slice hand-overs %0d, scan/vote overlap cycles %0d, local max updates %0d",
             n_skip, n_handover, n_overlap, n_update);
    checks++; if (n_skip == 0)     begin failures++; $display("FAIL basis skip never happened"); end
    checks++; if (n_handover == 0) begin failures++; $display("FAIL slice hand-over never happened"); end
    checks++; if (n_overlap == 0)  begin failures++; $display("FAIL scan never overlapped voting"); end
    checks++; if (n_update == 0)   begin failures++; $display("FAIL local max never updated"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
