// gh_recognition_tb_body.svh: shared body of the recognition testbenches.
// Included inside a testbench module after the size localparams (P, N, T,
// S, BIN_W, M, NF, PAIRS, UIDS, NB, TRUE_MODEL, SCALE) and before the
// instance 'dut' of gh_probe_top and the watchdog, which the including
// module declares.
// See tb_gh_recognition.sv for what the test does.

  logic clk, rst_n = 0, start = 0;
  logic [7:0] basis_a = 0, basis_b = 0;
  logic busy, done;
  logic [7:0]  gmax_vote;
  logic [16:0] gmax_uid;
  logic scene_we = 0; logic [7:0] scene_addr = 0; logic [15:0] scene_data = 0;
  logic ct_we = 0; logic [15:0] ct_addr = 0; logic [15:0] ct_data = 0;
  logic bg_we = 0; logic [15:0] bg_addr = 0; logic [12:0] bg_data = 0;
  logic hm_we = 0; logic [18:0] hm_addr = 0; logic [P-1:0][N-1:0] hm_data = '0;

  int checks = 0, failures = 0;
  real mx [M][NF];
  real my [M][NF];
  int  sx [S];
  int  sy [S];
  int  sbin [S];
  int  slot_of [NB];
  int  nslots = 0;
  int  slot_bin [S];
  bit  table_bits [S][UIDS];    // bit-level hash bins of the bins the scene reaches
  int  votes [UIDS];

  initial begin clk = 0; forever #50 clk = ~clk; end

  function automatic real gauss();
    real u1, u2;
    u1 = (real'($urandom_range(1, 1000000))) / 1000001.0;
    u2 = (real'($urandom_range(0, 1000000))) / 1000001.0;
    return $sqrt(-2.0 * $ln(u1)) * $cos(6.283185307179586 * u2);
  endfunction

  function automatic int q8(real r);
    int q;
    q = int'($floor(r * SCALE + 0.5));
    if (q > 127) q = 127;
    if (q < -128) q = -128;
    return q;
  endfunction

  // bin of a quantised (u, v): what the bin address generator table holds
  function automatic int hash_bin(int qu, int qv);
    real u, v, r, a;
    int ri, ai;
    u = real'(qu) / SCALE;
    v = real'(qv) / SCALE;
    r = 1.0 - $exp(-(u * u + v * v) / 3.0);
    a = $atan2(v, u) + 3.141592653589793;
    ri = int'($floor(r * 64.0));
    ai = int'($floor(a * 128.0 / 6.283185307179586));
    if (ri > 63) ri = 63;
    if (ai > 127) ai = 127;
    return ri * 128 + ai;
  endfunction

  // (u, v) of point (px, py) in the frame of basis (ax, ay) -> (bx, by)
  function automatic void to_frame(real ax, real ay, real bx, real by, real px, real py,
                                   output real u, output real v);
    real dx, dy, d2;
    dx = bx - ax; dy = by - ay; d2 = dx * dx + dy * dy;
    u = ((px - ax) * dx + (py - ay) * dy) / d2;
    v = ((py - ay) * dx - (px - ax) * dy) / d2;
  endfunction

  initial begin
    int perm [S];
    int ia, ib, bm, bu, second, cyc, uid, k;
    real u, v, c, s, sc;
    logic [P-1:0][N-1:0] hd;

    // ------------------------------------------------ model database
    for (int m = 0; m < M; m++)
      for (int i = 0; i < NF; i++) begin mx[m][i] = gauss(); my[m][i] = gauss(); end

    // ------------------------------------------------ scene
    for (int i = 0; i < S; i++) perm[i] = i;
    for (int i = S - 1; i > 0; i--) begin
      int j, t;
      j = $urandom_range(0, i);
      t = perm[i]; perm[i] = perm[j]; perm[j] = t;
    end
    c = $cos(0.7); s = $sin(0.7); sc = 22.0;
    for (int i = 0; i < S; i++) begin
      real x, y;
      if (i < NF) begin
        x = 128.0 + sc * (c * mx[TRUE_MODEL][i] - s * my[TRUE_MODEL][i]) + 9.0;
        y = 128.0 + sc * (s * mx[TRUE_MODEL][i] + c * my[TRUE_MODEL][i]) - 6.0;
      end else begin
        x = 128.0 + 40.0 * gauss();
        y = 128.0 + 40.0 * gauss();
      end
      sx[perm[i]] = int'($floor(x + 0.5)) < 0 ? 0 : int'($floor(x + 0.5)) > 255 ? 255 : int'($floor(x + 0.5));
      sy[perm[i]] = int'($floor(y + 0.5)) < 0 ? 0 : int'($floor(y + 0.5)) > 255 ? 255 : int'($floor(y + 0.5));
    end
    ia = perm[0]; ib = perm[1];
    $display("model point 0 at scene %0d (%0d, %0d), point 1 at scene %0d (%0d, %0d)",
             ia, sx[ia], sy[ia], ib, sx[ib], sy[ib]);

    // scene points that share a grid position with another would need two
    // different table entries; move the later point off the occupied position
    for (int i = 0; i < S; i++)
      for (int j = 0; j < i; j++)
        if (sx[i] == sx[j] && sy[i] == sy[j]) begin
          sx[i] = (sx[i] + 3) & 255;
          j = -1;
        end

    // bins of the scene points for this basis
    for (int b = 0; b < NB; b++) slot_of[b] = -1;
    for (int i = 0; i < S; i++) begin
      to_frame(sx[ia], sy[ia], sx[ib], sy[ib], sx[i], sy[i], u, v);
      sbin[i] = hash_bin(q8(u), q8(v));
      if (slot_of[sbin[i]] < 0) begin
        slot_of[sbin[i]] = nslots; slot_bin[nslots] = sbin[i]; nslots++;
      end
    end

    // ------------------------------------------------ bit-level hash bins
    for (int sl = 0; sl < S; sl++) for (int x = 0; x < UIDS; x++) table_bits[sl][x] = 0;
    for (int m = 0; m < M; m++) begin
      k = 0;
      for (int i = 0; i < NF; i++)
        for (int j = i + 1; j < NF; j++) begin
          uid = m * PAIRS + k;
          for (int p = 0; p < NF; p++) begin
            int bin;
            if (p == i || p == j) continue;
            to_frame(mx[m][i], my[m][i], mx[m][j], my[m][j], mx[m][p], my[m][p], u, v);
            bin = hash_bin(q8(u), q8(v));
            if (slot_of[bin] >= 0) table_bits[slot_of[bin]][uid] = 1;
          end
          k++;
        end
    end

    // reference votes
    for (int x = 0; x < UIDS; x++) votes[x] = 0;
    for (int i = 0; i < S; i++) begin
      if (i == ia || i == ib) continue;
      for (int x = 0; x < UIDS; x++) votes[x] += int'(table_bits[slot_of[sbin[i]]][x]);
    end
    bm = 0; bu = 0;
    for (int p = 0; p < P; p++)
      for (int j = 0; j < T; j++)
        for (int kk = 0; kk < 8; kk++)
          for (int g = 0; g < N / 8; g++) begin
            uid = p * N * T + j * N + g * 8 + kk;
            if (votes[uid] > bm) begin bm = votes[uid]; bu = uid; end
          end
    second = 0;
    for (int x = 0; x < UIDS; x++) if (x != bu && votes[x] > second) second = votes[x];
    $display("scene bins: %0d distinct; reference maximum %0d votes at UID %0d (model %0d, pair %0d), runner-up %0d votes",
             nslots, bm, bu, bu / PAIRS, bu % PAIRS, second);

    // ------------------------------------------------ load the engine
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < S; i++) begin
      to_frame(sx[ia], sy[ia], sx[ib], sy[ib], sx[i], sy[i], u, v);
      scene_we <= 1; scene_addr <= 8'(i); scene_data <= {8'(sx[i]), 8'(sy[i])};
      ct_we <= 1; ct_addr <= {8'(sx[i]), 8'(sy[i])}; ct_data <= {8'(q8(u)), 8'(q8(v))};
      bg_we <= 1; bg_addr <= {8'(q8(u)), 8'(q8(v))}; bg_data <= 13'(sbin[i]);
      @(posedge clk);
    end
    scene_we <= 0; ct_we <= 0; bg_we <= 0;
    for (int j = 0; j < T; j++)
      for (int sl = 0; sl < nslots; sl++) begin
        for (int p = 0; p < P; p++)
          for (int b = 0; b < N; b++) hd[p][b] = table_bits[sl][p * N * T + j * N + b];
        hm_we <= 1; hm_addr <= {6'(j), 13'(slot_bin[sl])}; hm_data <= hd;
        @(posedge clk);
      end
    hm_we <= 0;

    // ------------------------------------------------ probe
    @(posedge clk);
    basis_a <= 8'(ia); basis_b <= 8'(ib); start <= 1;
    @(posedge clk); start <= 0; #1;
    cyc = 0;
    while (!done && cyc < 40000) begin @(posedge clk); #1; cyc++; end
    $display("probe: %0d cycles (%0.3f ms at 10 MHz), maximum %0d votes at UID %0d (model %0d, pair %0d)",
             cyc, cyc * 1.0e-4, gmax_vote, gmax_uid, int'(gmax_uid) / PAIRS, int'(gmax_uid) % PAIRS);
    checks++;
    if (gmax_vote != 8'(bm) || gmax_uid != 17'(bu)) begin
      failures++; $display("FAIL engine result differs from the reference count");
    end
    checks++;
    if (gmax_uid != 17'(TRUE_MODEL * PAIRS) || gmax_vote < 10) begin
      failures++; $display("FAIL model %0d with basis (0, 1) not recognised", TRUE_MODEL);
    end
    checks++;
    if (second >= bm) begin
      failures++; $display("FAIL winner not unique: runner-up has %0d votes", second);
    end
    checks++;
    if (cyc != (S - 2) * T + 14) begin
      failures++; $display("FAIL probe took %0d cycles, expected %0d", cyc, (S - 2) * T + 14);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
