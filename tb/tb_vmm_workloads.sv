// tb_vmm_workloads: runs the applications that the multiplier is meant for on
// the full-size design (vmm_top at its default parameters) and checks the
// results against arithmetic done in the bench.
//
// A host process sends one frame at a time (an A vector, and per SED a
// command and a row); every command sets write_c, so the product of the
// inputs sent in frame f is read from the output bus in frame f+2. The
// detector read-out drops the 4 low bits of the exact 24-bit sum, so each
// single result is checked against (exact >> 4); results combined by the host
// from several products are checked against a tolerance of 16 per product.
//   1. matrix x matrix: a 256x256 matrix M held in the SLM (SLM_HOLD) while
//      the 256 rows of X stream through A, one per frame;
//   2. 64 pairs of 4x4 matrix products packed block-diagonally into one
//      256x256 matrix, 4 frames;
//   3. convolution of a 511-sample signal with a 256-tap mask: SED j holds the
//      signal shifted by j, 1 frame;
//   4. motion estimation: 1536 candidate 16x16 blocks of a 32x48 window, as 6
//      matrices loaded into the SED buffers (operation a) and then replayed
//      (operation c) against the current block, followed by the argmax;
//   5. complex vector x complex matrix: four real products U.X, U.Y, V.Y, V.X
//      with X taken from the input and Y from the buffer, combined by the host;
//   6. L2 distances of one vector to 256 vectors, 1 frame, with the squared
//      norms added by the host.
// Every mechanism used (SLM hold, buffer load, buffer replay, op b) is counted
// and must occur.
module tb_vmm_workloads;
  import vmm_pkg::*;

  localparam int NSED = 256;
  localparam int MAXF = 320;
  typedef logic [VEC_LEN-1:0][ELEM_W-1:0] vec_t;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic ce, frame_end, a_valid, a_incomplete, c_bus_valid;
  logic [2:0] beat, c_bus_group;
  logic [BUS_W-1:0] a_data;
  vec_t vcsel_drive;
  logic [N_ALU-1:0][ALU_BUS_W-1:0] bus_data;
  logic [N_ALU-1:0][ALU_BUS_W/SYNC_GROUP-1:0] bus_sync;
  sed_cmd_t [NSED-1:0] cmd;
  logic [C_BUS_W-1:0] c_bus;
  logic [31:0] c_bus_mask;
  logic [NSED-1:0][3:0] buf_count;
  logic [NSED-1:0] err_overflow, err_underflow, err_data;
  logic [N_ALU-1:0] sync_err;

  vmm_top dut (.*);

  // ------------------------------------------------------------ host side
  vec_t     cur_a;
  sed_cmd_t cur_cmd [NSED];
  vec_t     cur_row [NSED];
  int       fr = 0;                       // frame being sent
  logic [C_W-1:0] res [MAXF][NSED];       // results read in frame f
  int n_hold = 0, n_load = 0, n_replay = 0, n_ext = 0;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic sed_cmd_t mk(bit bw, slm_src_e s);
    sed_cmd_t c;
    c.buf_write = bw; c.slm_src = s; c.write_c = 1'b1;
    return c;
  endfunction

  // Sends one frame and returns its number. Called at the clock edge that
  // ends the previous frame; the bus driver picks the values up half a clock
  // later.
  int nsent = 0;
  task automatic send(vec_t a, sed_cmd_t c [NSED], vec_t rows [NSED], output int f);
    cur_a = a;
    cur_cmd = c;
    cur_row = rows;
    f = nsent++;
    for (int j = 0; j < NSED; j++) begin
      n_hold   += int'(c[j].slm_src == SLM_HOLD);
      n_ext    += int'(c[j].slm_src == SLM_FROM_EXT);
      n_replay += int'(c[j].slm_src == SLM_FROM_BUF);
      n_load   += int'(c[j].buf_write);
    end
    @(posedge clk iff frame_end);
  endtask

  task automatic idle(int n);
    sed_cmd_t c [NSED];
    vec_t r [NSED];
    int f;
    for (int j = 0; j < NSED; j++) begin c[j] = mk(0, SLM_HOLD); r[j] = '0; end
    repeat (n) send('0, c, r, f);
  endtask

  // drive the buses from cur_* on every clock
  always @(negedge clk) if (!rst) begin
    a_valid = 1'b1;
    a_data  = cur_a[int'(beat)*32 +: 32];
    for (int j = 0; j < NSED; j++) cmd[j] = cur_cmd[j];
    for (int e = 0; e < N_ALU; e++)
      for (int m = 0; m < 8; m++)
        bus_data[e][m*256 +: 256] = cur_row[e*16 + int'(dut.phase)*8 + m][int'(beat)*32 +: 32];
    bus_sync = '1;
  end

  // collect the output words: at the ce of beat b the bus shows the word
  // registered on the previous ce, group b-2; groups 6 and 7 are seen in
  // beats 0 and 1 of the following frame
  always @(negedge clk) if (!rst && ce) begin
    int g, sf;
    g  = int'(c_bus_group);
    sf = (beat < 3'd2) ? fr - 1 : fr;
    if (c_bus_valid && sf >= 0 && sf < MAXF)
      for (int m = 0; m < 32; m++) if (c_bus_mask[m]) res[sf][g*32 + m] = c_bus[m*20 +: 20];
  end
  int n_err = 0;
  always @(posedge clk) if (!rst && ce)
    n_err += int'(|err_overflow) + int'(|err_underflow) + int'(|err_data) + int'(a_incomplete) + int'(|sync_err);
  always @(posedge clk) if (!rst && frame_end) fr <= fr + 1;

  function automatic logic [C_W-1:0] dot(vec_t a, vec_t b);
    logic [23:0] s = '0;
    for (int i = 0; i < VEC_LEN; i++) s += 24'(a[i]) * 24'(b[i]);
    return C_W'(s >> 4);
  endfunction

  function automatic longint edot(vec_t a, vec_t b);
    longint s = 0;
    for (int i = 0; i < VEC_LEN; i++) s += longint'(a[i]) * longint'(b[i]);
    return s;
  endfunction

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < VEC_LEN; i += 4) v[i +: 4] = $urandom;
    return v;
  endfunction

  initial begin
    int cyc = 0;
    forever begin
      @(posedge clk);
      if (++cyc > 16 * MAXF) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // ------------------------------------------------------------ workloads
  vec_t M [NSED], X [NSED];
  sed_cmd_t cc [NSED];
  vec_t rows [NSED];
  int   f0;

  initial begin
    int f;
    cur_a = '0;
    for (int j = 0; j < NSED; j++) begin cur_cmd[j] = '0; cur_row[j] = '0; end
    a_valid = 1'b0; a_data = '0; bus_data = '0; bus_sync = '0; cmd = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    idle(1);

    // 1. matrix x matrix: C = X * M^T, M held in the SLM
    for (int j = 0; j < NSED; j++) begin M[j] = rand_vec(); X[j] = rand_vec(); end
    for (int k = 0; k < NSED; k++) begin
      for (int j = 0; j < NSED; j++) cc[j] = mk(0, (k == 0) ? SLM_FROM_EXT : SLM_HOLD);
      send(X[k], cc, M, f);
      if (k == 0) f0 = f;
    end
    idle(3);
    for (int k = 0; k < NSED; k++)
      for (int j = 0; j < NSED; j++) begin
        check(res[f0 + k + 2][j] == dot(X[k], M[j]), "matrix x matrix");
      end

    // 2. 64 pairs of 4x4 products, L_p * R_p, block-diagonal packing
    begin
      logic [7:0] L [64][4][4], R [64][4][4];
      for (int p = 0; p < 64; p++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin L[p][r][c] = 8'($urandom); R[p][r][c] = 8'($urandom); end
      for (int j = 0; j < NSED; j++) begin
        rows[j] = '0;
        for (int k = 0; k < 4; k++) rows[j][(j / 4) * 4 + k] = R[j / 4][k][j % 4];
      end
      for (int r = 0; r < 4; r++) begin
        vec_t a;
        for (int p = 0; p < 64; p++) for (int k = 0; k < 4; k++) a[p*4 + k] = L[p][r][k];
        for (int j = 0; j < NSED; j++) cc[j] = mk(0, (r == 0) ? SLM_FROM_EXT : SLM_HOLD);
        send(a, cc, rows, f);
        if (r == 0) f0 = f;
      end
      idle(3);
      for (int p = 0; p < 64; p++)
        for (int r = 0; r < 4; r++)
          for (int c = 0; c < 4; c++) begin
            int s;
            s = 0;
            for (int k = 0; k < 4; k++) s += int'(L[p][r][k]) * int'(R[p][k][c]);
            check(res[f0 + r + 2][p*4 + c] == C_W'(s >> 4), "4x4 block product");
          end
    end

    // 3. convolution / correlation: y_j = sum_i s[j+i] * x[i]
    begin
      logic [7:0] s [511];
      vec_t x;
      for (int i = 0; i < 511; i++) s[i] = 8'($urandom);
      x = rand_vec();
      for (int j = 0; j < NSED; j++) begin
        for (int i = 0; i < VEC_LEN; i++) rows[j][i] = s[j + i];
        cc[j] = mk(0, SLM_FROM_EXT);
      end
      send(x, cc, rows, f0);
      idle(3);
      for (int j = 0; j < NSED; j++) begin
        int y;
        y = 0;
        for (int i = 0; i < VEC_LEN; i++) y += int'(s[j + i]) * int'(x[i]);
        check(res[f0 + 2][j] == C_W'(y >> 4), "convolution output");
      end
    end

    // 4. motion estimation: 1536 candidates = 6 matrices through the buffers
    begin
      logic [7:0] win [32][48];
      vec_t blk, cand [1536];
      int best, best_val, got_best, got_val;
      for (int r = 0; r < 32; r++) for (int c = 0; c < 48; c++) win[r][c] = 8'($urandom);
      // candidate n starts at row n/48, column n%48; pixels past the window are 0
      for (int n = 0; n < 1536; n++)
        for (int i = 0; i < 256; i++) begin
          int rr, cl;
          rr = n / 48 + i / 16; cl = n % 48 + i % 16;
          cand[n][i] = (rr < 32 && cl < 48) ? win[rr][cl] : 8'd0;
        end
      for (int i = 0; i < 256; i++) blk[i] = 8'($urandom);
      // load: frame m writes matrix m (candidates 256m..256m+255) to the buffers
      for (int m = 0; m < 6; m++) begin
        for (int j = 0; j < NSED; j++) begin rows[j] = cand[m*256 + j]; cc[j] = mk(1, SLM_HOLD); end
        send(blk, cc, rows, f);
      end
      @(negedge clk);
      for (int j = 0; j < NSED; j++) check(buf_count[j] == 4'd6, "six matrices buffered");
      // replay against the current block
      for (int m = 0; m < 6; m++) begin
        for (int j = 0; j < NSED; j++) begin rows[j] = '0; cc[j] = mk(0, SLM_FROM_BUF); end
        send(blk, cc, rows, f);
        if (m == 0) f0 = f;
      end
      idle(3);
      best = 0; best_val = -1; got_best = 0; got_val = -1;
      for (int n = 0; n < 1536; n++) begin
        logic [C_W-1:0] v;
        v = res[f0 + n / 256 + 2][n % 256];
        check(v == dot(blk, cand[n]), "candidate correlation");
        if (int'(dot(blk, cand[n])) > best_val) begin best_val = int'(dot(blk, cand[n])); best = n; end
        if (int'(v) > got_val) begin got_val = int'(v); got_best = n; end
      end
      check(got_best == best, "best match");
      @(negedge clk);
      for (int j = 0; j < NSED; j++) check(buf_count[j] == 4'd0, "buffers drained");
    end

    // 5. complex vector x complex matrix: a = U + iV, b_j = X_j + iY_j
    begin
      vec_t U, V, XX [NSED], YY [NSED];
      int fx, fy, fvy, fvx;
      U = rand_vec(); V = rand_vec();
      for (int j = 0; j < NSED; j++) begin XX[j] = rand_vec(); YY[j] = rand_vec(); end
      // Y goes to the buffers first (operation a), X straight to the SLM
      for (int j = 0; j < NSED; j++) cc[j] = mk(1, SLM_HOLD);
      send(U, cc, YY, f);
      for (int j = 0; j < NSED; j++) cc[j] = mk(0, SLM_FROM_EXT);
      send(U, cc, XX, fx);                             // U.X
      for (int j = 0; j < NSED; j++) cc[j] = mk(0, SLM_FROM_BUF);
      send(U, cc, XX, fy);                             // U.Y (Y from the buffer)
      for (int j = 0; j < NSED; j++) cc[j] = mk(0, SLM_HOLD);
      send(V, cc, XX, fvy);                            // V.Y
      for (int j = 0; j < NSED; j++) cc[j] = mk(0, SLM_FROM_EXT);
      send(V, cc, XX, fvx);                            // V.X
      idle(3);
      for (int j = 0; j < NSED; j++) begin
        longint re, im, hre, him;
        re  = edot(U, XX[j]) - edot(V, YY[j]);
        im  = edot(U, YY[j]) + edot(V, XX[j]);
        hre = 16 * (longint'(res[fx + 2][j]) - longint'(res[fvy + 2][j]));
        him = 16 * (longint'(res[fy + 2][j]) + longint'(res[fvx + 2][j]));
        check(res[fx + 2][j] == dot(U, XX[j]) && res[fy + 2][j] == dot(U, YY[j]) &&
              res[fvy + 2][j] == dot(V, YY[j]) && res[fvx + 2][j] == dot(V, XX[j]), "complex partial products");
        check(hre - re < 32 && re - hre < 32, "complex real part");
        check(him - im <= 0 && im - him < 32, "complex imaginary part");
      end
    end

    // 6. L2 distances of one vector to 256 vectors: |a - b_j|^2 =
    //    a.a - 2 a.b_j + b_j.b_j, with a.b_j from the optics and the squared
    //    norms added by the host; one frame for all 256 distances
    begin
      vec_t a;
      a = rand_vec();
      for (int j = 0; j < NSED; j++) begin rows[j] = rand_vec(); cc[j] = mk(0, SLM_FROM_EXT); end
      send(a, cc, rows, f0);
      idle(3);
      for (int j = 0; j < NSED; j++) begin
        longint d, hd;
        d = 0;
        for (int i = 0; i < VEC_LEN; i++) d += (longint'(a[i]) - longint'(rows[j][i])) ** 2;
        hd = edot(a, a) + edot(rows[j], rows[j]) - 2 * 16 * longint'(res[f0 + 2][j]);
        check(hd - d >= 0 && hd - d < 32, "L2 distance");
      end
    end

    check(n_hold > 0 && n_load > 0 && n_replay > 0 && n_ext > 0, "hold, buffer load, buffer replay and direct load used");
    check(n_err == 0, "no refusals or bus errors");
    $display("frames=%0d hold=%0d load=%0d replay=%0d direct=%0d", fr, n_hold, n_load, n_replay, n_ext);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
