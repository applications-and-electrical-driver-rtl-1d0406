// tb_alu_element: self-checking testbench of one ALU element (bus distributor and 16 SEDs).
//
// 1 element(s) of 16 SEDs get random per-SED commands every frame (new rows
// into the SLM, buffer loads and reuse, result writes), random rows on their
// own 2048+128-line buses (two bus clocks per beat) with some words made
// invalid through their synch lines, and a light vector that changes every
// frame. The bench models every SED (buffer FIFO, SLM row, detector with the
// 4 low bits of the exact dot product dropped) and checks each SED's c_out and
// c_valid on the second beat of every frame, its buffer count after every
// frame end, and the sync_err pulse of every element on every beat. Rows,
// commands and errors differ between SEDs, so a wrong SED-to-bus mapping
// shows up as wrong results.
module tb_alu_element;
  import vmm_pkg::*;

  localparam int NE   = 1;
  localparam int NSED = NE * 16;
  localparam int NF   = 40;
  typedef logic [VEC_LEN-1:0][ELEM_W-1:0] vec_t;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic [0:0] phase;
  logic [2:0] beat;
  logic ce, frame_end;
  logic [NE-1:0][ALU_BUS_W-1:0] bus_data;
  logic [NE-1:0][127:0] bus_sync;
  sed_cmd_t [NSED-1:0] cmd;
  vec_t light;
  logic [NSED-1:0][C_W-1:0] c_out;
  logic [NSED-1:0] c_valid, err_overflow, err_underflow, err_data;
  logic [NSED-1:0][3:0] buf_count;
  logic [NE-1:0] sync_err;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);
  alu_element dut (.clk, .rst, .phase, .ce, .beat, .frame_end, .bus_data(bus_data[0]),
                   .bus_sync(bus_sync[0]), .cmd, .light, .c_out, .c_valid, .buf_count,
                   .err_overflow, .err_underflow, .err_data, .sync_err(sync_err[0]));

  vec_t      L  [NF];
  sed_cmd_t  C  [NF][NSED];
  vec_t      B  [NF][NSED];
  logic [7:0] bv [NF][NSED];
  logic [C_W-1:0] exp_c [NF][NSED];
  int        exp_cnt [NF][NSED];
  bit        exp_serr [NF][8][NE];

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < VEC_LEN; i += 4) v[i +: 4] = $urandom;
    return v;
  endfunction

  function automatic logic [C_W-1:0] dot(vec_t a, vec_t b);
    logic [23:0] s = '0;
    for (int i = 0; i < VEC_LEN; i++) s += 24'(a[i]) * 24'(b[i]);
    return C_W'(s >> 4);
  endfunction

  task automatic plan();
    vec_t slm_m [NSED];
    vec_t q [NSED][$];
    logic [C_W-1:0] cdet [NSED];
    for (int j = 0; j < NSED; j++) begin slm_m[j] = '0; cdet[j] = '0; end
    for (int f = 0; f < NF; f++) begin
      L[f] = rand_vec();
      for (int j = 0; j < NSED; j++) begin
        C[f][j].buf_write = 1'($urandom);
        C[f][j].slm_src   = slm_src_e'($urandom_range(0, 2));
        C[f][j].write_c   = 1'($urandom);
        B[f][j]  = rand_vec();
        bv[f][j] = ($urandom_range(0, 9) == 0) ? 8'($urandom_range(0, 254)) : 8'hFF;
      end
    end
    for (int f = 0; f < NF; f++) begin
      for (int k = 0; k < 8; k++)
        for (int e = 0; e < NE; e++) begin
          exp_serr[f][k][e] = 0;
          for (int m = 0; m < 16; m++) exp_serr[f][k][e] |= !bv[f][e*16+m][k];
        end
      for (int j = 0; j < NSED; j++) begin
        bit ovf, unf, cpl, bw, pop, ext;
        ovf = C[f][j].buf_write && q[j].size() == 8;
        unf = C[f][j].slm_src == SLM_FROM_BUF && q[j].size() == 0;
        cpl = &bv[f][j];
        bw  = C[f][j].buf_write && !ovf;
        pop = C[f][j].slm_src == SLM_FROM_BUF && !unf;
        ext = C[f][j].slm_src == SLM_FROM_EXT;
        exp_c[f][j] = cdet[j];                 // shown in frame f if write_c
        cdet[j] = dot(L[f], slm_m[j]);         // light L[f] during frame f
        if (pop) slm_m[j] = q[j].pop_front();
        if (bw && cpl) q[j].push_back(B[f][j]);
        if (ext && cpl) slm_m[j] = B[f][j];
        exp_cnt[f][j] = q[j].size();
      end
    end
  endtask

  int checks = 0, failures = 0, n_serr = 0, n_words = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int fr;
    bit fe;
    plan();
    bus_data = '0; bus_sync = '0; cmd = '0; light = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    fr = 0;
    while (fr < NF) begin
      int k, ph;
      k = int'(beat); ph = int'(phase);
      light = L[fr];
      for (int j = 0; j < NSED; j++) cmd[j] = C[fr][j];
      for (int e = 0; e < NE; e++)
        for (int m = 0; m < 8; m++) begin
          int j;
          j = e * 16 + ph * 8 + m;
          bus_data[e][m*256 +: 256] = B[fr][j][k*32 +: 32];
          // invalid words: mixed synch lines, so the element flags them
          bus_sync[e][m*16 +: 16] = bv[fr][j][k] ? 16'hFFFF : 16'h0F0F;
        end
      if (ce) begin
        if (k == 1)
          for (int j = 0; j < NSED; j++) begin
            check(c_valid[j] == C[fr][j].write_c, "c_valid");
            if (C[fr][j].write_c) check(c_out[j] == exp_c[fr][j], "c_out");
            n_words += int'(C[fr][j].write_c);
          end
        if (k == 0 && fr > 0)
          for (int j = 0; j < NSED; j++) check(int'(buf_count[j]) == exp_cnt[fr-1][j], "buffer count");
        // sync_err shows the previous beat
        if (fr > 0 || k > 0)
          for (int e = 0; e < NE; e++) begin
            int pf, pk;
            pf = (k == 0) ? fr - 1 : fr;
            pk = (k + 7) % 8;
            check(sync_err[e] == exp_serr[pf][pk][e], "sync_err");
            n_serr += int'(sync_err[e]);
          end
      end
      fe = frame_end;
      @(negedge clk);
      if (fe) fr++;
    end
    check(n_serr > 0 && n_words > 0, "synch errors and result writes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
