// tb_vmm_top: end-to-end test of the whole VMM electrical driver at its
// default size (256-element vectors, 16 ALU elements x 16 SEDs, 2048-byte
// buffers), with the optical rows modelled.
//
// The bench plans a run of frames in advance: per frame an input vector A and,
// per SED, a command, a 256-element row and a pattern of valid beats. It keeps
// its own model of the VCSEL drive, every SED's buffer FIFO and SLM row and
// the detector results, and from it the 256 results C that must leave on the
// 640-bit bus in every frame. It then streams the frames into the design
// through the A bus and the sixteen 2048+128-line element buses (two bus
// clocks per beat) and compares:
//   - every word on the output bus (data, mask, group) with the model;
//   - the VCSEL drive and every SED's buffer count after each frame;
//   - the number of overflow, underflow, incomplete-vector, synch-error and
//     incomplete-A events with the model's counts.
// Phases: streaming (a new A and a new matrix every frame, one full product
// per frame, which is also timed: 16 clocks per result), matrix loads into the
// buffers up to overflow, reuse of buffered matrices with new A vectors down
// to underflow, then random mixed commands with missing words and bad synch
// lines. Each of these mechanisms must happen at least once.
module tb_vmm_top;
  import vmm_pkg::*;

  localparam int NSED = 256;
  localparam int NF   = 52;          // planned frames
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

  // ---------------------------------------------------------------- plan
  vec_t      A   [NF];
  logic [7:0] av [NF];
  sed_cmd_t  C   [NF][NSED];
  vec_t      B   [NF][NSED];
  logic [7:0] bv [NF][NSED];
  bit        mixed [NF][NSED];    // invalid beats use mixed synch lines
  // model results
  logic [C_W-1:0] exp_c [NF][NSED];
  bit             exp_m [NF][NSED];
  vec_t           exp_light [NF];
  int             exp_cnt [NF][NSED];
  int m_ovf = 0, m_unf = 0, m_dat = 0, m_sync = 0, m_ainc = 0, m_full = 0;
  int m_opa = 0, m_opb = 0, m_opc = 0;

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

  function automatic sed_cmd_t mk(bit bw, slm_src_e s, bit wc);
    sed_cmd_t c;
    c.buf_write = bw; c.slm_src = s; c.write_c = wc;
    return c;
  endfunction

  task automatic plan();
    vec_t light_m = '0;
    vec_t slm_m [NSED];
    vec_t q [NSED][$];
    logic [C_W-1:0] cdet [NSED];
    for (int j = 0; j < NSED; j++) begin slm_m[j] = '0; cdet[j] = '0; end
    for (int f = 0; f < NF; f++) begin
      A[f]  = rand_vec();
      av[f] = 8'hFF;
      if (f >= 30 && f < NF - 3 && $urandom_range(0, 5) == 0) av[f] = 8'($urandom_range(0, 254));
      for (int j = 0; j < NSED; j++) begin
        B[f][j]     = rand_vec();
        bv[f][j]    = 8'hFF;
        mixed[f][j] = 1'b0;
        if (f < 10)       C[f][j] = mk(0, SLM_FROM_EXT, 1);          // streaming
        else if (f < 20)  C[f][j] = mk(1, SLM_HOLD, 1);              // load buffers, overflow
        else if (f < 29)  C[f][j] = mk(0, SLM_FROM_BUF, 1);          // reuse, underflow
        else if (f < NF - 3) begin                                   // random
          C[f][j] = mk(1'($urandom), slm_src_e'($urandom_range(0, 2)), $urandom_range(0, 4) != 0);
          if ($urandom_range(0, 15) == 0) begin
            bv[f][j]    = 8'($urandom_range(0, 254));
            mixed[f][j] = 1'($urandom);
          end
        end else          C[f][j] = mk(0, SLM_HOLD, 1);              // drain
      end
    end
    // run the model frame by frame
    for (int f = 0; f < NF; f++) begin
      for (int j = 0; j < NSED; j++) begin
        bit ovf, unf, cpl, bw, pop, ext;
        ovf = C[f][j].buf_write && q[j].size() == 8;
        unf = C[f][j].slm_src == SLM_FROM_BUF && q[j].size() == 0;
        cpl = &bv[f][j];
        bw  = C[f][j].buf_write && !ovf;
        pop = C[f][j].slm_src == SLM_FROM_BUF && !unf;
        ext = C[f][j].slm_src == SLM_FROM_EXT;
        exp_c[f][j] = cdet[j];
        exp_m[f][j] = C[f][j].write_c;
        cdet[j] = dot(light_m, slm_m[j]);
        if (pop) slm_m[j] = q[j].pop_front();
        if (bw && cpl) q[j].push_back(B[f][j]);
        if (ext && cpl) slm_m[j] = B[f][j];
        exp_cnt[f][j] = q[j].size();
        m_ovf += int'(ovf); m_unf += int'(unf);
        m_dat += int'((bw || ext) && !cpl);
        m_opa += int'(bw && cpl); m_opb += int'(ext && cpl); m_opc += int'(pop);
      end
      for (int e = 0; e < N_ALU; e++)
        for (int k = 0; k < 8; k++) begin
          bit any = 0;
          for (int m = 0; m < 16; m++) any |= !bv[f][e*16+m][k] && mixed[f][e*16+m];
          m_sync += int'(any);
        end
      if (&av[f]) light_m = A[f];
      else        m_ainc++;
      exp_light[f] = light_m;
    end
  endtask

  // ---------------------------------------------------------------- checks
  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    int cyc = 0;
    forever begin
      @(posedge clk);
      if (++cyc > 4000) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  // ---------------------------------------------------------------- stimulus
  int fr = -1;   // frame being sent, -1 before the first
  int d_ovf = 0, d_unf = 0, d_dat = 0, d_sync = 0, d_ainc = 0;

  task automatic drive(int f, int k, int ph);
    if (f < 0 || f >= NF) begin
      a_valid = 1'b0; bus_sync = '0; cmd = '0;
      return;
    end
    a_valid = av[f][k];
    a_data  = A[f][k*32 +: 32];
    for (int j = 0; j < NSED; j++) cmd[j] = C[f][j];
    for (int e = 0; e < N_ALU; e++)
      for (int m = 0; m < 8; m++) begin
        int j;
        j = e * 16 + ph * 8 + m;
        bus_data[e][m*256 +: 256] = B[f][j][k*32 +: 32];
        if (bv[f][j][k])         bus_sync[e][m*16 +: 16] = '1;
        else if (mixed[f][j])    bus_sync[e][m*16 +: 16] = 16'h00F0;
        else                     bus_sync[e][m*16 +: 16] = '0;
      end
  endtask

  int words_seen = 0, full_vectors = 0, first_full = -1, last_full = -1;
  logic [NSED-1:0] got_m [NF];

  initial begin
    int cycles = 0;
    bit fe;
    plan();
    a_valid = 1'b0; a_data = '0; bus_data = '0; bus_sync = '0; cmd = '0;
    repeat (4) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    fr = 0;
    while (fr < NF + 2) begin
      // here: a negative edge; the next positive edge samples the inputs
      drive(fr, int'(beat), int'(dut.phase));
      if (ce) begin
        // error pulses registered on the previous clock enable
        if (beat == 3'd1) begin
          d_ovf += $countones(err_overflow);
          d_unf += $countones(err_underflow);
        end
        if (beat == 3'd0) begin
          d_dat  += $countones(err_data);
          if (fr <= NF) d_ainc += int'(a_incomplete);
          if (fr >= 1 && fr <= NF) begin
            check(vcsel_drive == exp_light[fr-1], "VCSEL drive");
            for (int j = 0; j < NSED; j++)
              check(int'(buf_count[j]) == exp_cnt[fr-1][j], "buffer count");
          end
        end
        d_sync += $countones(sync_err);
        // output word registered on the previous clock enable
        begin
          int g, sf;
          g  = (int'(beat) + 6) % 8;
          sf = (beat < 3'd2) ? fr - 1 : fr;
          if (sf >= 0 && sf < NF) begin
            check(int'(c_bus_group) == g, "output group");
            for (int m = 0; m < 32; m++) begin
              int j;
              j = g * 32 + m;
              check(c_bus_mask[m] == exp_m[sf][j], "output mask");
              if (exp_m[sf][j]) check(c_bus[m*20 +: 20] == exp_c[sf][j], "output value");
              got_m[sf][j] = c_bus_mask[m];
            end
            check(c_bus_valid == (|c_bus_mask), "output valid");
            words_seen++;
            if (g == 7 && (&got_m[sf])) begin
              full_vectors++;
              if (sf >= 2 && sf < 10) begin
                if (first_full < 0) first_full = cycles;
                last_full = cycles;
              end
            end
          end
        end
      end
      fe = frame_end;
      @(negedge clk);
      cycles++;
      if (fe) fr++;
    end
    m_full = 0;
    for (int f = 0; f < NF; f++) begin
      bit all;
      all = 1;
      for (int j = 0; j < NSED; j++) all &= exp_m[f][j];
      m_full += int'(all);
    end
    check(words_seen == NF * 8, "output words");
    check(full_vectors == m_full, $sformatf("complete C vectors %0d/%0d", full_vectors, m_full));
    // streaming: results of frames 2..9 leave one frame (16 clocks) apart
    check(last_full - first_full == 7 * 16, "one product per frame while streaming");
    check(d_ovf == m_ovf && m_ovf > 0, "overflow events");
    check(d_unf == m_unf && m_unf > 0, "underflow events");
    check(d_dat == m_dat && m_dat > 0, "incomplete vector events");
    check(d_sync == m_sync && m_sync > 0, "synch error events");
    check(d_ainc == m_ainc && m_ainc > 0, "incomplete A events");
    check(m_opa > 0 && m_opb > 0 && m_opc > 0, "operations a, b, c");
    $display("events: opa=%0d opb=%0d opc=%0d overflow=%0d/%0d underflow=%0d/%0d data=%0d/%0d sync=%0d/%0d a_inc=%0d/%0d full C=%0d",
             m_opa, m_opb, m_opc, d_ovf, m_ovf, d_unf, m_unf, d_dat, m_dat, d_sync, m_sync, d_ainc, m_ainc, full_vectors);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
