// tb_sed: self-checking testbench of one single electrical driver (sed).
//
// A frame_timer supplies the beat and frame strobes. Each frame the bench
// gives the SED a command, a B_j vector (eight 256-bit words, with a chosen
// pattern of valid words) and a light vector, and keeps its own model of the
// buffer FIFO, the SLM row and the detector (exact dot product with the 4
// least significant bits dropped). It checks the SLM row and buffer count
// after every frame end, c_out / c_valid on the first beat of every frame, and
// the three error pulses. A directed prologue exercises operations a-d, a
// buffer overflow, an underflow and an incomplete vector; random frames
// follow. Each of those mechanisms must occur at least once.
module tb_sed;
  import vmm_pkg::*;

  localparam int NF = 60;

  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic       ce, frame_end;
  logic [0:0] phase;
  logic [2:0] beat;
  sed_cmd_t   cmd;
  logic       b_valid;
  logic [BUS_W-1:0] b_data;
  logic [VEC_LEN-1:0][ELEM_W-1:0] light, slm_drive;
  logic [C_W-1:0] c_out;
  logic c_valid, err_overflow, err_underflow, err_data;
  logic [3:0] buf_count;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);

  sed dut (.clk, .rst, .ce, .beat, .frame_end, .cmd, .b_valid, .b_data, .light,
           .slm_drive, .c_out, .c_valid, .buf_count, .err_overflow, .err_underflow, .err_data);

  int checks = 0, failures = 0;
  int n_a = 0, n_b = 0, n_c = 0, n_d = 0, n_ovf = 0, n_unf = 0, n_inc = 0;

  typedef logic [VEC_LEN-1:0][ELEM_W-1:0] vec_t;
  vec_t q[$];
  vec_t slm_m = '0;
  logic [C_W-1:0] c_det_m = '0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic vec_t rand_vec();
    vec_t v;
    for (int i = 0; i < VEC_LEN; i++) v[i] = ELEM_W'($urandom);
    return v;
  endfunction

  function automatic logic [C_W-1:0] dot(vec_t a, vec_t b);
    logic [23:0] s = '0;
    for (int i = 0; i < VEC_LEN; i++) s += 24'(a[i]) * 24'(b[i]);
    return C_W'(s >> 4);
  endfunction

  task automatic wait_beat(int k);
    do @(negedge clk); while (!(ce && beat == 3'(k)));
  endtask

  // One frame: command c, vector bv (word k valid if vmask[k]), light lv.
  task automatic run_frame(sed_cmd_t c, vec_t bv, logic [7:0] vmask, vec_t lv);
    bit ovf, unf, complete, bw, pop;
    vec_t popped;
    logic [C_W-1:0] c_prev;
    ovf      = c.buf_write && q.size() == 8;
    unf      = c.slm_src == SLM_FROM_BUF && q.size() == 0;
    complete = &vmask;
    bw       = c.buf_write && !ovf;
    pop      = c.slm_src == SLM_FROM_BUF && !unf;
    c_prev   = c_det_m;
    for (int k = 0; k < 8; k++) begin
      wait_beat(k);
      cmd     = (k == 0) ? c : sed_cmd_t'($urandom);  // only beat 0 counts
      b_data  = bv[k*32 +: 32];
      b_valid = vmask[k];
      if (k == 0) light = lv;
      if (k == 1) begin
        check(c_valid == c.write_c, "c_valid");
        if (c.write_c) check(c_out == c_prev, "c_out value");
        check(err_overflow == ovf, "overflow flag");
        check(err_underflow == unf, "underflow flag");
      end
    end
    // model of the frame end
    c_det_m = dot(lv, slm_m);
    if (pop) begin popped = q.pop_front(); slm_m = popped; end
    if (bw && complete) q.push_back(bv);
    if (c.slm_src == SLM_FROM_EXT && complete) slm_m = bv;
    @(negedge clk);  // just after the frame_end edge
    while (!(beat == 3'd0)) @(negedge clk);
    check(slm_drive == slm_m, "SLM row");
    check(buf_count == 4'(q.size()), "buffer count");
    check(err_data == ((bw || c.slm_src == SLM_FROM_EXT) && !complete), "data error flag");
    n_a += int'(bw && complete); n_b += int'(c.slm_src == SLM_FROM_EXT && complete);
    n_c += int'(pop); n_d += int'(c.write_c); n_ovf += int'(ovf); n_unf += int'(unf);
    n_inc += int'(!complete && (bw || c.slm_src == SLM_FROM_EXT));
  endtask

  function automatic sed_cmd_t mk(bit bw, slm_src_e s, bit wc);
    sed_cmd_t c;
    c.buf_write = bw; c.slm_src = s; c.write_c = wc;
    return c;
  endfunction

  initial begin
    int cyc = 0;
    forever begin
      @(posedge clk);
      if (++cyc > 20000) begin
        failures++;
        $display("watchdog expired");
        $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
        $finish;
      end
    end
  end

  initial begin
    vec_t lv;
    cmd = '0; b_valid = 1'b0; b_data = '0; light = '0;
    repeat (4) @(posedge clk);
    rst = 1'b0;
    // operation b, then d on its product
    lv = rand_vec();
    run_frame(mk(0, SLM_FROM_EXT, 0), rand_vec(), 8'hFF, rand_vec());
    run_frame(mk(0, SLM_HOLD, 0), rand_vec(), 8'hFF, lv);
    run_frame(mk(0, SLM_HOLD, 1), rand_vec(), 8'hFF, rand_vec());
    // full-scale product: all 255 -> 256*255*255 >> 4
    run_frame(mk(0, SLM_FROM_EXT, 1), {VEC_LEN{8'hFF}}, 8'hFF, rand_vec());
    run_frame(mk(0, SLM_HOLD, 1), rand_vec(), 8'hFF, {VEC_LEN{8'hFF}});
    check(c_det_m == C_W'(256 * 255 * 255 / 16), "model full scale");
    run_frame(mk(0, SLM_HOLD, 1), rand_vec(), 8'hFF, rand_vec());
    // underflow: buffer empty
    run_frame(mk(0, SLM_FROM_BUF, 0), rand_vec(), 8'hFF, rand_vec());
    // fill the buffer (operation a) and overflow it
    for (int i = 0; i < 9; i++) run_frame(mk(1, SLM_HOLD, 1), rand_vec(), 8'hFF, rand_vec());
    // incomplete vector for buffer and SLM
    run_frame(mk(0, SLM_FROM_EXT, 0), rand_vec(), 8'hEF, rand_vec());
    // drain with operation c, one with a simultaneous write
    run_frame(mk(0, SLM_FROM_BUF, 1), rand_vec(), 8'hFF, rand_vec());
    run_frame(mk(1, SLM_FROM_BUF, 1), rand_vec(), 8'hFF, rand_vec());
    for (int i = 0; i < 8; i++) run_frame(mk(0, SLM_FROM_BUF, 1), rand_vec(), 8'hFF, rand_vec());
    // random frames
    for (int f = 0; f < NF; f++) begin
      sed_cmd_t c;
      c = mk(1'($urandom), slm_src_e'($urandom_range(0, 2)), 1'($urandom));
      run_frame(c, rand_vec(), ($urandom_range(0, 5) == 0) ? 8'($urandom) : 8'hFF, rand_vec());
    end
    check(n_a > 0 && n_b > 0 && n_c > 0 && n_d > 0, "operations a-d all seen");
    check(n_ovf > 0 && n_unf > 0 && n_inc > 0, "overflow, underflow, incomplete all seen");
    $display("ops a=%0d b=%0d c=%0d d=%0d overflow=%0d underflow=%0d incomplete=%0d",
             n_a, n_b, n_c, n_d, n_ovf, n_unf, n_inc);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
