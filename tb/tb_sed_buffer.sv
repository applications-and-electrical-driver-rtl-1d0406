// tb_sed_buffer: drives the vector FIFO the way an SED does (one word per
// beat of two clocks, commits at frame end) and compares every word read with
// a queue model kept by the bench. Covers fill to 8 vectors, pointer
// wrap-around, reading and writing in the same frame, and a written but
// uncommitted vector that must not appear.
module tb_sed_buffer;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  logic [0:0] phase;
  logic [2:0] beat;
  logic ce, frame_end;
  logic wr_en, wr_commit, rd_commit;
  logic [255:0] wr_data, rd_data;
  logic [3:0] count;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);
  sed_buffer dut (.clk, .rst, .wr_en, .wr_off(beat), .wr_data, .wr_commit,
                  .rd_off(beat), .rd_data, .rd_commit, .count);

  int checks = 0, failures = 0, n_wrap = 0, n_both = 0, n_full = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef logic [7:0][255:0] vec_t;
  vec_t q[$];
  int pushed = 0;

  // One frame: optionally write v (committed if commit), optionally read.
  task automatic frame(bit wr, vec_t v, bit commit, bit rd);
    vec_t head;
    if (rd) head = q[0];
    for (int k = 0; k < 8; k++) begin
      do @(negedge clk); while (!(ce && beat == 3'(k)));
      wr_en     = wr;
      wr_data   = v[k];
      wr_commit = wr && commit && k == 7;
      rd_commit = rd && k == 7;
      if (rd) check(rd_data == head[k], "read word");
    end
    @(negedge clk);
    wr_en = 1'b0; wr_commit = 1'b0; rd_commit = 1'b0;
    if (rd) void'(q.pop_front());
    if (wr && commit) begin q.push_back(v); pushed++; end
    n_both += int'(wr && rd);
    n_wrap += int'(wr && commit && pushed > 8);
    check(count == 4'(q.size()), "count");
    n_full += int'(q.size() == 8);
  endtask

  function automatic vec_t rv();
    vec_t v;
    for (int k = 0; k < 8; k++) v[k] = {8{$urandom}};
    return v;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_commit = 0; rd_commit = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(count == 0, "empty after reset");
    for (int i = 0; i < 8; i++) frame(1, rv(), 1, 0);   // fill
    for (int i = 0; i < 3; i++) frame(0, rv(), 0, 1);   // drain three
    frame(1, rv(), 0, 0);                               // uncommitted write
    for (int i = 0; i < 3; i++) frame(1, rv(), 1, 1);   // write and read together
    for (int i = 0; i < 40; i++) begin
      bit w, r;
      w = q.size() < 8 && $urandom_range(0, 1);
      r = q.size() > 0 && $urandom_range(0, 1);
      frame(w, rv(), $urandom_range(0, 7) != 0, r);
    end
    while (q.size() > 0) frame(0, rv(), 0, 1);
    check(n_wrap > 0 && n_both > 0 && n_full > 0, "wrap, dual-port use and full seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
