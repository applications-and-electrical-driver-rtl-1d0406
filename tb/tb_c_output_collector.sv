// tb_c_output_collector: feeds 256 random 20-bit results with random write
// masks, changing them on the first beat of each frame as the SEDs do, and
// checks the eight 640-bit bus words of each frame: group g after the clock
// enable of beat g+1 (group 7 after beat 0 of the next frame), SED 32g+m in
// bits [20m+19:20m], with the right mask, group number and valid.
module tb_c_output_collector;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  logic [0:0] phase;
  logic [2:0] beat;
  logic ce, frame_end;
  logic [255:0][19:0] c_in;
  logic [255:0] c_valid;
  logic [639:0] c_bus;
  logic [31:0] c_bus_mask;
  logic [2:0] c_bus_group;
  logic c_bus_valid;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);
  c_output_collector dut (.clk, .rst, .ce, .beat, .c_in, .c_valid, .c_bus,
                          .c_bus_mask, .c_bus_group, .c_bus_valid);

  int checks = 0, failures = 0, n_words = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [255:0][19:0] prev_c, cur_c;
    logic [255:0] prev_v, cur_v;
    c_in = '0; c_valid = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    prev_c = '0; prev_v = '0;
    for (int f = 0; f < 30; f++) begin
      for (int i = 0; i < 256; i++) cur_c[i] = 20'($urandom);
      for (int i = 0; i < 8; i++) cur_v[i*32 +: 32] = (f % 4 == 2) ? 32'h0 : $urandom;
      for (int k = 0; k < 8; k++) begin
        do @(negedge clk); while (!(ce && beat == 3'(k)));
        // the bus shows the group registered on the previous clock enable:
        // beat k-1 registered group k-2, from the previous frame's results
        // for k = 0 and 1 (SED outputs change on the ce of beat 0)
        if (f > 0 || k > 0) begin
          int g;
          logic [255:0][19:0] cc;
          logic [255:0] vv;
          g  = (k + 6) % 8;
          cc = (k < 2) ? prev_c : cur_c;
          vv = (k < 2) ? prev_v : cur_v;
          check(c_bus_group == 3'(g), "group number");
          check(c_bus == cc[g*32 +: 32], "group data");
          check(c_bus_mask == vv[g*32 +: 32], "group mask");
          check(c_bus_valid == |vv[g*32 +: 32], "group valid");
          n_words++;
        end
        if (k == 0) begin
          @(posedge clk);
          c_in    <= cur_c;
          c_valid <= cur_v;
        end
      end
      prev_c = cur_c; prev_v = cur_v;
    end
    check(n_words > 200, "words checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
