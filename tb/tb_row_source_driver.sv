// tb_row_source_driver: sends A vectors on the 256-bit bus, one word per beat,
// and checks that the VCSEL drive register takes the whole vector at the end
// of the frame (and not before), keeps its value after a frame with a missing
// word while pulsing a_incomplete, and holds it through idle frames.
module tb_row_source_driver;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;
  logic [0:0] phase;
  logic [2:0] beat;
  logic ce, frame_end, a_valid, a_incomplete;
  logic [255:0] a_data;
  logic [255:0][7:0] vcsel_drive;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);
  row_source_driver dut (.clk, .rst, .ce, .beat, .frame_end, .a_valid, .a_data,
                         .vcsel_drive, .a_incomplete);

  int checks = 0, failures = 0, n_inc = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  typedef logic [255:0][7:0] vec_t;
  vec_t shown = '0;

  task automatic frame(vec_t v, logic [7:0] vmask);
    for (int k = 0; k < 8; k++) begin
      do @(negedge clk); while (!(ce && beat == 3'(k)));
      a_data  = v[k*32 +: 32];
      a_valid = vmask[k];
      check(vcsel_drive == shown, "drive stable inside the frame");
    end
    @(negedge clk);
    if (&vmask) shown = v;
    check(vcsel_drive == shown, "drive after frame end");
    check(a_incomplete == !(&vmask), "a_incomplete");
    n_inc += int'(!(&vmask));
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    vec_t v;
    a_valid = 1'b0; a_data = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    check(vcsel_drive == '0, "dark after reset");
    for (int f = 0; f < 40; f++) begin
      for (int i = 0; i < 256; i++) v[i] = 8'($urandom);
      frame(v, (f % 5 == 3) ? 8'($urandom_range(0, 254)) : 8'hFF);
    end
    check(n_inc > 0, "incomplete frame seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
