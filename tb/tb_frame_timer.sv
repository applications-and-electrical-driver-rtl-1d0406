// tb_frame_timer: checks the beat/frame timing generator against a counter
// kept by the bench: `ce` on every second clock, `beat` stepping 0..7 on each
// `ce`, `frame_end` exactly on the `ce` of beat 7 (one frame per 16 clocks,
// i.e. 125 MHz at a 2 GHz bus clock), and restart at beat 0 after reset.
module tb_frame_timer;
  logic clk = 1'b0, rst = 1'b1;
  always #1 clk = ~clk;

  logic [0:0] phase;
  logic [2:0] beat;
  logic       ce, frame_end;

  frame_timer dut (.clk, .rst, .phase, .ce, .beat, .frame_end);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, frames, last_fe;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 1'b0;
    for (int run = 0; run < 2; run++) begin
      n = 0; frames = 0; last_fe = -1;
      repeat (200) begin
        check(ce == (n % 2 == 1), "ce every second clock");
        check(beat == 3'((n / 2) % 8), "beat number");
        check(frame_end == (n % 16 == 15), "frame_end on last beat");
        if (frame_end) begin
          if (last_fe >= 0) check(n - last_fe == 16, "16 clocks per frame");
          last_fe = n;
          frames++;
        end
        n++;
        @(negedge clk);
      end
      check(frames == 12, "frame count");
      // mid-frame reset must restart at beat 0
      rst = 1'b1;
      @(negedge clk) rst = 1'b0;
      check(phase == '0 && beat == '0, "restart after reset");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
