// tb_slm_row: checks the optical row model. For random, all-ones, single
// element and full-scale light/drive vectors it compares the sampled result
// with the dot product worked out by the bench (24-bit exact sum, 4 low bits
// dropped), checks that `c` changes only on `frame_end` and that reset
// clears it.
module tb_slm_row;
  localparam int N = 256;
  logic clk = 1'b0, rst = 1'b1, frame_end = 1'b0;
  always #1 clk = ~clk;
  logic [N-1:0][7:0] light, drive;
  logic [19:0] c;

  slm_row dut (.clk, .rst, .frame_end, .light, .drive, .c);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [19:0] ref_dot(logic [N-1:0][7:0] a, logic [N-1:0][7:0] b);
    longint s = 0;
    for (int i = 0; i < N; i++) s += longint'(a[i]) * longint'(b[i]);
    return 20'(s / 16);
  endfunction

  task automatic sample(logic [N-1:0][7:0] a, logic [N-1:0][7:0] b);
    logic [19:0] c_prev;
    @(negedge clk);
    light = a; drive = b;
    c_prev = c;
    @(negedge clk);
    check(c == c_prev, "holds without frame_end");
    frame_end = 1'b1;
    @(negedge clk);
    frame_end = 1'b0;
    check(c == ref_dot(a, b), "dot product");
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [N-1:0][7:0] a, b;
    light = '0; drive = '0;
    repeat (2) @(posedge clk);
    check(c == '0, "reset value");
    rst = 1'b0;
    sample({N{8'hFF}}, {N{8'hFF}});
    check(c == 20'(256 * 255 * 255 / 16), "full scale");
    a = '0; b = '0; a[17] = 8'd200; b[17] = 8'd100;
    sample(a, b);                                  // a single product u*v
    check(c == 20'(20000 / 16), "single product");
    a = '0; b = {N{8'd1}}; for (int i = 0; i < N; i++) a[i] = 8'(i);
    sample(a, b);                                  // summation by all-ones
    check(c == 20'((255 * 256 / 2) / 16), "sum of elements");
    for (int t = 0; t < 200; t++) begin
      for (int i = 0; i < N; i++) begin a[i] = 8'($urandom); b[i] = 8'($urandom); end
      sample(a, b);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
