// tb_alu_bus_distributor: puts random 2048-bit words on the ALU element bus,
// two per beat, and checks that SED s gets bits [256m+255:256m] of the word of
// bus clock s/8 (m = s mod 8) on the beat's clock enable. Synch lines are set
// per 16-line group: all high must give a valid word, all low an invalid one
// without error, and a mixed group an invalid word and a sync_err pulse.
module tb_alu_bus_distributor;
  logic clk = 1'b0, rst = 1'b1;
  always #2 clk = ~clk;
  logic [0:0] phase;
  logic [2:0] beat;
  logic ce, frame_end, sync_err;
  logic [2047:0] bus_data;
  logic [127:0] bus_sync;
  logic [15:0][255:0] sed_data;
  logic [15:0] sed_valid;

  frame_timer u_t (.clk, .rst, .phase, .ce, .beat, .frame_end);
  alu_bus_distributor dut (.clk, .rst, .phase, .ce, .bus_data, .bus_sync,
                           .sed_data, .sed_valid, .sync_err);

  int checks = 0, failures = 0, n_err = 0, n_inv = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic logic [2047:0] rw();
    logic [2047:0] w;
    for (int i = 0; i < 64; i++) w[i*32 +: 32] = $urandom;
    return w;
  endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0][2047:0] w;
    logic [1:0][127:0]  sy;
    logic [15:0] exp_valid;
    bit exp_err;
    bus_data = '0; bus_sync = '0;
    repeat (3) @(posedge clk);
    rst = 1'b0;
    for (int t = 0; t < 300; t++) begin
      exp_err = 0;
      for (int p = 0; p < 2; p++) begin
        w[p]  = rw();
        sy[p] = '1;
        if ($urandom_range(0, 3) == 0) begin
          int g, kind;
          g = $urandom_range(0, 7);   // the 16 synch lines of one SED
          kind = $urandom_range(0, 1);
          sy[p][g*16 +: 16] = kind ? 16'h0 : 16'($urandom_range(1, 16'hFFFE));
        end
      end
      for (int s = 0; s < 16; s++) begin
        exp_valid[s] = &sy[s / 8][(s % 8) * 16 +: 16];
        if (|sy[s / 8][(s % 8) * 16 +: 16] && !exp_valid[s]) exp_err = 1;
      end
      // bus clock of phase 0, then phase 1 (the ce clock)
      @(negedge clk); while (phase != 1'b0) @(negedge clk);
      bus_data = w[0]; bus_sync = sy[0];
      @(negedge clk);
      bus_data = w[1]; bus_sync = sy[1];
      #1;
      check(ce, "ce on second bus clock");
      for (int s = 0; s < 16; s++) begin
        check(sed_data[s] == w[s / 8][(s % 8) * 256 +: 256], $sformatf("SED word %0d", s));
        check(sed_valid[s] == exp_valid[s], "SED valid");
      end
      @(negedge clk);
      check(sync_err == exp_err, "sync_err");
      n_err += int'(exp_err);
      n_inv += int'(!(&exp_valid));
    end
    check(n_err > 0 && n_inv > n_err, "sync errors and clean invalid words seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
