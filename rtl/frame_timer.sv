// frame_timer: beat and frame timing of the VMM electrical driver.
//
// All logic runs from one clock, the ALU bus clock (2 GHz in the published
// design). Every CLK_PER_BEAT clocks the timer raises `ce` for one clock: that
// clock is the 1 GHz beat at which SEDs, the A bus and the output bus move one
// word. `beat` numbers the beats of the current optical frame,
// 0..BEATS_PER_FRAME-1; `frame_end` is high with `ce` on the last beat, the
// clock at which the SLM rows and the VCSEL drive take their new values and the
// detectors are sampled (125 MHz). `phase` is the clock's position inside the
// beat. Synchronous active-high reset starts a new frame at beat 0, phase 0.
//
// The 1 GHz beat, the 8-beat (8 ns) frame and the 2 GHz bus follow the
// published design; one shared clock with enables stands for its clock tree.
module frame_timer #(
  parameter int unsigned CLK_PER_BEAT    = vmm_pkg::CLK_PER_BEAT,
  parameter int unsigned BEATS_PER_FRAME = vmm_pkg::BEATS_PER_FRAME
) (
  input  logic                               clk,
  input  logic                               rst,
  output logic [$clog2(CLK_PER_BEAT)-1:0]    phase,
  output logic                               ce,
  output logic [$clog2(BEATS_PER_FRAME)-1:0] beat,
  output logic                               frame_end
);
  localparam int unsigned PW = $clog2(CLK_PER_BEAT);
  localparam int unsigned BW = $clog2(BEATS_PER_FRAME);

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      beat  <= '0;
    end else if (ce) begin
      phase <= '0;
      beat  <= (beat == BW'(BEATS_PER_FRAME - 1)) ? '0 : beat + 1'b1;
    end else begin
      phase <= phase + 1'b1;
    end
  end

  assign ce        = (phase == PW'(CLK_PER_BEAT - 1));
  assign frame_end = ce && (beat == BW'(BEATS_PER_FRAME - 1));
endmodule
