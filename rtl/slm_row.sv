// slm_row: behavioural model of the optical part of one SED: row j of the
// multiple-quantum-well spatial light modulator (256 modulator pixels) together
// with detector j of the output detector array and its read-out converter.
// It is not logic: in the real device this is light and photocurrent.
//
// The lenses spread the light of VCSEL i over column i of the SLM, so pixel i
// of row j sees intensity a_i (the 8-bit VCSEL code, `light[i]`) and passes a
// fraction set by its 8-bit drive code b_i (`drive[i]`). The second set of
// lenses sums the whole row onto one detector, which therefore integrates
// sum_i a_i * b_i over the optical frame. At the end of each frame
// (`frame_end`) the model samples that sum into the 20-bit result `c`, which
// then stays constant for the next frame. Both inputs must be constant during
// a frame, as the drivers guarantee.
//
// The exact sum of 256 8x8-bit products needs 24 bits; the published design
// reads out 20 bits. This model maps the detector's full scale onto the 20-bit
// range, i.e. it drops the C_SHIFT = 4 least significant bits (rounding
// toward zero). That scaling, the sampling at frame end and the reset to 0 are
// this model's assumptions; the dot product itself and the 125 MHz frame are
// the published behaviour. Written with clocked code so that it simulates
// quickly; it is still a model, not a circuit to build.
module slm_row #(
  parameter int unsigned ELEM_W  = vmm_pkg::ELEM_W,
  parameter int unsigned VEC_LEN = vmm_pkg::VEC_LEN,
  parameter int unsigned C_W     = vmm_pkg::C_W,
  parameter int unsigned ACC_W   = 2 * ELEM_W + $clog2(VEC_LEN),
  parameter int unsigned C_SHIFT = (ACC_W > C_W) ? ACC_W - C_W : 0
) (
  input  logic                           clk,
  input  logic                           rst,
  input  logic                           frame_end,
  input  logic [VEC_LEN-1:0][ELEM_W-1:0] light,
  input  logic [VEC_LEN-1:0][ELEM_W-1:0] drive,
  output logic [C_W-1:0]                 c
);
  function automatic logic [ACC_W-1:0] detector_sum(
      input logic [VEC_LEN-1:0][ELEM_W-1:0] a,
      input logic [VEC_LEN-1:0][ELEM_W-1:0] b);
    logic [ACC_W-1:0] s = '0;
    for (int i = 0; i < VEC_LEN; i++) s += ACC_W'(a[i]) * ACC_W'(b[i]);
    return s;
  endfunction

  always_ff @(posedge clk) begin
    if (rst)            c <= '0;
    else if (frame_end) c <= C_W'(detector_sum(light, drive) >> C_SHIFT);
  end
endmodule
