// row_source_driver: electrical driver of the 1x256 VCSEL row source array
// that shows the input vector A as light.
//
// A arrives on a 256-bit bus at one word per 1 GHz beat (`ce`), so the 256
// 8-bit elements take the 8 beats of one optical frame: the word on beat k
// carries elements 32k..32k+31, element 32k+m in bits [8m+7:8m]. The driver
// collects the words of a frame in a staging register. On the frame's last
// beat (`frame_end`), if all 8 words of the frame were marked valid, the whole
// vector moves at once into the VCSEL drive register, which the lasers show
// for the whole next frame (125 MHz). A frame with missing words leaves the
// drive register unchanged and pulses `a_incomplete` at its end. Latency: a
// vector sent in frame f is light during frame f+1.
//
// The bus width, beat rate and frame rate follow the published design; the
// element order on the bus, the valid qualifier and the keep-on-incomplete
// rule are this design's own choices. Synchronous active-high reset clears
// the drive register (all lasers dark).
module row_source_driver #(
  parameter int unsigned ELEM_W          = vmm_pkg::ELEM_W,
  parameter int unsigned VEC_LEN         = vmm_pkg::VEC_LEN,
  parameter int unsigned BUS_W           = vmm_pkg::BUS_W,
  parameter int unsigned BEATS_PER_FRAME = VEC_LEN * ELEM_W / BUS_W
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               ce,
  input  logic [$clog2(BEATS_PER_FRAME)-1:0] beat,
  input  logic                               frame_end,
  input  logic                               a_valid,
  input  logic [BUS_W-1:0]                   a_data,
  output logic [VEC_LEN-1:0][ELEM_W-1:0]     vcsel_drive,
  output logic                               a_incomplete
);
  localparam int unsigned BW = $clog2(BEATS_PER_FRAME + 1);

  logic [BEATS_PER_FRAME-1:0][BUS_W-1:0] stage, stage_next;
  logic [BW-1:0]                         nvalid, nvalid_next;

  always_comb begin
    stage_next  = stage;
    nvalid_next = (beat == '0) ? '0 : nvalid;
    if (a_valid) begin
      stage_next[beat] = a_data;
      nvalid_next      = nvalid_next + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      stage        <= '0;
      nvalid       <= '0;
      vcsel_drive  <= '0;
      a_incomplete <= 1'b0;
    end else if (ce) begin
      stage        <= stage_next;
      nvalid       <= nvalid_next;
      a_incomplete <= 1'b0;
      if (frame_end) begin
        if (nvalid_next == BW'(BEATS_PER_FRAME)) vcsel_drive <= stage_next;
        else                                     a_incomplete <= 1'b1;
      end
    end
  end

  initial begin
    assert (VEC_LEN * ELEM_W == BEATS_PER_FRAME * BUS_W)
      else $error("a vector must fill the bus for exactly one frame");
  end
endmodule
