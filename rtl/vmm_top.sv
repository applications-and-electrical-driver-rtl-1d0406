// vmm_top: electrical driver of the optical vector-by-matrix multiplier, with
// behavioural models of its optical rows, computing C = A x B^T for a
// 1x256 vector A and a 256x256 matrix B of unsigned 8-bit elements, one
// product per 8-beat optical frame (125 MHz at 1 GHz beats).
//
// Blocks: frame_timer makes the beat and frame strobes from the bus clock
// (two clocks per beat); row_source_driver takes A, one 256-bit word per
// beat, and drives the VCSEL row source array for the next frame (the drive
// codes are also brought out as `vcsel_drive`, the VCSEL array itself being an
// optical part); interface_board holds 16 ALU elements of 16 SEDs, each SED j
// loading row j of the SLM matrix from its share of its element's
// 2048+128-line bus or from its buffer and producing c_j = sum_i a_i * b_ji
// (20 bits); c_output_collector sends C on a 640-bit bus, 32 results per beat.
//
// Host timing: `ce`, `beat` and `frame_end` are outputs. In frame f the host
// puts word k of A on `a_data` and, for every SED, word k of its row on the
// element buses during beat k (two bus clocks: SEDs 0-7 of the element, then
// SEDs 8-15), and gives each SED its command `cmd[j]` by the first beat. In
// frame f+1 the products are formed optically; with write_c set in frame f+2
// the 8 words of C leave on `c_bus` after beats 1..7 of f+2 and beat 0 of f+3.
// One new A and a full new matrix can enter every frame.
//
// Sizes follow the published design; the timing contract above is this
// design's own. Synchronous active-high reset.
module vmm_top #(
  parameter int unsigned N_ALU        = vmm_pkg::N_ALU,
  parameter int unsigned SEDS_PER_ALU = vmm_pkg::SEDS_PER_ALU,
  parameter int unsigned ELEM_W       = vmm_pkg::ELEM_W,
  parameter int unsigned VEC_LEN      = vmm_pkg::VEC_LEN,
  parameter int unsigned C_W          = vmm_pkg::C_W,
  parameter int unsigned BUS_W        = vmm_pkg::BUS_W,
  parameter int unsigned BUF_BYTES    = vmm_pkg::BUF_BYTES,
  parameter int unsigned ALU_BUS_W    = vmm_pkg::ALU_BUS_W,
  parameter int unsigned SYNC_GROUP   = vmm_pkg::SYNC_GROUP,
  parameter int unsigned C_BUS_W      = vmm_pkg::C_BUS_W,
  parameter int unsigned N_SED        = N_ALU * SEDS_PER_ALU,
  parameter int unsigned SLICES       = SEDS_PER_ALU * BUS_W / ALU_BUS_W,
  parameter int unsigned BEATS        = VEC_LEN * ELEM_W / BUS_W,
  parameter int unsigned N_VEC        = BUF_BYTES * 8 / (VEC_LEN * ELEM_W),
  parameter int unsigned C_GROUP      = C_BUS_W / C_W
) (
  input  logic                                        clk,
  input  logic                                        rst,
  // timing
  output logic                                        ce,
  output logic [$clog2(BEATS)-1:0]                    beat,
  output logic                                        frame_end,
  // input vector A
  input  logic                                        a_valid,
  input  logic [BUS_W-1:0]                            a_data,
  output logic [VEC_LEN-1:0][ELEM_W-1:0]              vcsel_drive,
  output logic                                        a_incomplete,
  // matrix rows B_j, on the ALU element buses
  input  logic [N_ALU-1:0][ALU_BUS_W-1:0]             bus_data,
  input  logic [N_ALU-1:0][ALU_BUS_W/SYNC_GROUP-1:0]  bus_sync,
  input  vmm_pkg::sed_cmd_t [N_SED-1:0]               cmd,
  // output vector C
  output logic [C_BUS_W-1:0]                          c_bus,
  output logic [C_GROUP-1:0]                          c_bus_mask,
  output logic [$clog2(BEATS)-1:0]                    c_bus_group,
  output logic                                        c_bus_valid,
  // status
  output logic [N_SED-1:0][$clog2(N_VEC+1)-1:0]       buf_count,
  output logic [N_SED-1:0]                            err_overflow,
  output logic [N_SED-1:0]                            err_underflow,
  output logic [N_SED-1:0]                            err_data,
  output logic [N_ALU-1:0]                            sync_err
);
  logic [$clog2(SLICES)-1:0] phase;
  logic [N_SED-1:0][C_W-1:0] c_out;
  logic [N_SED-1:0]          c_valid;

  frame_timer #(
    .CLK_PER_BEAT   (SLICES),
    .BEATS_PER_FRAME(BEATS)
  ) u_timer (
    .clk      (clk),
    .rst      (rst),
    .phase    (phase),
    .ce       (ce),
    .beat     (beat),
    .frame_end(frame_end)
  );

  row_source_driver #(
    .ELEM_W (ELEM_W),
    .VEC_LEN(VEC_LEN),
    .BUS_W  (BUS_W)
  ) u_rsd (
    .clk         (clk),
    .rst         (rst),
    .ce          (ce),
    .beat        (beat),
    .frame_end   (frame_end),
    .a_valid     (a_valid),
    .a_data      (a_data),
    .vcsel_drive (vcsel_drive),
    .a_incomplete(a_incomplete)
  );

  interface_board #(
    .N_ALU     (N_ALU),
    .SEDS      (SEDS_PER_ALU),
    .ELEM_W    (ELEM_W),
    .VEC_LEN   (VEC_LEN),
    .C_W       (C_W),
    .BUS_W     (BUS_W),
    .BUF_BYTES (BUF_BYTES),
    .ALU_BUS_W (ALU_BUS_W),
    .SYNC_GROUP(SYNC_GROUP)
  ) u_board (
    .clk          (clk),
    .rst          (rst),
    .phase        (phase),
    .ce           (ce),
    .beat         (beat),
    .frame_end    (frame_end),
    .bus_data     (bus_data),
    .bus_sync     (bus_sync),
    .cmd          (cmd),
    .light        (vcsel_drive),
    .c_out        (c_out),
    .c_valid      (c_valid),
    .buf_count    (buf_count),
    .err_overflow (err_overflow),
    .err_underflow(err_underflow),
    .err_data     (err_data),
    .sync_err     (sync_err)
  );

  c_output_collector #(
    .N_SED  (N_SED),
    .C_W    (C_W),
    .C_BUS_W(C_BUS_W)
  ) u_collect (
    .clk        (clk),
    .rst        (rst),
    .ce         (ce),
    .beat       (beat),
    .c_in       (c_out),
    .c_valid    (c_valid),
    .c_bus      (c_bus),
    .c_bus_mask (c_bus_mask),
    .c_bus_group(c_bus_group),
    .c_bus_valid(c_bus_valid)
  );
endmodule
