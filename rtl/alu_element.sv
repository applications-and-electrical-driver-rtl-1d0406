// alu_element: one ALU chip, SEDS = 16 single electrical drivers fed by one
// wide input bus through the bus distributor.
//
// The chip's input bus (2048 data lines and 128 synch lines at two bus clocks
// per 1 GHz beat) is split by alu_bus_distributor into one 256-bit word per
// SED per beat. Every SED gets its own per-frame command, the common VCSEL
// light vector (the light of the row source array reaches every SLM row) and
// the common beat/frame timing, and reports its 20-bit c_j. SED m of ALU
// element e drives row 16e+m of the SLM matrix. SEDs do not talk to each
// other. Timing is that of `sed`: the distributor adds no beat of latency.
// Each SED's `slm_drive` (its row's pixel codes) stays inside the chip: the
// SLM row and its detector are modelled within the SED, so the pin is left
// open here.
//
// Sixteen SEDs per element follow the published block diagram and the board's
// 16 x 16 = 256 SEDs; the published text also mentions 8 SEDs per element,
// which would not give 256 SEDs on 16 elements.
module alu_element #(
  parameter int unsigned SEDS            = vmm_pkg::SEDS_PER_ALU,
  parameter int unsigned ELEM_W          = vmm_pkg::ELEM_W,
  parameter int unsigned VEC_LEN         = vmm_pkg::VEC_LEN,
  parameter int unsigned C_W             = vmm_pkg::C_W,
  parameter int unsigned BUS_W           = vmm_pkg::BUS_W,
  parameter int unsigned BUF_BYTES       = vmm_pkg::BUF_BYTES,
  parameter int unsigned ALU_BUS_W       = vmm_pkg::ALU_BUS_W,
  parameter int unsigned SYNC_GROUP      = vmm_pkg::SYNC_GROUP,
  parameter int unsigned SLICES          = SEDS * BUS_W / ALU_BUS_W,
  parameter int unsigned BEATS_PER_FRAME = VEC_LEN * ELEM_W / BUS_W,
  parameter int unsigned N_VEC           = BUF_BYTES * 8 / (VEC_LEN * ELEM_W)
) (
  input  logic                                  clk,
  input  logic                                  rst,
  input  logic [$clog2(SLICES)-1:0]             phase,
  input  logic                                  ce,
  input  logic [$clog2(BEATS_PER_FRAME)-1:0]    beat,
  input  logic                                  frame_end,
  input  logic [ALU_BUS_W-1:0]                  bus_data,
  input  logic [ALU_BUS_W/SYNC_GROUP-1:0]       bus_sync,
  input  vmm_pkg::sed_cmd_t [SEDS-1:0]          cmd,
  input  logic [VEC_LEN-1:0][ELEM_W-1:0]        light,
  output logic [SEDS-1:0][C_W-1:0]              c_out,
  output logic [SEDS-1:0]                       c_valid,
  output logic [SEDS-1:0][$clog2(N_VEC+1)-1:0]  buf_count,
  output logic [SEDS-1:0]                       err_overflow,
  output logic [SEDS-1:0]                       err_underflow,
  output logic [SEDS-1:0]                       err_data,
  output logic                                  sync_err
);
  logic [SEDS-1:0][BUS_W-1:0] sed_data;
  logic [SEDS-1:0]            sed_valid;

  alu_bus_distributor #(
    .SEDS      (SEDS),
    .BUS_W     (BUS_W),
    .ALU_BUS_W (ALU_BUS_W),
    .SYNC_GROUP(SYNC_GROUP)
  ) u_dist (
    .clk      (clk),
    .rst      (rst),
    .phase    (phase),
    .ce       (ce),
    .bus_data (bus_data),
    .bus_sync (bus_sync),
    .sed_data (sed_data),
    .sed_valid(sed_valid),
    .sync_err (sync_err)
  );

  for (genvar s = 0; s < SEDS; s++) begin : g_sed
    sed #(
      .ELEM_W   (ELEM_W),
      .VEC_LEN  (VEC_LEN),
      .C_W      (C_W),
      .BUS_W    (BUS_W),
      .BUF_BYTES(BUF_BYTES)
    ) u_sed (
      .clk          (clk),
      .rst          (rst),
      .ce           (ce),
      .beat         (beat),
      .frame_end    (frame_end),
      .cmd          (cmd[s]),
      .b_valid      (sed_valid[s]),
      .b_data       (sed_data[s]),
      .light        (light),
      .slm_drive    (),
      .c_out        (c_out[s]),
      .c_valid      (c_valid[s]),
      .buf_count    (buf_count[s]),
      .err_overflow (err_overflow[s]),
      .err_underflow(err_underflow[s]),
      .err_data     (err_data[s])
    );
  end
endmodule
