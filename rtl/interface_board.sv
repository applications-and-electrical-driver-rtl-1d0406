// interface_board: the board that carries the N_ALU = 16 ALU elements, i.e.
// all 256 SEDs of the VMM electrical driver.
//
// Each ALU element has its own input bus (2048 data lines with 128 synch
// lines) and is fed independently of the others; there is no connection and
// no switch between elements. What they share is the timing (the beat and
// frame strobes, standing for the board's clock tree) and the light of the row
// source array. SED m of element e is row j = 16e + m of the SLM matrix, and
// its command, result and status appear at index j of the flattened arrays.
// sync_err has one bit per element. Timing is that of `sed`.
//
// The element count, independence and per-element buses follow the published
// design; the flat indexing is this design's own choice.
module interface_board #(
  parameter int unsigned N_ALU           = vmm_pkg::N_ALU,
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
  input  logic                                        clk,
  input  logic                                        rst,
  input  logic [$clog2(SLICES)-1:0]                   phase,
  input  logic                                        ce,
  input  logic [$clog2(BEATS_PER_FRAME)-1:0]          beat,
  input  logic                                        frame_end,
  input  logic [N_ALU-1:0][ALU_BUS_W-1:0]             bus_data,
  input  logic [N_ALU-1:0][ALU_BUS_W/SYNC_GROUP-1:0]  bus_sync,
  input  vmm_pkg::sed_cmd_t [N_ALU*SEDS-1:0]          cmd,
  input  logic [VEC_LEN-1:0][ELEM_W-1:0]              light,
  output logic [N_ALU*SEDS-1:0][C_W-1:0]              c_out,
  output logic [N_ALU*SEDS-1:0]                       c_valid,
  output logic [N_ALU*SEDS-1:0][$clog2(N_VEC+1)-1:0]  buf_count,
  output logic [N_ALU*SEDS-1:0]                       err_overflow,
  output logic [N_ALU*SEDS-1:0]                       err_underflow,
  output logic [N_ALU*SEDS-1:0]                       err_data,
  output logic [N_ALU-1:0]                            sync_err
);
  for (genvar e = 0; e < N_ALU; e++) begin : g_alu
    alu_element #(
      .SEDS      (SEDS),
      .ELEM_W    (ELEM_W),
      .VEC_LEN   (VEC_LEN),
      .C_W       (C_W),
      .BUS_W     (BUS_W),
      .BUF_BYTES (BUF_BYTES),
      .ALU_BUS_W (ALU_BUS_W),
      .SYNC_GROUP(SYNC_GROUP)
    ) u_alu (
      .clk          (clk),
      .rst          (rst),
      .phase        (phase),
      .ce           (ce),
      .beat         (beat),
      .frame_end    (frame_end),
      .bus_data     (bus_data[e]),
      .bus_sync     (bus_sync[e]),
      .cmd          (cmd[e*SEDS +: SEDS]),
      .light        (light),
      .c_out        (c_out[e*SEDS +: SEDS]),
      .c_valid      (c_valid[e*SEDS +: SEDS]),
      .buf_count    (buf_count[e*SEDS +: SEDS]),
      .err_overflow (err_overflow[e*SEDS +: SEDS]),
      .err_underflow(err_underflow[e*SEDS +: SEDS]),
      .err_data     (err_data[e*SEDS +: SEDS]),
      .sync_err     (sync_err[e])
    );
  end
endmodule
