// alu_bus_distributor: the "bus + logic" of an ALU element, which spreads the
// element's wide input bus over its SEDs.
//
// The ALU element receives ALU_BUS_W = 2048 data lines plus one synch line for
// every SYNC_GROUP = 16 data lines (128 synch lines, 2176 lines in all), at two
// bus clocks per 1 GHz SED beat. Each SED needs one 256-bit word per beat, so
// the 16 SEDs need 4096 bits per beat: bus clock p of a beat (`phase` = p)
// carries the words of SEDs 8p..8p+7, SED 8p+m in bits [256m+255:256m]. The
// distributor holds the words of the early bus clocks and, on the beat's last
// clock (`ce`), hands every SED its word, taking the last slice straight off
// the bus, so the SEDs see the data in the same beat.
//
// The synch lines qualify their 16 data lines. A SED's word is valid
// (`sed_valid`) when all 16 synch lines covering it are high. If those 16
// lines disagree, the word is not valid and `sync_err` pulses for the beat
// after. The line counts and rates follow the published design; the slice
// order, the meaning given to the synch lines and the error flag are this
// design's own choices. The published bus also carries 20% redundancy for
// error correction and handshaking, which is not described far enough to be
// built and is not part of this block. No reset is needed for the data path;
// `sync_err` is cleared by the synchronous active-high reset.
module alu_bus_distributor #(
  parameter int unsigned SEDS       = vmm_pkg::SEDS_PER_ALU,
  parameter int unsigned BUS_W      = vmm_pkg::BUS_W,
  parameter int unsigned ALU_BUS_W  = vmm_pkg::ALU_BUS_W,
  parameter int unsigned SYNC_GROUP = vmm_pkg::SYNC_GROUP,
  parameter int unsigned SLICES     = SEDS * BUS_W / ALU_BUS_W,
  parameter int unsigned N_SYNC     = ALU_BUS_W / SYNC_GROUP
) (
  input  logic                                   clk,
  input  logic                                   rst,
  input  logic [$clog2(SLICES)-1:0]              phase,
  input  logic                                   ce,
  input  logic [ALU_BUS_W-1:0]                   bus_data,
  input  logic [N_SYNC-1:0]                      bus_sync,
  output logic [SEDS-1:0][BUS_W-1:0]             sed_data,
  output logic [SEDS-1:0]                        sed_valid,
  output logic                                   sync_err
);
  localparam int unsigned SEDS_PER_SLICE = ALU_BUS_W / BUS_W;
  localparam int unsigned SYNC_PER_SED   = BUS_W / SYNC_GROUP;

  logic [SLICES-1:0][ALU_BUS_W-1:0] hold_data;
  logic [SLICES-1:0][N_SYNC-1:0]    hold_sync;
  logic [SLICES-1:0][ALU_BUS_W-1:0] slice_data;
  logic [SLICES-1:0][N_SYNC-1:0]    slice_sync;
  logic [SEDS-1:0]                  mixed;

  always_ff @(posedge clk) begin
    hold_data[phase] <= bus_data;
    hold_sync[phase] <= bus_sync;
  end

  always_comb begin
    slice_data             = hold_data;
    slice_sync             = hold_sync;
    slice_data[SLICES - 1] = bus_data;
    slice_sync[SLICES - 1] = bus_sync;
    for (int s = 0; s < SEDS; s++) begin
      sed_data[s]  = slice_data[s / SEDS_PER_SLICE][(s % SEDS_PER_SLICE) * BUS_W +: BUS_W];
      sed_valid[s] = &slice_sync[s / SEDS_PER_SLICE][(s % SEDS_PER_SLICE) * SYNC_PER_SED +: SYNC_PER_SED];
      mixed[s]     = |slice_sync[s / SEDS_PER_SLICE][(s % SEDS_PER_SLICE) * SYNC_PER_SED +: SYNC_PER_SED]
                     && !sed_valid[s];
    end
  end

  always_ff @(posedge clk) begin
    if (rst)     sync_err <= 1'b0;
    else if (ce) sync_err <= |mixed;
  end

  initial begin
    assert (SLICES * ALU_BUS_W == SEDS * BUS_W && SLICES >= 2)
      else $error("alu_bus_distributor: the SED words must fill at least two bus clocks exactly");
  end
endmodule
