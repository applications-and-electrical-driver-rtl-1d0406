// vmm_pkg: sizes, timing constants and the SED command type shared by the
// electrical driver of the optical vector-by-matrix multiplier (VMM).
//
// The VMM multiplies a 1x256 vector of 8-bit elements (A, shown as light by a
// row of VCSELs) by a 256x256 matrix of 8-bit elements (held in 256 SLM rows,
// one per single electrical driver, SED) once per 8 ns optical frame
// (125 MHz). Each SED j reports the 20-bit dot product c_j. Electrical buses
// run at 1 GHz (one "beat"), so a 256-element x 8-bit vector crosses a 256-bit
// bus in 8 beats, which is exactly one frame.
//
// The counts (256 elements, 8 bits, 20-bit results, 256-bit buses, 16 ALU
// elements of 16 SEDs, a 2048-byte buffer, a 2048+128-line ALU bus, a 640-bit
// output bus) follow the published design. The command encoding below, the
// choice of two bus clocks per beat and the 4-bit result shift are this
// design's own choices.
package vmm_pkg;

  // Element and vector sizes.
  localparam int unsigned ELEM_W    = 8;     // bits per vector / matrix element
  localparam int unsigned VEC_LEN   = 256;   // elements per vector (VCSELs, SLM row length)
  localparam int unsigned C_W       = 20;    // bits of one result scalar c_j
  localparam int unsigned BUS_W     = 256;   // bits per beat of the A and B_j buses
  localparam int unsigned BUF_BYTES = 2048;  // SED buffer size in bytes

  // Organisation of the board.
  localparam int unsigned N_ALU        = 16;  // ALU elements on the interface board
  localparam int unsigned SEDS_PER_ALU = 16;  // SEDs per ALU element
  localparam int unsigned N_SED        = N_ALU * SEDS_PER_ALU;  // 256 SEDs, one per matrix row
  localparam int unsigned ALU_BUS_W    = 2048;  // data lines of an ALU element's input bus
  localparam int unsigned SYNC_GROUP   = 16;    // data lines per synch line
  localparam int unsigned C_BUS_W      = 640;   // width of the output bus carrying C

  // Timing: bus clocks per 1 GHz beat (the ALU bus runs at 2 GHz) and beats
  // per 125 MHz optical frame.
  localparam int unsigned CLK_PER_BEAT    = 2;
  localparam int unsigned BEATS_PER_FRAME = 8;

  // Where SLM row j takes its next contents from (read operations b and c).
  typedef enum logic [1:0] {
    SLM_HOLD     = 2'd0,  // keep the current SLM contents
    SLM_FROM_EXT = 2'd1,  // operation b: external input B_j -> SLM_j
    SLM_FROM_BUF = 2'd2   // operation c: buffer -> SLM_j
  } slm_src_e;

  // Command given to one SED for one frame.
  typedef struct packed {
    logic     buf_write;  // operation a: external input B_j -> buffer
    slm_src_e slm_src;    // operations b / c
    logic     write_c;    // operation d: send the latest c_j to the output
  } sed_cmd_t;

endpackage
