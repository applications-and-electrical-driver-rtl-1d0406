// sed: single electrical driver (SED) j, the electronics behind row j of the
// SLM matrix.
//
// An SED holds a FIFO buffer of whole 256-element vectors (sed_buffer), the
// drive register of its 256 SLM pixels, and the optical row with its detector
// (slm_row, a model). Once per optical frame (8 beats, 125 MHz) it takes a
// command `cmd`, sampled on the frame's first beat (`ce` with `beat == 0`):
//   a  buf_write         the 8 words of B_j that arrive in this frame go to
//                        the buffer;
//   b  slm_src=FROM_EXT  the same 8 words become the next SLM row;
//   c  slm_src=FROM_BUF  the oldest buffered vector becomes the next SLM row
//                        (it can run in the same frame as a: dual port);
//   d  write_c           c_j, the dot product of the previous frame's light
//                        and SLM row, is put on `c_out` with `c_valid` for
//                        this frame.
// B_j arrives as one 256-bit word per beat, word k = elements 32k..32k+31,
// each qualified by `b_valid`. The next SLM row is assembled in a staging
// register and replaces the SLM drive register at once at `frame_end`, so the
// pixels never change inside a frame. A vector with a missing word is dropped
// (`err_data`); a buffer write while 8 vectors are stored is refused
// (`err_overflow`); a buffer read with nothing stored is refused and the SLM
// keeps its row (`err_underflow`). The three error outputs pulse for one beat.
//
// Timing, for B_j and A sent in frame f: SLM row and light are shown in frame
// f+1, the detector is sampled at the end of f+1, and a write_c command in
// frame f+2 presents c_j from that frame's first beat on. One full row update
// and one dot product per frame is the published rate.
//
// The operations a-d, the buffer size and the widths follow the published
// design. The per-frame command word, the staging register, the b_valid
// qualifier and the refusal rules are this design's own choices. Synchronous
// active-high reset empties the buffer and clears the SLM row and outputs.
module sed #(
  parameter int unsigned ELEM_W          = vmm_pkg::ELEM_W,
  parameter int unsigned VEC_LEN         = vmm_pkg::VEC_LEN,
  parameter int unsigned C_W             = vmm_pkg::C_W,
  parameter int unsigned BUS_W           = vmm_pkg::BUS_W,
  parameter int unsigned BUF_BYTES       = vmm_pkg::BUF_BYTES,
  parameter int unsigned BEATS_PER_FRAME = VEC_LEN * ELEM_W / BUS_W,
  parameter int unsigned N_VEC           = BUF_BYTES * 8 / (VEC_LEN * ELEM_W)
) (
  input  logic                               clk,
  input  logic                               rst,
  input  logic                               ce,
  input  logic [$clog2(BEATS_PER_FRAME)-1:0] beat,
  input  logic                               frame_end,
  input  vmm_pkg::sed_cmd_t                           cmd,
  input  logic                               b_valid,
  input  logic [BUS_W-1:0]                   b_data,
  input  logic [VEC_LEN-1:0][ELEM_W-1:0]     light,
  output logic [VEC_LEN-1:0][ELEM_W-1:0]     slm_drive,
  output logic [C_W-1:0]                     c_out,
  output logic                               c_valid,
  output logic [$clog2(N_VEC+1)-1:0]         buf_count,
  output logic                               err_overflow,
  output logic                               err_underflow,
  output logic                               err_data
);
  localparam int unsigned CW = $clog2(N_VEC + 1);

  vmm_pkg::sed_cmd_t cur, eff, act;
  logic     first, uses_ext, ext_ok, ext_ok_next, ovf, unf;
  logic [BUS_W-1:0] rd_data, word;
  logic [BEATS_PER_FRAME-1:0][BUS_W-1:0] stage, stage_next;
  logic [C_W-1:0] c_det;

  assign first = (beat == '0);

  // Refuse what the buffer cannot do; an unknown source code means hold.
  always_comb begin
    eff = cmd;
    ovf = 1'b0;
    unf = 1'b0;
    if (cmd.buf_write && buf_count == CW'(N_VEC)) begin
      eff.buf_write = 1'b0;
      ovf           = 1'b1;
    end
    if (cmd.slm_src == vmm_pkg::SLM_FROM_BUF && buf_count == '0) begin
      eff.slm_src = vmm_pkg::SLM_HOLD;
      unf         = 1'b1;
    end
    if (!(cmd.slm_src inside {vmm_pkg::SLM_HOLD, vmm_pkg::SLM_FROM_EXT, vmm_pkg::SLM_FROM_BUF})) eff.slm_src = vmm_pkg::SLM_HOLD;
  end

  assign act         = first ? eff : cur;
  assign uses_ext    = act.buf_write || act.slm_src == vmm_pkg::SLM_FROM_EXT;
  assign ext_ok_next = (first || ext_ok) && b_valid;
  assign word        = (act.slm_src == vmm_pkg::SLM_FROM_BUF) ? rd_data : b_data;

  always_comb begin
    stage_next       = stage;
    stage_next[beat] = word;
  end

  sed_buffer #(
    .WORD_W       (BUS_W),
    .WORDS_PER_VEC(BEATS_PER_FRAME),
    .N_VEC        (N_VEC)
  ) u_buf (
    .clk      (clk),
    .rst      (rst),
    .wr_en    (ce && act.buf_write && b_valid),
    .wr_off   (beat),
    .wr_data  (b_data),
    .wr_commit(frame_end && act.buf_write && ext_ok_next),
    .rd_off   (beat),
    .rd_data  (rd_data),
    .rd_commit(frame_end && act.slm_src == vmm_pkg::SLM_FROM_BUF),
    .count    (buf_count)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      cur           <= '0;
      ext_ok        <= 1'b0;
      stage         <= '0;
      slm_drive     <= '0;
      c_out         <= '0;
      c_valid       <= 1'b0;
      err_overflow  <= 1'b0;
      err_underflow <= 1'b0;
      err_data      <= 1'b0;
    end else if (ce) begin
      cur           <= act;
      ext_ok        <= ext_ok_next;
      stage         <= stage_next;
      err_overflow  <= first && ovf;
      err_underflow <= first && unf;
      err_data      <= frame_end && uses_ext && !ext_ok_next;
      if (frame_end) begin
        if (act.slm_src == vmm_pkg::SLM_FROM_BUF || (act.slm_src == vmm_pkg::SLM_FROM_EXT && ext_ok_next))
          slm_drive <= stage_next;
      end
      if (first) begin
        c_out   <= c_det;
        c_valid <= cmd.write_c;
      end
    end
  end

  slm_row #(
    .ELEM_W (ELEM_W),
    .VEC_LEN(VEC_LEN),
    .C_W    (C_W)
  ) u_row (
    .clk      (clk),
    .rst      (rst),
    .frame_end(frame_end),
    .light    (light),
    .drive    (slm_drive),
    .c        (c_det)
  );
endmodule
