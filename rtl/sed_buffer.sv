// sed_buffer: the SED's dual-port buffer, a 2048x8-bit SRAM organised as a
// FIFO of whole 256-element vectors.
//
// With a 256-bit port the 2048 bytes are 64 words, i.e. N_VEC = 8 vectors of
// WORDS_PER_VEC = 8 words. A vector is written one word per beat, at offset
// `wr_off` inside the slot after the newest vector, and becomes part of the
// FIFO only when `wr_commit` is pulsed (at the end of the frame that carried
// it). Likewise the oldest vector is read one word per beat at offset `rd_off`
// and is released by `rd_commit`. Uncommitted words are simply overwritten,
// so a vector cut short never enters the FIFO. The read port is synchronous
// and re-reads every clock: `rd_data` is the word at `rd_off` of the clock
// before, which is why `rd_off` must be stable for at least two clocks (the
// SED changes it once per beat of two bus clocks).
//
// `count` is the number of committed vectors. The caller must not commit a
// write when `count == N_VEC` or a read when `count == 0`; assertions check
// this. Both ports may run in the same frame (the buffer is dual-ported).
// The FIFO organisation, the 2048-byte size and dual porting follow the
// published design; vector-granular commits are this design's own choice.
// Synchronous active-high reset empties the FIFO.
module sed_buffer #(
  parameter int unsigned WORD_W        = vmm_pkg::BUS_W,
  parameter int unsigned WORDS_PER_VEC = vmm_pkg::BEATS_PER_FRAME,
  parameter int unsigned N_VEC         = vmm_pkg::BUF_BYTES * 8 / (WORD_W * WORDS_PER_VEC)
) (
  input  logic                             clk,
  input  logic                             rst,
  // write port (external input B_j -> buffer)
  input  logic                             wr_en,
  input  logic [$clog2(WORDS_PER_VEC)-1:0] wr_off,
  input  logic [WORD_W-1:0]                wr_data,
  input  logic                             wr_commit,
  // read port (buffer -> SLM_j)
  input  logic [$clog2(WORDS_PER_VEC)-1:0] rd_off,
  output logic [WORD_W-1:0]                rd_data,
  input  logic                             rd_commit,
  // status
  output logic [$clog2(N_VEC+1)-1:0]       count
);
  localparam int unsigned OW = $clog2(WORDS_PER_VEC);
  localparam int unsigned VW = $clog2(N_VEC);
  localparam int unsigned CW = $clog2(N_VEC + 1);

  logic [VW-1:0] wr_vec, rd_vec;

  dp_ram #(.WIDTH(WORD_W), .DEPTH(N_VEC * WORDS_PER_VEC)) u_ram (
    .clk  (clk),
    .we   (wr_en),
    .waddr({wr_vec, wr_off}),
    .wdata(wr_data),
    .raddr({rd_vec, rd_off}),
    .rdata(rd_data)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_vec <= '0;
      rd_vec <= '0;
      count  <= '0;
    end else begin
      if (wr_commit) wr_vec <= wr_vec + 1'b1;
      if (rd_commit) rd_vec <= rd_vec + 1'b1;
      count <= count + CW'(wr_commit) - CW'(rd_commit);
    end
  end

  assert property (@(posedge clk) disable iff (rst) wr_commit |-> count != CW'(N_VEC))
    else $error("sed_buffer: write committed while full");
  assert property (@(posedge clk) disable iff (rst) rd_commit |-> count != '0)
    else $error("sed_buffer: read committed while empty");

  initial begin
    assert (N_VEC == (1 << VW) && WORDS_PER_VEC == (1 << OW))
      else $error("sed_buffer: N_VEC and WORDS_PER_VEC must be powers of two");
  end
endmodule
