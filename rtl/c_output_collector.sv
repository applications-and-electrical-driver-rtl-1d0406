// c_output_collector: gathers the scalar results c_j of all SEDs into the
// output vector C and sends it on the C_BUS_W = 640-bit output bus.
//
// C is 256 x 20 = 5120 bits, so it crosses a 640-bit bus in 8 beats: one
// optical frame, the rate at which results are produced. Beat word g carries
// the results of SEDs 32g..32g+31, SED 32g+m in bits [20m+19:20m], with
// `c_bus_mask[m]` telling whether that SED wrote its result (operation d) in
// this frame; `c_bus_group` is g and `c_bus_valid` is high when any mask bit
// is. SEDs present their results from the first beat of a frame, so group g is
// registered on the clock enable of beat g+1 (group 7 on beat 0 of the next
// frame) and is held until the next beat. The total width of C and the
// 640-bit bus follow the published design; the group order and the mask are
// this design's own choices. Synchronous active-high reset clears the bus.
module c_output_collector #(
  parameter int unsigned N_SED   = vmm_pkg::N_SED,
  parameter int unsigned C_W     = vmm_pkg::C_W,
  parameter int unsigned C_BUS_W = vmm_pkg::C_BUS_W,
  parameter int unsigned GROUP   = C_BUS_W / C_W,
  parameter int unsigned GROUPS  = N_SED / GROUP
) (
  input  logic                          clk,
  input  logic                          rst,
  input  logic                          ce,
  input  logic [$clog2(GROUPS)-1:0]     beat,
  input  logic [N_SED-1:0][C_W-1:0]     c_in,
  input  logic [N_SED-1:0]              c_valid,
  output logic [C_BUS_W-1:0]            c_bus,
  output logic [GROUP-1:0]              c_bus_mask,
  output logic [$clog2(GROUPS)-1:0]     c_bus_group,
  output logic                          c_bus_valid
);
  logic [$clog2(GROUPS)-1:0] g;
  assign g = beat - 1'b1;   // wraps: beat 0 sends the last group

  always_ff @(posedge clk) begin
    if (rst) begin
      c_bus       <= '0;
      c_bus_mask  <= '0;
      c_bus_group <= '0;
      c_bus_valid <= 1'b0;
    end else if (ce) begin
      c_bus       <= c_in[g*GROUP +: GROUP];
      c_bus_mask  <= c_valid[g*GROUP +: GROUP];
      c_bus_group <= g;
      c_bus_valid <= |c_valid[g*GROUP +: GROUP];
    end
  end

  initial begin
    assert (GROUP * C_W == C_BUS_W && GROUPS * GROUP == N_SED && GROUPS == (1 << $clog2(GROUPS)))
      else $error("c_output_collector: C must fill a power-of-two number of bus words exactly");
  end
endmodule
