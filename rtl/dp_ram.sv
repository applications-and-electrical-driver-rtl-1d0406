// dp_ram: simple dual-port RAM, one write port and one read port on one clock.
//
// Writes happen on the clock edge where `we` is high. The read port is
// synchronous: `rdata` shows the word at the `raddr` of the previous clock,
// every clock. A read of the address being written in the same clock returns
// the old word. The array has no reset; its users track which words hold data.
// This is the storage of the SED buffer, written as an array so that it maps
// to an SRAM macro.
module dp_ram #(
  parameter int unsigned WIDTH = 256,
  parameter int unsigned DEPTH = 64
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  logic [WIDTH-1:0]         wdata,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
