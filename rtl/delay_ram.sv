// delay_ram: the sample memory behind the echo and reverb effects.
//
// A simple dual-port RAM, DEPTH words of WIDTH bits (4096 x 12 by default,
// the size the effects use), meant to map onto FPGA block RAM. One write
// port and one read port share the clock. The read is synchronous: rdata
// holds mem[raddr] one clock after raddr is presented. Reading and writing
// the same address in one cycle returns the old word. Contents are not
// reset; the effect controller clears the memory after reset.
module delay_ram #(
  parameter int unsigned DEPTH = 4096,
  parameter int unsigned WIDTH = 12,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
