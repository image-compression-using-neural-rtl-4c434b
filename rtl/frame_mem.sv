// frame_mem - simple dual-port RAM with synchronous read, used for the input
// image memory, the row-pass buffers and the banks of the coefficient memory.
//
// One write port (we / waddr / wdata, written at the clock edge) and one read port
// whose data appears one cycle after the address (registered read, as an FPGA
// block RAM). A read of the address being written returns the old contents.
// The memories are named in the published 2D-DWT processor; their organisation
// (one word per pixel or coefficient, synchronous read) is this design's choice.
module frame_mem #(
  parameter int DEPTH = 65536,
  parameter int WIDTH = 8,
  localparam int AW   = $clog2(DEPTH)
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
