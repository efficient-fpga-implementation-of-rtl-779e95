// dist_ram_sdp: simple dual port RAM in the style of FPGA distributed
// (LUT) RAM: one synchronous write port and one asynchronous read port.
// With the defaults it is the 16 x 16 block that holds one lane of the
// folded state. Contents are not reset; whatever is read must have been
// written first.
module dist_ram_sdp #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
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

  always_ff @(posedge clk)
    if (we) mem[waddr] <= wdata;

  assign rdata = mem[raddr];
endmodule
