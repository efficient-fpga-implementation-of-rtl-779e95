// dist_ram_sp: single port RAM in the style of FPGA distributed (LUT) RAM:
// one address shared by a synchronous write and an asynchronous read. With
// the defaults it is the 16 x 16 block that holds one lane of the input
// buffer. Contents are not reset.
module dist_ram_sp #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 16,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we) mem[addr] <= wdata;

  assign rdata = mem[addr];
endmodule
