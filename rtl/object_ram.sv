// object_ram: on-chip object point memory of one calculation FPGA.
//
// Holds up to DEPTH object points (X_j, Y_j, Delta_j: 14 + 14 + 32 = 60 bits
// each). It is a simple dual-port memory: one write port, filled from the
// ring bus while the node is idle, and one read port that streams the points
// into the pixel pipeline. The read is synchronous: the point at raddr
// appears on rdata after the clock edge on which re is high; with re low the
// output holds, which lets a pipeline stall freeze it. The contents are not
// reset.
//
// A capacity of 65,536 (2^16) points per pass follows the HORN-8 design,
// where these memories fill most of the FPGA's block RAM; the two-port
// organisation is this design's choice.
module object_ram
  import horn8_pkg::*;
#(
  parameter int unsigned DEPTH = 65536
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [$clog2(DEPTH)-1:0] waddr,
  input  obj_point_t               wdata,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] raddr,
  output obj_point_t               rdata
);

  obj_point_t mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    if (re) rdata <= mem[raddr];
  end

endmodule
