// horn_pipeline: the pixel pipeline of one calculation FPGA.
//
// One BPU followed by UNITS-1 APUs computes UNITS horizontally adjacent
// pixels of one hologram line at once. Object points enter the BPU one per
// clock; each point then ripples one unit per clock down the chain, and
// every unit adds the point's cosine to its own pixel sum. A pass over N
// points therefore takes N clocks of issue, after which pixel k holds its
// result BPU_LAT + k clocks after the last point entered. The pixel bits are
// pix[k] = pixel X_a + k.
//
// `tail` is the phase bus leaving the last unit; its `last` flag marks the
// moment at which every pixel of the pass is final. `en` stalls the whole
// chain (and every accumulator) for output back-pressure.
//
// 1 BPU + 639 APUs (640 pixels per FPGA) follow the HORN-8 design.
module horn_pipeline
  import horn8_pkg::*;
#(
  parameter int unsigned UNITS = 640
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [COORD_W-1:0] xa,
  input  logic [COORD_W-1:0] ya,
  input  obj_point_t         point,
  output logic [UNITS-1:0]   pix,
  output phase_bus_t         tail
);

  phase_bus_t bus [UNITS];

  bpu u_bpu (
    .clk, .rst_n, .en,
    .in_valid, .in_first, .in_last,
    .xa, .ya, .point,
    .out (bus[0]),
    .pix (pix[0])
  );

  for (genvar k = 1; k < UNITS; k++) begin : g_apu
    apu u_apu (
      .clk, .rst_n, .en,
      .in  (bus[k-1]),
      .out (bus[k]),
      .pix (pix[k])
    );
  end

  assign tail = bus[UNITS-1];

endmodule
