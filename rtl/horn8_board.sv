// horn8_board: one HORN-8 hologram computing board.
//
// The board computes binary amplitude holograms of point-cloud objects with
// the Fresnel approximation: pixel (X, Y) is the sign of
//   sum_j cos(2*pi * Delta_j * ((X - X_j)^2 + (Y - Y_j)^2)),
//   Delta_j = p / (2 lambda Z_j),
// with coordinates in units of the pixel pitch p. N_CALC calculation nodes
// (FPGAs in the original board) each run a pipeline of UNITS pixel units, so
// the board evaluates N_CALC*UNITS pixels in parallel (7 x 640 = 4,480) and
// one object point per clock per node. A communication node links the host
// to all of them through a ring bus that passes through every node and
// returns to the communication node.
//
// Interface: the host's DMA streams, 64-bit words with valid/ready, in the
// format of interface_ctrl. A typical job: broadcast the object points (OBJ)
// and CFG_NOBJ, send each node its own CFG_START/CFG_GEOM (for example line
// offset k-1 and line step N_CALC for node k), broadcast RUN, then collect
// RES words and one DONE per node. Calculation proceeds while earlier
// results travel to the host.
//
// Timing: a pass of N >= UNITS points takes N clocks per node for UNITS
// pixels, so a hologram of H pixels takes about N*H/(N_CALC*UNITS) clocks.
//
// Seven calculation FPGAs with 640 pixel units each, one communication FPGA
// and the ring bus follow the HORN-8 board. The PCI-Express endpoint and its
// DMA engine are not part of this RTL: the host streams are brought out as
// ports instead.
module horn8_board
  import horn8_pkg::*;
#(
  parameter int unsigned N_CALC = 7,
  parameter int unsigned UNITS  = 640,
  parameter int unsigned DEPTH  = 65536
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              host_in_valid,
  output logic              host_in_ready,
  input  logic [DATA_W-1:0] host_in_data,
  output logic              host_out_valid,
  input  logic              host_out_ready,
  output logic [DATA_W-1:0] host_out_data,
  output logic [N_CALC-1:0] node_busy
);

  // ring hop k goes from node k to node (k+1) mod (N_CALC+1); node 0 is the
  // communication node
  logic       hop_valid [N_CALC+1];
  logic       hop_ready [N_CALC+1];
  ring_word_t hop_word  [N_CALC+1];

  logic       if_tx_valid, if_tx_ready, if_rx_valid, if_rx_ready;
  ring_word_t if_tx_word, if_rx_word;

  interface_ctrl u_if (
    .clk, .rst_n,
    .host_in_valid, .host_in_ready, .host_in_data,
    .host_out_valid, .host_out_ready, .host_out_data,
    .ring_tx_valid (if_tx_valid), .ring_tx_ready (if_tx_ready), .ring_tx_word (if_tx_word),
    .ring_rx_valid (if_rx_valid), .ring_rx_ready (if_rx_ready), .ring_rx_word (if_rx_word)
  );

  bus_ctrl #(.NODE_ID(3'd0), .SINK_ALL(1'b1)) u_bus0 (
    .clk, .rst_n,
    .in_valid  (hop_valid[N_CALC]), .in_ready (hop_ready[N_CALC]), .in_word (hop_word[N_CALC]),
    .out_valid (hop_valid[0]),      .out_ready (hop_ready[0]),     .out_word (hop_word[0]),
    .rx_valid  (if_rx_valid), .rx_ready (if_rx_ready), .rx_word (if_rx_word),
    .tx_valid  (if_tx_valid), .tx_ready (if_tx_ready), .tx_word (if_tx_word)
  );

  for (genvar k = 1; k <= N_CALC; k++) begin : g_node
    logic       rx_valid, tx_valid, tx_ready;
    ring_word_t rx_word, tx_word;

    bus_ctrl #(.NODE_ID(NODE_W'(k)), .SINK_ALL(1'b0)) u_bus (
      .clk, .rst_n,
      .in_valid  (hop_valid[k-1]), .in_ready (hop_ready[k-1]), .in_word (hop_word[k-1]),
      .out_valid (hop_valid[k]),   .out_ready (hop_ready[k]),  .out_word (hop_word[k]),
      .rx_valid, .rx_ready (1'b1), .rx_word,
      .tx_valid, .tx_ready, .tx_word
    );

    calc_module #(.UNITS(UNITS), .DEPTH(DEPTH), .NODE_ID(NODE_W'(k))) u_calc (
      .clk, .rst_n,
      .rx_valid, .rx_word,
      .tx_valid, .tx_ready, .tx_word,
      .busy (node_busy[k-1])
    );
  end

endmodule
