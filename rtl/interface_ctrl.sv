// interface_ctrl: host bridge of the communication FPGA.
//
// It turns the host's DMA word stream into ring-bus words and the ring's
// result words back into a host stream. Both host streams are 64-bit words
// with a valid/ready handshake; the PCI-Express endpoint and DMA engine that
// would carry them to and from the host are outside this module.
//
// Host to board. A header word [63:61] op, [60:58] node, [57:42] tag,
// [40:24] count is followed by its payload:
//   OBJ  count object points, one per word (bits 59:0 = {X, Y, Delta}),
//        sent as OBJ ring words with tags (addresses) tag, tag+1, ...;
//   CFG  one data word, sent as one CFG ring word;
//   RUN  no payload, sent as one RUN ring word.
// Node 0 addresses every calculation node at once. Other op codes are
// ignored.
//
// Board to host. A RES ring word becomes two host words, a header of the
// same layout (op, source node, tag) and the 64 pixel bits; a DONE word
// becomes one header word. Host-to-node words that come back around the
// ring are dropped here, which is where the ring ends.
//
// Timing: one register on each direction; a full host stream of object
// points moves one point per clock when nothing back-pressures.
//
// That a separate interface controller on the communication FPGA links the
// PCI-Express host link to the ring follows the HORN-8 board; the stream
// formats are this design's own.
module interface_ctrl
  import horn8_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  // host -> board
  input  logic              host_in_valid,
  output logic              host_in_ready,
  input  logic [DATA_W-1:0] host_in_data,
  // board -> host
  output logic              host_out_valid,
  input  logic              host_out_ready,
  output logic [DATA_W-1:0] host_out_data,
  // to the ring (source)
  output logic              ring_tx_valid,
  input  logic              ring_tx_ready,
  output ring_word_t        ring_tx_word,
  // from the ring (sink)
  input  logic              ring_rx_valid,
  output logic              ring_rx_ready,
  input  ring_word_t        ring_rx_word
);

  // ------------------------------------------------------------ host -> ring
  logic              in_payload;   // expecting payload words
  ring_op_e          h_op;
  logic [NODE_W-1:0] h_node;
  logic [TAG_W-1:0]  h_tag;
  logic [16:0]       h_count;
  logic              in_take;
  ring_op_e          hdr_op;

  assign host_in_ready = !ring_tx_valid || ring_tx_ready;
  assign in_take       = host_in_valid && host_in_ready;
  assign hdr_op        = ring_op_e'(host_in_data[63:61]);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      in_payload    <= 1'b0;
      h_op          <= OP_NONE;
      h_node        <= '0;
      h_tag         <= '0;
      h_count       <= '0;
      ring_tx_valid <= 1'b0;
      ring_tx_word  <= '0;
    end else begin
      if (ring_tx_valid && ring_tx_ready) ring_tx_valid <= 1'b0;
      if (in_take) begin
        if (!in_payload) begin
          h_op   <= hdr_op;
          h_node <= host_in_data[60:58];
          h_tag  <= host_in_data[57:42];
          unique case (hdr_op)
            OP_OBJ: begin
              h_count    <= host_in_data[40:24];
              in_payload <= (host_in_data[40:24] != '0);
            end
            OP_CFG: begin
              h_count    <= 17'd1;
              in_payload <= 1'b1;
            end
            OP_RUN: begin
              ring_tx_valid <= 1'b1;
              ring_tx_word  <= '{op: OP_RUN, node: host_in_data[60:58],
                                 tag: host_in_data[57:42], data: '0};
            end
            default: ;
          endcase
        end else begin
          ring_tx_valid <= 1'b1;
          ring_tx_word  <= '{op: h_op, node: h_node, tag: h_tag, data: host_in_data};
          h_tag         <= h_tag + 1'b1;
          h_count       <= h_count - 1'b1;
          if (h_count == 17'd1) in_payload <= 1'b0;
        end
      end
    end
  end

  // ------------------------------------------------------------ ring -> host
  logic              pend_valid;    // RES data word waiting behind its header
  logic [DATA_W-1:0] pend_data;
  logic              out_free;
  logic              to_host;

  assign out_free      = !host_out_valid || host_out_ready;
  assign ring_rx_ready = out_free && !pend_valid;
  assign to_host       = (ring_rx_word.op == OP_RES) || (ring_rx_word.op == OP_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      host_out_valid <= 1'b0;
      host_out_data  <= '0;
      pend_valid     <= 1'b0;
      pend_data      <= '0;
    end else if (out_free) begin
      if (pend_valid) begin
        host_out_valid <= 1'b1;
        host_out_data  <= pend_data;
        pend_valid     <= 1'b0;
      end else if (ring_rx_valid && to_host) begin
        host_out_valid <= 1'b1;
        host_out_data  <= {ring_rx_word.op, ring_rx_word.node, ring_rx_word.tag, 42'd0};
        pend_valid     <= (ring_rx_word.op == OP_RES);
        pend_data      <= ring_rx_word.data;
      end else begin
        host_out_valid <= 1'b0;
      end
    end
  end

endmodule
