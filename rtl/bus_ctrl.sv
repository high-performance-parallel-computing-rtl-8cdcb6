// bus_ctrl: one node of the board's ring bus.
//
// Every FPGA of the board has one. Words travel around the ring one hop per
// clock with a valid/ready handshake on each hop, so a congested receiver
// back-pressures the ring instead of losing data. A node either passes an
// arriving word on, takes it off the ring for its own FPGA, or both:
//   * host-to-node words (OBJ, CFG, RUN) addressed to this node are taken
//     off; those addressed to node 0 are broadcasts, delivered here and also
//     passed on; all others are passed on;
//   * node-to-host words (RES, DONE) are passed on;
//   * with SINK_ALL = 1 (the communication FPGA's node, where the ring both
//     starts and ends) every arriving word is taken off and none passed on.
// The node's own FPGA sends words (tx) into free slots: traffic already on
// the ring has priority.
//
// Timing: the outgoing hop is a register, one clock of latency per node.
// A word is delivered locally (rx_valid & rx_ready) in the same cycle in
// which it is accepted from the ring.
//
// The ring topology through all eight FPGAs follows the HORN-8 board; the
// word format, the addressing and the handshake are this design's own.
module bus_ctrl
  import horn8_pkg::*;
#(
  parameter logic [NODE_W-1:0] NODE_ID  = 3'd1,
  parameter bit                SINK_ALL = 1'b0
) (
  input  logic       clk,
  input  logic       rst_n,
  // ring input (from the previous node)
  input  logic       in_valid,
  output logic       in_ready,
  input  ring_word_t in_word,
  // ring output (to the next node)
  output logic       out_valid,
  input  logic       out_ready,
  output ring_word_t out_word,
  // to this FPGA
  output logic       rx_valid,
  input  logic       rx_ready,
  output ring_word_t rx_word,
  // from this FPGA
  input  logic       tx_valid,
  output logic       tx_ready,
  input  ring_word_t tx_word
);

  logic adv;       // the output register can take a word this cycle
  logic deliver;   // the arriving word is for this FPGA
  logic forward;   // the arriving word goes on to the next node
  logic take_in;

  always_comb begin
    adv = !out_valid || out_ready;
    if (SINK_ALL) begin
      deliver = 1'b1;
      forward = 1'b0;
    end else begin
      deliver = is_down_op(in_word.op) &&
                (in_word.node == NODE_ID || in_word.node == NODE_BROADCAST);
      forward = !(is_down_op(in_word.op) && in_word.node == NODE_ID);
    end
    in_ready = (!deliver || rx_ready) && (!forward || adv);
    take_in  = in_valid && in_ready;
    rx_valid = in_valid && deliver && (!forward || adv);
    rx_word  = in_word;
    tx_ready = adv && !(in_valid && forward);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_word  <= '0;
    end else if (adv) begin
      if (take_in && forward) begin
        out_valid <= 1'b1;
        out_word  <= in_word;
      end else if (tx_valid && tx_ready) begin
        out_valid <= 1'b1;
        out_word  <= tx_word;
      end else begin
        out_valid <= 1'b0;
      end
    end
  end

  // Handshake rule: a word offered downstream stays unchanged until taken.
  a_out_stable: assert property (@(posedge clk) disable iff (!rst_n)
    out_valid && !out_ready |=> out_valid && $stable(out_word));

endmodule
