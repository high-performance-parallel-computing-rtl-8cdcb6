// horn8_pkg: widths, types and constants shared by the HORN-8 hologram engine.
//
// The arithmetic widths are those of the per-FPGA pipeline: 14-bit pixel and
// object coordinates, a 32-bit depth coefficient Delta = p / (2 lambda Z_j),
// 28-bit squared distances, 21-bit phases, a 6-bit cosine and an 18-bit pixel
// accumulator. Phases are unsigned fractions of one turn (2*pi): bit 20 of a
// 21-bit phase weighs 1/2 turn, and every phase sum wraps modulo one turn,
// which is exactly the periodicity of the cosine. Delta is a pure fraction
// with 32 fraction bits (Q0.32); this binary point is a choice of this design.
//
// The ring-bus word format, the operation codes and the configuration
// register map are this design's own; the board only fixes that the host,
// the communication FPGA and the seven calculation FPGAs share one ring.
package horn8_pkg;

  // ---------------------------------------------------------------- datapath
  localparam int unsigned COORD_W = 14;  // X, Y coordinates, in pixel pitches
  localparam int unsigned DELTA_W = 32;  // Delta, Q0.32 fraction of a turn
  localparam int unsigned SQ_W    = 28;  // X^2 + Y^2
  localparam int unsigned GAMMA_IN_W = 15;  // 2*dX + 1
  localparam int unsigned PHASE_W = 21;  // Theta, Gamma, 2*Delta (fraction of a turn)
  localparam int unsigned COS_W   = 6;   // cosine argument and value
  localparam int unsigned ACC_W   = 18;  // per-pixel accumulator
  localparam int unsigned OBJ_AW  = 16;  // object memory address (65,536 points)

  // The 21 phase bits kept from a Q.32 product are its fraction bits 31..11.
  localparam int unsigned PHASE_LSB = DELTA_W - PHASE_W;  // 11

  // One object point as stored in the object memory: 14 + 14 + 32 = 60 bits.
  typedef struct packed {
    logic [COORD_W-1:0] x;
    logic [COORD_W-1:0] y;
    logic [DELTA_W-1:0] delta;
  } obj_point_t;

  // Phase data handed from one processing unit to the next, with the flags
  // that mark the object point it belongs to.
  typedef struct packed {
    logic               valid;  // an object point occupies this slot
    logic               first;  // first object point of a pass: restart the sum
    logic               last;   // last object point of a pass: latch the pixel
    logic [PHASE_W-1:0] theta;  // phase of this unit's pixel
    logic [PHASE_W-1:0] gamma;  // phase step to the next pixel
    logic [PHASE_W-1:0] delta2; // 2*Delta, the change of gamma per pixel
  } phase_bus_t;

  // ---------------------------------------------------------------- ring bus
  localparam int unsigned NODE_W = 3;
  localparam int unsigned TAG_W  = 16;
  localparam int unsigned DATA_W = 64;

  // Node 0 is the communication FPGA. Host-to-node words addressed to node 0
  // are broadcast to every calculation node.
  localparam logic [NODE_W-1:0] NODE_BROADCAST = '0;

  typedef enum logic [2:0] {
    OP_NONE = 3'd0,
    OP_OBJ  = 3'd1,  // host -> node: object point, tag = memory address
    OP_CFG  = 3'd2,  // host -> node: configuration register, tag = register
    OP_RUN  = 3'd3,  // host -> node: start the configured passes
    OP_RES  = 3'd4,  // node -> host: 64 result pixels, tag = {pass, word}
    OP_DONE = 3'd5   // node -> host: all passes sent, tag = passes done
  } ring_op_e;

  typedef struct packed {
    ring_op_e            op;
    logic [NODE_W-1:0]   node;  // destination (host->node) or source (node->host)
    logic [TAG_W-1:0]    tag;
    logic [DATA_W-1:0]   data;
  } ring_word_t;

  // Configuration registers of a calculation node (OP_CFG tag values).
  localparam logic [TAG_W-1:0] CFG_NOBJ  = 16'd0;  // data[16:0]: number of points, 1..65536
  localparam logic [TAG_W-1:0] CFG_START = 16'd1;  // data[13:0]: X start, data[29:16]: Y start
  localparam logic [TAG_W-1:0] CFG_GEOM  = 16'd2;  // data[14:0]: line width, data[29:16]: Y step,
                                                   // data[63:32]: number of passes

  function automatic logic is_down_op(ring_op_e op);
    return (op == OP_OBJ) || (op == OP_CFG) || (op == OP_RUN);
  endfunction

endpackage
