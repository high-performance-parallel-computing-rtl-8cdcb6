// bpu: basic processing unit, the head of the HORN-8 pixel pipeline.
//
// For each object point j streamed in, the BPU evaluates the Fresnel phase of
// the first pixel of the segment directly,
//   Theta_1 = Delta_j * ((X_a - X_j)^2 + (Y_a - Y_j)^2)   (mod one turn)
// and prepares the two difference terms the APUs downstream need,
//   Gamma_1 = Delta_j * (2*(X_a - X_j) + 1),   2*Delta_j.
// Coordinates are 14-bit integers in units of the pixel pitch; their
// differences are 14-bit two's complement, the squares and their sum 28 bits.
// Delta_j = p / (2 lambda Z_j) is a 32-bit fraction of a turn (Q0.32). Only
// the fractional part of each product matters, because the cosine has a
// period of one turn: the 21 kept bits are product bits 31..11.
// The BPU also holds the cosine and accumulator of pixel 1.
//
// Timing: four register stages. Inputs are sampled in cycle c; Theta_1 and
// friends appear on `out` after the edge ending cycle c+3, the same edge on
// which pixel 1's accumulator takes the point in. en = 0 stalls every stage.
//
// The operators and widths (14-bit subtractors, 28-bit squares and sum,
// x2 shift and +1 for 15 bits, 32-bit Delta, 21-bit outputs, 6-bit COS on the
// product, 18-bit accumulator) follow the published HORN-8 pipeline. The
// pipeline register placement and the Q0.32 binary point are this design's.
module bpu
  import horn8_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               in_valid,
  input  logic               in_first,
  input  logic               in_last,
  input  logic [COORD_W-1:0] xa,      // X of the segment's first pixel
  input  logic [COORD_W-1:0] ya,      // Y of the segment's line
  input  obj_point_t         point,   // object point j
  output phase_bus_t         out,
  output logic               pix      // binary value of pixel 1
);

  typedef struct packed {
    logic valid, first, last;
  } flags_t;

  // stage 1: differences
  flags_t             f1;
  logic [COORD_W-1:0] dx1, dy1;
  logic [DELTA_W-1:0] d1;
  // stage 2: squares and 2*dX + 1
  flags_t                f2;
  logic [SQ_W-1:0]       sx2, sy2;
  logic [GAMMA_IN_W-1:0] g2;
  logic [DELTA_W-1:0]    d2;
  // stage 3: sum of squares, Gamma_1, 2*Delta
  flags_t             f3;
  logic [SQ_W-1:0]    r3;
  logic [PHASE_W-1:0] gam3, dd3;
  logic [DELTA_W-1:0] d3;

  logic [DELTA_W-1:0] gprod, tprod;
  logic [PHASE_W-1:0] theta_n;

  // Low 32 bits of a product depend only on the low 32 bits of the operands,
  // so the signed 2*dX + 1 is sign extended and multiplied modulo 2^32.
  assign gprod   = DELTA_W'({{(DELTA_W-GAMMA_IN_W){g2[GAMMA_IN_W-1]}}, g2} * d2);
  assign tprod   = DELTA_W'({{(DELTA_W-SQ_W){1'b0}}, r3} * d3);
  assign theta_n = tprod[DELTA_W-1:PHASE_LSB];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      f1 <= '0; dx1 <= '0; dy1 <= '0; d1 <= '0;
      f2 <= '0; sx2 <= '0; sy2 <= '0; g2 <= '0; d2 <= '0;
      f3 <= '0; r3 <= '0; gam3 <= '0; dd3 <= '0; d3 <= '0;
      out <= '0;
    end else if (en) begin
      f1  <= '{valid: in_valid, first: in_first, last: in_last};
      dx1 <= xa - point.x;
      dy1 <= ya - point.y;
      d1  <= point.delta;

      f2  <= f1;
      sx2 <= SQ_W'($signed(dx1) * $signed(dx1));
      sy2 <= SQ_W'($signed(dy1) * $signed(dy1));
      g2  <= {dx1, 1'b1};                      // 2*dX + 1
      d2  <= d1;

      f3   <= f2;
      r3   <= sx2 + sy2;
      gam3 <= gprod[DELTA_W-1:PHASE_LSB];
      dd3  <= d2[DELTA_W-2:PHASE_LSB-1];       // (2*Delta) bits 31..11
      d3   <= d2;

      out.valid  <= f3.valid;
      out.first  <= f3.first;
      out.last   <= f3.last;
      out.theta  <= theta_n;
      out.gamma  <= gam3;
      out.delta2 <= dd3;
    end
  end

  logic [ACC_W-1:0] acc_unused;

  pixel_acc u_acc (
    .clk, .rst_n, .en,
    .valid (f3.valid),
    .first (f3.first),
    .last  (f3.last),
    .phase (theta_n[PHASE_W-1 -: COS_W]),
    .acc   (acc_unused),
    .pix
  );

endmodule
