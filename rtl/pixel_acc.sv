// pixel_acc: cosine plus accumulator of one hologram pixel.
//
// Every cycle in which an object point passes through its processing unit,
// the unit's phase is turned into a 6-bit cosine (cos_approx) and added, sign
// extended, to an 18-bit two's-complement sum. The first point of a pass
// replaces the sum instead of adding to it, so no separate clear cycle is
// needed. When the last point of a pass is added, the most significant bit of
// the new sum is latched as the binary pixel value and held until the next
// pass ends. The MSB of a two's-complement sum is its sign, so the pixel is 1
// where the summed fringe pattern is negative; a binary hologram and its
// complement reconstruct the same image.
//
// Timing: one register stage; pix changes on the clock edge that takes in the
// last point. en = 0 freezes the unit (pipeline stall).
//
// The 6-bit cosine, the 18-bit feedback adder and the MSB output follow the
// HORN-8 pipeline; the first/last flags and wrap-around on overflow (more
// than 4,096 points of equal phase) are this design's choices.
module pixel_acc
  import horn8_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               en,
  input  logic               valid,
  input  logic               first,
  input  logic               last,
  input  logic [COS_W-1:0]   phase,   // top 6 bits of the unit's phase
  output logic [ACC_W-1:0]   acc,     // running sum
  output logic               pix      // MSB of the sum at the end of the pass
);

  logic signed [COS_W-1:0] cval;
  logic [ACC_W-1:0]        sum;

  cos_approx u_cos (.phase(phase), .value(cval));

  always_comb begin
    if (first) sum = ACC_W'(cval);                    // sign extends
    else       sum = acc + ACC_W'(cval);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      acc <= '0;
      pix <= 1'b0;
    end else if (en && valid) begin
      acc <= sum;
      if (last) pix <= sum[ACC_W-1];
    end
  end

endmodule
