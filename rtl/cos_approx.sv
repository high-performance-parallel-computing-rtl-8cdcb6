// cos_approx: memoryless cosine of a 6-bit phase, as used in every processing
// unit of the pixel pipeline.
//
// The argument t is an unsigned fraction of one turn (t/64 turn); the result
// is a signed 6-bit value, roughly 31*cos(2*pi*(t+0.5)/64). The cosine is
// replaced by a triangle wave built from two subtractions and no table:
//   fold:  f = t        for t <  32,   f = 63 - t for t >= 32   (0..31)
//   scale: c = 31 - 2f                                          (-31..31)
// The result is symmetric about zero, so the sum over a full period is zero.
// Purely combinational.
//
// That the pipeline needs a table-free cosine of 6 bits in and 6 bits out,
// made of two adder-subtractors, follows the HORN-8 design; the triangle
// wave itself is this design's choice, since the exact approximation used
// there is not described.
module cos_approx
  import horn8_pkg::*;
(
  input  logic [COS_W-1:0]        phase,  // fraction of a turn, t/64
  output logic signed [COS_W-1:0] value   // approx. 31*cos(2*pi*(t+0.5)/64)
);

  logic [COS_W-2:0] fold;

  always_comb begin
    // First subtractor: fold the second half-turn onto the first.
    if (phase[COS_W-1]) fold = (COS_W-1)'(6'd63 - phase);
    else                fold = phase[COS_W-2:0];
    // Second subtractor: 31 - 2*fold.
    value = $signed(6'd31 - {fold, 1'b0});
  end

endmodule
