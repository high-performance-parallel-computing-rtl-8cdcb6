// apu: additional processing unit of the HORN-8 pixel pipeline.
//
// Each APU computes the pixel one step to the right of its upstream
// neighbour, for the same object point, by difference updates instead of
// squares and products:
//   Theta(X+1) = Theta(X) + Gamma(X)        Gamma(X) = Delta*(2*dX + 1)
//   Gamma(X+1) = Gamma(X) + 2*Delta
// All three quantities are 21-bit fractions of a turn that wrap modulo one
// turn. The new phase also drives the cosine and pixel accumulator of this
// unit (its top 6 bits). Theta, Gamma and 2*Delta are registered and passed
// on with the point's flags, so a chain of APUs is a one-cycle-per-unit
// systolic pipeline.
//
// Interface: phase_bus_t in from the upstream unit, phase_bus_t out to the
// next one, pix = this unit's binary pixel (see pixel_acc). en = 0 stalls.
//
// Structure (two adders, COS, 18-bit accumulator, 21-bit buses) follows the
// published HORN-8 pipeline; the flag handling is this design's choice.
module apu
  import horn8_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,
  input  phase_bus_t in,
  output phase_bus_t out,
  output logic       pix
);

  logic [PHASE_W-1:0] theta_n;
  logic [ACC_W-1:0]   acc_unused;

  assign theta_n = in.theta + in.gamma;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out <= '0;
    end else if (en) begin
      out.valid  <= in.valid;
      out.first  <= in.first;
      out.last   <= in.last;
      out.theta  <= theta_n;
      out.gamma  <= in.gamma + in.delta2;
      out.delta2 <= in.delta2;
    end
  end

  pixel_acc u_acc (
    .clk, .rst_n, .en,
    .valid (in.valid),
    .first (in.first),
    .last  (in.last),
    .phase (theta_n[PHASE_W-1 -: COS_W]),
    .acc   (acc_unused),
    .pix
  );

endmodule
