// pwl_sigmoid: membrane potential clipping and piecewise-linear sigmoid.
//
// The ACC_W-bit membrane potential (FRAC fractional bits) is first clipped
// (saturated) to an 8-bit signed fixed-point value, Q3.4 in [-8, 8) at the
// default FRAC = 4. The sigmoid is then approximated with shifts and one
// subtraction: for x <= 0 with |x| = I + F (I integer, F fraction),
//   y(x) = (1/2 - F/4) / 2^I
// and for x > 0 the symmetry y(x) = 1 - y(-x) is used. The result is an
// unsigned 8-bit probability p = round-down(256 * y), saturated to 255. With
// F in sixteenths (f) the negative branch is p = (128 - 4 f) >> I. The
// formula, the clip to [-8, 8] and the 8-bit unsigned output follow the
// document; the Q3.4 split (1 sign, 3 integer, 4 fraction bits) and the
// saturation at 255 are this design's reading.
//
// FRAC may be 0 to 6; below 4 the clipped range widens to [-128, 128) /
// 2^FRAC and the integer part can exceed 7 (the shift then gives 0).
//
// Timing: purely combinational.
module pwl_sigmoid #(
  parameter int unsigned ACC_W = spinaps_pkg::ACC_W_D,
  parameter int unsigned FRAC  = spinaps_pkg::FRAC_D
) (
  input  logic signed [ACC_W-1:0] u,
  output logic signed [7:0]       u_clip,
  output logic [7:0]              prob
);

  if (FRAC > 6) begin : g_bad_frac
    $error("pwl_sigmoid: FRAC must not exceed 6");
  end

  logic [8:0] mag;     // |u_clip|, 0 .. 128
  logic [7:0] ipart;   // integer part of |x| (up to 128 at FRAC = 0)
  logic [8:0] fpart;   // fractional part of |x|, in 2^-FRAC units
  logic [8:0] yneg;    // probability for -|x|, 0 .. 128

  always_comb begin
    if (u > ACC_W'(127))       u_clip = 8'sd127;
    else if (u < -ACC_W'(128)) u_clip = -8'sd128;
    else                       u_clip = u[7:0];

    mag   = u_clip[7] ? 9'(-{u_clip[7], u_clip}) : 9'({1'b0, u_clip});
    ipart = 8'(mag >> FRAC);
    fpart = mag & 9'((1 << FRAC) - 1);
    // (1/2 - F/4) in 1/256 units is 128 - 64*F = 128 - fpart * 2^(6-FRAC)
    yneg  = (9'd128 - 9'((16'(fpart) << 6) >> FRAC)) >> ipart;

    if (u_clip[7] || u_clip == 8'sd0) prob = yneg[7:0];
    else if (yneg == 9'd0)            prob = 8'd255;
    else                              prob = 8'(9'd256 - yneg);
  end

endmodule
