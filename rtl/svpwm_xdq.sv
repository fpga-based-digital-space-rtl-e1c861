// svpwm_xdq: intermediate d-q transformation of the three phase references.
//
// The Park/Clarke projection Vd = (2Va - Vb - Vc)/3, Vq = (Vb - Vc)/sqrt(3)
// needs constant multipliers by 1/3 and 1/sqrt(3). Those constants are dropped
// and two scaled intermediate variables are formed instead, with a one-bit left
// shift and subtractors only:
//
//   xd = 2*va - vb - vc          (= 3 * Vd)
//   xq = 2*(vb - vc)             (= 2*sqrt(3) * Vq)
//
// xd follows the described circuit (2Va by a shift, then two subtractions).
// The factor 2 on xq is this design's choice: the sector rules and the
// decomposition matrix that consume xd/xq assume xd ~ cos(alpha) and
// xq ~ (2/sqrt(3))*sin(alpha) at the same scale, which xq = vb - vc alone does
// not satisfy (the sector boundary would sit near 74 degrees instead of 60).
// With the factor 2 the boundaries fall exactly on 60-degree multiples and the
// dwell times come out in the right proportion. xq is therefore always even.
//
// Interface: va, vb, vc are VW-bit two's complement samples; xd, xq are
// VW+2 bits wide, which holds every possible result without overflow
// (VW = 6 gives the 8-bit xd/xq of the reference design).
// Timing: purely combinational, no clock.
module svpwm_xdq #(
  parameter int unsigned VW = 6
) (
  input  logic signed [VW-1:0] va,
  input  logic signed [VW-1:0] vb,
  input  logic signed [VW-1:0] vc,
  output logic signed [VW+1:0] xd,
  output logic signed [VW+1:0] xq
);

  logic signed [VW+1:0] va_x, vb_x, vc_x;

  always_comb begin
    va_x = (VW+2)'(va);
    vb_x = (VW+2)'(vb);
    vc_x = (VW+2)'(vc);
    xd   = (va_x <<< 1) - vb_x - vc_x;
    xq   = (vb_x - vc_x) <<< 1;
  end

endmodule
