// svpwm_sector: sector determination of the reference vector.
//
// The sector (1..6) of the reference vector is found without any angle
// computation, from three conditions on the intermediate variables xd, xq:
//   c1: sign of xd          (xd >= 0 counts as positive)
//   c2: sign of xq          (xq >= 0 counts as positive)
//   u : |xd| > |xq/2|
// and the rules
//   xd+ xq+  u -> 1      xd+ xq+ !u -> 2      xd- xq+ !u -> 2
//   xd- xq+  u -> 3      xd- xq-  u -> 4
//   xd+ xq- !u -> 5      xd- xq- !u -> 5      xd+ xq-  u -> 6
// With xd ~ cos(alpha) and xq ~ (2/sqrt(3))*sin(alpha), |xd| = |xq/2| is
// exactly the 60/120/240/300-degree boundary. On a tie (u false) the vector is
// put in sector 2 or 5, and a zero xd or xq counts as positive, as in the
// described rules; the dwell times are continuous across those boundaries so
// either choice gives the same pulses.
//
// The rules and the encoding follow the described controller. One detail is
// this design's own: u is evaluated as 2*|xd| > |xq| (|xd| shifted left)
// rather than by shifting xq right, so an odd xq is not rounded. Both
// magnitudes are formed one bit wider than the inputs so that the most
// negative input value does not overflow.
//
// Interface: xd, xq are XW-bit two's complement; sector is a sector_e code.
// Timing: purely combinational.
module svpwm_sector
  import svpwm_pkg::*;
#(
  parameter int unsigned XW = 8
) (
  input  logic signed [XW-1:0] xd,
  input  logic signed [XW-1:0] xq,
  output sector_e              sector
);

  logic          xd_neg, xq_neg, u;
  logic [XW:0]   xd_mag, xq_mag;   // magnitudes, one bit wider than the input
  logic [XW+1:0] xd_mag2;          // 2*|xd|

  always_comb begin
    xd_neg  = xd[XW-1];
    xq_neg  = xq[XW-1];
    xd_mag  = xd_neg ? (XW+1)'(-(XW+1)'(xd)) : (XW+1)'(xd);
    xq_mag  = xq_neg ? (XW+1)'(-(XW+1)'(xq)) : (XW+1)'(xq);
    xd_mag2 = {xd_mag, 1'b0};
    u       = xd_mag2 > (XW+2)'(xq_mag);

    unique case ({xd_neg, xq_neg, u})
      3'b001:  sector = SECTOR_1;
      3'b000:  sector = SECTOR_2;
      3'b100:  sector = SECTOR_2;
      3'b101:  sector = SECTOR_3;
      3'b111:  sector = SECTOR_4;
      3'b010:  sector = SECTOR_5;
      3'b110:  sector = SECTOR_5;
      default: sector = SECTOR_6;   // 3'b011: xd+ xq- u
    endcase
  end

endmodule
