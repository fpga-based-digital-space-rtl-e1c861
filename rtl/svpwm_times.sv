// svpwm_times: dwell times of the two active vectors and of the zero vectors.
//
// In sector n the reference is built from the bordering active vectors Vn and
// Vn+1 and the zero vectors. Their on-times follow from the 2x2 decomposition
// matrix M of the sector applied to (xd, xq):
//
//   sector  tn               tn1
//     1     xd - xq/2        xq
//     2     xd + xq/2        xq/2 - xd
//     3     xq               -xd - xq/2
//     4     -xd + xq/2       -xq
//     5     -xd - xq/2       xd - xq/2
//     6     -xq              xd + xq/2
//
//   t0 = TPWM - (tn + tn1)
//
// Only an arithmetic right shift (xq/2), additions and subtractions are used.
// The times come out directly in clock ticks of the pulse generator: the scale
// factor Tz/Vdc of the modulation is folded into the input scaling, i.e. a
// DC-link voltage Vdc corresponds to TPWM/2 LSBs of the phase references fed
// to svpwm_xdq (for balanced sine references of amplitude A LSBs, linear
// modulation holds up to A = TPWM/(2*sqrt(3))).
//
// The table and t0 follow the described controller. The handling of
// over-modulation is this design's own: when tn + tn1 exceeds TPWM, t0 is
// forced to 0, tn is limited to TPWM and tn1 takes the remainder, and
// `overmod` is raised. A negative time (possible only if `sector` does not
// match xd/xq) is forced to 0.
//
// Interface: xd, xq are XW-bit two's complement; tn, tn1, t0 are TW-bit
// unsigned tick counts that always add up to TPWM.
// Timing: purely combinational.
module svpwm_times
  import svpwm_pkg::*;
#(
  parameter int unsigned XW   = 8,
  parameter int unsigned TPWM = 128,
  parameter int unsigned TW   = $clog2(TPWM + 1)
) (
  input  logic signed [XW-1:0] xd,
  input  logic signed [XW-1:0] xq,
  input  sector_e              sector,
  output logic        [TW-1:0] tn,
  output logic        [TW-1:0] tn1,
  output logic        [TW-1:0] t0,
  output logic                 overmod
);

  // Working width: covers |xd| + |xq|/2 and TPWM, plus a sign bit.
  localparam int unsigned SW = ((XW + 2) > (TW + 2)) ? (XW + 2) : (TW + 2);
  localparam logic signed [SW-1:0] TP = SW'(TPWM);

  logic signed [SW-1:0] d, q, h, a, b, a_c, b_c, sum;

  always_comb begin
    d = SW'(xd);
    q = SW'(xq);
    h = q >>> 1;

    unique case (sector)
      SECTOR_1: begin a = d - h;  b = q;      end
      SECTOR_2: begin a = d + h;  b = h - d;  end
      SECTOR_3: begin a = q;      b = -d - h; end
      SECTOR_4: begin a = h - d;  b = -q;     end
      SECTOR_5: begin a = -d - h; b = d - h;  end
      default:  begin a = -q;     b = d + h;  end   // SECTOR_6
    endcase

    a_c = (a < 0) ? '0 : a;
    b_c = (b < 0) ? '0 : b;
    sum = a_c + b_c;

    overmod = sum > TP;
    if (overmod) begin
      if (a_c > TP) a_c = TP;
      b_c = TP - a_c;
      t0  = '0;
    end else begin
      t0  = TW'(TP - sum);
    end
    tn  = TW'(a_c);
    tn1 = TW'(b_c);
  end

endmodule
