// tb_svpwm_sector: exhaustive check of the sector decision.
//
// For every pair (xd, xq) of XW-bit values the angle of the reference vector is
// computed with atan2, using xd ~ cos(alpha) and xq ~ (2/sqrt(3)) sin(alpha),
// and the expected sector is floor(alpha / 60 deg) + 1. On an exact sector
// boundary (2|xd| = |xq| or xq = 0) either neighbouring sector is accepted; the
// origin accepts any sector. Every sector must be reported at least once.
module tb_svpwm_sector;
  import svpwm_pkg::*;
  localparam int unsigned XW = 8;

  logic signed [XW-1:0] xd, xq;
  sector_e              sector;
  int checks = 0, failures = 0;
  int seen [1:6];

  svpwm_sector #(.XW(XW)) dut (.xd(xd), .xq(xq), .sector(sector));

  function automatic int sector_of(real deg);
    real a = deg;
    while (a < 0.0)    a += 360.0;
    while (a >= 360.0) a -= 360.0;
    return int'($floor(a / 60.0)) + 1;
  endfunction

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real alpha;
    int  lo, hi, got, ad, aq;
    bit  tie;
    for (int s = 1; s <= 6; s++) seen[s] = 0;
    for (int d = -(2**(XW-1)); d < 2**(XW-1); d++)
      for (int q = -(2**(XW-1)); q < 2**(XW-1); q++) begin
        xd = XW'(d); xq = XW'(q);
        #1;
        got = int'(sector);
        checks++;
        if (d == 0 && q == 0) begin
          if (got < 1 || got > 6) failures++;
          continue;
        end
        alpha = $atan2(real'(q) * $sqrt(3.0) / 2.0, real'(d)) * 180.0 / 3.14159265358979;
        ad  = (d < 0) ? -d : d;
        aq  = (q < 0) ? -q : q;
        tie = (2 * ad == aq) || (q == 0);
        lo  = sector_of(alpha - 0.01);
        hi  = sector_of(alpha + 0.01);
        if (!tie) lo = hi;
        if (got != lo && got != hi) begin
          failures++;
          if (failures < 10) $display("xd=%0d xq=%0d alpha=%f got %0d exp %0d/%0d", d, q, alpha, got, lo, hi);
        end
        if (got >= 1 && got <= 6) seen[got]++;
      end
    for (int s = 1; s <= 6; s++) begin
      checks++;
      if (seen[s] == 0) begin
        failures++;
        $display("sector %0d never reported", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
