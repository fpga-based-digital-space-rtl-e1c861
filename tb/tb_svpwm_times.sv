// tb_svpwm_times: check of the dwell-time calculation against trigonometry.
//
// For every xd of XW bits and every even xq (the transformation only produces
// even xq) the sector is found from the angle of the vector, and the expected
// dwell times come from the textbook SVPWM equations
//   tn  = k * sin(n*60 - alpha) / sin(60)
//   tn1 = k * sin(alpha - (n-1)*60) / sin(60)
// with xd = k cos(alpha), xq = (2/sqrt(3)) k sin(alpha). Below the limit the
// block must match them exactly and give t0 = TPWM - tn - tn1; above it
// (over-modulation) t0 must be 0, tn saturated at TPWM and tn1 the rest.
// Both regimes must occur.
module tb_svpwm_times;
  import svpwm_pkg::*;
  localparam int unsigned XW   = 8;
  localparam int unsigned TPWM = 128;
  localparam int unsigned TW   = $clog2(TPWM + 1);
  localparam real         PI   = 3.14159265358979;

  logic signed [XW-1:0] xd, xq;
  sector_e              sector;
  logic [TW-1:0]        tn, tn1, t0;
  logic                 overmod;
  int checks = 0, failures = 0, n_lin = 0, n_ovm = 0;

  svpwm_times #(.XW(XW), .TPWM(TPWM)) dut (
    .xd(xd), .xq(xq), .sector(sector),
    .tn(tn), .tn1(tn1), .t0(t0), .overmod(overmod)
  );

  initial begin
    #1s;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int d, int q);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 12) $display("%s: xd=%0d xq=%0d sector=%0d got %0d exp %0d", what, d, q, sector, got, exp);
    end
  endtask

  initial begin
    real alpha, k, ks, e_tn, e_tn1;
    int  n, i_tn, i_tn1;
    for (int d = -(2**(XW-1)); d < 2**(XW-1); d++)
      for (int q = -(2**(XW-1)); q < 2**(XW-1); q += 2) begin
        ks    = real'(q) * $sqrt(3.0) / 2.0;          // k*sin(alpha)
        k     = $sqrt(real'(d) * real'(d) + ks * ks);
        alpha = (d == 0 && q == 0) ? 0.0 : $atan2(ks, real'(d));
        if (alpha < 0.0) alpha += 2.0 * PI;
        n = int'($floor(alpha / (PI / 3.0))) + 1;
        if (n > 6) n = 6;
        e_tn  = k * $sin(real'(n) * PI / 3.0 - alpha) / $sin(PI / 3.0);
        e_tn1 = k * $sin(alpha - real'(n - 1) * PI / 3.0) / $sin(PI / 3.0);
        i_tn  = int'($floor(e_tn + 0.5));
        i_tn1 = int'($floor(e_tn1 + 0.5));
        if (i_tn < 0)  i_tn = 0;
        if (i_tn1 < 0) i_tn1 = 0;
        xd = XW'(d); xq = XW'(q); sector = sector_e'(n);
        #1;
        if (i_tn + i_tn1 <= int'(TPWM)) begin
          n_lin++;
          expect_eq("overmod", int'(overmod), 0, d, q);
          expect_eq("tn", int'(tn), i_tn, d, q);
          expect_eq("tn1", int'(tn1), i_tn1, d, q);
          expect_eq("t0", int'(t0), int'(TPWM) - i_tn - i_tn1, d, q);
        end else begin
          n_ovm++;
          if (i_tn > int'(TPWM)) i_tn = TPWM;
          expect_eq("overmod", int'(overmod), 1, d, q);
          expect_eq("tn", int'(tn), i_tn, d, q);
          expect_eq("tn1", int'(tn1), int'(TPWM) - i_tn, d, q);
          expect_eq("t0", int'(t0), 0, d, q);
        end
      end
    expect_eq("linear cases seen", int'(n_lin > 0), 1, 0, 0);
    expect_eq("over-modulation cases seen", int'(n_ovm > 0), 1, 0, 0);
    $display("linear cases %0d, over-modulation cases %0d", n_lin, n_ovm);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
