// tb_svpwm_pwm_gen: check of the seven-segment pulse generator.
//
// A driver applies one test case (sector, tn, tn1, t0 with tn+tn1+t0 = TPWM)
// in each cycle in which the generator samples, and random junk in every other
// cycle, so a pattern that changes mid-period is caught. A checker records each
// output period (2*TPWM cycles from period_start) and compares it with a model
// built from the switching-time table of the upper switches:
//   * cycles spent in each switching state: 000 -> 2*floor(t0/2),
//     first active vector -> 2*t_first, second -> 2*t_second, 111 -> the rest;
//     in odd sectors Vn comes first, in even sectors Vn+1;
//   * per-phase high time = 2 * on-time of the table, with T0/2 = ceil(t0/2);
//   * the pattern is mirror-symmetric about the period centre, and in the
//     first half the first active vector precedes the second;
//   * the lower gates are the complements of the upper ones;
//   * the period is exactly 2*TPWM cycles.
// Before the first sample after reset every gate must be low.
module tb_svpwm_pwm_gen;
  import svpwm_pkg::*;
  localparam int unsigned TPWM = 128;
  localparam int unsigned TW   = $clog2(TPWM + 1);
  localparam int unsigned NCASE = 300;

  logic          clk = 1'b0, rst_n = 1'b0;
  sector_e       sector;
  logic [TW-1:0] tn, tn1, t0;
  logic          sample, period_start;
  logic [2:0]    pwm;
  logic [6:1]    gate;
  sector_e       sector_o;
  int checks = 0, failures = 0;

  typedef struct { int s; int a; int b; int z; } case_t;
  case_t cases[NCASE];
  case_t pending[$];
  int    drv_k = 0, done = 0;

  // Active vectors V1..V6 as {A,B,C}
  localparam logic [2:0] VEC [1:7] = '{3'b100, 3'b110, 3'b010, 3'b011, 3'b001, 3'b101, 3'b100};

  svpwm_pwm_gen #(.TPWM(TPWM)) dut (
    .clk(clk), .rst_n(rst_n), .sector(sector), .tn(tn), .tn1(tn1), .t0(t0),
    .sample(sample), .pwm(pwm), .gate(gate), .period_start(period_start),
    .sector_o(sector_o)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * TPWM * (NCASE + 10)) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 15) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // Test cases: corners first, then random splits of TPWM.
  initial begin
    for (int k = 0; k < NCASE; k++) begin
      cases[k].s = (k % 6) + 1;
      if (k < 6)       begin cases[k].a = 0;    cases[k].b = 0;    end
      else if (k < 12) begin cases[k].a = TPWM; cases[k].b = 0;    end
      else if (k < 18) begin cases[k].a = 0;    cases[k].b = TPWM; end
      else if (k < 24) begin cases[k].a = 37;   cases[k].b = 50;   end
      else begin
        cases[k].a = $urandom_range(TPWM);
        cases[k].b = $urandom_range(TPWM - cases[k].a);
      end
      cases[k].z = TPWM - cases[k].a - cases[k].b;
    end
  end

  // Driver
  always @(negedge clk) begin
    if (rst_n && sample && drv_k < NCASE) begin
      sector <= sector_e'(cases[drv_k].s);
      tn     <= TW'(cases[drv_k].a);
      tn1    <= TW'(cases[drv_k].b);
      t0     <= TW'(cases[drv_k].z);
      pending.push_back(cases[drv_k]);
      drv_k  <= drv_k + 1;
    end else begin
      sector <= sector_e'($urandom_range(6, 1));
      tn     <= TW'($urandom_range(TPWM));
      tn1    <= TW'($urandom_range(TPWM));
      t0     <= TW'($urandom_range(TPWM));
    end
  end

  function automatic int on_time(int s, int ph, int t1, int t2, int zh);
    // Upper-switch on-time per half period; ph 0 = A, 1 = B, 2 = C.
    int tab [1:6][0:2];
    tab[1] = '{t1 + t2 + zh, t2 + zh,      zh};
    tab[2] = '{t1 + zh,      t1 + t2 + zh, zh};
    tab[3] = '{zh,           t1 + t2 + zh, t2 + zh};
    tab[4] = '{zh,           t1 + zh,      t1 + t2 + zh};
    tab[5] = '{t2 + zh,      zh,           t1 + t2 + zh};
    tab[6] = '{t1 + t2 + zh, zh,           t1 + zh};
    return tab[s][ph];
  endfunction

  // Checker
  initial begin
    logic [2:0] rec [2*TPWM];
    int dur [8];
    int hi [3];
    int first_f, first_s, zh, tf, ts;
    logic [2:0] vf, vs;
    case_t c;

    sector = SECTOR_1; tn = '0; tn1 = '0; t0 = TW'(TPWM);
    repeat (3) @(negedge clk);
    chk("gates low in reset", int'(gate), 0);
    rst_n = 1'b1;
    @(negedge clk);
    chk("gates low before first sample", int'(gate), 0);

    while (done < NCASE) begin
      @(negedge clk);
      if (!period_start) continue;
      c = pending.pop_front();
      chk("sector_o", int'(sector_o), c.s);
      for (int i = 0; i < 2 * int'(TPWM); i++) begin
        if (i > 0) @(negedge clk);
        rec[i] = pwm;
        if (i > 0 && period_start) chk("period length", i, 2 * TPWM);
        chk("complementary gates", int'(gate[4] != gate[1]) + int'(gate[6] != gate[3]) + int'(gate[2] != gate[5]), 3);
        chk("pwm vs gates", int'(pwm), int'({gate[1], gate[3], gate[5]}));
      end
      // state durations
      for (int v = 0; v < 8; v++) dur[v] = 0;
      for (int p = 0; p < 3; p++) hi[p] = 0;
      for (int i = 0; i < 2 * int'(TPWM); i++) begin
        dur[rec[i]]++;
        for (int p = 0; p < 3; p++) hi[p] += int'(rec[i][2-p]);
      end
      zh = c.z / 2;
      if (c.s % 2 == 1) begin vf = VEC[c.s];     vs = VEC[c.s + 1]; tf = c.a; ts = c.b; end
      else              begin vf = VEC[c.s + 1]; vs = VEC[c.s];     tf = c.b; ts = c.a; end
      chk("time in 000", dur[0], 2 * zh);
      chk("time in first active vector", dur[vf], 2 * tf);
      chk("time in second active vector", dur[vs], 2 * ts);
      chk("time in 111", dur[7], 2 * (c.z - zh));
      for (int p = 0; p < 3; p++)
        chk("phase on-time", hi[p], 2 * on_time(c.s, p, c.a, c.b, c.z - zh));
      // symmetry and order
      first_f = -1; first_s = -1;
      for (int i = 0; i < int'(TPWM); i++) begin
        chk("symmetry", int'(rec[i]), int'(rec[2 * TPWM - 1 - i]));
        if (rec[i] == vf && first_f < 0) first_f = i;
        if (rec[i] == vs && first_s < 0) first_s = i;
      end
      if (tf > 0 && ts > 0) chk("first vector precedes second", int'(first_f < first_s), 1);
      done++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
