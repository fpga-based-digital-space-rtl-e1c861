// tb_svpwm_top: end-to-end test of the SVPWM controller at a reduced PWM period (TPWM = 32) so that
// the 6-bit references can drive it into over-modulation.
//
// A rotating, balanced three-phase reference of growing amplitude (followed by
// random samples) is offered to the controller; the references are held only
// in the cycle in which `sample` is high and are random junk at all other
// times, so a period that changed half-way would be caught. For every output
// period the checker compares the gate pattern with properties derived
// independently of the RTL's formulas:
//   * line voltages: with the DC link at TPWM/2 LSBs, the average of
//     (A - B) over a period must equal va - vb, i.e. the on-time difference of
//     the two upper switches is 4*(va - vb); likewise for B - C;
//   * zero vectors split evenly: on-time of the highest phase plus that of the
//     lowest is 2*TPWM (2*TPWM + 2 when t0 is odd);
//   * over-modulation is expected exactly when the needed active-vector time
//     2*(vmax - vmin) exceeds TPWM; then the highest phase is always on and the
//     lowest always off for the whole period and `overmod` is set;
//   * the reported sector matches the angle of the Clarke-transformed
//     reference (either neighbour on an exact boundary);
//   * lower gates are the complements of the upper ones; each period lasts
//     2*TPWM cycles; gates are low from reset to the first period.
// It counts how often each sector, over-modulation, linear operation, the zero
// vector alone and a changing input between samples occurred, and fails if a
// mechanism that the configuration can reach never happened.
module tb_svpwm_top;
  import svpwm_pkg::*;
  localparam int unsigned VW    = 6;
  localparam int unsigned TPWM  = 32;
  localparam int unsigned NPER  = 400;
  localparam int          AMAX  = 20;
  localparam bit          OVM_REACHABLE = 1'b1;
  localparam real         PI    = 3.14159265358979;

  logic                 clk = 1'b0, rst_n = 1'b0;
  logic signed [VW-1:0] va, vb, vc;
  logic                 sample, overmod, period_start;
  logic [6:1]           gate;
  logic [2:0]           pwm;
  sector_e              sector;
  int checks = 0, failures = 0;
  int n_sector [1:6];
  int n_ovm = 0, n_lin = 0, n_zero = 0, n_junk = 0;

  typedef struct { int a; int b; int c; } smp_t;
  smp_t pending[$];
  int   drv_k = 0, done = 0;

  svpwm_top #(.TPWM(32)) dut (
    .clk(clk), .rst_n(rst_n), .va(va), .vb(vb), .vc(vc),
    .sample(sample), .gate(gate), .pwm(pwm), .sector(sector),
    .overmod(overmod), .period_start(period_start)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2 * TPWM * (NPER + 10)) @(posedge clk);
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

  function automatic int clip(int v);
    if (v > 2**(VW-1) - 1) return 2**(VW-1) - 1;
    if (v < -(2**(VW-1)))  return -(2**(VW-1));
    return v;
  endfunction

  // Sample k of the reference sequence.
  function automatic smp_t ref_sample(int k);
    smp_t s;
    real  th, amp;
    if (k < 6) begin
      s.a = k - 3; s.b = k - 3; s.c = k - 3;          // zero vector only
    end else if (k < NPER * 3 / 4) begin
      th  = real'(k) * 7.3 * PI / 180.0;
      amp = 1.0 + real'(AMAX - 1) * real'(k) / real'(NPER * 3 / 4);
      s.a = clip(int'($floor(amp * $cos(th) + 0.5)));
      s.b = clip(int'($floor(amp * $cos(th - 2.0 * PI / 3.0) + 0.5)));
      s.c = clip(int'($floor(amp * $cos(th + 2.0 * PI / 3.0) + 0.5)));
    end else begin
      s.a = $urandom_range(2**VW - 1) - 2**(VW-1);
      s.b = $urandom_range(2**VW - 1) - 2**(VW-1);
      s.c = $urandom_range(2**VW - 1) - 2**(VW-1);
    end
    return s;
  endfunction

  // Driver: a reference sample in each sampling cycle, junk otherwise.
  always @(negedge clk) begin
    smp_t s;
    if (rst_n && sample && drv_k < NPER) begin
      s = ref_sample(drv_k);
      va <= VW'(s.a); vb <= VW'(s.b); vc <= VW'(s.c);
      pending.push_back(s);
      drv_k <= drv_k + 1;
    end else begin
      va <= VW'($urandom); vb <= VW'($urandom); vc <= VW'($urandom);
      n_junk++;
    end
  end

  initial begin
    int   on [3];
    int   onmax, onmin, vmax, vmin, need, s_lo, s_hi;
    real  vd, vq, alpha;
    bit   tie, ovm_exp;
    smp_t s;
    sector_e sec_p;
    logic    ovm_p;

    for (int i = 1; i <= 6; i++) n_sector[i] = 0;
    va = '0; vb = '0; vc = '0;
    repeat (3) @(negedge clk);
    chk("gates low in reset", int'(gate), 0);
    rst_n = 1'b1;
    @(negedge clk);
    chk("gates low before the first period", int'(gate), 0);

    while (done < NPER) begin
      @(negedge clk);
      if (!period_start) continue;
      s = pending.pop_front();
      on = '{0, 0, 0};
      sec_p = sector;
      ovm_p = overmod;
      for (int i = 0; i < 2 * int'(TPWM); i++) begin
        if (i > 0) @(negedge clk);
        if (i > 0 && period_start) chk("period length", i, 2 * TPWM);
        chk("complementary gates", int'(gate[4] != gate[1]) + int'(gate[6] != gate[3]) + int'(gate[2] != gate[5]), 3);
        on[0] += int'(gate[1]); on[1] += int'(gate[3]); on[2] += int'(gate[5]);
      end
      onmax = (on[0] > on[1]) ? on[0] : on[1]; onmax = (on[2] > onmax) ? on[2] : onmax;
      onmin = (on[0] < on[1]) ? on[0] : on[1]; onmin = (on[2] < onmin) ? on[2] : onmin;
      vmax  = (s.a > s.b) ? s.a : s.b; vmax = (s.c > vmax) ? s.c : vmax;
      vmin  = (s.a < s.b) ? s.a : s.b; vmin = (s.c < vmin) ? s.c : vmin;
      need  = 2 * (vmax - vmin);
      ovm_exp = need > int'(TPWM);
      chk("overmod flag", int'(ovm_p), int'(ovm_exp));
      if (!ovm_exp) begin
        n_lin++;
        if (need == 0) n_zero++;
        chk("line voltage A-B", on[0] - on[1], 4 * (s.a - s.b));
        chk("line voltage B-C", on[1] - on[2], 4 * (s.b - s.c));
        chk("zero vectors split evenly", int'(onmax + onmin == 2 * TPWM || onmax + onmin == 2 * TPWM + 2), 1);
      end else begin
        n_ovm++;
        chk("saturated highest phase", onmax, 2 * TPWM);
        chk("saturated lowest phase", onmin, 0);
      end
      // sector from the Clarke transform of the sample
      vd = (2.0 / 3.0) * (real'(s.a) - 0.5 * real'(s.b) - 0.5 * real'(s.c));
      vq = (real'(s.b) - real'(s.c)) / $sqrt(3.0);
      if (need != 0) begin
        alpha = $atan2(vq, vd) * 180.0 / PI;
        if (alpha < 0.0) alpha += 360.0;
        s_lo = (int'($floor((alpha + 359.99) / 60.0)) % 6) + 1;
        s_hi = (int'($floor((alpha + 0.01) / 60.0)) % 6) + 1;
        tie  = (s_lo != s_hi);
        checks++;
        if (!(int'(sec_p) == s_hi || (tie && int'(sec_p) == s_lo))) begin
          failures++;
          if (failures < 15) $display("sector: got %0d exp %0d (alpha %f)", sec_p, s_hi, alpha);
        end
      end
      if (int'(sec_p) >= 1 && int'(sec_p) <= 6) n_sector[int'(sec_p)]++;
      done++;
    end

    $display("periods %0d: linear %0d, zero vector only %0d, over-modulated %0d, junk input cycles %0d",
             done, n_lin, n_zero, n_ovm, n_junk);
    for (int i = 1; i <= 6; i++) begin
      $display("sector %0d: %0d periods", i, n_sector[i]);
      chk("sector reached", int'(n_sector[i] > 0), 1);
    end
    chk("linear operation reached", int'(n_lin > 0), 1);
    chk("zero-vector-only period reached", int'(n_zero > 0), 1);
    chk("input changes between samples reached", int'(n_junk > 0), 1);
    if (OVM_REACHABLE) chk("over-modulation reached", int'(n_ovm > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
