// svpwm_top: digital space vector PWM controller for a three-phase
// voltage source inverter.
//
// Three phase reference samples va, vb, vc go through a purely combinational
// chain built from shifts, adders and subtractors only:
//   svpwm_xdq    -> intermediate variables xd, xq (no sqrt(3), no 1/3)
//   svpwm_sector -> sector 1..6 from two signs and one magnitude compare
//   svpwm_times  -> dwell times tn, tn1, t0 from the sector's decomposition
//                   matrix
// and the clocked svpwm_pwm_gen turns the sector and times into a symmetric
// seven-segment switching pattern on the six bridge switches S1..S6.
//
// Interface: va/vb/vc are VW-bit two's complement, scaled so that the DC-link
// voltage equals TPWM/2 LSBs; they are taken in the clock cycle in which
// `sample` is high (the last cycle of each PWM period) and may change at any
// other time. gate[k] drives switch Sk of the bridge (S1/S4 phase A, S3/S6
// phase B, S5/S2 phase C); pwm = {A, B, C} are the upper-switch states;
// sector and overmod describe the period being output; period_start marks its
// first output cycle.
// Timing: one PWM period is 2*TPWM clock cycles (256 cycles, 2.56 us at
// 100 MHz with the defaults); a sample reaches the gates in the period that
// starts right after it, one clock later. The defaults VW = 6 (giving the
// 8-bit xd/xq of the reference controller) and TPWM = 128 are this design's
// choices; the structure follows the described controller.
module svpwm_top
  import svpwm_pkg::*;
#(
  parameter int unsigned VW   = 6,
  parameter int unsigned TPWM = 128
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [VW-1:0] va,
  input  logic signed [VW-1:0] vb,
  input  logic signed [VW-1:0] vc,
  output logic                 sample,
  output logic [6:1]           gate,
  output logic [2:0]           pwm,
  output sector_e              sector,
  output logic                 overmod,
  output logic                 period_start
);

  localparam int unsigned XW = VW + 2;
  localparam int unsigned TW = $clog2(TPWM + 1);

  logic signed [XW-1:0] xd, xq;
  sector_e              sec_now;
  logic [TW-1:0]        tn, tn1, t0;
  logic                 ovm_now;

  svpwm_xdq #(.VW(VW)) u_xdq (
    .va (va),
    .vb (vb),
    .vc (vc),
    .xd (xd),
    .xq (xq)
  );

  svpwm_sector #(.XW(XW)) u_sector (
    .xd     (xd),
    .xq     (xq),
    .sector (sec_now)
  );

  svpwm_times #(.XW(XW), .TPWM(TPWM), .TW(TW)) u_times (
    .xd      (xd),
    .xq      (xq),
    .sector  (sec_now),
    .tn      (tn),
    .tn1     (tn1),
    .t0      (t0),
    .overmod (ovm_now)
  );

  svpwm_pwm_gen #(.TPWM(TPWM), .TW(TW)) u_pwm (
    .clk          (clk),
    .rst_n        (rst_n),
    .sector       (sec_now),
    .tn           (tn),
    .tn1          (tn1),
    .t0           (t0),
    .sample       (sample),
    .pwm          (pwm),
    .gate         (gate),
    .period_start (period_start),
    .sector_o     (sector)
  );

  // Over-modulation flag of the period being output, sampled with the times.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      overmod <= 1'b0;
    else if (sample) overmod <= ovm_now;
  end

endmodule
