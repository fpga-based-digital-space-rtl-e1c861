// svpwm_pwm_gen: symmetric (centre-aligned) seven-segment SVPWM pulse generator.
//
// A free-running counter cnt runs 0 .. 2*TPWM-1; one PWM period is 2*TPWM
// clock cycles and TPWM = t0 + tn + tn1 is its half. In the first half the
// switching state walks from the zero vector 000 through the two active
// vectors of the sector to the zero vector 111, and in the second half it walks
// back in mirror image:
//
//   000 (t0/2) -> first active (..) -> second active (..) -> 111 (t0)
//       -> second active -> first active -> 000 (t0/2)
//
// For sector 1, for example, phase A rises at cnt = t0/2, B at t0/2 + tn and
// C at t0/2 + tn + tn1, and each falls at the mirrored count 2*TPWM - rise.
// In general each phase has a rise count `off` (its off-time in a half
// period), taken from the per-sector on-time table of the upper switches:
//
//   sector   A off          B off          C off
//     1      h              h+tn           h+tn+tn1        (h = t0/2)
//     2      h+tn1          h              h+tn+tn1
//     3      h+tn+tn1       h              h+tn
//     4      h+tn+tn1       h+tn1          h
//     5      h+tn           h+tn+tn1       h
//     6      h              h+tn+tn1       h+tn1
//
// and is high while off <= cnt < 2*TPWM - off. The upper switches are
// S1 (A), S3 (B), S5 (C); the lower ones are their complements S4, S6, S2.
//
// sector/tn/tn1/t0 are sampled once per period, in the last cycle of the
// counter, so a period is never changed half-way. This sampling point, the
// registered outputs and the start-up behaviour are this design's choices:
// after reset all six gates stay low until the first sample has been taken
// (one clock later). No dead time is inserted between a switch and its
// complement.
//
// Interface: gate[k] drives switch Sk (k = 1..6); pwm = {A, B, C};
// period_start is high in the first output cycle of every period; sector_o is
// the sector of the period being output.
// Timing: the outputs are registered and follow the counter by one clock;
// inputs must be stable in the cycle in which `sample` is high.
module svpwm_pwm_gen
  import svpwm_pkg::*;
#(
  parameter int unsigned TPWM = 128,
  parameter int unsigned TW   = $clog2(TPWM + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  sector_e       sector,
  input  logic [TW-1:0] tn,
  input  logic [TW-1:0] tn1,
  input  logic [TW-1:0] t0,
  output logic          sample,
  output logic [2:0]    pwm,
  output logic [6:1]    gate,
  output logic          period_start,
  output sector_e       sector_o
);

  localparam int unsigned CW   = $clog2(2 * TPWM) + 1;   // one spare bit
  localparam logic [CW-1:0] LAST = CW'(2 * TPWM - 1);
  localparam logic [CW-1:0] FULL = CW'(2 * TPWM);

  logic [CW-1:0] cnt;
  logic          active;
  logic [CW-1:0] off_a, off_b, off_c;        // registered rise counts
  logic [CW-1:0] h, h_n, h_n1, h_all;        // candidate rise counts
  logic [CW-1:0] na, nb, nc;
  logic [2:0]    pwm_next;

  assign sample = (cnt == LAST);

  // Rise counts of the three phases for the sector and times at the inputs.
  always_comb begin
    h     = CW'(t0 >> 1);
    h_n   = h + CW'(tn);
    h_n1  = h + CW'(tn1);
    h_all = h + CW'(tn) + CW'(tn1);
    unique case (sector)
      SECTOR_1: begin na = h;     nb = h_n;   nc = h_all; end
      SECTOR_2: begin na = h_n1;  nb = h;     nc = h_all; end
      SECTOR_3: begin na = h_all; nb = h;     nc = h_n;   end
      SECTOR_4: begin na = h_all; nb = h_n1;  nc = h;     end
      SECTOR_5: begin na = h_n;   nb = h_all; nc = h;     end
      default:  begin na = h;     nb = h_all; nc = h_n1;  end   // SECTOR_6
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt      <= LAST;
      active   <= 1'b0;
      off_a    <= '0;
      off_b    <= '0;
      off_c    <= '0;
      sector_o <= SECTOR_1;
    end else if (sample) begin
      cnt      <= '0;
      active   <= 1'b1;
      off_a    <= na;
      off_b    <= nb;
      off_c    <= nc;
      sector_o <= sector;
    end else begin
      cnt      <= cnt + 1'b1;
    end
  end

  always_comb begin
    pwm_next[2] = (cnt >= off_a) && (cnt < FULL - off_a);
    pwm_next[1] = (cnt >= off_b) && (cnt < FULL - off_b);
    pwm_next[0] = (cnt >= off_c) && (cnt < FULL - off_c);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pwm          <= 3'b000;
      gate         <= '0;
      period_start <= 1'b0;
    end else begin
      pwm          <= active ? pwm_next : 3'b000;
      // S1/S4 leg A, S3/S6 leg B, S5/S2 leg C
      gate[1]      <= active &&  pwm_next[2];
      gate[4]      <= active && !pwm_next[2];
      gate[3]      <= active &&  pwm_next[1];
      gate[6]      <= active && !pwm_next[1];
      gate[5]      <= active &&  pwm_next[0];
      gate[2]      <= active && !pwm_next[0];
      period_start <= active && (cnt == '0);
    end
  end

endmodule
