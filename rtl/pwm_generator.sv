// pwm_generator: counter-based PWM of the processed error.
//
// A counter runs from 0 to PERIOD-1 at the system clock; the output is high for the first
// floor(duty * PERIOD) clocks of each period. At 100 MHz the default PERIOD = 100 gives a
// 1 MHz PWM with 1 % duty resolution, the highest PWM rate the controller has to support;
// PERIOD = 10000 gives the 10 kHz used while testing.
//
// The duty input comes from the 1 MS/s datapath and may change at any clock. It is sampled
// once, in the last clock of a period, and held for the whole next period, so a period never
// mixes two duty values (the rate transition with guaranteed data integrity that removed the
// output offsets seen on the first hardware build). Because the duty format tops out at
// 1 - 2^-18, the output is never high for a full period.
//
// Interface: duty in ufix18_En18; pwm_out and period_start (high in the first clock of each
// period) are driven from registers. The counter structure and the sampling point are this
// design's choices; PERIOD and the latch-once-per-period behaviour follow the original design.
module pwm_generator
  import sd_ctrl_pkg::*;
#(
  parameter int unsigned PERIOD = 100
) (
  input  logic  clk,
  input  logic  rst,
  input  duty_t duty,
  output logic  pwm_out,
  output logic  period_start
);

  localparam int unsigned CW = $clog2(PERIOD + 1);

  logic [CW-1:0] cnt;
  logic [CW-1:0] cmp;      // high time of the current period, in clocks
  logic [CW-1:0] cmp_next;
  logic [DUTY_W+CW-1:0] prod;

  always_comb begin
    prod     = duty * (DUTY_W+CW)'(PERIOD);
    cmp_next = CW'(prod >> DUTY_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      cmp <= '0;
    end else if (cnt == CW'(PERIOD - 1)) begin
      cnt <= '0;
      cmp <= cmp_next;
    end else begin
      cnt <= cnt + 1'b1;
    end
  end

  assign pwm_out      = (cnt < cmp);
  assign period_start = (cnt == '0);

endmodule
