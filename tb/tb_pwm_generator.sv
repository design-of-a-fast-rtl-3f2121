// tb_pwm_generator: self-checking test of the PWM output stage.
// Three instances: the default PERIOD = 100 (1 MHz at 100 MHz), PERIOD = 10000 (10 kHz) and
// PERIOD = 7. The duty input
// changes at random clocks, often in the middle of a period. For every period the test checks
// that it lasts exactly PERIOD clocks, that pwm_out is high for the first floor(duty * PERIOD)
// clocks and low after, where duty is the value present in the last clock of the previous
// period, and so that a change inside a period has no effect until the next one.
module tb_pwm_generator;
  import sd_ctrl_pkg::*;

  logic  clk = 1'b0, rst = 1'b1;
  duty_t duty = '0;
  logic  pwm_a, ps_a, pwm_b, ps_b, pwm_c, ps_c;
  int checks = 0, failures = 0, mid_changes = 0;

  always #5 clk = ~clk;

  pwm_generator               dut_a (.clk, .rst, .duty, .pwm_out(pwm_a), .period_start(ps_a));
  pwm_generator #(.PERIOD(7)) dut_b (.clk, .rst, .duty, .pwm_out(pwm_b), .period_start(ps_b));
  pwm_generator #(.PERIOD(10000)) dut_c (.clk, .rst, .duty, .pwm_out(pwm_c), .period_start(ps_c));

  // Per-instance period checker, sampled at negedges.
  class checker_t;
    int period, pos = -1, high_exp = 0, periods = 0;
    duty_t last_duty = '0;
    function new(int p); period = p; endfunction
    function void step(logic pwm, logic ps, duty_t d_now, ref int checks, ref int failures);
      if (ps) begin
        if (pos != -1) begin
          checks++;
          if (pos != period) begin failures++; $display("FAIL period %0d len %0d", period, pos); end
          periods++;
        end
        high_exp = int'((longint'(last_duty) * period) >> 18);
        pos = 0;
      end
      if (pos >= 0) begin
        checks++;
        if (pwm != (pos < high_exp)) begin
          failures++;
          $display("FAIL P=%0d pos=%0d pwm=%0b high_exp=%0d", period, pos, pwm, high_exp);
        end
        pos++;
      end
      last_duty = d_now;
    endfunction
  endclass

  checker_t ca = new(100), cb = new(7), cc = new(10000);

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    repeat (60000) begin
      @(negedge clk);
      if ($urandom_range(0, 40) == 0) begin
        if (!ps_a) mid_changes++;
        case ($urandom_range(0, 3))
          0: duty = '0;
          1: duty = '1;
          default: duty = duty_t'($urandom);
        endcase
      end
      // duty now holds the value the next clock edge will see
      ca.step(pwm_a, ps_a, duty, checks, failures);
      cb.step(pwm_b, ps_b, duty, checks, failures);
      cc.step(pwm_c, ps_c, duty, checks, failures);
    end
    checks++;
    if (ca.periods < 500 || cb.periods < 8000 || cc.periods < 5 || mid_changes == 0) begin
      failures++; $display("FAIL coverage %0d %0d %0d", ca.periods, cb.periods, mid_changes);
    end
    $display("periods %0d / %0d, duty changes inside a period %0d", ca.periods, cb.periods,
             mid_changes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
