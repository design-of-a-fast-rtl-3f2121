// tb_sd_controller_top: end-to-end test of the controller top at its default parameters.
// 100 MHz clock, one grid sample every 100 clocks (1 MS/s), 1 MHz PWM (PWM_PERIOD = 100).
// Sequence: clock not locked, lock, a bounced and then a real button press, then 40 ms of a
// distorted 50 Hz grid with sags in both half cycles and a swell; the gain is changed at run
// time half-way. Checks:
//   - the datapath stays in reset until lock and button release, and bounce is ignored;
//   - every processed_error matches a real-valued model of the chain within a few LSB and
//     arrives exactly 6 clocks after its sample;
//   - every PWM period is 100 clocks long and high for floor(duty * 100) clocks, duty being the
//     processed error present at the end of the previous period; likewise for the two monitor
//     outputs, whose duty is the last grid / reference sample in offset binary.
// Each mechanism (sag in either half cycle, threshold suppression, swell clamp, PWM pulses,
// run-time gain change, bounce rejection) is counted and must occur at least once.
module tb_sd_controller_top;
  import sd_ctrl_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  LATENCY = 6;
  localparam int  SAMPLE_CLKS = 100;
  localparam int  NSAMP = 40000;
  localparam int  PWM_P = 100;

  logic        clk = 1'b0, ext_reset_in = 1'b0, dcm_locked = 1'b0, sample_valid = 1'b0;
  volt_t       vgrid = '0, vref = '0;
  logic [17:0] error_gain = 18'h3FFFF;
  duty_t       starting_threshold = duty_t'(13107);  // 0.05
  duty_t       processed_error;
  logic        pe_valid, pwm_out, pwm_vgrid_mon, pwm_vref_mon, peripheral_aresetn;
  int checks = 0, failures = 0;
  int n_sag_pos = 0, n_sag_neg = 0, n_suppressed = 0, n_swell = 0, n_pwm_pulses = 0;
  int n_gain_change = 0, n_bounce_ignored = 0;

  always #5 clk = ~clk;   // 10 time units per clock

  sd_controller_top dut (.*);

  // ---- reference model ----
  real c1 [5] = '{0.9988530979108216, -1.9977061588626044, 0.9988530979108214,
                  -1.9983776129918456, 0.9983784207567755};
  real c2 [5] = '{1.0, -1.9999997843396045, 1.0, -1.9993270140016512, 0.9993280007492327};
  real s1v1 = 0, s1v2 = 0, s2v1 = 0, s2v2 = 0;
  real exp_q [$];

  function automatic real sec(input real c [5], input real xin, inout real v1, inout real v2);
    real v, yo;
    v  = xin - c[3] * v1 - c[4] * v2;
    yo = c[0] * v + c[1] * v1 + c[2] * v2;
    v2 = v1;
    v1 = v;
    return yo;
  endfunction

  function automatic real clampq(input real r, input real lsb, input real lo, input real hi);
    real q;
    q = $floor(r / lsb) * lsb;
    if (q < lo) q = lo;
    if (q > hi) q = hi;
    return q;
  endfunction

  function automatic real grid(input int n, output real ref_v);
    real t, w, v, d;
    t = real'(n) * 1e-6;
    w = 2.0 * PI * 50.0;
    ref_v = 325.0 * $sin(w * t);
    v = ref_v + 6.0 * $sin(3.0 * w * t);
    d = 1.0;
    if (t >= 0.0050) d -= 0.35 * $exp(-(t - 0.0050) / 0.4e-3);
    if (t >= 0.0150) d -= 0.35 * $exp(-(t - 0.0150) / 0.4e-3);
    if (t >= 0.0250) d += 0.25 * $exp(-(t - 0.0250) / 0.4e-3);
    if (t >= 0.0350) d -= 0.35 * $exp(-(t - 0.0350) / 0.4e-3);
    return v * d;
  endfunction

  task automatic model(input volt_t g, input volt_t r);
    real e, xn, y, s, th, dz;
    e  = (real'(r) - real'(g)) / 256.0 * 147170.0 / (2.0 ** 26);
    xn = clampq(e, 2.0 ** -17, -1.0, 1.0 - 2.0 ** -17);
    y  = sec(c2, sec(c1, xn, s1v1, s1v2), s2v1, s2v2);
    y  = clampq(y, 2.0 ** -17, -1.0, 1.0 - 2.0 ** -17);
    s  = y * ((g > 0) ? 1.0 : (g < 0) ? -1.0 : 0.0);
    if (s < 0.0) n_swell++;
    s  = clampq(s, 2.0 ** -18, 0.0, 1.0 - 2.0 ** -18);
    th = real'(starting_threshold) / (2.0 ** 18);
    dz = (s > th) ? s - th : 0.0;
    if (s > 0.0 && s <= th) n_suppressed++;
    if (dz > 0.0 && g > 0) n_sag_pos++;
    if (dz > 0.0 && g < 0) n_sag_neg++;
    exp_q.push_back(clampq(dz * real'(error_gain) / (2.0 ** 18), 2.0 ** -18, 0.0,
                           1.0 - 2.0 ** -18));
  endtask

  task automatic expect_cond(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  // ---- output checkers ----
  logic vhist [LATENCY+1];
  logic run = 1'b0;
  real  max_pe = 0.0;

  // Samples as the DUT sees them at the clock edge.
  always @(posedge clk) begin
    if (run) begin
      for (int i = LATENCY; i > 0; i--) vhist[i] = vhist[i-1];
      vhist[0] = sample_valid;
    end
  end

  always @(negedge clk) begin
    if (run) begin
      real e;
      checks++;
      if (pe_valid !== vhist[LATENCY-1]) begin
        failures++; $display("FAIL pe_valid=%0b expected %0b", pe_valid, vhist[LATENCY-1]);
      end else if (pe_valid) begin
        e = exp_q.pop_front();
        if (real'(processed_error) / (2.0 ** 18) - e > 6.0 * 2.0 ** -18 ||
            e - real'(processed_error) / (2.0 ** 18) > 6.0 * 2.0 ** -18) begin
          failures++;
          if (failures < 10)
            $display("FAIL pe got=%f exp=%f", real'(processed_error) / (2.0 ** 18), e);
        end
        if (real'(processed_error) / (2.0 ** 18) > max_pe)
          max_pe = real'(processed_error) / (2.0 ** 18);
      end
    end
  end

  // Last accepted sample, as the monitor outputs hold it.
  volt_t hold_g = '0, hold_r = '0;
  always @(posedge clk) if (run && sample_valid) begin hold_g = vgrid; hold_r = vref; end

  // Voltage (sfix18_En8) to duty in offset binary: (v / 512 + 1) / 2 in units of 2^-18.
  function automatic longint offset_duty(input volt_t v);
    return longint'(v) + 131072;
  endfunction

  // PWM: the period position is known from the period length once the phase is set.
  int    pwm_pos = -1;
  int    hi_pe = 0, hi_g = 0, hi_r = 0;
  longint d_pe = 0, d_g = 131072, d_r = 131072;
  int    n_mon_checked = 0;
  always @(negedge clk) begin
    if (run) begin
      if (pwm_pos == PWM_P) pwm_pos = 0;
      if (pwm_pos == 0) begin
        hi_pe = int'((d_pe * PWM_P) >> 18);
        hi_g  = int'((d_g * PWM_P) >> 18);
        hi_r  = int'((d_r * PWM_P) >> 18);
        if (hi_pe > 0) n_pwm_pulses++;
        if (hi_g != hi_r) n_mon_checked++;
      end
      if (pwm_pos >= 0) begin
        checks += 3;
        if (pwm_out != (pwm_pos < hi_pe)) begin
          failures++;
          if (failures < 10) $display("FAIL pwm pos=%0d exp_high=%0d", pwm_pos, hi_pe);
        end
        if (pwm_vgrid_mon != (pwm_pos < hi_g) || pwm_vref_mon != (pwm_pos < hi_r)) begin
          failures++;
          if (failures < 10) $display("FAIL monitor pwm pos=%0d exp_high=%0d/%0d", pwm_pos, hi_g, hi_r);
        end
        pwm_pos++;
      end
      // values the next clock edge samples
      d_pe = longint'(processed_error);
      d_g  = offset_duty(hold_g);
      d_r  = offset_duty(hold_r);
    end
  end

  initial begin
    real rv, gv;
    int n;
    vhist = '{default: 1'b0};
    repeat (50) @(negedge clk);
    expect_cond(!peripheral_aresetn, "reset held while the clock is not locked");
    dcm_locked = 1'b1;
    repeat (10) @(negedge clk);
    ext_reset_in = 1'b1; repeat (2) @(negedge clk); ext_reset_in = 1'b0;   // bounce
    repeat (40) @(negedge clk);
    expect_cond(peripheral_aresetn, "released after lock, bounce ignored");
    if (peripheral_aresetn) n_bounce_ignored++;
    ext_reset_in = 1'b1; repeat (20) @(negedge clk);
    expect_cond(!peripheral_aresetn, "button press resets");
    ext_reset_in = 1'b0;
    n = 0;
    while (!peripheral_aresetn && n < 100) begin @(negedge clk); n++; end
    expect_cond(peripheral_aresetn, "released after button");
    // The PWM counter restarted with the reset release; find the phase.
    n = 0;
    while (!dut.u_pwm.period_start && n < 200) begin @(negedge clk); n++; end
    // The PWM counter is 0 at this negedge and the duty is 0 after reset. Start the checkers
    // just after it, so that their first look is at counter value 1.
    #1;
    pwm_pos = 1;
    run = 1'b1;
    @(negedge clk);
    for (n = 0; n < NSAMP; n++) begin
      if (n == NSAMP / 2) begin
        error_gain = 18'h20000;   // 0.5, set by the host while running
        n_gain_change++;
      end
      gv = grid(n, rv);
      vgrid = volt_t'(longint'($floor(gv * 256.0)));
      vref  = volt_t'(longint'($floor(rv * 256.0)));
      model(vgrid, vref);
      sample_valid = 1'b1;
      @(negedge clk);
      sample_valid = 1'b0;
      repeat (SAMPLE_CLKS - 1) @(negedge clk);
    end
    repeat (20) @(negedge clk);
    $display("peak processed error %f", max_pe);
    $display("samples with sag output: pos %0d neg %0d; suppressed %0d; swell clamped %0d",
             n_sag_pos, n_sag_neg, n_suppressed, n_swell);
    $display("PWM periods with pulses %0d; monitor periods with grid != reference %0d",
             n_pwm_pulses, n_mon_checked);
    $display("gain changes %0d; bounces ignored %0d", n_gain_change, n_bounce_ignored);
    checks++;
    if (n_sag_pos == 0 || n_sag_neg == 0 || n_suppressed == 0 || n_swell == 0 ||
        n_pwm_pulses == 0 || n_mon_checked == 0 || n_gain_change == 0 || n_bounce_ignored == 0) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NSAMP * SAMPLE_CLKS + 5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
