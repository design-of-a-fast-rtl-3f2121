// tb_sd_controller: self-checking test of the controller datapath.
// A 50 Hz, 325 V grid with a small third harmonic, a sag in the positive half cycle, a sag in
// the negative half cycle and a swell is sampled at 1 MS/s (one sample every other clock, so
// the test is short) and fed together with a clean reference sine to two instances:
//   dut_a  default gain format, gain ~1, threshold 0.05 (normalised)
//   dut_b  GAIN_FRAC = 14, gain 10, threshold 15 V / 456 V
// Every output is compared with a real-valued model of the chain (error, normalise, double
// precision high-pass, sign correction, dead zone, gain) within a few LSB, and out_valid must
// follow each sample by exactly 6 clocks. Counts how often a sag passes the threshold in each
// half cycle, how often the dead zone suppresses a small error and how often a swell is clamped.
// For dut_b it also measures how many samples pass from each sag onset to the first non-zero
// processed error; this must stay within 10 samples (10 us at 1 MS/s).
module tb_sd_controller;
  import sd_ctrl_pkg::*;

  localparam real PI = 3.14159265358979323846;
  localparam int  LATENCY = 6;
  localparam int  NSAMP = 40000;

  logic        clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  volt_t       vgrid = '0, vref = '0;
  duty_t       pe_a, pe_b;
  logic        v_a, v_b;
  duty_t       th_a = duty_t'(13107);   // 0.05
  duty_t       th_b = duty_t'(8623);    // 15 / 456
  logic [17:0] g_a = 18'h3FFFF;         // 1 - 2^-18
  logic [17:0] g_b = 18'd163840;        // 10.0 with 14 fraction bits
  int checks = 0, failures = 0;
  int n_sag_pos = 0, n_sag_neg = 0, n_suppressed = 0, n_swell = 0;

  always #5 clk = ~clk;

  sd_controller dut_a (.clk, .rst, .in_valid, .vgrid, .vref, .error_gain(g_a),
                       .starting_threshold(th_a), .processed_error(pe_a), .out_valid(v_a));
  sd_controller #(.GAIN_FRAC(14)) dut_b (.clk, .rst, .in_valid, .vgrid, .vref, .error_gain(g_b),
                       .starting_threshold(th_b), .processed_error(pe_b), .out_valid(v_b));

  // ---- reference model ----
  real c1 [5] = '{0.9988530979108216, -1.9977061588626044, 0.9988530979108214,
                  -1.9983776129918456, 0.9983784207567755};
  real c2 [5] = '{1.0, -1.9999997843396045, 1.0, -1.9993270140016512, 0.9993280007492327};
  real s1v1 = 0, s1v2 = 0, s2v1 = 0, s2v2 = 0;

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

  real exp_a [$], exp_b [$];
  logic vhist [LATENCY+1];

  // Grid waveform at sample n (1 us per sample).
  function automatic real grid(input int n, output real ref_v);
    real t, w, v, d;
    t = real'(n) * 1e-6;
    w = 2.0 * PI * 50.0;
    ref_v = 325.0 * $sin(w * t);
    v = ref_v + 6.0 * $sin(3.0 * w * t);
    d = 1.0;
    if (t >= 0.0050) d -= 0.35 * $exp(-(t - 0.0050) / 0.4e-3);   // sag, positive half cycle
    if (t >= 0.0150) d -= 0.35 * $exp(-(t - 0.0150) / 0.4e-3);   // sag, negative half cycle
    if (t >= 0.0250) d += 0.25 * $exp(-(t - 0.0250) / 0.4e-3);   // swell, positive half cycle
    return v * d;
  endfunction

  task automatic model(input volt_t g, input volt_t r);
    real e, xn, y, s, dz;
    e  = (real'(r) - real'(g)) / 256.0 * 147170.0 / (2.0 ** 26);
    xn = clampq(e, 2.0 ** -17, -1.0, 1.0 - 2.0 ** -17);
    y  = sec(c2, sec(c1, xn, s1v1, s1v2), s2v1, s2v2);
    y  = clampq(y, 2.0 ** -17, -1.0, 1.0 - 2.0 ** -17);
    s  = y * ((g > 0) ? 1.0 : (g < 0) ? -1.0 : 0.0);
    if (s < 0.0) n_swell++;
    s  = clampq(s, 2.0 ** -18, 0.0, 1.0 - 2.0 ** -18);
    dz = (s > 0.05) ? s - 0.05 : 0.0;
    if (s > 0.0 && s <= 0.05) n_suppressed++;
    if (dz > 0.0 && g > 0) n_sag_pos++;
    if (dz > 0.0 && g < 0) n_sag_neg++;
    exp_a.push_back(clampq(dz * real'(g_a) / (2.0 ** 18), 2.0 ** -18, 0.0, 1.0 - 2.0 ** -18));
    dz = (s > real'(th_b) / (2.0 ** 18)) ? s - real'(th_b) / (2.0 ** 18) : 0.0;
    exp_b.push_back(clampq(dz * 10.0, 2.0 ** -18, 0.0, 1.0 - 2.0 ** -18));
  endtask

  task automatic compare(input string name, input duty_t got, input logic vld, input logic want,
                         ref real q [$], input real tol);
    real e;
    checks++;
    if (vld !== want) begin
      failures++; $display("FAIL %s out_valid=%0b expected %0b", name, vld, want); return;
    end
    if (!vld) return;
    e = q.pop_front();
    if (real'(got) / (2.0 ** 18) - e > tol || e - real'(got) / (2.0 ** 18) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", name, real'(got) / (2.0 ** 18), e);
    end
  endtask

  real max_a = 0, max_b = 0;

  // Response delay of dut_b, in samples, for the sags starting at samples 5000 and 15000.
  int out_idx = 0, resp1 = -1, resp2 = -1;
  always @(negedge clk) begin
    if (!rst && v_b) begin
      if (out_idx >= 5000 && out_idx < 15000 && resp1 < 0 && pe_b != 0) resp1 = out_idx - 5000;
      if (out_idx >= 15000 && resp2 < 0 && pe_b != 0) resp2 = out_idx - 15000;
      out_idx++;
    end
  end

  initial begin
    real rv, gv;
    int n = 0;
    vhist = '{default: 1'b0};
    repeat (3) @(negedge clk);
    rst = 1'b0;
    while (n < NSAMP || vhist.or() != 1'b0) begin
      @(negedge clk);
      // outputs for the sample entered LATENCY clocks ago
      compare("A", pe_a, v_a, vhist[LATENCY-1], exp_a, 6.0 * 2.0 ** -18);
      compare("B", pe_b, v_b, vhist[LATENCY-1], exp_b, 60.0 * 2.0 ** -18);
      if (v_a && real'(pe_a) > max_a) max_a = real'(pe_a);
      if (v_b && real'(pe_b) > max_b) max_b = real'(pe_b);
      for (int i = LATENCY; i > 0; i--) vhist[i] = vhist[i-1];
      // a new sample every other clock
      if (n < NSAMP && !in_valid) begin
        gv = grid(n, rv);
        vgrid = volt_t'(longint'($floor(gv * 256.0)));
        vref  = volt_t'(longint'($floor(rv * 256.0)));
        model(vgrid, vref);
        in_valid = 1'b1;
        n++;
      end else begin
        in_valid = 1'b0;
        vgrid = volt_t'($urandom);   // inputs between samples must not matter
      end
      vhist[0] = in_valid;
    end
    $display("peak processed error: A %f, B %f", max_a / 2.0 ** 18, max_b / 2.0 ** 18);
    $display("samples: sag active pos %0d neg %0d, suppressed by threshold %0d, swell clamped %0d",
             n_sag_pos, n_sag_neg, n_suppressed, n_swell);
    $display("response delay after sag onset: %0d and %0d samples", resp1, resp2);
    checks += 2;
    if (resp1 < 0 || resp1 > 10) begin failures++; $display("FAIL response delay 1"); end
    if (resp2 < 0 || resp2 > 10) begin failures++; $display("FAIL response delay 2"); end
    checks++;
    if (n_sag_pos == 0 || n_sag_neg == 0 || n_suppressed == 0 || n_swell == 0) begin
      failures++; $display("FAIL a mechanism was not exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2 * NSAMP + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
