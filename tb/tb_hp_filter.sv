// tb_hp_filter: self-checking test of the fourth-order high-pass filter.
// 1. Random input: every output is compared with a double-precision model of the two cascaded
//    sections, within 2 LSB of sfix18_En17; the two-clock latency of out_valid is checked.
// 2. Frequency response, one sample per clock as at 1 MS/s: after settling, a 50 Hz sine must be
//    attenuated by at least 40 dB (stopband), a 1 kHz and a 5 kHz sine must pass within 1 dB.
// 3. A DC step must settle at the -40 dB stopband level (even-order inverted Chebyshev).
module tb_hp_filter;
  import sd_ctrl_pkg::*;

  localparam real FS = 1.0e6;
  localparam real PI = 3.14159265358979323846;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  norm_t x = '0, y;
  logic  out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  hp_filter dut (.*);

  // Double-precision model with the default coefficients.
  real c1 [5] = '{0.9988530979108216, -1.9977061588626044, 0.9988530979108214,
                  -1.9983776129918456, 0.9983784207567755};
  real c2 [5] = '{1.0, -1.9999997843396045, 1.0, -1.9993270140016512, 0.9993280007492327};
  real s1v1, s1v2, s2v1, s2v2;

  function automatic real sec(input real c [5], input real xin, inout real v1, inout real v2);
    real v, yo;
    v  = xin - c[3] * v1 - c[4] * v2;
    yo = c[0] * v + c[1] * v1 + c[2] * v2;
    v2 = v1;
    v1 = v;
    return yo;
  endfunction

  task automatic do_reset();
    @(negedge clk);
    rst = 1'b1; in_valid = 1'b0;
    s1v1 = 0; s1v2 = 0; s2v1 = 0; s2v2 = 0;
    repeat (2) @(negedge clk);
    rst = 1'b0;
  endtask

  function automatic norm_t to_norm(input real r);
    return norm_t'(longint'($floor(r * (2.0 ** 17))));
  endfunction

  // Random-input comparison with the model.
  task automatic random_test(input int n);
    real xr, ym, pipe [2];
    logic vpipe [2];
    pipe = '{0.0, 0.0}; vpipe = '{1'b0, 1'b0};
    for (int i = 0; i < n + 2; i++) begin
      @(negedge clk);
      if (i >= 2) begin
        checks++;
        if (out_valid !== vpipe[1] ||
            (vpipe[1] && (real'(y) / (2.0 ** 17) - pipe[1] > 2.0 ** -16 ||
                          pipe[1] - real'(y) / (2.0 ** 17) > 2.0 ** -16))) begin
          failures++;
          if (failures < 10)
            $display("FAIL random i=%0d got=%f exp=%f vld=%0b", i, real'(y) / (2.0 ** 17),
                     pipe[1], out_valid);
        end
      end
      pipe[1] = pipe[0]; vpipe[1] = vpipe[0];
      if (i < n && $urandom_range(0, 4) != 0) begin
        xr = real'($signed($urandom_range(0, 131071)) - 65536) / (2.0 ** 17);
        x = to_norm(xr);
        xr = real'(x) / (2.0 ** 17);
        in_valid = 1'b1;
        ym = sec(c2, sec(c1, xr, s1v1, s1v2), s2v1, s2v2);
        if (ym > 1.0 - 2.0 ** -17) ym = 1.0 - 2.0 ** -17;
        if (ym < -1.0) ym = -1.0;
        pipe[0] = ym; vpipe[0] = 1'b1;
      end else begin
        in_valid = 1'b0;
        vpipe[0] = 1'b0;
      end
    end
    in_valid = 1'b0;
  endtask

  // Sine through the filter; returns the peak output over the last period after settling.
  task automatic sine_test(input real f, input real amp, input int settle, output real peak);
    int period;
    period = int'(FS / f);
    peak = 0.0;
    for (int n = 0; n < settle + period + 2; n++) begin
      @(negedge clk);
      x = to_norm(amp * $sin(2.0 * PI * f * real'(n) / FS));
      in_valid = 1'b1;
      if (n >= settle + 2 && out_valid) begin
        if (real'(y) / (2.0 ** 17) > peak) peak = real'(y) / (2.0 ** 17);
        if (-real'(y) / (2.0 ** 17) > peak) peak = -real'(y) / (2.0 ** 17);
      end
    end
    in_valid = 1'b0;
  endtask

  initial begin
    real peak;
    do_reset();
    random_test(20000);

    do_reset();
    sine_test(50.0, 0.9, 100000, peak);
    $display("50 Hz: gain %f (%f dB)", peak / 0.9, 20.0 * $log10(peak / 0.9 + 1e-12));
    checks++;
    if (peak > 0.9 * 0.01) begin failures++; $display("FAIL 50 Hz not attenuated by 40 dB"); end

    do_reset();
    sine_test(1000.0, 0.5, 20000, peak);
    $display("1 kHz: gain %f", peak / 0.5);
    checks++;
    if (peak < 0.5 * 0.891 || peak > 0.5 * 1.122) begin failures++; $display("FAIL 1 kHz gain"); end

    do_reset();
    sine_test(5000.0, 0.5, 20000, peak);
    $display("5 kHz: gain %f", peak / 0.5);
    checks++;
    if (peak < 0.5 * 0.891 || peak > 0.5 * 1.122) begin failures++; $display("FAIL 5 kHz gain"); end

    // DC step: must be blocked.
    do_reset();
    x = to_norm(0.5);
    in_valid = 1'b1;
    repeat (100000) @(negedge clk);
    // An even-order inverted Chebyshev high-pass keeps the stopband level (-40 dB) at DC.
    checks++;
    if (real'(y) > 0.5 * 0.0105 * (2.0 ** 17) || real'(y) < -0.5 * 0.0105 * (2.0 ** 17)) begin
      failures++; $display("FAIL DC step residue %0d LSB", y);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
