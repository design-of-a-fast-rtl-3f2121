// tb_biquad_section: self-checking test of one direct form II section.
// Two instances are driven with the same random input stream (one sample per clock, with random
// gaps): one with simple, exactly representable coefficients, one with the first high-pass
// section of the controller, whose poles lie just inside the unit circle. Each output is compared
// with a double-precision model of the same recursion, v = x - a1 v1 - a2 v2,
// y = b0 v + b1 v1 + b2 v2. Also checks the one-clock latency of out_valid.
module tb_biquad_section;
  import sd_ctrl_pkg::*;

  localparam biquad_coef_t C_A = '{b0: 96'h200000000000000000000000,   //  0.5
                                   b1: 96'h100000000000000000000000,   //  0.25
                                   b2: 96'hF80000000000000000000000,   // -0.125
                                   a1: 96'hC66666666666666666666666,   // -0.9 (rounded down)
                                   a2: 96'h0CCCCCCCCCCCCCCCCCCCCCCD};  //  0.2
  localparam biquad_coef_t C_B = '{b0: 96'h3FED358B4241C60000000000,
                                   b1: 96'h802595112AB5980000000000,
                                   b2: 96'h3FED358B4241C40000000000,
                                   a1: 96'h801A94C8C90DFC0000000000,
                                   a2: 96'h3FE56E9A8BADBA0000000000};

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  state_t x = '0, ya, yb;
  logic va, vb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  biquad_section #(.COEF(C_A)) dut_a (.clk, .rst, .in_valid, .x, .y(ya), .out_valid(va));
  biquad_section #(.COEF(C_B)) dut_b (.clk, .rst, .in_valid, .x, .y(yb), .out_valid(vb));

  function automatic real c2r(input coef_t c);
    return real'(c) / (2.0 ** 94);
  endfunction
  function automatic real s2r(input state_t s);
    return real'(s) / (2.0 ** 32);
  endfunction

  real ma_v1 = 0, ma_v2 = 0, mb_v1 = 0, mb_v2 = 0;
  real max_err_a = 0, max_err_b = 0;

  task automatic model(input biquad_coef_t c, input real xr, inout real v1, inout real v2,
                       output real y);
    real v;
    v  = xr - c2r(c.a1) * v1 - c2r(c.a2) * v2;
    y  = c2r(c.b0) * v + c2r(c.b1) * v1 + c2r(c.b2) * v2;
    v2 = v1;
    v1 = v;
  endtask

  task automatic check(input string name, input state_t got, input logic vld, input real exp_y,
                       input real tol, inout real max_err);
    real err;
    err = s2r(got) - exp_y;
    if (err < 0) err = -err;
    if (err > max_err) max_err = err;
    checks++;
    if (!vld || err > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f valid=%0b", name, s2r(got), exp_y, vld);
    end
  endtask

  initial begin
    real xr, ya_m, yb_m;
    int n;
    repeat (3) @(negedge clk);
    rst = 1'b0;
    for (n = 0; n < 20000; n++) begin
      @(negedge clk);
      if (n < 4) xr = (n == 0) ? 1.0 - 2.0 ** -17 : 0.0;   // impulse first
      else       xr = real'($signed($urandom_range(0, 262143)) - 131072) / (2.0 ** 17);
      x = state_t'(longint'(xr * (2.0 ** 17))) <<< 15;
      in_valid = 1'b1;
      model(C_A, xr, ma_v1, ma_v2, ya_m);
      model(C_B, xr, mb_v1, mb_v2, yb_m);
      @(negedge clk);
      in_valid = 1'b0;
      check("A", ya, va, ya_m, 1e-6, max_err_a);
      check("B", yb, vb, yb_m, 1e-4, max_err_b);
      if ($urandom_range(0, 3) == 0) begin
        @(negedge clk);
        checks++;
        if (va || vb) begin failures++; $display("FAIL valid without input"); end
      end
    end
    $display("max abs error: A %e, B %e", max_err_a, max_err_b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
