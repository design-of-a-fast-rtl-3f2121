// tb_error_normalizer: self-checking test of the error calculation and normalizer.
// Random and extreme voltage pairs are applied; each result is compared with a real-valued
// model, (vref - vgrid) * NORM_GAIN floored to 2^-17 and clamped to [-1, 1). Also checks the
// one-clock latency of out_valid and that the output holds while in_valid is low.
module tb_error_normalizer;
  import sd_ctrl_pkg::*;

  logic clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  volt_t vgrid = '0, vref = '0;
  norm_t err_norm;
  logic  out_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  error_normalizer dut (.*);

  function automatic longint expected(input volt_t g, input volt_t r);
    real e;
    longint q;
    e = (real'(r) - real'(g)) * 147170.0 / (2.0 ** 26) / 256.0;  // normalised volts
    q = longint'($floor(e * (2.0 ** 17)));
    if (q > 131071) q = 131071;
    if (q < -131072) q = -131072;
    return q;
  endfunction

  task automatic apply(input volt_t g, input volt_t r);
    longint exp_v;
    @(negedge clk);
    vgrid = g; vref = r; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    exp_v = expected(g, r);
    checks++;
    if (!out_valid || longint'(err_norm) != exp_v) begin
      failures++;
      $display("FAIL g=%0d r=%0d got=%0d valid=%0b exp=%0d", g, r, err_norm, out_valid, exp_v);
    end
    vgrid = volt_t'($urandom); vref = volt_t'($urandom);   // must not disturb the output
    @(negedge clk);
    checks++;
    if (out_valid || longint'(err_norm) != exp_v) begin
      failures++;
      $display("FAIL hold: got=%0d valid=%0b", err_norm, out_valid);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    apply(18'sd0, 18'sd0);
    apply(18'sd256, 18'sd0);                 // -1 V error
    apply(-18'sd116736, 18'sd0);             // +456 V error -> about 1.0
    apply(18'sd131071, -18'sd131072);        // largest positive error, saturates
    apply(-18'sd131072, 18'sd131071);
    apply(18'sd131071, 18'sd0);
    repeat (2000) apply(volt_t'($urandom), volt_t'($urandom));
    repeat (500) apply(volt_t'($signed($urandom_range(0, 20000)) - 10000),
                       volt_t'($signed($urandom_range(0, 20000)) - 10000));
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
