// tb_sign_correction: self-checking test of the sign correction.
// Random and corner (filtered error, grid voltage) pairs; the expected value is
// filt * sign(vgrid) in real numbers, floored to 2^-18 and clamped to [0, 1 - 2^-18].
// Also checks the one-clock latency and that the output holds between samples.
module tb_sign_correction;
  import sd_ctrl_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  norm_t filt = '0;
  volt_t vgrid = '0;
  duty_t sag;
  logic  out_valid;
  int checks = 0, failures = 0;
  int n_clamped_neg = 0, n_sat = 0;

  always #5 clk = ~clk;

  sign_correction dut (.*);

  task automatic apply(input norm_t f, input volt_t g);
    real e;
    longint q;
    @(negedge clk);
    filt = f; vgrid = g; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    e = real'(f) / (2.0 ** 17) * ((g > 0) ? 1.0 : (g < 0) ? -1.0 : 0.0);
    q = longint'($floor(e * (2.0 ** 18)));
    if (q < 0) begin q = 0; n_clamped_neg++; end
    if (q > 262143) begin q = 262143; n_sat++; end
    checks++;
    if (!out_valid || longint'(sag) != q) begin
      failures++;
      $display("FAIL f=%0d g=%0d got=%0d exp=%0d vld=%0b", f, g, sag, q, out_valid);
    end
    filt = norm_t'($urandom); vgrid = volt_t'($urandom);
    @(negedge clk);
    checks++;
    if (out_valid || longint'(sag) != q) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    apply(18'sd1000, 18'sd5);
    apply(18'sd1000, -18'sd5);
    apply(-18'sd1000, -18'sd5);
    apply(-18'sd1000, 18'sd5);
    apply(18'sd1000, 18'sd0);
    apply(-18'sd131072, -18'sd1);    // |-1| * -1 = 1.0 saturates
    apply(18'sd131071, 18'sd1);
    repeat (3000) apply(norm_t'($urandom), volt_t'($urandom));
    checks++;
    if (n_clamped_neg == 0 || n_sat == 0) begin failures++; $display("FAIL coverage"); end
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
