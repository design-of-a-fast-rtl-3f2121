// tb_dead_zone: self-checking test of the dead zone (starting threshold).
// Random inputs and thresholds, with lo = 0 as in the controller and with lo > 0; the expected
// output is u - up above up, 0 inside [lo, up], and u - lo (clamped at 0) below lo.
module tb_dead_zone;
  import sd_ctrl_pkg::*;

  logic  clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  duty_t u = '0, up = '0, lo = '0, y;
  logic  out_valid;
  int checks = 0, failures = 0;
  int n_above = 0, n_inside = 0, n_below = 0;

  always #5 clk = ~clk;

  dead_zone dut (.*);

  task automatic apply(input duty_t uu, input duty_t uup, input duty_t ulo);
    longint e;
    @(negedge clk);
    u = uu; up = uup; lo = ulo; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    if (longint'(uu) > longint'(uup))      begin e = longint'(uu) - longint'(uup); n_above++; end
    else if (longint'(uu) < longint'(ulo)) begin e = 0; n_below++; end
    else                                   begin e = 0; n_inside++; end
    checks++;
    if (!out_valid || longint'(y) != e) begin
      failures++;
      $display("FAIL u=%0d up=%0d lo=%0d got=%0d exp=%0d", uu, uup, ulo, y, e);
    end
    u = duty_t'($urandom); up = duty_t'($urandom);
    @(negedge clk);
    checks++;
    if (out_valid || longint'(y) != e) begin failures++; $display("FAIL hold"); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    apply(18'd1000, 18'd999, 18'd0);
    apply(18'd1000, 18'd1000, 18'd0);
    apply(18'd0, 18'd0, 18'd0);
    apply(18'd262143, 18'd0, 18'd0);
    apply(18'd5, 18'd100, 18'd10);
    repeat (2000) apply(duty_t'($urandom), duty_t'($urandom), '0);
    repeat (2000) begin
      duty_t a, b;
      a = duty_t'($urandom_range(0, 100000));
      b = duty_t'($urandom_range(100000, 262143));
      apply(duty_t'($urandom), b, a);
    end
    checks++;
    if (n_above == 0 || n_inside == 0 || n_below == 0) begin failures++; $display("FAIL coverage"); end
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
