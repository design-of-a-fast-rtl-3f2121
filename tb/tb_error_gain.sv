// tb_error_gain: self-checking test of the processed-error gain.
// Instance g18 uses the default gain format (ufix18_En18); instance g14 has 14 fraction bits so
// that gains up to 16 can be set, which also exercises output saturation. Expected values are
// floor(u * gain) computed with real numbers and clamped to [0, 1 - 2^-18].
module tb_error_gain;
  import sd_ctrl_pkg::*;

  logic        clk = 1'b0, rst = 1'b1, in_valid = 1'b0;
  duty_t       u = '0, y18, y14;
  logic [17:0] gain = '0;
  logic        v18, v14;
  int checks = 0, failures = 0, n_sat = 0;

  always #5 clk = ~clk;

  error_gain                  g18 (.clk, .rst, .in_valid, .u, .gain, .y(y18), .out_valid(v18));
  error_gain #(.GAIN_FRAC(14)) g14 (.clk, .rst, .in_valid, .u, .gain, .y(y14), .out_valid(v14));

  function automatic longint expect_y(input duty_t uu, input logic [17:0] g, input int frac);
    real r;
    longint q;
    r = real'(uu) / (2.0 ** 18) * real'(g) / (2.0 ** frac);
    q = longint'($floor(r * (2.0 ** 18)));
    if (q > 262143) q = 262143;
    return q;
  endfunction

  task automatic apply(input duty_t uu, input logic [17:0] g);
    longint e18, e14;
    @(negedge clk);
    u = uu; gain = g; in_valid = 1'b1;
    @(negedge clk);
    in_valid = 1'b0;
    e18 = expect_y(uu, g, 18);
    e14 = expect_y(uu, g, 14);
    if (e14 == 262143) n_sat++;
    checks += 2;
    if (!v18 || longint'(y18) != e18) begin
      failures++; $display("FAIL g18 u=%0d g=%0d got=%0d exp=%0d", uu, g, y18, e18);
    end
    if (!v14 || longint'(y14) != e14) begin
      failures++; $display("FAIL g14 u=%0d g=%0d got=%0d exp=%0d", uu, g, y14, e14);
    end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst = 1'b0;
    apply(18'd131072, 18'd262143);          // 0.5 * ~1
    apply(18'd262143, 18'd262143);
    apply(18'd26214, 18'd163840);           // 0.1 * 10 with 14 fraction bits
    apply(18'd0, 18'd200000);
    repeat (4000) apply(duty_t'($urandom), 18'($urandom));
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL coverage"); end
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
