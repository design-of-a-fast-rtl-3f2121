// tb_reset_manager: self-checking test of the reset manager.
// Checks that reset is held while the clock is not locked, released HOLD_CYCLES plus the
// synchroniser and debounce delay after lock, that a button bounce shorter than EXT_RST_WIDTH
// is ignored, that a long press, an aux (active-low) request and a debug request each cause a
// reset, and that the five outputs always agree.
module tb_reset_manager;

  logic clk = 1'b0;
  logic ext_reset_in = 1'b0, aux_reset_in = 1'b1, mb_debug_sys_rst = 1'b0, dcm_locked = 1'b0;
  logic mb_reset, bus_struct_reset, peripheral_reset, interconnect_aresetn, peripheral_aresetn;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  reset_manager dut (.slowest_sync_clk(clk), .*);

  // Outputs must agree at all times.
  always @(negedge clk) begin
    checks++;
    if (mb_reset != peripheral_reset || bus_struct_reset != peripheral_reset ||
        interconnect_aresetn != ~peripheral_reset || peripheral_aresetn != ~peripheral_reset) begin
      failures++; $display("FAIL outputs disagree");
    end
  end

  // Clocks until peripheral_reset falls, at most lim.
  task automatic wait_release(input int lim, output int n);
    n = 0;
    while (peripheral_reset && n < lim) begin @(negedge clk); n++; end
  endtask

  task automatic expect_cond(input logic c, input string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int n;
    repeat (40) @(negedge clk);
    expect_cond(peripheral_reset, "reset while unlocked");
    dcm_locked = 1'b1;
    wait_release(100, n);
    $display("release %0d clocks after lock", n);
    expect_cond(n >= 16 && n <= 16 + 4, "release delay after lock");
    repeat (5) @(negedge clk);

    // Bounce: 2-clock pulse, shorter than EXT_RST_WIDTH = 4.
    ext_reset_in = 1'b1; repeat (2) @(negedge clk); ext_reset_in = 1'b0;
    repeat (30) begin
      @(negedge clk);
      expect_cond(!peripheral_reset, "short bounce ignored");
    end

    // Long press.
    ext_reset_in = 1'b1; repeat (10) @(negedge clk);
    expect_cond(peripheral_reset, "long press resets");
    ext_reset_in = 1'b0;
    wait_release(100, n);
    expect_cond(n >= 16 && n <= 16 + 4, "release after button");
    repeat (5) @(negedge clk);

    // aux_reset_in is active low.
    aux_reset_in = 1'b0; repeat (10) @(negedge clk);
    expect_cond(peripheral_reset, "aux reset");
    aux_reset_in = 1'b1;
    wait_release(100, n);
    expect_cond(n >= 16 && n <= 20, "release after aux");
    repeat (5) @(negedge clk);

    mb_debug_sys_rst = 1'b1; repeat (4) @(negedge clk);
    expect_cond(peripheral_reset, "debug reset");
    mb_debug_sys_rst = 1'b0;
    wait_release(100, n);
    expect_cond(n >= 16 && n <= 20, "release after debug");

    dcm_locked = 1'b0; repeat (4) @(negedge clk);
    expect_cond(peripheral_reset, "loss of lock resets");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
