// dead_zone: starting threshold of the sag controller (a dynamic dead zone).
//
//   y = u - up   if u > up
//   y = 0        if lo <= u <= up
//   y = u - lo   if u < lo
//
// With lo = 0 and the unsigned input used in the controller, small sag measures are zeroed and
// larger ones pass reduced by the threshold, so the inverter only acts on significant sags.
// All values are ufix18_En18; a negative result (only possible for u < lo) saturates to 0.
// The dead-zone law and the two threshold inputs follow the original model; the saturation of
// the lower branch is this design's choice.
//
// Timing: one register stage, out_valid one clock after in_valid. Thresholds may change at
// any time and are used in the cycle where in_valid is high.
module dead_zone
  import sd_ctrl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  duty_t u,
  input  duty_t up,
  input  duty_t lo,
  output duty_t y,
  output logic  out_valid
);

  logic signed [127:0] diff;

  always_comb begin
    if (u > up)       diff = 128'(u) - 128'(up);
    else if (u < lo)  diff = 128'(u) - 128'(lo);
    else              diff = '0;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sat_duty(diff);
    end
  end

endmodule
