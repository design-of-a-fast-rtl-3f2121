// error_gain: applies the tunable processed-error gain.
//
// y = u * gain, with u in ufix18_En18 and gain an unsigned 18-bit number with GAIN_FRAC
// fraction bits. The default GAIN_FRAC = 18 is the gain format of the original model (gains
// below 1); a smaller GAIN_FRAC allows gains above 1. The exact 36-bit product is floored and
// saturated to ufix18_En18.
//
// Timing: one register stage, out_valid one clock after in_valid.
module error_gain
  import sd_ctrl_pkg::*;
#(
  parameter int unsigned GAIN_FRAC = 18
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  duty_t       u,
  input  logic [17:0] gain,
  output duty_t       y,
  output logic        out_valid
);

  logic [35:0]         prod;
  logic signed [127:0] aligned;  // En18

  always_comb begin
    prod    = u * gain;
    aligned = signed'(128'(prod) >> GAIN_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) y <= sat_duty(aligned);
    end
  end

endmodule
