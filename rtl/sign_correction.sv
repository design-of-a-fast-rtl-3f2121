// sign_correction: turns the filtered error into a sag measure valid in both half cycles.
//
// A positive error means a sag in the positive half cycle but a swell in the negative one, so
// the filtered error is multiplied by sign(Vgrid) (-1, 0 or +1). Correcting after the filter
// keeps the jumps of the sign out of the filter. The product goes into the unsigned duty
// format ufix18_En18 with saturation, which bounds it to [0, 1): swells give 0.
//
// vgrid_sign must be the grid sample belonging to the filtered value. Following the original
// model the sign is taken of the grid voltage itself; saturating instead of wrapping is this
// design's reading of "bounded between 0 and 1".
//
// Timing: one register stage, out_valid one clock after in_valid.
module sign_correction
  import sd_ctrl_pkg::*;
(
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  norm_t filt,        // sfix18_En17
  input  volt_t vgrid,       // sfix18_En8, only its sign is used
  output duty_t sag,         // ufix18_En18
  output logic  out_valid
);

  logic signed [1:0]   sgn;
  logic signed [127:0] prod;  // En18

  always_comb begin
    if (vgrid > 0)       sgn = 2'sd1;
    else if (vgrid < 0)  sgn = -2'sd1;
    else                 sgn = 2'sd0;
    prod = (128'(filt) * 128'(sgn)) <<< (DUTY_FRAC - NORM_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sag       <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) sag <= sat_duty(prod);
    end
  end

endmodule
