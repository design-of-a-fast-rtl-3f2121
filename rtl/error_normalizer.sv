// error_normalizer: error calculation and normalizer of the sag controller.
//
// The error is the reference (clean PLL sine) minus the measured grid voltage, so during the
// positive half cycle a sag gives a positive error. The difference of the two sfix18_En8 inputs
// is formed exactly in 19 bits, multiplied by the unsigned constant NORM_GAIN (NORM_GAIN_FRAC
// fraction bits) and brought to sfix18_En17 with floor rounding and saturation.
// The default gain is 1/456: 456 V is the largest grid amplitude the design expects
// (230 Vrms with a 40 % margin), so a full-scale grid voltage maps to 1.0. That exact value, the
// gain format, floor rounding and saturation are this design's choices.
//
// Timing: one register stage. out_valid follows in_valid one clock later; the output holds
// between samples.
module error_normalizer
  import sd_ctrl_pkg::*;
#(
  parameter logic [17:0] NORM_GAIN      = 18'd147170,  // round(2^26 / 456)
  parameter int unsigned NORM_GAIN_FRAC = 26
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  volt_t vgrid,
  input  volt_t vref,
  output norm_t err_norm,
  output logic  out_valid
);

  logic signed [VOLT_W:0]        err;     // sfix19_En8, exact
  logic signed [VOLT_W+18:0]     scaled;  // En(8 + NORM_GAIN_FRAC)
  logic signed [127:0]           aligned; // En17

  always_comb begin
    err     = (VOLT_W+1)'(vref) - (VOLT_W+1)'(vgrid);
    scaled  = err * $signed({1'b0, NORM_GAIN});
    aligned = 128'(scaled) >>> (VOLT_FRAC + NORM_GAIN_FRAC - NORM_FRAC);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      err_norm  <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err_norm <= sat_norm(aligned);
    end
  end

endmodule
