// hp_filter: high-pass filter that removes the grid-frequency residue from the error signal.
//
// A fourth-order inverted Chebyshev (Chebyshev type II) high-pass built from two cascaded
// direct form II biquad sections. The default coefficients are a minimum-order design for a
// 1 MS/s sample rate with an 80 Hz stopband edge, 200 Hz passband edge and 40 dB stopband
// attenuation: order 4, zeros on the unit circle at about 31 Hz and 74 Hz, poles just inside
// it. All gain sits in the first section. Coefficients are sfix96_En94, rounded to nearest.
// The poles lie within 1e-3 of z = 1, so the section states grow to about 1e6 times the input
// at low frequencies; the 32 integer bits of the states hold that.
//
// Interface: sfix18_En17 in and out. The input is widened to sfix64_En32; the section outputs
// stay sfix64_En32 between sections; the result is floored and saturated back to sfix18_En17.
// The filter specification, the section structure and the word lengths follow the original
// design; the coefficient values are recomputed from that specification, and the sfix64_En32
// section interface is this design's choice.
//
// Timing: two clocks from in_valid to out_valid (one per section); one sample may enter every
// clock.
module hp_filter
  import sd_ctrl_pkg::*;
#(
  parameter biquad_coef_t SEC1 = '{
    b0: 96'h3FED358B4241C60000000000,   //  0.99885309791082
    b1: 96'h802595112AB5980000000000,   // -1.99770615886260
    b2: 96'h3FED358B4241C40000000000,   //  0.99885309791082
    a1: 96'h801A94C8C90DFC0000000000,   // -1.99837761299185
    a2: 96'h3FE56E9A8BADBA0000000000},  //  0.99837842075678
  parameter biquad_coef_t SEC2 = '{
    b0: 96'h400000000000000000000000,   //  1.0
    b1: 96'h800000E79047340000000000,   // -1.99999978433960
    b2: 96'h400000000000000000000000,   //  1.0
    a1: 96'h800B06B536A0F40000000000,   // -1.99932701400165
    a2: 96'h3FF4FD6E4C7B2C0000000000}   //  0.99932800074923
) (
  input  logic  clk,
  input  logic  rst,
  input  logic  in_valid,
  input  norm_t x,
  output norm_t y,
  output logic  out_valid
);

  state_t x_wide, y1, y2;
  logic   v1;

  assign x_wide = state_t'(x) <<< (STATE_FRAC - NORM_FRAC);

  biquad_section #(.COEF(SEC1)) u_sec1 (
    .clk, .rst, .in_valid, .x(x_wide), .y(y1), .out_valid(v1)
  );

  biquad_section #(.COEF(SEC2)) u_sec2 (
    .clk, .rst, .in_valid(v1), .x(y1), .y(y2), .out_valid
  );

  assign y = sat_norm(128'(y2) >>> (STATE_FRAC - NORM_FRAC));

endmodule
