// sd_ctrl_pkg: fixed-point types and saturation helpers shared by the voltage-sag controller.
//
// Four number formats run through the datapath (all two's complement or unsigned binary):
//   volt_t  sfix18_En8   grid and reference voltages in volts, range +-512 V
//   norm_t  sfix18_En17  normalised voltages, range [-1, 1)
//   duty_t  ufix18_En18  duty cycle / processed error, range [0, 1)
//   coef_t  sfix96_En94  filter coefficients, range [-2, 2)
//   state_t sfix64_En32  filter states, products and accumulators
// The word and fraction lengths are the ones of the original fixed-point model; the helper
// functions implement floor rounding and saturation, which is this design's choice.
package sd_ctrl_pkg;

  localparam int unsigned VOLT_W     = 18;
  localparam int unsigned VOLT_FRAC  = 8;
  localparam int unsigned NORM_W     = 18;
  localparam int unsigned NORM_FRAC  = 17;
  localparam int unsigned DUTY_W     = 18;
  localparam int unsigned DUTY_FRAC  = 18;
  localparam int unsigned COEF_W     = 96;
  localparam int unsigned COEF_FRAC  = 94;
  localparam int unsigned STATE_W    = 64;
  localparam int unsigned STATE_FRAC = 32;

  typedef logic signed [VOLT_W-1:0]  volt_t;
  typedef logic signed [NORM_W-1:0]  norm_t;
  typedef logic        [DUTY_W-1:0]  duty_t;
  typedef logic signed [COEF_W-1:0]  coef_t;
  typedef logic signed [STATE_W-1:0] state_t;

  // Coefficient set of one direct form II section, a0 = 1 implied.
  typedef struct packed {
    coef_t b0;
    coef_t b1;
    coef_t b2;
    coef_t a1;
    coef_t a2;
  } biquad_coef_t;

  localparam norm_t  NORM_MAX  = norm_t'({1'b0, {(NORM_W-1){1'b1}}});
  localparam norm_t  NORM_MIN  = norm_t'({1'b1, {(NORM_W-1){1'b0}}});
  localparam duty_t  DUTY_MAX  = '1;

  // Saturate a wide signed value (already aligned to En17) into norm_t.
  function automatic norm_t sat_norm(input logic signed [127:0] v);
    if (v > 128'(signed'(NORM_MAX)))      return NORM_MAX;
    else if (v < 128'(signed'(NORM_MIN))) return NORM_MIN;
    else                                  return norm_t'(v);
  endfunction

  // Saturate a wide signed value (already aligned to En18) into duty_t, [0, 1 - 2^-18].
  function automatic duty_t sat_duty(input logic signed [127:0] v);
    if (v < 0)                                     return '0;
    else if (v > 128'(signed'({1'b0, DUTY_MAX})))  return DUTY_MAX;
    else                                           return duty_t'(v);
  endfunction

endpackage
