// biquad_section: one direct form II second-order IIR section.
//
//   v(n) = x(n) - a1*v(n-1) - a2*v(n-2)
//   y(n) = b0*v(n) + b1*v(n-1) + b2*v(n-2)
//
// Input, output, states, products and sums are sfix64_En32; coefficients are sfix96_En94 with
// a0 = 1. Each 96x64-bit product is formed exactly and cut back to sfix64_En32 by dropping the
// 94 extra fraction bits (floor) and wrapping the upper bits, as fixed-point model hardware does
// by default. The structure and the word lengths are those of the original filter; the
// per-product rounding mode is this design's choice.
//
// Timing: the whole section is evaluated in the clock cycle where in_valid is high; y and the
// two states are registered, so out_valid follows in_valid one clock later and y holds between
// samples. The recursion closes within that single cycle.
module biquad_section
  import sd_ctrl_pkg::*;
#(
  // Default: the first section of the controller's high-pass filter (see hp_filter).
  parameter biquad_coef_t COEF = '{b0: 96'h3FED358B4241C60000000000,
                                   b1: 96'h802595112AB5980000000000,
                                   b2: 96'h3FED358B4241C40000000000,
                                   a1: 96'h801A94C8C90DFC0000000000,
                                   a2: 96'h3FE56E9A8BADBA0000000000}
) (
  input  logic   clk,
  input  logic   rst,
  input  logic   in_valid,
  input  state_t x,
  output state_t y,
  output logic   out_valid
);

  state_t v1, v2;   // v(n-1), v(n-2)
  state_t v, y_next;

  // Product of a coefficient and a state value, truncated to sfix64_En32.
  function automatic state_t mul(input coef_t c, input state_t s);
    logic signed [COEF_W+STATE_W-1:0] p;
    p = c * s;
    return state_t'(p >>> COEF_FRAC);
  endfunction

  always_comb begin
    v      = x - mul(COEF.a1, v1) - mul(COEF.a2, v2);
    y_next = mul(COEF.b0, v) + mul(COEF.b1, v1) + mul(COEF.b2, v2);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      v1        <= '0;
      v2        <= '0;
      y         <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        v2 <= v1;
        v1 <= v;
        y  <= y_next;
      end
    end
  end

endmodule
