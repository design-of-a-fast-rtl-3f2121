// sd_controller: the sag controller datapath, from grid samples to the processed error.
//
// Each 1 MS/s sample pair (measured grid voltage, PLL reference) passes through
//   error_normalizer  Vref - Vgrid, scaled to [-1, 1)            1 clock
//   hp_filter         4th-order high-pass, removes the 50 Hz part  2 clocks
//   sign_correction   times sign(Vgrid), clamped to [0, 1)         1 clock
//   dead_zone         minus the starting threshold, 0 below it     1 clock
//   error_gain        times the processed-error gain               1 clock
// and leaves as processed_error, a duty cycle in ufix18_En18. This chain and its number formats
// follow the original controller model. Each stage is registered, so processed_error follows
// a sample by LATENCY = 6 clocks (60 ns at 100 MHz), well inside one 1 us sample period.
// That register placement is this design's choice.
//
// The grid sample is carried alongside the pipeline so that the sign used in sign_correction
// belongs to the same sample as the filtered error. The lower dead-zone threshold is the
// constant LOWER_THRESHOLD (0 in the original model); error_gain and starting_threshold are
// run-time inputs, meant to be written by a host.
module sd_controller
  import sd_ctrl_pkg::*;
#(
  parameter logic [17:0]  NORM_GAIN       = 18'd147170,
  parameter int unsigned  NORM_GAIN_FRAC  = 26,
  parameter int unsigned  GAIN_FRAC       = 18,
  parameter duty_t        LOWER_THRESHOLD = '0
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        in_valid,
  input  volt_t       vgrid,
  input  volt_t       vref,
  input  logic [17:0] error_gain,
  input  duty_t       starting_threshold,
  output duty_t       processed_error,
  output logic        out_valid
);

  localparam int unsigned LATENCY = 6;

  norm_t err_norm, filt;
  duty_t sag, dz;
  logic  v_norm, v_filt, v_sag, v_dz;
  volt_t vgrid_d [3];  // grid sample aligned with the filter output

  error_normalizer #(.NORM_GAIN(NORM_GAIN), .NORM_GAIN_FRAC(NORM_GAIN_FRAC)) u_norm (
    .clk, .rst, .in_valid, .vgrid, .vref, .err_norm, .out_valid(v_norm)
  );

  hp_filter u_filt (
    .clk, .rst, .in_valid(v_norm), .x(err_norm), .y(filt), .out_valid(v_filt)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      vgrid_d <= '{default: '0};
    end else begin
      vgrid_d[0] <= vgrid;
      vgrid_d[1] <= vgrid_d[0];
      vgrid_d[2] <= vgrid_d[1];
    end
  end

  sign_correction u_sign (
    .clk, .rst, .in_valid(v_filt), .filt, .vgrid(vgrid_d[2]), .sag, .out_valid(v_sag)
  );

  dead_zone u_dz (
    .clk, .rst, .in_valid(v_sag), .u(sag), .up(starting_threshold), .lo(LOWER_THRESHOLD),
    .y(dz), .out_valid(v_dz)
  );

  error_gain #(.GAIN_FRAC(GAIN_FRAC)) u_gain (
    .clk, .rst, .in_valid(v_dz), .u(dz), .gain(error_gain), .y(processed_error), .out_valid
  );

  // Fixed pipeline latency: every accepted sample produces an output LATENCY clocks later.
  a_latency: assert property (@(posedge clk) disable iff (rst) in_valid |-> ##LATENCY out_valid);

endmodule
