// sd_controller_top: FPGA top of the voltage-sag stabilisation controller.
//
// The stabilisation device injects short current pulses into a weak grid when a fast voltage
// sag occurs. This top holds its control part: the reset manager, the controller datapath
// (sd_controller) and the PWM output stage. The grid voltage tracker supplies 1 MS/s sample
// pairs (vgrid, vref) with a sample_valid strobe; the clock generator supplies the 100 MHz clk
// and dcm_locked; a host supplies error_gain and starting_threshold. pwm_out carries the
// processed error as PWM towards the H-bridge driver (on the prototype board, an LED).
// Two more PWM outputs, pwm_vgrid_mon and pwm_vref_mon, carry the last grid and reference
// samples so that all three signals can be watched with a scope and a low-pass filter on a
// board with few free pins. Their duty is the voltage in offset binary, (v / 512 V + 1) / 2,
// so -512 V, 0 V and +512 V map to 0, 0.5 and 1. Bringing these signals out as PWM follows the
// original test set-up; the offset-binary mapping is this design's choice.
//
// Timing: processed_error and pe_valid follow sample_valid by 6 clocks; the three PWM outputs
// take a new duty value at the start of each PWM period of PWM_PERIOD clocks. The datapath is held in reset
// by the reset manager until the clock is locked and the reset button has been released.
module sd_controller_top
  import sd_ctrl_pkg::*;
#(
  parameter int unsigned PWM_PERIOD = 100
) (
  input  logic        clk,
  input  logic        ext_reset_in,
  input  logic        dcm_locked,
  input  logic        sample_valid,
  input  volt_t       vgrid,
  input  volt_t       vref,
  input  logic [17:0] error_gain,
  input  duty_t       starting_threshold,
  output duty_t       processed_error,
  output logic        pe_valid,
  output logic        pwm_out,
  output logic        pwm_vgrid_mon,
  output logic        pwm_vref_mon,
  output logic        peripheral_aresetn
);

  logic rst;
  logic unused_mb_reset, unused_bus_reset, unused_ic_aresetn;
  logic unused_period_start, unused_ps_vgrid, unused_ps_vref;
  volt_t vgrid_hold, vref_hold;   // last accepted sample, for the monitor outputs

  reset_manager u_reset (
    .slowest_sync_clk     (clk),
    .ext_reset_in         (ext_reset_in),
    .aux_reset_in         (1'b1),
    .mb_debug_sys_rst     (1'b0),
    .dcm_locked           (dcm_locked),
    .mb_reset             (unused_mb_reset),
    .bus_struct_reset     (unused_bus_reset),
    .peripheral_reset     (rst),
    .interconnect_aresetn (unused_ic_aresetn),
    .peripheral_aresetn   (peripheral_aresetn)
  );

  sd_controller u_ctrl (
    .clk, .rst,
    .in_valid           (sample_valid),
    .vgrid, .vref, .error_gain, .starting_threshold,
    .processed_error,
    .out_valid          (pe_valid)
  );

  pwm_generator #(.PERIOD(PWM_PERIOD)) u_pwm (
    .clk, .rst,
    .duty         (processed_error),
    .pwm_out,
    .period_start (unused_period_start)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      vgrid_hold <= '0;
      vref_hold  <= '0;
    end else if (sample_valid) begin
      vgrid_hold <= vgrid;
      vref_hold  <= vref;
    end
  end

  // Offset binary: inverting the sign bit of an sfix18 value gives (v / 2^17 + 1) / 2 as En18.
  pwm_generator #(.PERIOD(PWM_PERIOD)) u_pwm_vgrid (
    .clk, .rst,
    .duty         ({~vgrid_hold[VOLT_W-1], vgrid_hold[VOLT_W-2:0]}),
    .pwm_out      (pwm_vgrid_mon),
    .period_start (unused_ps_vgrid)
  );

  pwm_generator #(.PERIOD(PWM_PERIOD)) u_pwm_vref (
    .clk, .rst,
    .duty         ({~vref_hold[VOLT_W-1], vref_hold[VOLT_W-2:0]}),
    .pwm_out      (pwm_vref_mon),
    .period_start (unused_ps_vref)
  );

endmodule
