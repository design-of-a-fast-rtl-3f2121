// reset_manager: debounces and synchronises the board reset for the 100 MHz clock domain.
//
// Four reset requests are synchronised with two flip-flops each: the push button
// ext_reset_in (active high), aux_reset_in (active low), the debug reset mb_debug_sys_rst
// (active high) and the lock flag of the clock generator (reset while it is low). The button and
// aux requests count only after they have been stable for EXT_RST_WIDTH / AUX_RST_WIDTH clocks,
// which filters contact bounce shorter than that. While any request is active all outputs are
// in reset; after the last one ends they stay in reset for HOLD_CYCLES more clocks and are then
// released together, synchronously. Outputs come straight from flip-flops.
//
// The need for debouncing, synchronisation and lock-gating comes from the original board design,
// as do the port names. Widths, hold time, two-flop synchronisers and releasing all outputs at
// once are this design's choices.
module reset_manager #(
  parameter int unsigned EXT_RST_WIDTH = 4,
  parameter int unsigned AUX_RST_WIDTH = 4,
  parameter int unsigned HOLD_CYCLES   = 16
) (
  input  logic slowest_sync_clk,
  input  logic ext_reset_in,
  input  logic aux_reset_in,
  input  logic mb_debug_sys_rst,
  input  logic dcm_locked,
  output logic mb_reset,
  output logic bus_struct_reset,
  output logic peripheral_reset,
  output logic interconnect_aresetn,
  output logic peripheral_aresetn
);

  localparam int unsigned EW = $clog2(EXT_RST_WIDTH + 1);
  localparam int unsigned AW = $clog2(AUX_RST_WIDTH + 1);
  localparam int unsigned HW = $clog2(HOLD_CYCLES + 1);

  logic [1:0] ext_sync, aux_sync, dbg_sync, lock_sync;
  logic [EW-1:0] ext_cnt;
  logic [AW-1:0] aux_cnt;
  logic ext_req, aux_req, req;
  logic [HW-1:0] hold_cnt;
  logic in_reset;

  always_ff @(posedge slowest_sync_clk) begin
    ext_sync  <= {ext_sync[0],  ext_reset_in};
    aux_sync  <= {aux_sync[0],  ~aux_reset_in};
    dbg_sync  <= {dbg_sync[0],  mb_debug_sys_rst};
    lock_sync <= {lock_sync[0], dcm_locked};
  end

  // Debounce: a request is taken only after it has been stable for the full width, and it is
  // dropped as soon as the synchronised input goes inactive.
  always_ff @(posedge slowest_sync_clk) begin
    if (!ext_sync[1])                     ext_cnt <= '0;
    else if (ext_cnt != EW'(EXT_RST_WIDTH)) ext_cnt <= ext_cnt + 1'b1;
    if (!aux_sync[1])                     aux_cnt <= '0;
    else if (aux_cnt != AW'(AUX_RST_WIDTH)) aux_cnt <= aux_cnt + 1'b1;
  end

  assign ext_req = (ext_cnt == EW'(EXT_RST_WIDTH));
  assign aux_req = (aux_cnt == AW'(AUX_RST_WIDTH));
  assign req     = ext_req | aux_req | dbg_sync[1] | ~lock_sync[1];

  always_ff @(posedge slowest_sync_clk) begin
    if (req) begin
      hold_cnt <= '0;
      in_reset <= 1'b1;
    end else if (hold_cnt != HW'(HOLD_CYCLES)) begin
      hold_cnt <= hold_cnt + 1'b1;
      in_reset <= 1'b1;
    end else begin
      in_reset <= 1'b0;
    end
  end

  assign mb_reset             = in_reset;
  assign bus_struct_reset     = in_reset;
  assign peripheral_reset     = in_reset;
  assign interconnect_aresetn = ~in_reset;
  assign peripheral_aresetn   = ~in_reset;

endmodule
