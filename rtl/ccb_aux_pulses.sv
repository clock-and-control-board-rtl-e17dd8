// ccb_aux_pulses: reserved-line pulses and the TTCrx reset.
//
// Lines reserved for future use carry a 25 ns pulse, synchronous with the
// selected 40 MHz clock, on a VME write to their address:
// ccb_reserved[3:1] (Base+82..86), tmb_reserved[0] (7c),
// tmb_reserved_out[2:0] (76..7a), dmb_reserved[1:0] (66, 68),
// dmb_reserved_out[4:0] (6c..74), mpc_reserved[1:0] (60, 62), the
// front-panel FP_RSV1_OUT (8a), and L1 Reset (88, also from command 03).
// A write to Base+26 resets the TTCrx ASIC: Reset_b is held low for
// TTC_RST_CLKS clocks.
//
// Timing: outputs are registered, one clock after the command pulse.
// Addresses and lengths are the specification's except the TTCrx reset
// length, which is this design's choice.
module ccb_aux_pulses
  import ccb_pkg::*;
#(
  parameter int unsigned TTC_RST_CLKS = 16
) (
  input  logic       clk,
  input  logic       rst,
  input  vme_cmd_t   cmd,
  input  logic       dec_l1reset,
  output logic [3:1] ccb_reserved,
  output logic       tmb_reserved0,
  output logic [2:0] tmb_reserved_out,
  output logic [1:0] dmb_reserved,
  output logic [4:0] dmb_reserved_out,
  output logic [1:0] mpc_reserved,
  output logic       fp_reserved_out0,
  output logic       l1reset,
  output logic       ttcrx_reset_b
);

  logic ttc_rst_pulse;

  always_ff @(posedge clk) begin
    if (rst) begin
      ccb_reserved     <= '0;
      tmb_reserved0    <= 1'b0;
      tmb_reserved_out <= '0;
      dmb_reserved     <= '0;
      dmb_reserved_out <= '0;
      mpc_reserved     <= '0;
      fp_reserved_out0 <= 1'b0;
      l1reset          <= 1'b0;
    end else begin
      ccb_reserved     <= cmd.ccb_rsv;
      tmb_reserved0    <= cmd.tmb_rsv0;
      tmb_reserved_out <= cmd.tmb_rsv_out;
      dmb_reserved     <= cmd.dmb_rsv;
      dmb_reserved_out <= cmd.dmb_rsv_out;
      mpc_reserved     <= cmd.mpc_rsv;
      fp_reserved_out0 <= cmd.fp_rsv1_out;
      l1reset          <= cmd.l1reset | dec_l1reset;
    end
  end

  ccb_pulse_gen u_ttc_rst (.clk, .rst, .trig(cmd.ttc_reset), .len(8'(TTC_RST_CLKS)), .pulse(ttc_rst_pulse));
  assign ttcrx_reset_b = ~ttc_rst_pulse;

endmodule
