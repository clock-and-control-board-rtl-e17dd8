// ccb_reload_ctrl: FPGA reload (hard reset) and initialisation (soft reset)
// lines of the reload buses.
//
// Hard resets make the TMB, ALCT, DMB and MPC boards reload their FPGAs
// from EPROM.  Each line is pulsed for 400 ns (HARD_RESET_CLKS clocks) by
//   * its own decoded command (10..13 hex) or VME write (Base+2c..32),
//   * the common "Hard reset" command (04) or VME write (Base+34), or
//   * the front-panel FP_Hard_Reset edge (already masked by the caller),
// the last two pulsing all four lines together.  Soft resets are 25 ns
// (one clock) pulses to DMB, TMB and MPC from their own command (1D/1E/1F)
// or VME write (Base+6a/7e/64), or to all three from the common Soft_reset
// command (1C) or VME write (Base+3c).
//
// Timing: every output rises one clock after its request.  The 400 ns
// length and the sources are the specification's; 16 clocks (399 ns at
// 40.08 MHz) is this design's rounding.
module ccb_reload_ctrl
  import ccb_pkg::*;
#(
  parameter int unsigned HR_CLKS = HARD_RESET_CLKS
) (
  input  logic     clk,
  input  logic     rst,
  input  ccb_dec_t dec,
  input  vme_cmd_t cmd,
  input  logic     fp_hard_reset,
  output logic     tmb_hard_reset,
  output logic     alct_hard_reset,
  output logic     dmb_hard_reset,
  output logic     mpc_hard_reset,
  output logic     tmb_soft_reset,
  output logic     dmb_soft_reset,
  output logic     mpc_soft_reset,
  output logic     any_hard_reset
);

  localparam logic [7:0] LEN = 8'(HR_CLKS);
  logic all_hr;

  assign all_hr = dec.hard_reset | cmd.all_hr | fp_hard_reset;

  ccb_pulse_gen u_tmb  (.clk, .rst, .trig(all_hr | dec.tmb_hr  | cmd.tmb_hr),  .len(LEN), .pulse(tmb_hard_reset));
  ccb_pulse_gen u_alct (.clk, .rst, .trig(all_hr | dec.alct_hr | cmd.alct_hr), .len(LEN), .pulse(alct_hard_reset));
  ccb_pulse_gen u_dmb  (.clk, .rst, .trig(all_hr | dec.dmb_hr  | cmd.dmb_hr),  .len(LEN), .pulse(dmb_hard_reset));
  ccb_pulse_gen u_mpc  (.clk, .rst, .trig(all_hr | dec.mpc_hr  | cmd.mpc_hr),  .len(LEN), .pulse(mpc_hard_reset));

  assign any_hard_reset = tmb_hard_reset | alct_hard_reset | dmb_hard_reset | mpc_hard_reset;

  always_ff @(posedge clk) begin
    if (rst) begin
      tmb_soft_reset <= 1'b0;
      dmb_soft_reset <= 1'b0;
      mpc_soft_reset <= 1'b0;
    end else begin
      tmb_soft_reset <= dec.soft_reset | cmd.soft_reset | dec.tmb_sr | cmd.tmb_sr;
      dmb_soft_reset <= dec.soft_reset | cmd.soft_reset | dec.dmb_sr | cmd.dmb_sr;
      mpc_soft_reset <= dec.soft_reset | cmd.soft_reset | dec.mpc_sr | cmd.mpc_sr;
    end
  end

endmodule
