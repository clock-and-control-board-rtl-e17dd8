// ccb_special_bus: DAQ and trigger special purpose buses.
//
// DAQ bus: dmb_cfeb_calibrate[2:0] are 25 ns pulses made by TTC commands
// 14..16, VME writes to Base+48/4a/4c, or rising edges of the front-panel
// calibrate inputs.
// Trigger bus:
//   * ALCT_adb_pulse_sync: command 18, VME Base+40, front-panel edge, or
//     the "both" request (command 25, Base+3e); stretched to 500 ns
//     (ADB_CLKS clocks) before the backplane.
//   * ALCT_adb_pulse_async: command 19, Base+42, or "both" give a one-clock
//     pulse; the front-panel input is passed through as it is (gated only by
//     the front-panel enable), so it keeps the length of its source and is
//     not tied to the clock.
//   * direct CLCT/ALCT_external_trigger requests: command 1A/1B, Base+44/46
//     or front-panel edge.
// Each ADB source also raises a one-clock L1ACC request (adb_sync_req,
// adb_async_req) for the L1ACC logic.  None of this depends on CSR1[0].
//
// Timing: registered outputs rise one clock after their request; the
// front-panel async path is combinational.  Sources and lengths are the
// specification's; the one-clock length of the TTC/VME async pulse is this
// design's choice.
module ccb_special_bus
  import ccb_pkg::*;
#(
  parameter int unsigned ADB_CLKS = ADB_SYNC_CLKS
) (
  input  logic       clk,
  input  logic       rst,
  input  ccb_dec_t   dec,
  input  vme_cmd_t   cmd,
  input  logic       fp_en,          // CSR1[8]
  input  logic [2:0] fp_cal_rise,
  input  logic       fp_adb_sync_rise,
  input  logic       fp_adb_async_rise,
  input  logic       fp_adb_async_raw,
  input  logic       fp_clct_rise,
  input  logic       fp_alct_rise,
  output logic [2:0] cfeb_calibrate,
  output logic       adb_pulse_sync,
  output logic       adb_pulse_async,
  output logic       adb_sync_req,
  output logic       adb_async_req,
  output logic       direct_clct,
  output logic       direct_alct
);

  logic sync_trig, async_trig, async_q;

  assign sync_trig  = dec.adb_sync  | dec.adb_both | cmd.adb_sync  | cmd.adb_both
                    | (fp_en & fp_adb_sync_rise);
  assign async_trig = dec.adb_async | dec.adb_both | cmd.adb_async | cmd.adb_both;

  ccb_pulse_gen u_sync (.clk, .rst, .trig(sync_trig), .len(8'(ADB_CLKS)), .pulse(adb_pulse_sync));

  always_ff @(posedge clk) begin
    if (rst) begin
      cfeb_calibrate <= '0;
      async_q        <= 1'b0;
      adb_sync_req   <= 1'b0;
      adb_async_req  <= 1'b0;
      direct_clct    <= 1'b0;
      direct_alct    <= 1'b0;
    end else begin
      cfeb_calibrate <= dec.cal | cmd.cal | (fp_cal_rise & {3{fp_en}});
      async_q        <= async_trig;
      adb_sync_req   <= sync_trig;
      adb_async_req  <= async_trig | (fp_en & fp_adb_async_rise);
      direct_clct    <= dec.clct_ext | cmd.clct_ext | (fp_en & fp_clct_rise);
      direct_alct    <= dec.alct_ext | cmd.alct_ext | (fp_en & fp_alct_rise);
    end
  end

  assign adb_pulse_async = async_q | (fp_en & fp_adb_async_raw);

endmodule
