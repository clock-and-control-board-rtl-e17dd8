// ccb_cmd_decoder: fast-control command decoder.
//
// The six-bit ccb_cmd bus with its strobe can carry up to 63 commands.  This
// block turns each code the CCB itself acts on (the table of fast-control
// codes: BC0, L1 reset, the hard and soft resets, the CFEB calibration and
// anode/cathode test pulses, and the four "send counter" requests) into a
// one-clock pulse on the matching field of a ccb_dec_t.  Codes that are only
// passed on to other boards (start/stop trigger, test enable, pattern
// injection, ...) produce nothing here.
//
// Timing: the pulse appears one clock after the cycle in which strobe is
// high.  The code table is the specification's; registering the output is
// this design's choice.
module ccb_cmd_decoder
  import ccb_pkg::*;
(
  input  logic       clk,
  input  logic       rst,
  input  logic [5:0] cmd,
  input  logic       strobe,
  output ccb_dec_t   dec
);

  ccb_dec_t nxt;

  always_comb begin
    nxt = '0;
    if (strobe) begin
      unique case (cmd)
        CMD_BC0:           nxt.bc0           = 1'b1;
        CMD_L1RESET:       nxt.l1reset       = 1'b1;
        CMD_HARD_RESET:    nxt.hard_reset    = 1'b1;
        CMD_TMB_HR:        nxt.tmb_hr        = 1'b1;
        CMD_ALCT_HR:       nxt.alct_hr       = 1'b1;
        CMD_DMB_HR:        nxt.dmb_hr        = 1'b1;
        CMD_MPC_HR:        nxt.mpc_hr        = 1'b1;
        CMD_CAL0:          nxt.cal[0]        = 1'b1;
        CMD_CAL1:          nxt.cal[1]        = 1'b1;
        CMD_CAL2:          nxt.cal[2]        = 1'b1;
        CMD_CFEB_INITIATE: nxt.cfeb_initiate = 1'b1;
        CMD_ADB_SYNC:      nxt.adb_sync      = 1'b1;
        CMD_ADB_ASYNC:     nxt.adb_async     = 1'b1;
        CMD_CLCT_EXT:      nxt.clct_ext      = 1'b1;
        CMD_ALCT_EXT:      nxt.alct_ext      = 1'b1;
        CMD_SOFT_RESET:    nxt.soft_reset    = 1'b1;
        CMD_DMB_SR:        nxt.dmb_sr        = 1'b1;
        CMD_TMB_SR:        nxt.tmb_sr        = 1'b1;
        CMD_MPC_SR:        nxt.mpc_sr        = 1'b1;
        CMD_SEND_BCNT:     nxt.send_bcnt     = 1'b1;
        CMD_SEND_EV0:      nxt.send_ev0      = 1'b1;
        CMD_SEND_EV1:      nxt.send_ev1      = 1'b1;
        CMD_SEND_EV2:      nxt.send_ev2      = 1'b1;
        CMD_ADB_BOTH:      nxt.adb_both      = 1'b1;
        default:           ;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (rst) dec <= '0;
    else     dec <= nxt;
  end

endmodule
