// ccb_fast_ctrl: the fast control bus (ccb_cmd, ccb_data and their strobes,
// ccb_bcntres, ccb_evcntres).
//
// Two sources feed the bus, chosen by CSR1[0]:
//   * "TTCrx" mode (ttc_mode = 1): ccb_cmd[5:0] and ccb_cmd_strobe follow
//     the TTCrx broadcast Brcst<7:2> and BrcstStr1; ccb_bcntres and
//     ccb_evcntres copy BCntRes and EvCntRes.  ccb_data follows Dout<7:0>
//     when DoutStr comes with DQ = 0 (individually addressed data).
//   * "VME" mode: a write to CSR2 puts CSR2[7:2] on ccb_cmd with a strobe
//     and pulses ccb_bcntres / ccb_evcntres if CSR2[0] / CSR2[1] are set; a
//     write to CSR3 puts CSR3[7:0] on ccb_data with a strobe.
// In either mode the decoded commands 20..23 ("send counter") put one byte
// of the latched TTCrx bunch counter or event counter on ccb_data with a
// data strobe.  The front-panel BCNTRES edge also pulses ccb_bcntres.
//
// Timing: every output is registered; strobes and resets are one clock
// (25 ns) long; ccb_cmd and ccb_data hold their last value.  Using the
// TTCrx counters latched in CSR12..CSR14 as the "counter registers" of
// commands 20..23 is this design's reading; the rest is the specification's.
module ccb_fast_ctrl
  import ccb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  logic        ttc_mode,
  input  ttcrx_t      ttc,
  input  logic        csr2_wr,
  input  logic        csr3_wr,
  input  logic [7:0]  wdata,
  input  logic        send_bcnt,
  input  logic        send_ev0,
  input  logic        send_ev1,
  input  logic        send_ev2,
  input  logic [11:0] bcnt_lat,
  input  logic [23:0] evcnt_lat,
  input  logic        fp_bcntres,
  output logic [5:0]  ccb_cmd,
  output logic        ccb_cmd_strobe,
  output logic [7:0]  ccb_data,
  output logic        ccb_data_strobe,
  output logic        ccb_bcntres,
  output logic        ccb_evcntres
);

  always_ff @(posedge clk) begin
    if (rst) begin
      ccb_cmd         <= '0;
      ccb_cmd_strobe  <= 1'b0;
      ccb_data        <= '0;
      ccb_data_strobe <= 1'b0;
      ccb_bcntres     <= 1'b0;
      ccb_evcntres    <= 1'b0;
    end else begin
      ccb_cmd_strobe  <= 1'b0;
      ccb_data_strobe <= 1'b0;
      ccb_bcntres     <= fp_bcntres;
      ccb_evcntres    <= 1'b0;
      if (ttc_mode) begin
        ccb_bcntres  <= ttc.bcnt_res | fp_bcntres;
        ccb_evcntres <= ttc.evcnt_res;
        if (ttc.brcst_str1) begin
          ccb_cmd        <= ttc.brcst;
          ccb_cmd_strobe <= 1'b1;
        end
        if (ttc.dout_str && ttc.dq == 4'h0) begin
          ccb_data        <= ttc.dout;
          ccb_data_strobe <= 1'b1;
        end
      end else begin
        if (csr2_wr) begin
          ccb_cmd        <= wdata[7:2];
          ccb_cmd_strobe <= 1'b1;
          ccb_bcntres    <= wdata[0] | fp_bcntres;
          ccb_evcntres   <= wdata[1];
        end
        if (csr3_wr) begin
          ccb_data        <= wdata;
          ccb_data_strobe <= 1'b1;
        end
      end
      // Counter transmission (commands 20..23) takes the data bus.
      if (send_bcnt | send_ev0 | send_ev1 | send_ev2) begin
        ccb_data_strobe <= 1'b1;
        if (send_bcnt)     ccb_data <= bcnt_lat[7:0];
        else if (send_ev0) ccb_data <= evcnt_lat[7:0];
        else if (send_ev1) ccb_data <= evcnt_lat[15:8];
        else               ccb_data <= evcnt_lat[23:16];
      end
    end
  end

endmodule
