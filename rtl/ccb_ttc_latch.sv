// ccb_ttc_latch: TTCrx snapshot registers CSR12..CSR16.
//
// For testing and debugging, the CCB keeps copies of the TTCrx outputs that
// VME can read:
//   CSR12[11:0] bunch count, latched on BCntStr; [12] BCntStr
//   CSR13[11:0] event count bits 11:0, latched on EvCntLStr; [12] EvCntLStr
//   CSR14[11:0] event count bits 23:12, latched on EvCntHStr; [12] EvCntHStr
//   CSR15[3:0] Brcst<5:2> and [9:8] BCntRes/EvCntRes on BrcstStr1,
//        [5:4] Brcst<7:6> on BrcstStr2, [6]/[7] BrcstStr1/2, [13:10] DQ on
//        DoutStr, [14] DoutStr
//   CSR16 {SubAddr, Dout} on DoutStr
// The strobe bits are the strobe lines registered every clock.  The latched
// counts are also given to the fast control bus for commands 20..23.
// Timing: values update one clock after the strobe.  The bit layout is the
// specification's.
module ccb_ttc_latch
  import ccb_pkg::*;
(
  input  logic        clk,
  input  logic        rst,
  input  ttcrx_t      ttc,
  output logic [15:0] csr12,
  output logic [15:0] csr13,
  output logic [15:0] csr14,
  output logic [15:0] csr15,
  output logic [15:0] csr16,
  output logic [11:0] bcnt_lat,
  output logic [23:0] evcnt_lat
);

  logic [11:0] bcnt_q, evl_q, evh_q;
  logic [3:0]  brcst_lo_q;
  logic [1:0]  brcst_hi_q;
  logic        evres_q, bcres_q;
  logic [3:0]  dq_q;
  logic [7:0]  dout_q, subad_q;
  logic        bstr_q, lstr_q, hstr_q, b1_q, b2_q, dstr_q;

  always_ff @(posedge clk) begin
    if (rst) begin
      bcnt_q <= '0; evl_q <= '0; evh_q <= '0;
      brcst_lo_q <= '0; brcst_hi_q <= '0; evres_q <= 1'b0; bcres_q <= 1'b0;
      dq_q <= '0; dout_q <= '0; subad_q <= '0;
      bstr_q <= 1'b0; lstr_q <= 1'b0; hstr_q <= 1'b0;
      b1_q <= 1'b0; b2_q <= 1'b0; dstr_q <= 1'b0;
    end else begin
      if (ttc.bcnt_str)    bcnt_q <= ttc.bcnt;
      if (ttc.evcnt_l_str) evl_q  <= ttc.bcnt;
      if (ttc.evcnt_h_str) evh_q  <= ttc.bcnt;
      if (ttc.brcst_str1) begin
        brcst_lo_q <= ttc.brcst[5:2];
        evres_q    <= ttc.evcnt_res;
        bcres_q    <= ttc.bcnt_res;
      end
      if (ttc.brcst_str2) brcst_hi_q <= ttc.brcst[7:6];
      if (ttc.dout_str) begin
        dq_q    <= ttc.dq;
        dout_q  <= ttc.dout;
        subad_q <= ttc.subaddr;
      end
      bstr_q <= ttc.bcnt_str;
      lstr_q <= ttc.evcnt_l_str;
      hstr_q <= ttc.evcnt_h_str;
      b1_q   <= ttc.brcst_str1;
      b2_q   <= ttc.brcst_str2;
      dstr_q <= ttc.dout_str;
    end
  end

  assign csr12 = {3'b000, bstr_q, bcnt_q};
  assign csr13 = {3'b000, lstr_q, evl_q};
  assign csr14 = {3'b000, hstr_q, evh_q};
  assign csr15 = {1'b0, dstr_q, dq_q, bcres_q, evres_q, b2_q, b1_q,
                  brcst_hi_q, brcst_lo_q};
  assign csr16 = {subad_q, dout_q};
  assign bcnt_lat  = bcnt_q;
  assign evcnt_lat = {evh_q, evl_q};

endmodule
