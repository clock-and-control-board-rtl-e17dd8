// ccb_l1a_ctrl: L1ACC and pretrigger sources, delays, hold mode and counter.
//
// Six request sources can make an L1ACC, each with a mask bit in CSR1
// ("1" disables):
//   TTCrx L1Accept (CSR1[3]), VME write to Base+2a (CSR1[4]), backplane
//   tmb_l1a_request (CSR1[5]), front-panel External_L1ACC (CSR1[7], and the
//   front panel must be enabled by CSR1[8]), any ALCT_adb_pulse_sync source
//   (CSR1[11]) and any ALCT_adb_pulse_async source (CSR1[12]).
// The OR of the enabled requests is counted by a 32-bit counter and enters
// two delay lines: the L1ACC line (CSR5[7:0] clocks) and the pretrigger
// line (CSR5[15:8] clocks) which makes ALCT_external_trigger (mask CSR1[9])
// and CLCT_external_trigger (mask CSR1[10]).  Direct pretrigger requests
// (TTC commands 1A/1B, VME writes, front panel) bypass the delay.
//
// Hold mode: while `hold` is set the delayed L1ACC and pretriggers are not
// sent.  It is set by dmb_cfeb_initiate (TTC command 17 or VME Base+5a), and,
// when CSR1[13] = 0, by the first L1ACC sent to the backplane.  It is cleared
// by dmb_l1a_release (unless CSR4[9]), tmb_l1a_release (unless CSR4[8]) or a
// VME write to Base+5c; a release wins over a set in the same clock.
//
// Timing: a request pulse in clock t gives l1accept in clock t + n + 1 for
// CSR5[7:0] = n (1..255), and likewise for the pretriggers with CSR5[15:8].
// Direct pretriggers appear one clock after their request.  Source list,
// masks, delays, hold and counter are the specification's; the exact
// pipeline and the priority of release over set are this design's.
module ccb_l1a_ctrl (
  input  logic        clk,
  input  logic        rst,
  input  logic [15:0] csr1,
  input  logic [15:0] csr4,
  input  logic [15:0] csr5,
  // L1ACC request sources (one-clock pulses)
  input  logic        src_ttc,
  input  logic        src_vme,
  input  logic        src_tmb,
  input  logic        src_fp,
  input  logic        src_adb_sync,
  input  logic        src_adb_async,
  // direct pretrigger requests
  input  logic        direct_clct,
  input  logic        direct_alct,
  // hold control
  input  logic        cfeb_initiate,
  input  logic        dmb_release,
  input  logic        tmb_release,
  input  logic        vme_release,
  // counter control
  input  logic        cnt_clr,
  input  logic        cnt_en,
  input  logic        cnt_dis,
  input  logic        cnt_latch,
  output logic [31:0] cnt_value,
  output logic [15:0] cnt_lo,
  output logic [15:0] cnt_hi,
  // backplane
  output logic        l1accept,
  output logic        clct_ext_trig,
  output logic        alct_ext_trig,
  output logic        hold,
  output logic        l1a_req
);

  logic l1a_dly, pt_dly, l1a_pass, pt_pass, release_any, counting;

  assign l1a_req = (src_ttc       & ~csr1[3])
                 | (src_vme       & ~csr1[4])
                 | (src_tmb       & ~csr1[5])
                 | (src_fp        & ~csr1[7] & csr1[8])
                 | (src_adb_sync  & ~csr1[11])
                 | (src_adb_async & ~csr1[12]);

  ccb_delay_line u_l1a_dly (.clk, .rst, .din(l1a_req), .delay(csr5[7:0]),  .dout(l1a_dly));
  ccb_delay_line u_pt_dly  (.clk, .rst, .din(l1a_req), .delay(csr5[15:8]), .dout(pt_dly));

  assign l1a_pass    = l1a_dly & ~hold;
  assign pt_pass     = pt_dly  & ~hold;
  assign release_any = (dmb_release & ~csr4[9]) | (tmb_release & ~csr4[8]) | vme_release;

  always_ff @(posedge clk) begin
    if (rst) begin
      hold          <= 1'b0;
      l1accept      <= 1'b0;
      clct_ext_trig <= 1'b0;
      alct_ext_trig <= 1'b0;
    end else begin
      if (release_any)                                hold <= 1'b0;
      else if (cfeb_initiate || (l1a_pass && !csr1[13])) hold <= 1'b1;
      l1accept      <= l1a_pass;
      clct_ext_trig <= (pt_pass & ~csr1[10]) | direct_clct;
      alct_ext_trig <= (pt_pass & ~csr1[9])  | direct_alct;
    end
  end

  ccb_l1a_counter u_cnt (
    .clk, .rst, .l1a_req, .clr(cnt_clr), .enable(cnt_en), .disable_cnt(cnt_dis),
    .latch(cnt_latch), .count(cnt_value), .counting, .lo(cnt_lo), .hi(cnt_hi)
  );

endmodule
