// ccb_top: main logic of the Clock and Control Board (CCB), peripheral
// crate version.
//
// The CCB distributes the LHC clock and the fast timing and trigger signals
// of the TTC system to every board of a CSC peripheral crate, and lets the
// crate controller do the same by VME.  Inside:
//   ccb_clock_select  chooses the 40 MHz clock (on-board quartz/2, TTCrx,
//                     front panel, single VME pulse) from CSR1[2:1]
//   ccb_vme_slave     A24/D16 VME slave, geographical or logical address
//   ccb_csr           CSR1..CSR17 and the write-command decode
//   ccb_i2c_bridge    VME path to the PCF8584 that programs the TTCrx
//   ccb_ttc_latch     TTCrx snapshots CSR12..CSR16
//   ccb_fast_ctrl     ccb_cmd / ccb_data buses from TTCrx or VME (CSR1[0])
//   ccb_cmd_decoder   x2: one on the selected ccb_cmd (resets, BC0, L1
//                     reset, counters), one on the raw TTCrx broadcast (the
//                     special purpose buses, which work in both modes)
//   ccb_reload_ctrl   400 ns hard resets, 25 ns soft resets
//   ccb_special_bus   CFEB calibrate, ALCT ADB pulses, direct pretriggers
//   ccb_l1a_ctrl      L1ACC sources, masks, delays, hold, 32-bit counter
//   ccb_aux_pulses    reserved-line pulses, L1 reset, TTCrx reset
//   ccb_pulse_gen     ccb_clock40_enable of CSR4[7:0] clocks
//   ccb_led_ctrl      front-panel LEDs
//
// Boundary conventions: all backplane (GTLP) lines are active low in both
// directions, as are the front-panel outputs; front-panel inputs are active
// high.  TTCrx outputs and backplane inputs are synchronous to the crate
// clock and are registered once; front-panel inputs are asynchronous and
// pass through two-flip-flop synchronisers with edge detection.  por_n is
// the power-up reset; a VME write to Base+28 resets everything except the
// VME slave, so that the write cycle itself completes.
//
// The block structure, register map and signal behaviour follow the CCB
// specification; the register-level timing (each registered stage adds one
// 25 ns clock) is this design's.
module ccb_top
  import ccb_pkg::*;
#(
  parameter int unsigned FW_DAY      = 4,
  parameter int unsigned FW_MONTH    = 8,
  parameter int unsigned FW_YEAR     = 6,
  parameter int unsigned LED_ONESHOT = 2_000_000
) (
  // clocks and reset
  input  logic        clk80_osc,
  input  logic        fp_clk40,
  input  logic        por_n,
  // TTCrx mezzanine
  input  logic        ttc_clk40,
  input  ttcrx_t      ttc,
  output logic        ttcrx_reset_b,
  // VME
  input  logic        vme_as_n,
  input  logic        vme_ds0_n,
  input  logic        vme_ds1_n,
  input  logic        vme_write_n,
  input  logic [5:0]  vme_am,
  input  logic [23:1] vme_addr,
  input  logic [4:0]  vme_ga_n,
  input  logic        geo_mode,
  input  logic [15:0] vme_d_in,
  output logic [15:0] vme_d_out,
  output logic        vme_d_oe,
  output logic        vme_dtack_n,
  // PCF8584 I2C controller
  output logic        pcf_cs_n,
  output logic        pcf_a0,
  output logic        pcf_rw,
  output logic [7:0]  pcf_d_out,
  output logic        pcf_d_oe,
  input  logic [7:0]  pcf_d_in,
  input  logic        pcf_dtack_n,
  output logic        pcf_reset_n,
  output logic        pcf_clk,
  // backplane
  output logic        ccb_clock40,
  input  bp_in_t      bp_in_n,
  output bp_out_t     bp_out_n,
  // front panel
  input  fp_in_t      fp_in,
  output fp_out_t     fp_out_n,
  output led_t        led
);

  // ------------------------------------------------------------ clocking
  logic        clk;
  logic [15:0] csr1, csr2, csr3, csr4, csr5;
  logic        single_pulse;

  ccb_clock_select u_clk (
    .por_n, .clk80_osc, .ttc_clk40, .fp_clk40, .sel(csr1[2:1]), .single_pulse,
    .ccb_clock40, .core_clk(clk)
  );

  // --------------------------------------------------------------- resets
  logic [1:0] por_s;
  logic       por_rst, rst;
  vme_cmd_t   cmd;

  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) por_s <= 2'b11;
    else        por_s <= {por_s[0], 1'b0};
  end
  assign por_rst = por_s[1];
  assign rst     = por_rst | cmd.ccb_reset;

  // --------------------------------------------------- boundary registers
  ttcrx_t ttc_q;
  bp_in_t bp_q;
  fp_in_t fp_lvl, fp_rise;

  always_ff @(posedge clk) begin
    if (rst) begin
      ttc_q <= '0;
      bp_q  <= '0;
    end else begin
      ttc_q <= ttc;
      bp_q  <= ~bp_in_n;
    end
  end

  ccb_sync_edge #(.W($bits(fp_in_t))) u_fp_sync (
    .clk, .rst, .d(fp_in), .level(fp_lvl), .rise(fp_rise)
  );

  logic fp_en;
  assign fp_en = csr1[8];

  // ------------------------------------------------------------------ VME
  logic        bus_req, bus_we, bus_ack, csr_ack, i2c_ack;
  logic [7:0]  bus_addr, i2c_rdata;
  logic [15:0] bus_wdata, bus_rdata, csr_rdata;
  logic        i2c_sel;

  ccb_vme_slave u_vme (
    .clk, .rst(por_rst),
    .as_n(vme_as_n), .ds0_n(vme_ds0_n), .ds1_n(vme_ds1_n), .write_n(vme_write_n),
    .am(vme_am), .addr(vme_addr), .ga_n(vme_ga_n), .geo_mode,
    .d_in(vme_d_in), .d_out(vme_d_out), .d_oe(vme_d_oe), .dtack_n(vme_dtack_n),
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack, .bus_rdata
  );

  assign i2c_sel   = (bus_addr == A_I2C0) || (bus_addr == A_I2C1);
  assign bus_ack   = csr_ack | i2c_ack;
  assign bus_rdata = i2c_sel ? {8'h00, i2c_rdata} : csr_rdata;

  // ------------------------------------------------------- TTCrx latches
  logic [15:0] csr12, csr13, csr14, csr15, csr16;
  logic [11:0] bcnt_lat;
  logic [23:0] evcnt_lat;

  ccb_ttc_latch u_ttc (
    .clk, .rst, .ttc(ttc_q), .csr12, .csr13, .csr14, .csr15, .csr16, .bcnt_lat, .evcnt_lat
  );

  // ------------------------------------------------------------------ CSR
  logic [31:0] l1a_count;
  logic [15:0] cnt_lo, cnt_hi;

  ccb_csr #(.FW_DAY(FW_DAY), .FW_MONTH(FW_MONTH), .FW_YEAR(FW_YEAR)) u_csr (
    .clk, .rst,
    .bus_req, .bus_we, .bus_addr, .bus_wdata, .bus_ack(csr_ack), .bus_rdata(csr_rdata),
    .csr1, .csr2, .csr3, .csr4, .csr5, .cmd,
    .tmb_cfg_done(bp_q.tmb_cfg_done), .alct_cfg_done(bp_q.alct_cfg_done),
    .dmb_cfg_done(bp_q.dmb_cfg_done), .mpc_cfg_done(bp_q.mpc_cfg_done),
    .clct_status(bp_q.clct_status), .alct_status(bp_q.alct_status),
    .dmb_reserved_in(bp_q.dmb_reserved_in), .tmb_reserved_in(bp_q.tmb_reserved_in),
    .fp_rsv(fp_lvl.rsv & {2{fp_en}}),
    .ttc_ready(ttc_q.ready), .ttc_sinerr(ttc_q.sinerr_str), .ttc_dberr(ttc_q.dberr_str),
    .csr12, .csr13, .csr14, .csr15, .csr16,
    .l1a_count, .l1a_cnt_hi(cnt_hi)
  );

  // ------------------------------------------------------------------ I2C
  logic i2c_access;

  ccb_i2c_bridge u_i2c (
    .clk, .rst,
    .bus_req, .bus_we, .bus_addr, .bus_wdata(bus_wdata[7:0]), .bus_ack(i2c_ack), .bus_rdata(i2c_rdata),
    .i2c_reset(cmd.i2c_reset),
    .pcf_cs_n, .pcf_a0, .pcf_rw, .pcf_d_out, .pcf_d_oe, .pcf_d_in, .pcf_dtack_n,
    .pcf_reset_n, .pcf_clk, .access(i2c_access)
  );

  // --------------------------------------------------- fast control bus
  bp_out_t  bp;
  ccb_dec_t dec_sel, dec_ttc, dec_spc;

  ccb_fast_ctrl u_fast (
    .clk, .rst, .ttc_mode(csr1[0]), .ttc(ttc_q),
    .csr2_wr(cmd.csr2_wr), .csr3_wr(cmd.csr3_wr),
    .wdata(cmd.csr2_wr ? csr2[7:0] : csr3[7:0]),
    .send_bcnt(dec_sel.send_bcnt), .send_ev0(dec_sel.send_ev0),
    .send_ev1(dec_sel.send_ev1), .send_ev2(dec_sel.send_ev2),
    .bcnt_lat, .evcnt_lat,
    .fp_bcntres(fp_rise.bcntres & fp_en & ~csr1[14]),
    .ccb_cmd(bp.cmd), .ccb_cmd_strobe(bp.cmd_strobe),
    .ccb_data(bp.data), .ccb_data_strobe(bp.data_strobe),
    .ccb_bcntres(bp.bcntres), .ccb_evcntres(bp.evcntres)
  );

  ccb_cmd_decoder u_dec_sel (.clk, .rst, .cmd(bp.cmd), .strobe(bp.cmd_strobe), .dec(dec_sel));
  ccb_cmd_decoder u_dec_ttc (.clk, .rst, .cmd(ttc_q.brcst), .strobe(ttc_q.brcst_str1), .dec(dec_ttc));

  // In TTCrx mode both decoders see the same command one clock apart; the
  // special buses take the raw TTCrx decode, plus the CSR2 decode in VME mode.
  assign dec_spc = csr1[0] ? dec_ttc : (dec_ttc | dec_sel);

  // BC0 from the decoded command, VME or the front panel.
  always_ff @(posedge clk) begin
    if (rst) begin
      bp.bc0         <= 1'b0;
      single_pulse   <= 1'b0;
    end else begin
      bp.bc0       <= dec_sel.bc0 | cmd.bc0 | (fp_rise.bc0 & fp_en & ~csr1[6]);
      single_pulse <= cmd.clk_pulse & (csr1[2:1] == 2'b11);
    end
  end

  assign bp.ttcrx_ready = ttc_q.ready;

  // ------------------------------------------------------ reload buses
  logic any_hr;

  ccb_reload_ctrl u_reload (
    .clk, .rst, .dec(dec_sel), .cmd,
    .fp_hard_reset(fp_rise.hard_reset & fp_en & ~csr1[15]),
    .tmb_hard_reset(bp.tmb_hard_reset), .alct_hard_reset(bp.alct_hard_reset),
    .dmb_hard_reset(bp.dmb_hard_reset), .mpc_hard_reset(bp.mpc_hard_reset),
    .tmb_soft_reset(bp.tmb_soft_reset), .dmb_soft_reset(bp.dmb_soft_reset),
    .mpc_soft_reset(bp.mpc_soft_reset), .any_hard_reset(any_hr)
  );

  // ---------------------------------------------------- special buses
  logic adb_sync_req, adb_async_req, direct_clct, direct_alct;

  ccb_special_bus u_spc (
    .clk, .rst, .dec(dec_spc), .cmd, .fp_en,
    .fp_cal_rise(fp_rise.cfeb_calibrate),
    .fp_adb_sync_rise(fp_rise.adb_sync),
    .fp_adb_async_rise(fp_rise.adb_async),
    .fp_adb_async_raw(fp_in.adb_async),
    .fp_clct_rise(fp_rise.clct_ext), .fp_alct_rise(fp_rise.alct_ext),
    .cfeb_calibrate(bp.cfeb_calibrate),
    .adb_pulse_sync(bp.adb_pulse_sync), .adb_pulse_async(bp.adb_pulse_async),
    .adb_sync_req, .adb_async_req, .direct_clct, .direct_alct
  );

  // -------------------------------------------------- L1ACC / pretriggers
  logic hold, l1a_req;

  ccb_l1a_ctrl u_l1a (
    .clk, .rst, .csr1, .csr4, .csr5,
    .src_ttc(ttc_q.l1accept), .src_vme(cmd.l1a), .src_tmb(bp_q.tmb_l1a_request),
    .src_fp(fp_rise.l1accept), .src_adb_sync(adb_sync_req), .src_adb_async(adb_async_req),
    .direct_clct, .direct_alct,
    .cfeb_initiate(dec_spc.cfeb_initiate | cmd.cfeb_initiate),
    .dmb_release(bp_q.dmb_l1a_release), .tmb_release(bp_q.tmb_l1a_release),
    .vme_release(cmd.release_hold),
    .cnt_clr(cmd.cnt_clr), .cnt_en(cmd.cnt_en), .cnt_dis(cmd.cnt_dis), .cnt_latch(cmd.cnt_latch),
    .cnt_value(l1a_count), .cnt_lo, .cnt_hi,
    .l1accept(bp.l1accept), .clct_ext_trig(bp.clct_ext_trig), .alct_ext_trig(bp.alct_ext_trig),
    .hold, .l1a_req
  );

  // ------------------------------------------------- reserved lines etc.
  logic fp_rsv_out0;

  ccb_aux_pulses u_aux (
    .clk, .rst, .cmd, .dec_l1reset(dec_sel.l1reset),
    .ccb_reserved(bp.ccb_reserved), .tmb_reserved0(bp.tmb_reserved0),
    .tmb_reserved_out(bp.tmb_reserved_out), .dmb_reserved(bp.dmb_reserved),
    .dmb_reserved_out(bp.dmb_reserved_out), .mpc_reserved(bp.mpc_reserved),
    .fp_reserved_out0(fp_rsv_out0), .l1reset(bp.l1reset), .ttcrx_reset_b
  );

  // ccb_clock40_enable: CSR4[7:0] clocks on Base+58 or a front-panel edge.
  ccb_pulse_gen u_clken (
    .clk, .rst, .trig(cmd.clk_en | (fp_rise.clock40_enable & fp_en)),
    .len(csr4[7:0]), .pulse(bp.clock40_enable)
  );

  // ------------------------------------------------------------ outputs
  assign bp_out_n = ~bp;

  fp_out_t fp;
  always_comb begin
    fp.clct_status   = bp_q.clct_status;
    fp.alct_status   = bp_q.alct_status;
    fp.bc0           = bp.bc0;
    fp.l1accept      = bp.l1accept;
    fp.cmdstr        = bp.cmd_strobe;
    fp.reserved_out0 = fp_rsv_out0;
  end
  assign fp_out_n = ~fp;

  ccb_led_ctrl #(.ONESHOT(LED_ONESHOT)) u_led (
    .clk, .rst,
    .ev_l1a(bp.l1accept), .ev_bc0(bp.bc0), .ev_hr(any_hr), .ev_i2c(i2c_access),
    .ev_vme(bus_req), .ev_siner(ttc_q.sinerr_str), .ev_dber(ttc_q.dberr_str),
    .mode(csr1[0]), .ttc_ready(ttc_q.ready), .led
  );

endmodule
