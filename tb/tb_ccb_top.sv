// tb_ccb_top: end-to-end test of the whole CCB at its default parameters.
//
// The board is driven only through its pins: an 80 MHz quartz, TTCrx
// outputs, VME A24/D16 cycles, backplane inputs and front-panel inputs, with
// a PCF8584 bus model on the I2C controller port.  A monitor samples every
// backplane output half a clock after each core clock edge and records, per
// line, how many pulses it made, when the last one started and how long it
// was.  The test
// then walks through the board's mechanisms: power-up state, VME-mode and
// TTCrx-mode fast-control commands and the switch between them, hard
// (400 ns) and soft (25 ns) resets, programmable L1ACC and pretrigger
// delays, source masks, the L1ACC counter, hold mode with its three
// releases, direct pretriggers, calibrate pulses, 500 ns ADB sync and ADB
// async pulses, the send-counter commands, I2C access to the TTCrx
// controller, sticky status bits, clock40_enable, TTCrx reset, reserved
// lines, L1 reset, front-panel inputs, LEDs, geographical addressing, the
// four clock sources with the single-pulse mode, and the CCB reset.  Each
// mechanism that is seen working is counted; one never seen is a failure.
// Expected values come from the register map and pulse lengths, not from
// the design's internals.  Latencies are measured from the clock edge at
// which the board samples a TTCrx input: an L1ACC delay of n clocks gives
// the backplane L1ACC n + 1 clocks later (one clock for the input register).
module tb_ccb_top;
  import ccb_pkg::*;

  logic        clk80_osc = 1'b0, fp_clk40 = 1'b0, ttc_clk40 = 1'b0, por_n = 1'b1;
  ttcrx_t      ttc = '0;
  logic        ttcrx_reset_b;
  logic        vme_as_n = 1, vme_ds0_n = 1, vme_ds1_n = 1, vme_write_n = 1;
  logic [5:0]  vme_am = 6'h39;
  logic [23:1] vme_addr = '0;
  logic [4:0]  vme_ga_n = ~5'd12;
  logic        geo_mode = 1'b0;
  logic [15:0] vme_d_in = '0, vme_d_out;
  logic        vme_d_oe, vme_dtack_n;
  logic        pcf_cs_n, pcf_a0, pcf_rw, pcf_d_oe, pcf_dtack_n, pcf_reset_n, pcf_clk;
  logic [7:0]  pcf_d_out, pcf_d_in;
  logic        ccb_clock40;
  bp_in_t      bp_in_n = '1;
  bp_out_t     bp_out_n;
  fp_in_t      fp_in = '0;
  fp_out_t     fp_out_n;
  led_t        led;

  ccb_top dut (.*);

  pcf8584_model #(.DELAY(3)) u_pcf (
    .clk(pcf_clk), .reset_n(pcf_reset_n), .cs_n(pcf_cs_n), .a0(pcf_a0), .rw(pcf_rw),
    .d_in(pcf_d_out), .d_out(pcf_d_in), .dtack_n(pcf_dtack_n), .mute(1'b0)
  );

  always #6.25 clk80_osc = ~clk80_osc;   // 80 MHz quartz
  always #12   ttc_clk40 = ~ttc_clk40;   // TTCrx clock, 24 ns here to tell it apart
  always #13   fp_clk40  = ~fp_clk40;    // front-panel clock, 26 ns

  wire tclk = dut.clk;                   // the board's core clock

  int checks = 0, failures = 0;
  int mech [string];
  int cyc = 0;

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (t=%0t)", msg, $time); end
  endtask

  task automatic seen(input string m, input bit cond, input string msg);
    chk(cond, {m, ": ", msg});
    if (cond) mech[m]++;
  endtask

  initial begin
    #2ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ monitor
  localparam int NB = $bits(bp_out_t);
  bp_out_t act;
  assign act = ~bp_out_n;
  logic [NB-1:0] prev = '0;
  int np [NB], st [NB], len [NB];
  logic [5:0] last_cmd;
  logic [7:0] last_data;
  int  rb_low = 0, rb_len = 0;
  logic rb_prev = 1'b1;

  initial foreach (np[i]) begin np[i] = 0; st[i] = 0; len[i] = 0; end

  always @(posedge tclk) cyc <= cyc + 1;

  // Sampled half a clock after each edge, where every register is settled.
  always @(negedge tclk) begin
    for (int i = 0; i < NB; i++) begin
      if (act[i] && !prev[i]) begin np[i]++; st[i] = cyc; end
      if (!act[i] && prev[i]) len[i] = cyc - st[i];
    end
    prev = act;
    if (act.cmd_strobe)  last_cmd  = act.cmd;
    if (act.data_strobe) last_data = act.data;
    if (!ttcrx_reset_b && rb_prev) rb_low = cyc;
    if (ttcrx_reset_b && !rb_prev) rb_len = cyc - rb_low;
    rb_prev = ttcrx_reset_b;
  end

  // Bit index of a named backplane line in bp_out_t.
  function automatic int b(input string name);
    bp_out_t m;
    m = '0;
    case (name)
      "clock40_enable": m.clock40_enable = 1;   "cmd_strobe": m.cmd_strobe = 1;
      "evcntres": m.evcntres = 1;               "bcntres": m.bcntres = 1;
      "l1reset": m.l1reset = 1;                 "bc0": m.bc0 = 1;
      "l1accept": m.l1accept = 1;               "data_strobe": m.data_strobe = 1;
      "ccb_rsv1": m.ccb_reserved[1] = 1;        "tmb_hr": m.tmb_hard_reset = 1;
      "alct_hr": m.alct_hard_reset = 1;         "tmb_sr": m.tmb_soft_reset = 1;
      "mpc_hr": m.mpc_hard_reset = 1;           "mpc_sr": m.mpc_soft_reset = 1;
      "dmb_hr": m.dmb_hard_reset = 1;           "dmb_sr": m.dmb_soft_reset = 1;
      "cal0": m.cfeb_calibrate[0] = 1;          "cal1": m.cfeb_calibrate[1] = 1;
      "cal2": m.cfeb_calibrate[2] = 1;          "adb_sync": m.adb_pulse_sync = 1;
      "adb_async": m.adb_pulse_async = 1;       "clct_ext": m.clct_ext_trig = 1;
      "alct_ext": m.alct_ext_trig = 1;          "dmb_rsv_out4": m.dmb_reserved_out[4] = 1;
      default: $fatal(1, "unknown line %s", name);
    endcase
    for (int i = 0; i < NB; i++) if (m[i]) return i;
    return 0;
  endfunction

  function automatic int n(input string name); return np[b(name)]; endfunction
  function automatic int plen(input string name); return len[b(name)]; endfunction
  function automatic int pst(input string name); return st[b(name)]; endfunction

  // --------------------------------------------------------------- VME
  localparam logic [23:0] LOGICAL = 24'hC00000;
  localparam logic [23:0] GEO     = 24'(12) << 19;
  logic [23:0] base = LOGICAL;

  task automatic vme(input logic wr, input logic [7:0] off, input logic [15:0] wd,
                     output logic [15:0] rd, output logic ok);
    vme_addr = 23'((base | 24'(off)) >> 1); vme_write_n = ~wr; vme_d_in = wd; vme_am = 6'h39;
    #30 vme_as_n = 0;
    #10 vme_ds0_n = 0; vme_ds1_n = 0;
    ok = 0;
    for (int t = 0; t < 400; t++) begin
      #10;
      if (!vme_dtack_n) begin ok = 1; break; end
    end
    rd = vme_d_out;
    vme_ds0_n = 1; vme_ds1_n = 1; vme_as_n = 1;
    for (int t = 0; t < 20 && !vme_dtack_n; t++) #10;
    #40;
  endtask

  task automatic wr(input logic [7:0] off, input logic [15:0] d);
    logic [15:0] rd; logic ok;
    vme(1, off, d, rd, ok);
    chk(ok, $sformatf("VME write %h acknowledged", off));
  endtask

  task automatic rd(input logic [7:0] off, output logic [15:0] d);
    logic ok;
    vme(0, off, 16'h0, d, ok);
    chk(ok, $sformatf("VME read %h acknowledged", off));
  endtask

  task automatic clks(input int k); repeat (k) @(posedge tclk); endtask

  // -------------------------------------------------------------- TTCrx
  // Each task drives an input for one clock and returns the number of the
  // clock edge at which the board samples it.
  task automatic ttc_cmd(input logic [5:0] code, output int t0);
    @(negedge tclk); ttc.brcst = code; ttc.brcst_str1 = 1;
    @(negedge tclk); t0 = cyc; ttc.brcst_str1 = 0;
  endtask

  task automatic ttc_l1a(output int t0);
    @(negedge tclk); ttc.l1accept = 1;
    @(negedge tclk); t0 = cyc; ttc.l1accept = 0;
  endtask

  logic [15:0] csr1v = 16'h2000;
  task automatic set_csr1(input logic [15:0] v); csr1v = v; wr(8'h00, v); endtask

  // ---------------------------------------------------------------- test
  initial begin
    logic [15:0] d, d2;
    logic ok;
    int t0, c0, c1, e0, k;
    int lat_a, lat_b;
    bp_out_t idle;

    ttc.ready = 1'b1;
    #1   por_n = 1'b0;                                 // power-up reset pulse
    #200 por_n = 1'b1;
    clks(10);

    // ---- power-up state
    idle = '0; idle.ttcrx_ready = 1'b1;
    seen("power_up", act == idle && fp_out_n == '1 && ttcrx_reset_b, "all backplane lines idle");
    rd(8'h00, d); seen("power_up", d == 16'h2000, $sformatf("CSR1 = %h after reset", d));
    rd(8'h5e, d); chk(d == ((16'd6 << 9) | (16'd8 << 5) | 16'd4), $sformatf("CSR17 firmware date %h", d));
    wr(8'h24, 0);                                      // reset the I2C controller

    // ---- VME mode: fast control commands from CSR2/CSR3
    c0 = n("cmd_strobe");
    wr(8'h02, (16'h12 << 2) | 16'h3);                  // DMB hard reset + BCntRes + EvCntRes
    clks(25);
    seen("vme_mode_cmd", n("cmd_strobe") == c0 + 1 && last_cmd == 6'h12 && plen("cmd_strobe") == 1,
         $sformatf("ccb_cmd %h", last_cmd));
    seen("vme_mode_cmd", n("bcntres") == 1 && n("evcntres") == 1 && plen("bcntres") == 1, "bcntres/evcntres pulses");
    seen("hard_reset_400ns", n("dmb_hr") == 1 && plen("dmb_hr") == 16, $sformatf("dmb hard reset %0d clocks", plen("dmb_hr")));
    chk(n("tmb_hr") == 0 && n("alct_hr") == 0 && n("mpc_hr") == 0, "other hard resets quiet");
    wr(8'h04, 16'h00a5);
    clks(3);
    seen("vme_data", n("data_strobe") == 1 && last_data == 8'ha5 && plen("data_strobe") == 1, "ccb_data from CSR3");

    // ---- mode switch to TTCrx
    set_csr1(16'h2001);
    rd(8'h00, d); chk(d == 16'h2001, "CSR1 read back");
    ttc_cmd(6'h1d, t0);                                // DMB soft reset
    clks(5);
    seen("ttc_mode_cmd", last_cmd == 6'h1d && n("cmd_strobe") == c0 + 2, "ccb_cmd follows Brcst");
    seen("soft_reset_25ns", n("dmb_sr") == 1 && plen("dmb_sr") == 1 && n("tmb_sr") == 0, $sformatf("DMB soft reset n=%0d len=%0d tmb n=%0d", n("dmb_sr"), plen("dmb_sr"), n("tmb_sr")));
    c1 = n("cmd_strobe");
    wr(8'h02, 16'h10 << 2);                            // ignored in TTCrx mode
    clks(25);
    seen("mode_switch", n("cmd_strobe") == c1 && n("tmb_hr") == 0, "CSR2 ignored in TTCrx mode");
    @(negedge tclk); ttc.bcnt_res = 1; @(negedge tclk); ttc.bcnt_res = 0;
    clks(3);
    chk(n("bcntres") == 2, "BCntRes passed through in TTCrx mode");
    ttc_cmd(6'h04, t0);                                // hard reset all
    clks(25);
    seen("hard_reset_400ns", n("tmb_hr") == 1 && n("alct_hr") == 1 && n("mpc_hr") == 1 && n("dmb_hr") == 2
         && plen("tmb_hr") == 16 && plen("mpc_hr") == 16, "command 04 resets all four");
    ttc_cmd(6'h1c, t0);                                // soft reset all
    clks(4);
    seen("soft_reset_25ns", n("tmb_sr") == 1 && n("mpc_sr") == 1 && n("dmb_sr") == 2, "command 1C soft resets all");

    // ---- L1ACC counter and programmable delays
    wr(8'h9a, 0); wr(8'h9c, 0);
    wr(8'h08, {8'd7, 8'd12});                          // pretrigger 7, L1ACC 12
    c0 = n("l1accept");
    ttc_l1a(t0);
    clks(20);
    lat_a = pst("l1accept") - t0;
    seen("l1a_delay", n("l1accept") == c0 + 1 && plen("l1accept") == 1, "one L1ACC");
    seen("pretrigger_delay", pst("alct_ext") - t0 == 7 - 12 + lat_a && pst("clct_ext") == pst("alct_ext"),
         $sformatf("pretrigger latency %0d vs L1ACC %0d", pst("alct_ext") - t0, lat_a));
    chk(lat_a == 12 + 1, $sformatf("L1ACC latency %0d clocks for delay 12", lat_a));
    wr(8'h08, {8'd3, 8'd40});
    ttc_l1a(t0);
    clks(50);
    lat_b = pst("l1accept") - t0;
    seen("l1a_delay", lat_b - lat_a == 28, $sformatf("latency %0d for delay 40", lat_b));
    seen("pretrigger_delay", pst("alct_ext") - t0 == 3 + 1, "pretrigger delay 3");
    rd(8'h96, d); rd(8'h98, d2);
    seen("l1a_counter", {d2, d} == 32'd2, $sformatf("counter %0d", {d2, d}));
    wr(8'h9e, 0);
    ttc_l1a(t0); clks(50);
    rd(8'h96, d);
    seen("l1a_counter", d == 16'd2, "counter stops when disabled");
    wr(8'h9a, 0);
    rd(8'h96, d); rd(8'h98, d2);
    seen("l1a_counter", {d2, d} == 0, "counter cleared");
    wr(8'h08, {8'd2, 8'd4});

    // ---- sources and masks
    c0 = n("l1accept");
    set_csr1(16'h2001 | 16'h0008);                     // mask TTCrx L1Accept
    ttc_l1a(t0); clks(10);
    seen("l1a_mask", n("l1accept") == c0, "masked TTCrx L1Accept");
    wr(8'h2a, 0); clks(10);
    seen("l1a_src_vme", n("l1accept") == c0 + 1, "VME L1ACC");
    @(negedge tclk); bp_in_n.tmb_l1a_request = 0; @(negedge tclk); bp_in_n.tmb_l1a_request = 1;
    clks(10);
    seen("l1a_src_tmb", n("l1accept") == c0 + 2, "TMB L1ACC request");
    set_csr1(16'h2001 | 16'h0028);                     // mask TTCrx and TMB
    @(negedge tclk); bp_in_n.tmb_l1a_request = 0; @(negedge tclk); bp_in_n.tmb_l1a_request = 1;
    clks(10);
    seen("l1a_mask", n("l1accept") == c0 + 2, "masked TMB request");

    // ---- hold mode: set by an L1ACC when CSR1[13] = 0
    set_csr1(16'h0001);
    c0 = n("l1accept");
    ttc_l1a(t0); clks(10);
    seen("hold", n("l1accept") == c0 + 1, "first L1ACC passes");
    ttc_l1a(t0); clks(10);
    seen("hold", n("l1accept") == c0 + 1, "second L1ACC held");
    @(negedge tclk); bp_in_n.tmb_l1a_release = 0; @(negedge tclk); bp_in_n.tmb_l1a_release = 1;
    clks(3);
    ttc_l1a(t0); clks(10);
    seen("release_tmb", n("l1accept") == c0 + 2, "TMB release reopens");
    @(negedge tclk); bp_in_n.dmb_l1a_release = 0; @(negedge tclk); bp_in_n.dmb_l1a_release = 1;
    clks(3);
    ttc_l1a(t0); clks(10);
    seen("release_dmb", n("l1accept") == c0 + 3, "DMB release reopens");
    wr(8'h06, 16'h0300);                               // ignore both backplane releases
    @(negedge tclk); bp_in_n.dmb_l1a_release = 0; bp_in_n.tmb_l1a_release = 0;
    @(negedge tclk); bp_in_n.dmb_l1a_release = 1; bp_in_n.tmb_l1a_release = 1;
    clks(3);
    ttc_l1a(t0); clks(10);
    seen("release_mask", n("l1accept") == c0 + 3, "masked releases do nothing");
    wr(8'h5c, 0);
    ttc_l1a(t0); clks(10);
    seen("release_vme", n("l1accept") == c0 + 4, "VME release reopens");
    wr(8'h06, 16'h0000);
    wr(8'h5c, 0);
    // hold set by dmb_cfeb_initiate with CSR1[13] = 1
    set_csr1(16'h2001);
    ttc_cmd(6'h17, t0); clks(3);
    c0 = n("l1accept");
    ttc_l1a(t0); clks(10);
    seen("cfeb_initiate_hold", n("l1accept") == c0, "L1ACC held after command 17");
    // direct pretriggers bypass delay and hold
    c0 = n("clct_ext"); c1 = n("alct_ext");
    ttc_cmd(6'h1a, t0); clks(6);
    seen("direct_pretrigger", n("clct_ext") == c0 + 1 && n("alct_ext") == c1 && pst("clct_ext") - t0 < 4,
         "command 1A while held");
    wr(8'h46, 0); clks(3);
    seen("direct_pretrigger", n("alct_ext") == c1 + 1, "VME ALCT external trigger");
    wr(8'h5c, 0);
    c0 = n("l1accept");
    ttc_l1a(t0); clks(10);
    chk(n("l1accept") == c0 + 1, "released after command 17");

    // ---- calibrate and ADB pulses
    ttc_cmd(6'h15, t0); clks(4);
    seen("calibrate", n("cal1") == 1 && plen("cal1") == 1 && n("cal0") == 0, $sformatf("command 15: n=%0d len=%0d cal0 n=%0d", n("cal1"), plen("cal1"), n("cal0")));
    wr(8'h4c, 0); clks(3);
    seen("calibrate", n("cal2") == 1, "VME calibrate 2");
    c0 = n("l1accept");
    wr(8'h40, 0); clks(30);
    seen("adb_sync_500ns", n("adb_sync") == 1 && plen("adb_sync") == 20, $sformatf("ADB sync %0d clocks", plen("adb_sync")));
    chk(n("l1accept") == c0 + 1, "ADB sync makes an L1ACC");
    wr(8'h42, 0); clks(10);
    seen("adb_async", n("adb_async") == 1 && plen("adb_async") == 1 && n("l1accept") == c0 + 2, "ADB async");
    ttc_cmd(6'h25, t0); clks(30);
    seen("adb_both", n("adb_sync") == 2 && n("adb_async") == 2, "command 25 makes both");

    // ---- TTCrx counters and send commands
    @(negedge tclk); ttc.bcnt = 12'h3c5; ttc.bcnt_str = 1; @(negedge tclk); ttc.bcnt_str = 0;
    ttc.bcnt = 12'h123; ttc.evcnt_l_str = 1; @(negedge tclk); ttc.evcnt_l_str = 0;
    ttc.bcnt = 12'h456; ttc.evcnt_h_str = 1; @(negedge tclk); ttc.evcnt_h_str = 0;
    rd(8'h16, d); chk(d[11:0] == 12'h3c5, $sformatf("CSR12 %h", d));
    rd(8'h18, d); chk(d[11:0] == 12'h123, "CSR13");
    ttc_cmd(6'h20, t0); clks(5);
    seen("send_counter", last_data == 8'hc5, $sformatf("send bunch count %h", last_data));
    ttc_cmd(6'h22, t0); clks(5);
    seen("send_counter", last_data == 8'h61, $sformatf("send event count byte 1 %h", last_data));

    // ---- I2C controller
    wr(8'h22, 16'h005a); wr(8'h20, 16'h003c);
    rd(8'h22, d); rd(8'h20, d2);
    seen("i2c", d[7:0] == 8'h5a && d2[7:0] == 8'h3c, $sformatf("PCF8584 registers %h %h", d, d2));
    seen("leds", led.i2c && led.l1a && led.vme && led.mode, "activity LEDs lit");

    // ---- sticky status, front-panel mirror
    @(negedge tclk); bp_in_n.clct_status[3] = 0;
    clks(2);
    chk(!fp_out_n.clct_status[3], "CLCT status on the front panel");
    @(negedge tclk); bp_in_n.clct_status[3] = 1;
    clks(2);
    rd(8'h10, d);
    seen("sticky_status", d[3], $sformatf("CSR9 %h", d));
    wr(8'h4e, 0); rd(8'h10, d);
    seen("sticky_status", !d[3], "CSR9 cleared");

    // ---- clock enable, TTCrx reset, reserved lines, L1 reset, BC0
    wr(8'h06, 16'h0009); wr(8'h58, 0); clks(15);
    seen("clock40_enable", n("clock40_enable") == 1 && plen("clock40_enable") == 9, $sformatf("%0d clocks", plen("clock40_enable")));
    wr(8'h26, 0); clks(20);
    seen("ttcrx_reset", rb_len == 16, $sformatf("TTCrx reset %0d clocks", rb_len));
    wr(8'h82, 0); wr(8'h74, 0); clks(3);
    seen("reserved_lines", n("ccb_rsv1") == 1 && n("dmb_rsv_out4") == 1, "reserved pulses");
    ttc_cmd(6'h03, t0); clks(6);
    seen("l1reset", n("l1reset") == 1 && plen("l1reset") == 1, $sformatf("command 03: n=%0d len=%0d", n("l1reset"), plen("l1reset")));
    ttc_cmd(6'h01, t0); clks(4);
    seen("bc0", n("bc0") == 1, "command 01");

    // ---- front panel (enabled by CSR1[8])
    c0 = n("l1accept"); c1 = n("bc0");
    @(negedge tclk); fp_in.l1accept = 1; fp_in.bc0 = 1; clks(4);
    @(negedge tclk); fp_in.l1accept = 0; fp_in.bc0 = 0; clks(10);
    seen("front_panel", n("l1accept") == c0 && n("bc0") == c1, "ignored while disabled");
    set_csr1(16'h2101);
    @(negedge tclk); fp_in.l1accept = 1; fp_in.bc0 = 1; clks(4);
    @(negedge tclk); fp_in.l1accept = 0; fp_in.bc0 = 0; clks(10);
    seen("front_panel", n("l1accept") == c0 + 1 && n("bc0") == c1 + 1, "one L1ACC and BC0 per edge");
    @(negedge tclk); fp_in.hard_reset = 1; clks(4);
    @(negedge tclk); fp_in.hard_reset = 0; clks(20);
    seen("front_panel", n("alct_hr") == 2 && n("tmb_hr") == 2, "front-panel hard reset");

    // ---- geographical address
    geo_mode = 1'b1;
    vme(0, 8'h00, 0, d, ok); chk(!ok, "logical address ignored in geographical mode");
    base = GEO;
    vme(0, 8'h00, 0, d, ok);
    seen("geo_address", ok && d == 16'h2101, "slot 12 address");
    geo_mode = 1'b0; base = LOGICAL;

    // ---- clock sources
    begin
      realtime ta, tb2;
      set_csr1(16'h2103);                              // TTCrx clock
      @(posedge ccb_clock40); ta = $realtime; @(posedge ccb_clock40); tb2 = $realtime;
      seen("clock_select", tb2 - ta == 24.0, $sformatf("TTCrx clock period %0t", tb2 - ta));
      set_csr1(16'h2105);                              // front-panel clock
      @(posedge ccb_clock40); ta = $realtime; @(posedge ccb_clock40); tb2 = $realtime;
      seen("clock_select", tb2 - ta == 26.0, "front-panel clock period");
      set_csr1(16'h2107);                              // single pulses
      k = 0;
      fork
        begin repeat (200) @(posedge clk80_osc); end
        forever @(posedge ccb_clock40) k++;
      join_any
      disable fork;
      chk(k == 0, "no clock in single-pulse mode");
      k = 0;
      fork
        begin wr(8'h38, 0); clks(5); end
        forever @(posedge ccb_clock40) k++;
      join_any
      disable fork;
      seen("single_pulse", k == 1, $sformatf("%0d pulses for one write", k));
      set_csr1(16'h2101);                              // back to the quartz
      @(posedge ccb_clock40); ta = $realtime; @(posedge ccb_clock40); tb2 = $realtime;
      seen("clock_select", tb2 - ta == 25.0, "quartz/2 period");
    end

    // ---- CCB reset
    wr(8'h08, 16'h1234);
    wr(8'h28, 0);
    clks(5);
    rd(8'h00, d); rd(8'h08, d2);
    seen("ccb_reset", d == 16'h2000 && d2 == 16'h0000, $sformatf("CSR1 %h CSR5 %h after reset", d, d2));

    // ---- every mechanism must have happened
    foreach (mech[m]) $display("mechanism %-20s %0d", m, mech[m]);
    foreach (expected[i]) chk(mech.exists(expected[i]) && mech[expected[i]] > 0, {"never seen: ", expected[i]});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  string expected [] = '{"power_up", "vme_mode_cmd", "hard_reset_400ns", "vme_data", "ttc_mode_cmd",
    "soft_reset_25ns", "mode_switch", "l1a_delay", "pretrigger_delay", "l1a_counter", "l1a_mask",
    "l1a_src_vme", "l1a_src_tmb", "hold", "release_tmb", "release_dmb", "release_mask", "release_vme",
    "cfeb_initiate_hold", "direct_pretrigger", "calibrate", "adb_sync_500ns", "adb_async", "adb_both",
    "send_counter", "i2c", "leds", "sticky_status", "clock40_enable", "ttcrx_reset", "reserved_lines",
    "l1reset", "bc0", "front_panel", "geo_address", "clock_select", "single_pulse", "ccb_reset"};
endmodule
