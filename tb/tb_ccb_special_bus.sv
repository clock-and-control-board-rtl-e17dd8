// tb_ccb_special_bus: checks the DAQ and trigger special purpose buses:
// calibrate pulses (one clock) from command, VME and front panel; the
// ALCT_adb_pulse_sync length of 20 clocks (500 ns) from each source and the
// "both" requests; the async pulse from command/VME (one clock) and from the
// front panel (same length as the input, unclocked); the L1ACC requests of
// both ADB pulses; direct pretriggers; and the front-panel enable.
module tb_ccb_special_bus;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ccb_dec_t dec = '0;
  vme_cmd_t cmd = '0;
  logic fp_en = 1;
  logic [2:0] fp_cal_rise = '0;
  logic fp_adb_sync_rise = 0, fp_adb_async_rise = 0, fp_adb_async_raw = 0;
  logic fp_clct_rise = 0, fp_alct_rise = 0;
  logic [2:0] cfeb_calibrate;
  logic adb_pulse_sync, adb_pulse_async, adb_sync_req, adb_async_req, direct_clct, direct_alct;
  int checks = 0, failures = 0;

  ccb_special_bus dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // Count clocks each output is high in the 30 clocks after the request.
  int n_cal [3], n_sync, n_async, n_sreq, n_areq, n_clct, n_alct;
  task automatic run;
    n_cal = '{0, 0, 0}; n_sync = 0; n_async = 0; n_sreq = 0; n_areq = 0; n_clct = 0; n_alct = 0;
    @(negedge clk);
    dec = '0; cmd = '0; fp_cal_rise = '0; fp_adb_sync_rise = 0; fp_adb_async_rise = 0;
    fp_clct_rise = 0; fp_alct_rise = 0;
    repeat (30) begin
      for (int i = 0; i < 3; i++) n_cal[i] += int'(cfeb_calibrate[i]);
      n_sync += int'(adb_pulse_sync); n_async += int'(adb_pulse_async);
      n_sreq += int'(adb_sync_req); n_areq += int'(adb_async_req);
      n_clct += int'(direct_clct); n_alct += int'(direct_alct);
      @(negedge clk);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    for (int i = 0; i < 3; i++) begin
      dec.cal[i] = 1; run; chk(n_cal[i] == 1 && n_cal[(i+1)%3] == 0, $sformatf("dec cal%0d", i));
      cmd.cal[i] = 1; run; chk(n_cal[i] == 1 && n_cal[(i+2)%3] == 0, $sformatf("vme cal%0d", i));
      fp_cal_rise[i] = 1; run; chk(n_cal[i] == 1, $sformatf("fp cal%0d", i));
    end
    dec.adb_sync = 1; run; chk(n_sync == 20 && n_sreq == 1 && n_async == 0, $sformatf("dec adb_sync %0d", n_sync));
    cmd.adb_sync = 1; run; chk(n_sync == 20 && n_sreq == 1 && n_async == 0, "vme adb_sync");
    fp_adb_sync_rise = 1; run; chk(n_sync == 20 && n_sreq == 1, "fp adb_sync");
    dec.adb_async = 1; run; chk(n_async == 1 && n_areq == 1 && n_sync == 0, "dec adb_async");
    cmd.adb_async = 1; run; chk(n_async == 1 && n_areq == 1 && n_sync == 0, "vme adb_async");
    dec.adb_both = 1; run; chk(n_async == 1 && n_sync == 20 && n_areq == 1 && n_sreq == 1, "dec both");
    cmd.adb_both = 1; run; chk(n_async == 1 && n_sync == 20 && n_areq == 1 && n_sreq == 1, "vme both");
    dec.clct_ext = 1; run; chk(n_clct == 1 && n_alct == 0, "dec clct");
    cmd.alct_ext = 1; run; chk(n_alct == 1 && n_clct == 0, "vme alct");
    fp_clct_rise = 1; fp_alct_rise = 1; run; chk(n_clct == 1 && n_alct == 1, "fp pretriggers");
    // front-panel async pulse: passed through with its own length
    #2 fp_adb_async_raw = 1; #1;
    chk(adb_pulse_async, "fp async passes without a clock edge");
    repeat (7) @(negedge clk);
    chk(adb_pulse_async, "fp async still high");
    fp_adb_async_raw = 0; #1;
    chk(!adb_pulse_async, "fp async follows its source down");
    // front panel disabled
    fp_en = 0;
    fp_adb_sync_rise = 1; fp_cal_rise = 3'b111; fp_clct_rise = 1; fp_adb_async_rise = 1; run;
    chk(n_sync == 0 && n_cal[0] == 0 && n_clct == 0 && n_areq == 0, "front panel disabled");
    fp_adb_async_raw = 1; #1; chk(!adb_pulse_async, "fp async disabled"); fp_adb_async_raw = 0;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
