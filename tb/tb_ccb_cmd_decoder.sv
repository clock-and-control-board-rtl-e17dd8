// tb_ccb_cmd_decoder: checks every one of the 64 command codes, with and
// without strobe, against a reference table written as a list of
// (code, field name) pairs, and checks the one-clock latency.
module tb_ccb_cmd_decoder;
  import ccb_pkg::*;

  logic clk = 1'b0, rst = 1'b1;
  logic [5:0] cmd = '0;
  logic strobe = 1'b0;
  ccb_dec_t dec;
  int checks = 0, failures = 0;

  ccb_cmd_decoder dut (.clk, .rst, .cmd, .strobe, .dec);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: which field should fire for a code, as a name.
  function automatic string ref_name(input int code);
    case (code)
      'h01: return "bc0";        'h03: return "l1reset";   'h04: return "hard_reset";
      'h10: return "tmb_hr";     'h11: return "alct_hr";   'h12: return "dmb_hr";
      'h13: return "mpc_hr";     'h14: return "cal0";      'h15: return "cal1";
      'h16: return "cal2";       'h17: return "cfeb_initiate";
      'h18: return "adb_sync";   'h19: return "adb_async"; 'h1a: return "clct_ext";
      'h1b: return "alct_ext";   'h1c: return "soft_reset";'h1d: return "dmb_sr";
      'h1e: return "tmb_sr";     'h1f: return "mpc_sr";    'h20: return "send_bcnt";
      'h21: return "send_ev0";   'h22: return "send_ev1";  'h23: return "send_ev2";
      'h25: return "adb_both";
      default: return "";
    endcase
  endfunction

  function automatic string got_name(input ccb_dec_t d);
    int n = 0; string s = "";
    if (d.bc0) begin s = "bc0"; n++; end
    if (d.l1reset) begin s = "l1reset"; n++; end
    if (d.hard_reset) begin s = "hard_reset"; n++; end
    if (d.tmb_hr) begin s = "tmb_hr"; n++; end
    if (d.alct_hr) begin s = "alct_hr"; n++; end
    if (d.dmb_hr) begin s = "dmb_hr"; n++; end
    if (d.mpc_hr) begin s = "mpc_hr"; n++; end
    if (d.cal[0]) begin s = "cal0"; n++; end
    if (d.cal[1]) begin s = "cal1"; n++; end
    if (d.cal[2]) begin s = "cal2"; n++; end
    if (d.cfeb_initiate) begin s = "cfeb_initiate"; n++; end
    if (d.adb_sync) begin s = "adb_sync"; n++; end
    if (d.adb_async) begin s = "adb_async"; n++; end
    if (d.adb_both) begin s = "adb_both"; n++; end
    if (d.clct_ext) begin s = "clct_ext"; n++; end
    if (d.alct_ext) begin s = "alct_ext"; n++; end
    if (d.soft_reset) begin s = "soft_reset"; n++; end
    if (d.dmb_sr) begin s = "dmb_sr"; n++; end
    if (d.tmb_sr) begin s = "tmb_sr"; n++; end
    if (d.mpc_sr) begin s = "mpc_sr"; n++; end
    if (d.send_bcnt) begin s = "send_bcnt"; n++; end
    if (d.send_ev0) begin s = "send_ev0"; n++; end
    if (d.send_ev1) begin s = "send_ev1"; n++; end
    if (d.send_ev2) begin s = "send_ev2"; n++; end
    if (n > 1) s = "MULTIPLE";
    return s;
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst <= 1'b0;
    for (int code = 0; code < 64; code++) begin
      for (int s = 0; s < 2; s++) begin
        @(negedge clk);
        cmd = 6'(code); strobe = s[0];
        @(negedge clk);             // one clock later
        strobe = 1'b0;
        checks++;
        if (got_name(dec) != (s ? ref_name(code) : "")) begin
          failures++;
          $display("FAIL code %02h strobe %0d: got '%s' expected '%s'", code, s, got_name(dec), s ? ref_name(code) : "");
        end
        @(negedge clk);
        checks++;
        if (dec != '0) begin failures++; $display("FAIL code %02h: pulse longer than one clock", code); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
