// tb_ccb_l1a_ctrl: checks the L1ACC / pretrigger logic.
//   * each of the six sources makes an L1ACC exactly n+1 clocks later for
//     CSR5[7:0] = n, and each mask bit of CSR1 blocks its source (the front
//     panel also needs CSR1[8]);
//   * pretriggers come m+1 clocks later for CSR5[15:8] = m, with their
//     CSR1[9]/[10] masks; direct pretriggers come after one clock;
//   * two requests in flight keep their spacing;
//   * hold after dmb_cfeb_initiate, and after the first L1ACC when
//     CSR1[13] = 0; release by dmb/tmb release (with CSR4[9]/[8] masks) or
//     VME;
//   * the request counter counts enabled requests only.
module tb_ccb_l1a_ctrl;
  logic clk = 1'b0, rst = 1'b1;
  logic [15:0] csr1 = 16'h2100, csr4 = '0, csr5 = '0;
  logic src_ttc = 0, src_vme = 0, src_tmb = 0, src_fp = 0, src_adb_sync = 0, src_adb_async = 0;
  logic direct_clct = 0, direct_alct = 0;
  logic cfeb_initiate = 0, dmb_release = 0, tmb_release = 0, vme_release = 0;
  logic cnt_clr = 0, cnt_en = 0, cnt_dis = 0, cnt_latch = 0;
  logic [31:0] cnt_value;
  logic [15:0] cnt_lo, cnt_hi;
  logic l1accept, clct_ext_trig, alct_ext_trig, hold, l1a_req;
  int checks = 0, failures = 0;
  int expected_count = 0;

  ccb_l1a_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic fire(input int src);
    @(negedge clk);
    case (src)
      0: src_ttc = 1; 1: src_vme = 1; 2: src_tmb = 1;
      3: src_fp = 1;  4: src_adb_sync = 1; default: src_adb_async = 1;
    endcase
  endtask

  // Fire a source and return the clocks until l1accept / clct / alct rise
  // (-1 if not within `lim` clocks).
  task automatic measure(input int src, input int lim, output int t_l1a, output int t_clct, output int t_alct);
    t_l1a = -1; t_clct = -1; t_alct = -1;
    fire(src);
    for (int k = 1; k <= lim; k++) begin
      @(negedge clk);
      {src_ttc, src_vme, src_tmb, src_fp, src_adb_sync, src_adb_async} = '0;
      if (l1accept && t_l1a < 0) t_l1a = k;
      if (clct_ext_trig && t_clct < 0) t_clct = k;
      if (alct_ext_trig && t_alct < 0) t_alct = k;
    end
  endtask

  task automatic pulse(ref logic s);
    @(negedge clk); s = 1; @(negedge clk); s = 0;
  endtask

  initial begin
    int a, b, c;
    int mask_bit [6] = '{3, 4, 5, 7, 11, 12};
    repeat (3) @(posedge clk); rst <= 1'b0;
    pulse(cnt_en);
    csr5 = {8'd9, 8'd5};
    for (int s = 0; s < 6; s++) begin
      measure(s, 20, a, b, c);
      expected_count++;
      chk(a == 6 && b == 10 && c == 10, $sformatf("source %0d: l1a %0d clct %0d alct %0d", s, a, b, c));
      csr1[mask_bit[s]] = 1;
      measure(s, 20, a, b, c);
      chk(a < 0 && b < 0 && c < 0, $sformatf("source %0d masked", s));
      csr1[mask_bit[s]] = 0;
    end
    csr1[8] = 0;
    measure(3, 20, a, b, c);
    chk(a < 0, "front panel disabled by CSR1[8]");
    csr1[8] = 1;
    chk(cnt_value == 32'(expected_count), $sformatf("counter %0d expected %0d", cnt_value, expected_count));
    // pretrigger masks
    csr1[9] = 1; measure(0, 20, a, b, c); expected_count++;
    chk(a == 6 && b == 10 && c < 0, "CSR1[9] masks ALCT pretrigger");
    csr1[9] = 0; csr1[10] = 1; measure(0, 20, a, b, c); expected_count++;
    chk(a == 6 && b < 0 && c == 10, "CSR1[10] masks CLCT pretrigger");
    csr1[10] = 0;
    // delay extremes (let older requests leave the 255-stage lines first)
    repeat (260) @(negedge clk);
    csr5 = {8'd255, 8'd1};
    measure(0, 300, a, b, c); expected_count++;
    chk(a == 2 && b == 256, $sformatf("delays 1/255: l1a %0d pt %0d", a, b));
    // two pulses in flight, 3 clocks apart
    csr5 = {8'd1, 8'd10};
    begin
      int t1 = -1, t2 = -1;
      fire(0); @(negedge clk); src_ttc = 0; @(negedge clk); fire(0);
      for (int k = 4; k < 30; k++) begin
        @(negedge clk); src_ttc = 0;
        if (l1accept) begin if (t1 < 0) t1 = k; else if (t2 < 0) t2 = k; end
      end
      expected_count += 2;
      chk(t1 == 11 && t2 == 14, $sformatf("two in flight: %0d %0d", t1, t2));
    end
    // direct pretriggers
    @(negedge clk); direct_clct = 1; direct_alct = 1; @(negedge clk); direct_clct = 0; direct_alct = 0;
    chk(clct_ext_trig && alct_ext_trig, "direct pretriggers after one clock");
    // hold by cfeb_initiate, released by dmb_l1a_release
    pulse(cfeb_initiate);
    chk(hold, "hold after cfeb_initiate");
    measure(0, 20, a, b, c); expected_count++;
    chk(a < 0 && b < 0, "held L1ACC and pretriggers not sent");
    @(negedge clk); direct_clct = 1; @(negedge clk); direct_clct = 0;
    chk(clct_ext_trig, "direct pretrigger not held");
    csr4[9] = 1; pulse(dmb_release);
    chk(hold, "dmb release masked by CSR4[9]");
    csr4[9] = 0; pulse(dmb_release);
    chk(!hold, "dmb release");
    measure(0, 20, a, b, c); expected_count++;
    chk(a == 11, "L1ACC after release");
    // hold after the first L1ACC when CSR1[13] = 0
    csr1[13] = 0; csr5[7:0] = 8'd2;
    measure(1, 20, a, b, c); expected_count++;
    chk(a == 3 && hold, "first L1ACC sent, then hold");
    measure(1, 20, a, b, c); expected_count++;
    chk(a < 0, "second L1ACC held");
    csr4[8] = 1; pulse(tmb_release);
    chk(hold, "tmb release masked by CSR4[8]");
    csr4[8] = 0; pulse(tmb_release);
    chk(!hold, "tmb release");
    measure(1, 20, a, b, c); expected_count++;
    chk(a == 3 && hold, "after tmb release one more L1ACC");
    pulse(vme_release);
    chk(!hold, "vme release");
    csr1[13] = 1;
    chk(cnt_value == 32'(expected_count), $sformatf("counter %0d expected %0d", cnt_value, expected_count));
    pulse(cnt_latch);
    chk({cnt_hi, cnt_lo} == 32'(expected_count), "counter latch");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
