// tb_ccb_fast_ctrl: checks the fast control bus in both modes.
//   TTCrx mode: broadcast with BrcstStr1 -> ccb_cmd + strobe; BCntRes and
//   EvCntRes copied; Dout forwarded only when DQ = 0; CSR2/CSR3 writes
//   ignored.  VME mode: CSR2 write -> cmd, strobe, bcntres/evcntres from
//   bits 0/1; CSR3 write -> data + strobe; TTCrx ignored.  Both modes: the
//   four send-counter requests put the right counter byte on ccb_data.
// All outputs are expected exactly one clock after their cause.
module tb_ccb_fast_ctrl;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ttc_mode = 1'b1;
  ttcrx_t ttc = '0;
  logic csr2_wr = 0, csr3_wr = 0;
  logic [7:0] wdata = '0;
  logic send_bcnt = 0, send_ev0 = 0, send_ev1 = 0, send_ev2 = 0;
  logic [11:0] bcnt_lat = 12'habc;
  logic [23:0] evcnt_lat = 24'h123456;
  logic fp_bcntres = 0;
  logic [5:0] ccb_cmd;
  logic ccb_cmd_strobe, ccb_data_strobe, ccb_bcntres, ccb_evcntres;
  logic [7:0] ccb_data;
  int checks = 0, failures = 0;

  ccb_fast_ctrl dut (.*);
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

  task automatic step; @(negedge clk); endtask
  task automatic idle;
    ttc = '0; csr2_wr = 0; csr3_wr = 0; send_bcnt = 0; send_ev0 = 0;
    send_ev1 = 0; send_ev2 = 0; fp_bcntres = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    step;
    // ---------------- TTCrx mode
    ttc_mode = 1;
    for (int i = 0; i < 20; i++) begin
      logic [5:0] c = 6'($urandom);
      ttc.brcst = c; ttc.brcst_str1 = 1; step; idle;
      chk(ccb_cmd == c && ccb_cmd_strobe, $sformatf("ttc cmd %h got %h/%b", c, ccb_cmd, ccb_cmd_strobe));
      step;
      chk(!ccb_cmd_strobe && ccb_cmd == c, "ttc strobe one clock, cmd held");
    end
    ttc.bcnt_res = 1; step; idle;
    chk(ccb_bcntres && !ccb_evcntres, "ttc bcntres");
    ttc.evcnt_res = 1; step; idle;
    chk(!ccb_bcntres && ccb_evcntres, "ttc evcntres");
    ttc.dout = 8'h5a; ttc.dq = 0; ttc.dout_str = 1; step; idle;
    chk(ccb_data == 8'h5a && ccb_data_strobe, "ttc dout with dq=0");
    ttc.dout = 8'h33; ttc.dq = 4'h3; ttc.dout_str = 1; step; idle;
    chk(ccb_data == 8'h5a && !ccb_data_strobe, "ttc dout with dq!=0 ignored");
    csr2_wr = 1; wdata = 8'hff; step; idle;
    chk(!ccb_cmd_strobe && !ccb_bcntres, "csr2 ignored in ttc mode");
    send_bcnt = 1; step; idle;
    chk(ccb_data == 8'hbc && ccb_data_strobe, "send bcnt");
    send_ev0 = 1; step; idle;
    chk(ccb_data == 8'h56 && ccb_data_strobe, "send ev 7:0");
    send_ev1 = 1; step; idle;
    chk(ccb_data == 8'h34 && ccb_data_strobe, "send ev 15:8");
    send_ev2 = 1; step; idle;
    chk(ccb_data == 8'h12 && ccb_data_strobe, "send ev 23:16");
    fp_bcntres = 1; step; idle;
    chk(ccb_bcntres, "front-panel bcntres");
    // ---------------- VME mode
    ttc_mode = 0;
    ttc.brcst = 6'h2a; ttc.brcst_str1 = 1; ttc.bcnt_res = 1; step; idle;
    chk(!ccb_cmd_strobe && !ccb_bcntres, "ttc ignored in vme mode");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] w = 8'($urandom);
      csr2_wr = 1; wdata = w; step; idle;
      chk(ccb_cmd == w[7:2] && ccb_cmd_strobe && ccb_bcntres == w[0] && ccb_evcntres == w[1],
          $sformatf("vme csr2 %h", w));
    end
    csr3_wr = 1; wdata = 8'hc3; step; idle;
    chk(ccb_data == 8'hc3 && ccb_data_strobe, "vme csr3");
    step;
    chk(ccb_data == 8'hc3 && !ccb_data_strobe, "data level held");
    send_ev2 = 1; step; idle;
    chk(ccb_data == 8'h12 && ccb_data_strobe, "send ev 23:16 in vme mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
