// tb_ccb_csr: checks the register bank through its bus:
//   * reset values, read-back of CSR1..CSR5, ack one clock after request,
//     no ack for the I2C controller addresses;
//   * each write-only address gives exactly its own one-clock command
//     pulse, unused addresses none (expected pulses set by field name);
//   * CSR6..CSR8 cfg_done, sticky CSR9..CSR11 bits and their reset
//     commands, live TTCrx bits, CSR12..CSR16 pass-through, CSR17 date,
//     L1ACC counter read with latch pulse.
module tb_ccb_csr;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic bus_req = 0, bus_we = 0;
  logic [7:0] bus_addr = '0;
  logic [15:0] bus_wdata = '0, bus_rdata;
  logic bus_ack;
  logic [15:0] csr1, csr2, csr3, csr4, csr5;
  vme_cmd_t cmd;
  logic [8:0] tmb_cfg_done = 9'h1a5, alct_cfg_done = 9'h0f3, dmb_cfg_done = 9'h155;
  logic mpc_cfg_done = 1;
  logic [8:0] clct_status = '0, alct_status = '0;
  logic [2:0] dmb_reserved_in = '0;
  logic [4:0] tmb_reserved_in = '0;
  logic [2:1] fp_rsv = 2'b10;
  logic ttc_ready = 1, ttc_sinerr = 0, ttc_dberr = 1;
  logic [15:0] csr12 = 16'h1111, csr13 = 16'h2222, csr14 = 16'h3333, csr15 = 16'h4444, csr16 = 16'h5555;
  logic [31:0] l1a_count = 32'hdead_beef;
  logic [15:0] l1a_cnt_hi = 16'h7777;
  int checks = 0, failures = 0;

  ccb_csr #(.FW_DAY(4), .FW_MONTH(8), .FW_YEAR(6)) dut (.*);
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

  // One bus access; returns read data and whether ack came in the next clock.
  task automatic acc(input logic we, input logic [7:0] a, input logic [15:0] wd,
                     output logic [15:0] rd, output logic acked, output vme_cmd_t c);
    @(negedge clk); bus_req = 1; bus_we = we; bus_addr = a; bus_wdata = wd;
    @(negedge clk); bus_req = 0;
    acked = bus_ack; rd = bus_rdata; c = cmd;
    @(negedge clk);
    chk(!bus_ack && cmd == '0, $sformatf("addr %h: ack/command longer than one clock", a));
  endtask

  function automatic vme_cmd_t expected_cmd(input logic [7:0] a);
    vme_cmd_t e = '0;
    case (a)
      8'h02: e.csr2_wr = 1;      8'h04: e.csr3_wr = 1;      8'h24: e.i2c_reset = 1;
      8'h26: e.ttc_reset = 1;    8'h28: e.ccb_reset = 1;    8'h2a: e.l1a = 1;
      8'h2c: e.tmb_hr = 1;       8'h2e: e.dmb_hr = 1;       8'h30: e.alct_hr = 1;
      8'h32: e.mpc_hr = 1;       8'h34: e.all_hr = 1;       8'h36: e.bc0 = 1;
      8'h38: e.clk_pulse = 1;    8'h3c: e.soft_reset = 1;   8'h3e: e.adb_both = 1;
      8'h40: e.adb_sync = 1;     8'h42: e.adb_async = 1;    8'h44: e.clct_ext = 1;
      8'h46: e.alct_ext = 1;     8'h48: e.cal[0] = 1;       8'h4a: e.cal[1] = 1;
      8'h4c: e.cal[2] = 1;       8'h4e: e.csr9_rst = 1;     8'h50: e.csr10_rst = 1;
      8'h52: e.csr11_rst = 1;    8'h58: e.clk_en = 1;       8'h5a: e.cfeb_initiate = 1;
      8'h5c: e.release_hold = 1; 8'h60: e.mpc_rsv[0] = 1;   8'h62: e.mpc_rsv[1] = 1;
      8'h64: e.mpc_sr = 1;       8'h66: e.dmb_rsv[0] = 1;   8'h68: e.dmb_rsv[1] = 1;
      8'h6a: e.dmb_sr = 1;       8'h6c: e.dmb_rsv_out[0] = 1; 8'h6e: e.dmb_rsv_out[1] = 1;
      8'h70: e.dmb_rsv_out[2] = 1; 8'h72: e.dmb_rsv_out[3] = 1; 8'h74: e.dmb_rsv_out[4] = 1;
      8'h76: e.tmb_rsv_out[0] = 1; 8'h78: e.tmb_rsv_out[1] = 1; 8'h7a: e.tmb_rsv_out[2] = 1;
      8'h7c: e.tmb_rsv0 = 1;     8'h7e: e.tmb_sr = 1;       8'h82: e.ccb_rsv[1] = 1;
      8'h84: e.ccb_rsv[2] = 1;   8'h86: e.ccb_rsv[3] = 1;   8'h88: e.l1reset = 1;
      8'h8a: e.fp_rsv1_out = 1;  8'h9a: e.cnt_clr = 1;      8'h9c: e.cnt_en = 1;
      8'h9e: e.cnt_dis = 1;
      default: ;
    endcase
    return e;
  endfunction

  initial begin
    logic [15:0] rd; logic ak; vme_cmd_t c;
    logic [15:0] vals [5];
    repeat (3) @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    chk(csr1 == 16'h2000 && csr2 == 0 && csr3 == 0 && csr4 == 0 && csr5 == 0, "reset values");
    // read/write registers
    for (int r = 0; r < 5; r++) begin
      vals[r] = 16'($urandom);
      acc(1, 8'(2 * r), vals[r], rd, ak, c);
      chk(ak, $sformatf("write CSR%0d ack", r + 1));
    end
    for (int r = 0; r < 5; r++) begin
      acc(0, 8'(2 * r), 16'h0, rd, ak, c);
      chk(ak && rd == vals[r], $sformatf("read CSR%0d: %h expected %h", r + 1, rd, vals[r]));
    end
    chk({csr1, csr2, csr3, csr4, csr5} == {vals[0], vals[1], vals[2], vals[3], vals[4]}, "register outputs");
    // command pulses for every even address 0x06..0x9e, except the R/W CSRs and I2C
    for (int a = 'h06; a <= 'h9e; a += 2) begin
      if (a == 'h06 || a == 'h08 || a == 'h20 || a == 'h22) continue;
      acc(1, 8'(a), 16'h0, rd, ak, c);
      chk(ak && c == expected_cmd(8'(a)), $sformatf("write %h: cmd %h expected %h", a, c, expected_cmd(8'(a))));
    end
    acc(1, 8'h02, 16'h00fc, rd, ak, c); chk(c.csr2_wr, "csr2 write pulse");
    // I2C addresses are not acknowledged here
    acc(0, 8'h20, 16'h0, rd, ak, c); chk(!ak, "no ack for Base+20");
    acc(1, 8'h22, 16'h0, rd, ak, c); chk(!ak, "no ack for Base+22");
    // read-only registers
    acc(0, 8'h0a, 0, rd, ak, c); chk(rd == 16'h01a5, "CSR6");
    acc(0, 8'h0c, 0, rd, ak, c); chk(rd == 16'h00f3, "CSR7");
    acc(0, 8'h0e, 0, rd, ak, c); chk(rd == 16'h0355, $sformatf("CSR8 %h", rd));
    acc(0, 8'h10, 0, rd, ak, c); chk(rd == 16'h0a00, $sformatf("CSR9 live bits %h", rd));
    @(negedge clk); clct_status = 9'h101; alct_status = 9'h0f0; dmb_reserved_in = 3'b101; tmb_reserved_in = 5'b10010;
    @(negedge clk); clct_status = 0; alct_status = 0; dmb_reserved_in = 0; tmb_reserved_in = 0;
    acc(0, 8'h10, 0, rd, ak, c); chk(rd == 16'h0b01, $sformatf("CSR9 sticky %h", rd));
    acc(0, 8'h12, 0, rd, ak, c); chk(rd == 16'h00f0, $sformatf("CSR10 sticky %h", rd));
    acc(0, 8'h14, 0, rd, ak, c); chk(rd == 16'h0295, $sformatf("CSR11 sticky %h", rd));
    acc(1, 8'h4e, 0, rd, ak, c);
    acc(0, 8'h10, 0, rd, ak, c); chk(rd == 16'h0a00, "CSR9 cleared");
    acc(0, 8'h12, 0, rd, ak, c); chk(rd == 16'h00f0, "CSR10 kept");
    acc(1, 8'h50, 0, rd, ak, c);
    acc(1, 8'h52, 0, rd, ak, c);
    acc(0, 8'h12, 0, rd, ak, c); chk(rd == 16'h0000, "CSR10 cleared");
    acc(0, 8'h14, 0, rd, ak, c); chk(rd == 16'h0200, "CSR11 cleared, FP_RSV live");
    acc(0, 8'h16, 0, rd, ak, c); chk(rd == 16'h1111, "CSR12");
    acc(0, 8'h18, 0, rd, ak, c); chk(rd == 16'h2222, "CSR13");
    acc(0, 8'h1a, 0, rd, ak, c); chk(rd == 16'h3333, "CSR14");
    acc(0, 8'h1c, 0, rd, ak, c); chk(rd == 16'h4444, "CSR15");
    acc(0, 8'h1e, 0, rd, ak, c); chk(rd == 16'h5555, "CSR16");
    acc(0, 8'h5e, 0, rd, ak, c); chk(rd == ((16'd6 << 9) | (16'd8 << 5) | 16'd4), $sformatf("CSR17 %h", rd));
    acc(0, 8'h96, 0, rd, ak, c); chk(rd == 16'hbeef && c.cnt_latch, "counter low + latch");
    acc(0, 8'h98, 0, rd, ak, c); chk(rd == 16'h7777 && !c.cnt_latch, "counter high");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
