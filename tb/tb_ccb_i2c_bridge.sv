// tb_ccb_i2c_bridge: connects the bridge to a behavioural PCF8584 and
// checks writes and reads of both registers (A0 = 0 and 1), that other
// addresses are ignored, the time-out when the controller never answers,
// the controller reset length, and the 8 MHz clock (period of 5 clocks).
module tb_ccb_i2c_bridge;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic bus_req = 0, bus_we = 0;
  logic [7:0] bus_addr = '0, bus_wdata = '0, bus_rdata;
  logic bus_ack, i2c_reset = 0;
  logic pcf_cs_n, pcf_a0, pcf_rw, pcf_d_oe, pcf_dtack_n, pcf_reset_n, pcf_clk, access;
  logic [7:0] pcf_d_out, pcf_d_in;
  logic mute = 0;
  int checks = 0, failures = 0;

  ccb_i2c_bridge #(.TIMEOUT(40)) dut (.*);
  pcf8584_model #(.DELAY(3)) u_pcf (.clk, .reset_n(pcf_reset_n), .cs_n(pcf_cs_n), .a0(pcf_a0),
    .rw(pcf_rw), .d_in(pcf_d_out), .d_out(pcf_d_in), .dtack_n(pcf_dtack_n), .mute);

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

  task automatic access_bus(input logic we, input logic [7:0] a, input logic [7:0] wd,
                            output logic [7:0] rd, output int clocks);
    @(negedge clk); bus_req = 1; bus_we = we; bus_addr = a; bus_wdata = wd;
    @(negedge clk); bus_req = 0;
    clocks = 1;
    while (!bus_ack && clocks < 200) begin @(negedge clk); clocks++; end
    rd = bus_rdata;
  endtask

  initial begin
    logic [7:0] rd; int n; int per; logic p;
    repeat (3) @(posedge clk); rst <= 1'b0;
    access_bus(1, A_I2C0, 8'h5a, rd, n);
    chk(n < 20, "write S0 acknowledged");
    access_bus(1, A_I2C1, 8'hc3, rd, n);
    access_bus(0, A_I2C0, 8'h00, rd, n);
    chk(rd == 8'h5a, $sformatf("read S0 %h", rd));
    access_bus(0, A_I2C1, 8'h00, rd, n);
    chk(rd == 8'hc3, $sformatf("read S1 %h", rd));
    chk(u_pcf.regs[0] == 8'h5a && u_pcf.regs[1] == 8'hc3, "registers written through A0");
    // other addresses are not for the bridge
    @(negedge clk); bus_req = 1; bus_we = 1; bus_addr = A_CSR1; @(negedge clk); bus_req = 0;
    repeat (10) begin chk(pcf_cs_n && !bus_ack, "CSR access ignored"); @(negedge clk); end
    // time-out
    mute = 1;
    access_bus(0, A_I2C0, 8'h00, rd, n);
    chk(rd == 8'hff && n > 40 && n < 50, $sformatf("time-out after %0d clocks, data %h", n, rd));
    mute = 0;
    // reset of the controller
    @(negedge clk); i2c_reset = 1; @(negedge clk); i2c_reset = 0;
    n = 0; while (!pcf_reset_n && n < 200) begin n++; @(negedge clk); end
    chk(n == 64, $sformatf("reset low %0d clocks", n));
    access_bus(0, A_I2C1, 8'h00, rd, n);
    chk(rd == 8'h00, "register cleared by reset");
    // 8 MHz clock: 5 core clocks from one rising edge to the next
    p = pcf_clk;
    while (!(pcf_clk && !p)) begin p = pcf_clk; @(negedge clk); end
    for (int r = 0; r < 4; r++) begin
      per = 0;
      do begin p = pcf_clk; @(negedge clk); per++; end while (!(pcf_clk && !p));
      chk(per == 5, $sformatf("pcf_clk period %0d clocks", per));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
