// tb_ccb_vme_slave: runs VME A24/D16 cycles against the slave with a simple
// register responder behind it (ack after a programmable wait).  Checks
// writes and reads in logical mode (base C00000) and geographical mode
// (A[23:19] = slot), that wrong AM codes, wrong A[23:19] and non-zero
// A[18:8] get no DTACK and no bus request, and the DTACK release.
module tb_ccb_vme_slave;
  logic clk = 1'b0, rst = 1'b1;
  logic as_n = 1, ds0_n = 1, ds1_n = 1, write_n = 1;
  logic [5:0] am = 6'h39;
  logic [23:1] addr = '0;
  logic [4:0] ga_n = ~5'd7;
  logic geo_mode = 0;
  logic [15:0] d_in = '0, d_out;
  logic d_oe, dtack_n;
  logic bus_req, bus_we, bus_ack;
  logic [7:0] bus_addr;
  logic [15:0] bus_wdata, bus_rdata;
  logic [15:0] regs [128];
  int reqs = 0, wait_clks = 0;
  int checks = 0, failures = 0;

  ccb_vme_slave dut (.*);
  always #12 clk = ~clk;

  // responder
  initial for (int i = 0; i < 128; i++) regs[i] = 16'(i * 3);
  always @(posedge clk) begin
    bus_ack <= 1'b0;
    if (bus_req) begin
      reqs++;
      if (bus_we) regs[bus_addr[7:1]] <= bus_wdata;
      bus_rdata <= regs[bus_addr[7:1]];
      fork begin repeat (wait_clks) @(posedge clk); bus_ack <= 1'b1; end join_none
    end
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  // One VME cycle; `ok` is whether DTACK came within 1 us.
  task automatic cycle(input logic wr, input logic [5:0] m, input logic [23:0] a, input logic [15:0] wd,
                       output logic [15:0] rd, output logic ok);
    am = m; addr = a[23:1]; write_n = ~wr; d_in = wd;
    #30 as_n = 0;
    #10 ds0_n = 0; ds1_n = 0;
    ok = 0;
    for (int t = 0; t < 100; t++) begin
      #10;
      if (!dtack_n) begin ok = 1; break; end
    end
    rd = d_out;
    chk(!ok || (d_oe == !wr), "data drivers only on reads");
    ds0_n = 1; ds1_n = 1; as_n = 1;
    for (int t = 0; t < 20 && !dtack_n; t++) #10;
    chk(dtack_n && !d_oe, "DTACK released after DS");
    #50;
  endtask

  initial begin
    logic [15:0] rd; logic ok; int r0;
    #100 rst = 0;
    // logical mode
    cycle(1, 6'h39, 24'hC00004, 16'hbeef, rd, ok); chk(ok, "logical write acknowledged");
    chk(regs[2] == 16'hbeef, "write reached register 2");
    cycle(0, 6'h3D, 24'hC00004, 0, rd, ok); chk(ok && rd == 16'hbeef, $sformatf("logical read %h", rd));
    cycle(0, 6'h3A, 24'hC0009E, 0, rd, ok); chk(ok && rd == 16'(79 * 3), "read highest offset");
    wait_clks = 6;
    cycle(0, 6'h3E, 24'hC00010, 0, rd, ok); chk(ok && rd == 16'(8 * 3), "slow responder");
    wait_clks = 0;
    r0 = reqs;
    cycle(0, 6'h09, 24'hC00004, 0, rd, ok); chk(!ok, "AM 09 ignored");
    cycle(0, 6'h39, 24'hC80004, 0, rd, ok); chk(!ok, "other board ignored");
    cycle(0, 6'h39, 24'hC00104, 0, rd, ok); chk(!ok, "A[18:8] non-zero ignored");
    cycle(0, 6'h39, 24'h380004, 0, rd, ok); chk(!ok, "slot address ignored in logical mode");
    chk(reqs == r0, "no bus request for ignored cycles");
    // geographical mode, slot 7 -> A[23:19] = 00111
    geo_mode = 1;
    cycle(1, 6'h39, 24'h380006, 16'h1234, rd, ok); chk(ok, "geographical write");
    cycle(0, 6'h39, 24'h380006, 0, rd, ok); chk(ok && rd == 16'h1234, "geographical read");
    cycle(0, 6'h39, 24'hC00006, 0, rd, ok); chk(!ok, "logical base ignored in geographical mode");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
