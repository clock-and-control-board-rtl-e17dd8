// tb_ccb_clock_select: runs the 80 MHz quartz, a TTCrx clock and a
// front-panel clock with distinct phases and checks, for each CSR1[2:1]
// setting, that ccb_clock40 and core_clk copy the right source at every
// sample, that the on-board clock is 80 MHz divided by two, and that the
// single-pulse mode passes exactly the pulses it is given.
module tb_ccb_clock_select;
  logic por_n = 1'b0;
  logic clk80_osc = 1'b0, ttc_clk40 = 1'b0, fp_clk40 = 1'b0;
  logic [1:0] sel = 2'b00;
  logic single_pulse = 1'b0;
  logic ccb_clock40, core_clk;
  int checks = 0, failures = 0;

  ccb_clock_select dut (.*);

  always #6.25 clk80_osc = ~clk80_osc;        // 80 MHz
  initial begin #3;  forever #12.5 ttc_clk40 = ~ttc_clk40; end
  initial begin #7;  forever #12.5 fp_clk40  = ~fp_clk40;  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    int rises, prev, rises80;
    #20 por_n = 1'b1;
    // on-board: count rising edges of ccb_clock40 against the 80 MHz clock
    sel = 2'b00; #1;
    rises = 0; rises80 = 0; prev = ccb_clock40;
    repeat (400) begin
      #1;
      if (ccb_clock40 && !prev) rises++;
      prev = ccb_clock40;
    end
    chk(rises == 16, $sformatf("on-board clock: %0d rises in 400 ns", rises));
    chk(core_clk == ccb_clock40, "core clock = on-board clock");
    // TTCrx and front panel: sampled copies
    sel = 2'b01;
    repeat (200) begin @(ttc_clk40 or clk80_osc); #0.2; chk(ccb_clock40 == ttc_clk40 && core_clk == ttc_clk40, "ttc clock"); end
    sel = 2'b10;
    repeat (200) begin @(fp_clk40 or clk80_osc); #0.2; chk(ccb_clock40 == fp_clk40 && core_clk == fp_clk40, "fp clock"); end
    // single pulse mode: the core keeps the on-board clock
    sel = 2'b11; #1;
    rises = 0; prev = ccb_clock40;
    fork
      begin
        repeat (3) begin
          #50 single_pulse = 1; #25 single_pulse = 0;
        end
      end
      begin
        repeat (300) begin
          #1;
          if (ccb_clock40 && !prev) rises++;
          prev = ccb_clock40;
          checks++;
          if (core_clk != dut.osc_div2) begin failures++; $display("FAIL core clock in pulse mode"); end
        end
      end
    join
    chk(rises == 3, $sformatf("single pulses: %0d", rises));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
