// tb_ccb_led_ctrl: with a one-shot of 10 clocks, checks that each event LED
// lights for exactly 10 clocks after a single pulse, that a new event
// restarts the time, and that Mode and TTC_Ready follow their levels.
module tb_ccb_led_ctrl;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  logic ev_l1a = 0, ev_bc0 = 0, ev_hr = 0, ev_i2c = 0, ev_vme = 0, ev_siner = 0, ev_dber = 0;
  logic mode = 0, ttc_ready = 0;
  led_t led;
  int checks = 0, failures = 0;

  ccb_led_ctrl #(.ONESHOT(10)) dut (.*);
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

  function automatic logic [6:0] evleds;
    return {led.l1a, led.bx0, led.hr, led.i2c, led.vme, led.siner, led.dber};
  endfunction

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    for (int i = 0; i < 7; i++) begin
      int n;
      n = 0;
      @(negedge clk);
      {ev_l1a, ev_bc0, ev_hr, ev_i2c, ev_vme, ev_siner, ev_dber} = 7'(1 << (6 - i));
      @(negedge clk);
      {ev_l1a, ev_bc0, ev_hr, ev_i2c, ev_vme, ev_siner, ev_dber} = '0;
      chk(evleds() == 7'(1 << (6 - i)), $sformatf("LED %0d alone", i));
      while (evleds() != 0 && n < 50) begin n++; @(negedge clk); end
      chk(n == 10, $sformatf("LED %0d on for %0d clocks", i, n));
    end
    begin
      int n;
      n = 0;
      @(negedge clk); ev_vme = 1; @(negedge clk); ev_vme = 0;
      repeat (5) @(negedge clk);
      ev_vme = 1; @(negedge clk); ev_vme = 0;
      while (led.vme && n < 50) begin n++; @(negedge clk); end
      chk(n == 10, "restart of the one-shot");
    end
    mode = 1; ttc_ready = 0; #1; chk(led.mode && !led.ttc_ready, "mode level");
    mode = 0; ttc_ready = 1; #1; chk(!led.mode && led.ttc_ready, "ttc_ready level");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
