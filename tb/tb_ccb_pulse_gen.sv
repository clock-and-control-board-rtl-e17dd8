// tb_ccb_pulse_gen: triggers pulses of several lengths (0, 1, 5, 16, 20,
// 255 clocks) and checks the start one clock after the trigger and the exact
// length; then checks that a trigger during a pulse restarts it.
module tb_ccb_pulse_gen;
  logic clk = 1'b0, rst = 1'b1, trig = 1'b0;
  logic [7:0] len = '0;
  logic pulse;
  int checks = 0, failures = 0;

  ccb_pulse_gen #(.W(8)) dut (.clk, .rst, .trig, .len, .pulse);
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

  task automatic measure(input int l, input int expect_len);
    int n = 0;
    @(negedge clk); len = 8'(l); trig = 1'b1;
    @(negedge clk); trig = 1'b0;
    chk(pulse == (expect_len > 0), $sformatf("len %0d: start", l));
    while (pulse && n < 400) begin n++; @(negedge clk); end
    chk(n == expect_len, $sformatf("len %0d: measured %0d", l, n));
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    measure(0, 0);
    measure(1, 1);
    measure(5, 5);
    measure(16, 16);
    measure(20, 20);
    measure(255, 255);
    // retrigger after 3 clocks of a 10-clock pulse: total 3 + 10
    begin
      int n = 0;
      @(negedge clk); len = 8'd10; trig = 1'b1;
      @(negedge clk); trig = 1'b0;
      repeat (2) begin n++; @(negedge clk); end
      trig = 1'b1; n++; @(negedge clk); trig = 1'b0;
      while (pulse && n < 100) begin n++; @(negedge clk); end
      chk(n == 13, $sformatf("retrigger: measured %0d", n));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
