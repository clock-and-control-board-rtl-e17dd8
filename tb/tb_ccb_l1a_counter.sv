// tb_ccb_l1a_counter: checks that the counter is disabled after reset,
// counts requests only while enabled, clears, and that `latch` copies the
// full 32-bit value into the two 16-bit halves (tested across a 16-bit
// carry by loading many requests).
module tb_ccb_l1a_counter;
  logic clk = 1'b0, rst = 1'b1;
  logic l1a_req = 0, clr = 0, enable = 0, disable_cnt = 0, latch = 0;
  logic [31:0] count;
  logic counting;
  logic [15:0] lo, hi;
  int checks = 0, failures = 0;
  longint model = 0;

  ccb_l1a_counter dut (.clk, .rst, .l1a_req, .clr, .enable, .disable_cnt, .latch,
                       .count, .counting, .lo, .hi);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  task automatic pulse_req(input int n);
    repeat (n) begin
      @(negedge clk); l1a_req = 1'b1;
      @(negedge clk); l1a_req = 1'b0;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    chk(count == 0 && !counting, "reset state");
    pulse_req(5);
    chk(count == 0, "disabled after reset: no counting");
    @(negedge clk); enable = 1; @(negedge clk); enable = 0;
    pulse_req(7); model = 7;
    chk(count == 32'(model), $sformatf("count 7: got %0d", count));
    // continuous requests across the 16-bit boundary
    @(negedge clk); l1a_req = 1'b1;
    repeat (70000) @(negedge clk);
    l1a_req = 1'b0; model += 70000;
    chk(count == 32'(model), $sformatf("count %0d: got %0d", model, count));
    @(negedge clk); latch = 1; @(negedge clk); latch = 0;
    chk({hi, lo} == 32'(model), $sformatf("latched %h%h expected %h", hi, lo, 32'(model)));
    pulse_req(3);
    chk({hi, lo} == 32'(model), "latch holds while counting");
    model += 3;
    @(negedge clk); disable_cnt = 1; @(negedge clk); disable_cnt = 0;
    pulse_req(4);
    chk(count == 32'(model), "disabled: no counting");
    @(negedge clk); clr = 1; @(negedge clk); clr = 0;
    chk(count == 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
