// tb_ccb_delay_line: drives a random pulse stream through the delay line
// with delays 1, 2, 7, 100 and 255 (and 0, which must act as 1) and
// compares dout with the input history delay clocks earlier.
module tb_ccb_delay_line;
  logic clk = 1'b0, rst = 1'b1, din = 1'b0;
  logic [7:0] delay = 8'd1;
  logic dout;
  int checks = 0, failures = 0;
  bit hist [$];

  ccb_delay_line #(.DEPTH(255)) dut (.clk, .rst, .din, .delay, .dout);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int dl [6] = '{1, 2, 7, 100, 255, 0};
    repeat (3) @(posedge clk); rst <= 1'b0;
    foreach (dl[k]) begin
      int d;
      d = (dl[k] == 0) ? 1 : dl[k];
      @(negedge clk); delay = 8'(dl[k]); din = 1'b0;
      hist.delete();
      for (int t = 0; t < 300 + 3 * d; t++) begin
        // hist[i] = din applied i+1 clocks ago
        @(negedge clk);
        hist.push_front(din);
        if (hist.size() > d) begin
          checks++;
          if (dout !== hist[d-1]) begin
            failures++;
            $display("FAIL delay %0d t %0d: dout %0b expected %0b", dl[k], t, dout, hist[d-1]);
          end
        end
        din = (t < 300) ? (($urandom % 4) == 0) : 1'b0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
