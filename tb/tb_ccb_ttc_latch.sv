// tb_ccb_ttc_latch: drives random TTCrx outputs with random strobes and
// compares CSR12..CSR16 after every clock with a reference model that
// applies the latch rules of the register descriptions.
module tb_ccb_ttc_latch;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ttcrx_t ttc = '0;
  logic [15:0] csr12, csr13, csr14, csr15, csr16;
  logic [11:0] bcnt_lat;
  logic [23:0] evcnt_lat;
  int checks = 0, failures = 0;
  logic [15:0] m12 = 0, m13 = 0, m14 = 0, m15 = 0, m16 = 0;

  ccb_ttc_latch dut (.clk, .rst, .ttc, .csr12, .csr13, .csr14, .csr15, .csr16, .bcnt_lat, .evcnt_lat);
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      // apply new random inputs
      ttc = ttcrx_t'($bits(ttcrx_t)'({$urandom, $urandom}));
      ttc.bcnt_str    = ($urandom % 5) == 0;
      ttc.evcnt_l_str = ($urandom % 5) == 0;
      ttc.evcnt_h_str = ($urandom % 5) == 0;
      ttc.brcst_str1  = ($urandom % 5) == 0;
      ttc.brcst_str2  = ($urandom % 5) == 0;
      ttc.dout_str    = ($urandom % 5) == 0;
      // model the effect of the coming clock edge
      if (ttc.bcnt_str)    m12[11:0] = ttc.bcnt;
      if (ttc.evcnt_l_str) m13[11:0] = ttc.bcnt;
      if (ttc.evcnt_h_str) m14[11:0] = ttc.bcnt;
      m12[12] = ttc.bcnt_str; m13[12] = ttc.evcnt_l_str; m14[12] = ttc.evcnt_h_str;
      if (ttc.brcst_str1) begin
        m15[3:0] = ttc.brcst[5:2]; m15[8] = ttc.evcnt_res; m15[9] = ttc.bcnt_res;
      end
      if (ttc.brcst_str2) m15[5:4] = ttc.brcst[7:6];
      m15[6] = ttc.brcst_str1; m15[7] = ttc.brcst_str2;
      if (ttc.dout_str) begin m15[13:10] = ttc.dq; m16 = {ttc.subaddr, ttc.dout}; end
      m15[14] = ttc.dout_str;
      @(posedge clk); #1;
      checks++;
      if ({csr12, csr13, csr14, csr15, csr16} != {m12, m13, m14, m15, m16}) begin
        failures++;
        $display("FAIL t=%0d got %h %h %h %h %h exp %h %h %h %h %h", t,
                 csr12, csr13, csr14, csr15, csr16, m12, m13, m14, m15, m16);
      end
      checks++;
      if (evcnt_lat != {m14[11:0], m13[11:0]} || bcnt_lat != m12[11:0]) begin
        failures++; $display("FAIL counter outputs");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
