// tb_ccb_aux_pulses: pulses each reserved-line command alone and checks that
// exactly the matching output bit gives a one-clock pulse, one clock later;
// checks L1 reset from VME and from the decoded command, and the 16-clock
// low TTCrx reset.
module tb_ccb_aux_pulses;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  vme_cmd_t cmd = '0;
  logic dec_l1reset = 0;
  logic [3:1] ccb_reserved;
  logic tmb_reserved0;
  logic [2:0] tmb_reserved_out;
  logic [1:0] dmb_reserved;
  logic [4:0] dmb_reserved_out;
  logic [1:0] mpc_reserved;
  logic fp_reserved_out0, l1reset, ttcrx_reset_b;
  int checks = 0, failures = 0;

  ccb_aux_pulses dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [17:0] outs;
    return {ccb_reserved, tmb_reserved0, tmb_reserved_out, dmb_reserved,
            dmb_reserved_out, mpc_reserved, fp_reserved_out0, l1reset};
  endfunction

  // Expected output bit for each command, in the order of outs().
  task automatic one(input string name, input int bit_idx);
    @(negedge clk); dec_l1reset = 0; cmd = '0;
    checks++;
    if (outs() != (18'd1 << bit_idx)) begin
      failures++; $display("FAIL %s: outputs %b", name, outs());
    end
    @(negedge clk);
    checks++;
    if (outs() != 0) begin failures++; $display("FAIL %s: longer than one clock", name); end
  endtask

  initial begin
    int lowlen;
    repeat (3) @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    cmd.ccb_rsv[3] = 1;        one("ccb_rsv3", 17);
    cmd.ccb_rsv[2] = 1;        one("ccb_rsv2", 16);
    cmd.ccb_rsv[1] = 1;        one("ccb_rsv1", 15);
    cmd.tmb_rsv0 = 1;          one("tmb_rsv0", 14);
    for (int i = 0; i < 3; i++) begin cmd.tmb_rsv_out[i] = 1; one("tmb_rsv_out", 11 + i); end
    for (int i = 0; i < 2; i++) begin cmd.dmb_rsv[i] = 1; one("dmb_rsv", 9 + i); end
    for (int i = 0; i < 5; i++) begin cmd.dmb_rsv_out[i] = 1; one("dmb_rsv_out", 4 + i); end
    for (int i = 0; i < 2; i++) begin cmd.mpc_rsv[i] = 1; one("mpc_rsv", 2 + i); end
    cmd.fp_rsv1_out = 1;       one("fp_rsv1_out", 1);
    cmd.l1reset = 1;           one("vme l1reset", 0);
    dec_l1reset = 1;           one("dec l1reset", 0);
    // TTCrx reset
    checks++; if (!ttcrx_reset_b) begin failures++; $display("FAIL ttc reset idle"); end
    @(negedge clk); cmd.ttc_reset = 1; @(negedge clk); cmd = '0;
    lowlen = 0;
    while (!ttcrx_reset_b && lowlen < 100) begin lowlen++; @(negedge clk); end
    checks++; if (lowlen != 16) begin failures++; $display("FAIL ttc reset low %0d clocks", lowlen); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
