// tb_ccb_reload_ctrl: for every hard-reset and soft-reset source (decoded
// command, VME write, common command, front panel) checks which of the
// lines pulse and how long: hard resets 16 clocks (400 ns), soft resets one
// clock, all starting one clock after the request.
module tb_ccb_reload_ctrl;
  import ccb_pkg::*;
  logic clk = 1'b0, rst = 1'b1;
  ccb_dec_t dec = '0;
  vme_cmd_t cmd = '0;
  logic fp_hard_reset = 0;
  logic tmb_hard_reset, alct_hard_reset, dmb_hard_reset, mpc_hard_reset;
  logic tmb_soft_reset, dmb_soft_reset, mpc_soft_reset, any_hard_reset;
  int checks = 0, failures = 0;

  ccb_reload_ctrl dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Apply the request set up by the caller for one clock, then record for
  // 30 clocks how long each of the seven lines stays high.
  task automatic run(input string name, input int exp_len [7]);
    int len [7] = '{0, 0, 0, 0, 0, 0, 0};
    int first [7] = '{-1, -1, -1, -1, -1, -1, -1};
    logic [6:0] v;
    @(negedge clk);
    dec = '0; cmd = '0; fp_hard_reset = 0;
    for (int k = 1; k <= 30; k++) begin
      v = {tmb_hard_reset, alct_hard_reset, dmb_hard_reset, mpc_hard_reset,
           tmb_soft_reset, dmb_soft_reset, mpc_soft_reset};
      for (int i = 0; i < 7; i++) if (v[6-i]) begin
        len[i]++;
        if (first[i] < 0) first[i] = k;
      end
      @(negedge clk);
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (len[i] != exp_len[i] || (exp_len[i] > 0 && first[i] != 1)) begin
        failures++;
        $display("FAIL %s line %0d: length %0d (expected %0d) start %0d", name, i, len[i], exp_len[i], first[i]);
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk); rst <= 1'b0;
    @(negedge clk);
    //                    tmbH alctH dmbH mpcH tmbS dmbS mpcS
    dec.tmb_hr = 1;     run("dec tmb_hr",     '{16, 0, 0, 0, 0, 0, 0});
    dec.alct_hr = 1;    run("dec alct_hr",    '{0, 16, 0, 0, 0, 0, 0});
    dec.dmb_hr = 1;     run("dec dmb_hr",     '{0, 0, 16, 0, 0, 0, 0});
    dec.mpc_hr = 1;     run("dec mpc_hr",     '{0, 0, 0, 16, 0, 0, 0});
    dec.hard_reset = 1; run("dec hard_reset", '{16, 16, 16, 16, 0, 0, 0});
    cmd.tmb_hr = 1;     run("vme tmb_hr",     '{16, 0, 0, 0, 0, 0, 0});
    cmd.alct_hr = 1;    run("vme alct_hr",    '{0, 16, 0, 0, 0, 0, 0});
    cmd.dmb_hr = 1;     run("vme dmb_hr",     '{0, 0, 16, 0, 0, 0, 0});
    cmd.mpc_hr = 1;     run("vme mpc_hr",     '{0, 0, 0, 16, 0, 0, 0});
    cmd.all_hr = 1;     run("vme all_hr",     '{16, 16, 16, 16, 0, 0, 0});
    fp_hard_reset = 1;  run("front panel",    '{16, 16, 16, 16, 0, 0, 0});
    dec.soft_reset = 1; run("dec soft_reset", '{0, 0, 0, 0, 1, 1, 1});
    dec.tmb_sr = 1;     run("dec tmb_sr",     '{0, 0, 0, 0, 1, 0, 0});
    dec.dmb_sr = 1;     run("dec dmb_sr",     '{0, 0, 0, 0, 0, 1, 0});
    dec.mpc_sr = 1;     run("dec mpc_sr",     '{0, 0, 0, 0, 0, 0, 1});
    cmd.soft_reset = 1; run("vme soft_reset", '{0, 0, 0, 0, 1, 1, 1});
    cmd.tmb_sr = 1;     run("vme tmb_sr",     '{0, 0, 0, 0, 1, 0, 0});
    cmd.dmb_sr = 1;     run("vme dmb_sr",     '{0, 0, 0, 0, 0, 1, 0});
    cmd.mpc_sr = 1;     run("vme mpc_sr",     '{0, 0, 0, 0, 0, 0, 1});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
