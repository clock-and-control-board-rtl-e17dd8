// ccb_led_ctrl: front-panel LED drivers.
//
// Event LEDs use a one-shot so that a single 25 ns pulse is visible: the
// LED lights for ONESHOT clocks after the last event (about 50 ms at the
// default).  Events: L1A (an L1ACC sent to the backplane), BX0 (BC0 sent),
// HR (any hard reset), I2C (an access to the I2C controller), VME (any VME
// access to the board), SinEr and DbEr (TTCrx single / double error
// strobes).  Mode (on in TTCrx mode, CSR1[0]) and TTC_Ready follow their
// level.  The LED list is the specification's; the one-shot length and the
// one-shots on the error LEDs are this design's choices.
module ccb_led_ctrl
  import ccb_pkg::*;
#(
  parameter int unsigned ONESHOT = 2_000_000
) (
  input  logic clk,
  input  logic rst,
  input  logic ev_l1a,
  input  logic ev_bc0,
  input  logic ev_hr,
  input  logic ev_i2c,
  input  logic ev_vme,
  input  logic ev_siner,
  input  logic ev_dber,
  input  logic mode,
  input  logic ttc_ready,
  output led_t led
);

  localparam int unsigned CW = $clog2(ONESHOT + 1);
  localparam int NEV = 7;

  logic [NEV-1:0]  ev;
  logic [CW-1:0]   cnt [NEV];
  logic [NEV-1:0]  on;

  assign ev = {ev_l1a, ev_bc0, ev_hr, ev_i2c, ev_vme, ev_siner, ev_dber};

  for (genvar i = 0; i < NEV; i++) begin : g_os
    always_ff @(posedge clk) begin
      if (rst)               cnt[i] <= '0;
      else if (ev[i])        cnt[i] <= CW'(ONESHOT);
      else if (cnt[i] != '0) cnt[i] <= cnt[i] - 1'b1;
    end
    assign on[i] = (cnt[i] != '0);
  end

  always_comb begin
    led.l1a       = on[6];
    led.bx0       = on[5];
    led.hr        = on[4];
    led.i2c       = on[3];
    led.vme       = on[2];
    led.siner     = on[1];
    led.dber      = on[0];
    led.mode      = mode;
    led.ttc_ready = ttc_ready;
  end

endmodule
