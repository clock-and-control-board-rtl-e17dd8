// ccb_clock_select: source of the distributed 40 MHz clock (CSR1[2:1]).
//
//   sel = 00  on-board 80 MHz quartz divided by 2
//   sel = 01  Clock40Des1, the deskewed clock from the TTCrx
//   sel = 10  external clock from the front panel
//   sel = 11  a single 25 ns pulse on each VME write to Base+38
// ccb_clock40 is the clock sent to every slot.  core_clk clocks the CCB
// logic: it is the selected clock, except in the single-pulse mode where it
// is the on-board clock, so that the logic keeps running and can make the
// pulse (single_pulse is a one-clock-high register output of that logic).
//
// Timing: a plain multiplexer; switching sources can produce a short or long
// clock phase.  The four sources are the specification's; the separate
// core clock and the plain (not glitch-free) switch are this design's.
// The divide-by-two flip-flop is cleared by the power-up reset.
module ccb_clock_select (
  input  logic       por_n,
  input  logic       clk80_osc,
  input  logic       ttc_clk40,
  input  logic       fp_clk40,
  input  logic [1:0] sel,
  input  logic       single_pulse,
  output logic       ccb_clock40,
  output logic       core_clk
);

  logic osc_div2;

  always_ff @(posedge clk80_osc or negedge por_n) begin
    if (!por_n) osc_div2 <= 1'b0;
    else        osc_div2 <= ~osc_div2;
  end

  always_comb begin
    unique case (sel)
      2'b00:   ccb_clock40 = osc_div2;
      2'b01:   ccb_clock40 = ttc_clk40;
      2'b10:   ccb_clock40 = fp_clk40;
      default: ccb_clock40 = single_pulse;
    endcase
    unique case (sel)
      2'b01:   core_clk = ttc_clk40;
      2'b10:   core_clk = fp_clk40;
      default: core_clk = osc_div2;
    endcase
  end

endmodule
