// ccb_pulse_gen: programmable-length pulse stretcher.
//
// A one-clock trigger starts an output pulse exactly `len` clocks long.  The
// CCB uses it wherever a short request must become a longer backplane pulse:
// the 400 ns (16 clock) FPGA hard resets, the 500 ns (20 clock) anode
// discriminator pulse, and the ccb_clock40_enable pulse whose length of 1 to
// 255 clocks is programmed in CSR4[7:0].
//
// Timing: pulse rises on the clock after trig and stays high for len clocks.
// A trigger during a pulse restarts the count; len = 0 gives no pulse.  The
// pulse lengths are the specification's; the restart rule is this design's.
module ccb_pulse_gen #(
  parameter int unsigned W = 8
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         trig,
  input  logic [W-1:0] len,
  output logic         pulse
);

  logic [W-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst)             cnt <= '0;
    else if (trig)       cnt <= len;
    else if (cnt != '0)  cnt <= cnt - 1'b1;
  end

  assign pulse = (cnt != '0);

endmodule
