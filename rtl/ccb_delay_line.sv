// ccb_delay_line: programmable delay for trigger pulses.
//
// The CCB delays L1ACC (by CSR5[7:0]) and the two pretriggers (by
// CSR5[15:8]) by 1 to 255 clocks before they reach the backplane.  The
// delay is a DEPTH-stage shift register read through a selectable tap, so
// any number of pulses may be in flight at once and the delay is exact.
//
// Timing: a pulse on din in clock t appears on dout (combinational from the
// register) in clock t + delay.  A delay of 0 behaves like 1.  The delay
// range is the specification's; the shift-register structure is this
// design's choice.
module ccb_delay_line #(
  parameter int unsigned DEPTH = 255
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       din,
  input  logic [7:0] delay,
  output logic       dout
);

  logic [DEPTH-1:0] sr;
  logic [7:0]       tap;

  always_ff @(posedge clk) begin
    if (rst) sr <= '0;
    else     sr <= {sr[DEPTH-2:0], din};
  end

  always_comb begin
    tap = (delay == 8'd0) ? 8'd0 : delay - 8'd1;
    if (32'(tap) >= DEPTH) tap = 8'(DEPTH - 1);
  end

  assign dout = sr[tap];

endmodule
