// ccb_l1a_counter: 32-bit counter of L1ACC requests.
//
// Counts every L1ACC request from an enabled source, whether or not the
// L1ACC is then sent to the backplane.  VME commands clear it (Base+9a),
// enable it (Base+9c) and disable it (Base+9e); it is disabled after reset.
// A read of Base+96 pulses `latch`: the full count is copied into two 16-bit
// output registers so that the following read of Base+98 returns the upper
// half of the same value.
//
// Timing: a request in clock t is counted at the end of clock t.  clr has
// priority over counting.  Clearing the count at reset is this design's
// choice; the rest follows the specification.
module ccb_l1a_counter #(
  parameter int unsigned W = 32
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         l1a_req,
  input  logic         clr,
  input  logic         enable,
  input  logic         disable_cnt,
  input  logic         latch,
  output logic [W-1:0] count,
  output logic         counting,
  output logic [15:0]  lo,
  output logic [15:0]  hi
);

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      counting <= 1'b0;
      lo       <= '0;
      hi       <= '0;
    end else begin
      if (enable)           counting <= 1'b1;
      else if (disable_cnt) counting <= 1'b0;
      if (clr)                        count <= '0;
      else if (counting && l1a_req)   count <= count + 1'b1;
      if (latch) begin
        lo <= 16'(count);
        hi <= 16'(count >> 16);
      end
    end
  end

endmodule
