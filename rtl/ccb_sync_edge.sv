// ccb_sync_edge: two-flip-flop synchroniser with rising-edge detector.
//
// Front-panel ECL inputs arrive asynchronously to the CCB clock.  Each bit
// is passed through two flip-flops; `level` is the synchronised signal and
// `rise` is a one-clock pulse on each 0-to-1 transition.  Latency: `level`
// follows the input after two clocks, `rise` is high in the same clock as
// the first high `level`.  The specification asks for action "on the rising
// edge of the external pulses"; the synchroniser is this design's.
module ccb_sync_edge #(
  parameter int unsigned W = 1
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [W-1:0] d,
  output logic [W-1:0] level,
  output logic [W-1:0] rise
);

  logic [W-1:0] s1, s2, s3;

  always_ff @(posedge clk) begin
    if (rst) begin
      s1 <= '0; s2 <= '0; s3 <= '0;
    end else begin
      s1 <= d; s2 <= s1; s3 <= s2;
    end
  end

  assign level = s2;
  assign rise  = s2 & ~s3;

endmodule
