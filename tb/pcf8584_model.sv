// pcf8584_model: bus-side behavioural model of a PCF8584 I2C controller in
// 68000 mode, for testbenches only.  Two byte registers are selected by A0
// (S0 data, S1 control/status).  While CS* is low the model answers after
// DELAY cycles of its own clock with DTACK* low and, for reads, the
// register on the data bus.  With `mute` set it never answers.  A low
// RESET* clears both registers.  Nothing of the I2C side is modelled.
module pcf8584_model #(
  parameter int DELAY = 3
) (
  input  logic       clk,
  input  logic       reset_n,
  input  logic       cs_n,
  input  logic       a0,
  input  logic       rw,
  input  logic [7:0] d_in,
  output logic [7:0] d_out,
  output logic       dtack_n,
  input  logic       mute
);
  logic [7:0] regs [2];
  int cnt = 0;

  always @(posedge clk or negedge reset_n) begin
    if (!reset_n) begin
      regs[0] <= 8'h00; regs[1] <= 8'h00; cnt <= 0; dtack_n <= 1'b1; d_out <= '0;
    end else if (cs_n) begin
      cnt <= 0; dtack_n <= 1'b1;
    end else if (!mute) begin
      cnt <= cnt + 1;
      if (cnt == DELAY) begin
        if (!rw) regs[a0] <= d_in;
        d_out   <= regs[a0];
        dtack_n <= 1'b0;
      end
    end
  end
endmodule
