// ccb_i2c_bridge: VME access path to the PCF8584 I2C bus controller.
//
// The TTCrx on the CCB is programmed over I2C through a PCF8584 controller
// wired in its "68000" bus mode.  VME reads and writes of Base+20 and
// Base+22 become PCF8584 accesses with A0 = 0 and A0 = 1: the bridge drives
// CS low with R/W and (for writes) the data, waits for the controller's
// DTACK, captures read data, and then acknowledges the internal bus.  If no
// DTACK comes within TIMEOUT clocks the access still ends (read data FF) so
// that VME does not hang.  A write to Base+24 holds the controller's reset
// low for RESET_CLKS clocks; the CCB reset holds it low as well.  The controller's 8 MHz reference clock is the
// CCB clock divided by CLK_DIV (40.08 / 5 = 8.016 MHz).
//
// Timing: cs_n falls one clock after the request and rises on the clock
// after the synchronised DTACK is seen low; ack follows once DTACK is seen
// high again, so each access is a full four-phase handshake.  The register addresses and the
// 8 MHz clock are the specification's; the handshake details, A0 mapping,
// time-out and reset length are this design's choices.
module ccb_i2c_bridge
  import ccb_pkg::*;
#(
  parameter int unsigned CLK_DIV    = 5,
  parameter int unsigned TIMEOUT    = 255,
  parameter int unsigned RESET_CLKS = 64
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        bus_req,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [7:0]  bus_wdata,
  output logic        bus_ack,
  output logic [7:0]  bus_rdata,
  input  logic        i2c_reset,
  output logic        pcf_cs_n,
  output logic        pcf_a0,
  output logic        pcf_rw,        // 1 = read
  output logic [7:0]  pcf_d_out,
  output logic        pcf_d_oe,
  input  logic [7:0]  pcf_d_in,
  input  logic        pcf_dtack_n,
  output logic        pcf_reset_n,
  output logic        pcf_clk,
  output logic        access        // one-clock pulse per access (LED)
);

  typedef enum logic [1:0] {IDLE, WAIT_DTACK, RELEASE} state_t;
  state_t state;

  logic [7:0]  tmo;
  logic [1:0]  dtack_s;
  logic [$clog2(CLK_DIV)-1:0] div;
  logic        rst_pulse;

  // 8 MHz reference clock.
  always_ff @(posedge clk) begin
    if (rst) begin
      div     <= '0;
      pcf_clk <= 1'b0;
    end else begin
      div     <= (32'(div) == CLK_DIV - 1) ? '0 : div + 1'b1;
      pcf_clk <= (32'(div) < CLK_DIV / 2);
    end
  end

  ccb_pulse_gen u_rst (.clk, .rst, .trig(i2c_reset), .len(8'(RESET_CLKS)), .pulse(rst_pulse));
  assign pcf_reset_n = ~(rst_pulse | rst);

  always_ff @(posedge clk) begin
    if (rst) begin
      state     <= IDLE;
      pcf_cs_n  <= 1'b1;
      pcf_a0    <= 1'b0;
      pcf_rw    <= 1'b1;
      pcf_d_out <= '0;
      pcf_d_oe  <= 1'b0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
      tmo       <= '0;
      dtack_s   <= 2'b11;
      access    <= 1'b0;
    end else begin
      dtack_s <= {dtack_s[0], pcf_dtack_n};
      bus_ack <= 1'b0;
      access  <= 1'b0;
      unique case (state)
        IDLE: if (bus_req && (bus_addr == A_I2C0 || bus_addr == A_I2C1)) begin
          pcf_cs_n  <= 1'b0;
          pcf_a0    <= (bus_addr == A_I2C1);
          pcf_rw    <= ~bus_we;
          pcf_d_out <= bus_wdata;
          pcf_d_oe  <= bus_we;
          tmo       <= '0;
          access    <= 1'b1;
          state     <= WAIT_DTACK;
        end
        WAIT_DTACK: begin
          tmo <= tmo + 1'b1;
          if (!dtack_s[1]) begin
            bus_rdata <= pcf_d_in;
            pcf_cs_n  <= 1'b1;
            pcf_d_oe  <= 1'b0;
            tmo       <= '0;
            state     <= RELEASE;
          end else if (32'(tmo) >= TIMEOUT) begin
            bus_rdata <= 8'hff;
            pcf_cs_n  <= 1'b1;
            pcf_d_oe  <= 1'b0;
            tmo       <= '0;
            state     <= RELEASE;
          end
        end
        // Wait for the controller to withdraw DTACK (seen through the
        // synchroniser) before the next access can start.
        RELEASE: begin
          tmo <= tmo + 1'b1;
          if (dtack_s[1] || 32'(tmo) >= TIMEOUT) begin
            pcf_rw  <= 1'b1;
            bus_ack <= 1'b1;
            state   <= IDLE;
          end
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Handshake rules: the internal bus is acknowledged only with the chip
  // select released, and the data drivers are on only during a write cycle.
  a_ack_cs: assert property (@(posedge clk) disable iff (rst) bus_ack |-> pcf_cs_n);
  a_oe_wr:  assert property (@(posedge clk) disable iff (rst) pcf_d_oe |-> !pcf_rw);

endmodule
