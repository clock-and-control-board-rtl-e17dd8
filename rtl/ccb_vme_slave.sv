// ccb_vme_slave: A24/D16 VME slave of the CCB.
//
// The board answers to the address modifiers 39, 3A, 3D and 3E (hex) and to
// single 16-bit accesses.  Its 512 KB space is selected by A[23:19]: in
// geographical mode (geo_mode = 1, set by a DIP switch) this must equal the
// slot's geographical address (the complement of the active-low GA pins of
// a VME64x backplane); in logical mode it must equal the fixed base C00000
// hex.  A[18:8] must be zero; A[7:1] select the register.
//
// The VME strobes are asynchronous: AS*, DS0* and DS1* are synchronised
// with two flip-flops.  When both data strobes fall while AS* is low and the
// address matches, the slave issues one bus_req with bus_we, bus_addr (byte
// offset, bit 0 = 0) and bus_wdata, waits for bus_ack, drives the read data
// and DTACK*, and holds them until the data strobes rise again.  Accesses
// to other boards are ignored.
//
// Timing: bus_req comes three clocks after DS* falls; DTACK* falls one
// clock after bus_ack and rises one clock after DS* is seen high (plus
// synchroniser delay).  The address decode rules are the specification's;
// the handshake timing and the zero check of A[18:8] are this design's.
module ccb_vme_slave #(
  parameter logic [4:0] LOGICAL_BASE = 5'b11000   // C00000 hex
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        as_n,
  input  logic        ds0_n,
  input  logic        ds1_n,
  input  logic        write_n,
  input  logic [5:0]  am,
  input  logic [23:1] addr,
  input  logic [4:0]  ga_n,
  input  logic        geo_mode,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  output logic        dtack_n,
  output logic        bus_req,
  output logic        bus_we,
  output logic [7:0]  bus_addr,
  output logic [15:0] bus_wdata,
  input  logic        bus_ack,
  input  logic [15:0] bus_rdata
);

  typedef enum logic [1:0] {IDLE, WAIT_ACK, ACKED} state_t;
  state_t state;

  logic [1:0] as_s, ds_s;
  logic       ds_q;
  logic       ds_fall, am_ok, addr_ok;
  logic [4:0] space;

  assign ds_fall = ds_s[1] & ~ds_q;     // synchronised "both DS low" rises
  assign am_ok   = (am == 6'h39) || (am == 6'h3A) || (am == 6'h3D) || (am == 6'h3E);
  assign space   = geo_mode ? ~ga_n : LOGICAL_BASE;
  assign addr_ok = (addr[23:19] == space) && (addr[18:8] == '0);

  always_ff @(posedge clk) begin
    if (rst) begin
      as_s      <= '0;
      ds_s      <= '0;
      ds_q      <= 1'b0;
      state     <= IDLE;
      bus_req   <= 1'b0;
      bus_we    <= 1'b0;
      bus_addr  <= '0;
      bus_wdata <= '0;
      d_out     <= '0;
      d_oe      <= 1'b0;
      dtack_n   <= 1'b1;
    end else begin
      as_s    <= {as_s[0], ~as_n};
      ds_s    <= {ds_s[0], ~ds0_n & ~ds1_n};
      ds_q    <= ds_s[1];
      bus_req <= 1'b0;
      unique case (state)
        IDLE: if (ds_fall && as_s[1] && am_ok && addr_ok) begin
          bus_req   <= 1'b1;
          bus_we    <= ~write_n;
          bus_addr  <= {addr[7:1], 1'b0};
          bus_wdata <= d_in;
          state     <= WAIT_ACK;
        end
        WAIT_ACK: if (bus_ack) begin
          d_out   <= bus_rdata;
          d_oe    <= ~bus_we;
          dtack_n <= 1'b0;
          state   <= ACKED;
        end
        ACKED: if (!ds_s[1]) begin
          d_oe    <= 1'b0;
          dtack_n <= 1'b1;
          state   <= IDLE;
        end
        default: state <= IDLE;
      endcase
    end
  end

  // Handshake rules: DTACK is driven only in the acknowledged state, and the
  // data drivers are never on without DTACK.
  a_dtack_state: assert property (@(posedge clk) disable iff (rst) !dtack_n |-> state == ACKED);
  a_oe_dtack:    assert property (@(posedge clk) disable iff (rst) d_oe |-> !dtack_n);

endmodule
