// ccb_csr: control and status registers and VME command decode.
//
// Sits on the internal register bus behind the VME slave (one request
// pulse with write enable, byte offset and data; an ack with read data).
//   CSR1..CSR5  read/write control: CSR1 sources and masks, CSR2 VME fast
//               command, CSR3 VME fast data, CSR4 clock-enable length and
//               release masks, CSR5 L1ACC and pretrigger delays.
//   CSR6..CSR8  cfg_done lines of TMB, ALCT, DMB (+MPC in CSR8[9]).
//   CSR9        CLCT status bits (sticky), TTCrx ready / error strobes.
//   CSR10       ALCT status bits (sticky).
//   CSR11       DMB_reserved_in[2:0] and TMB_reserved_in[4:0] (sticky),
//               front-panel FP_RSV<1..2>.
//   CSR12..16   TTCrx snapshots (from ccb_ttc_latch).
//   CSR17       firmware date: day [4:0], month [8:5], year-2000 [11:9].
//   Base+96/98  L1ACC counter low (and latch) / latched high half.
// Sticky bits are set by a high input in any clock and cleared by a write
// to Base+4e (CSR9), 50 (CSR10) or 52 (CSR11); a set in the clearing clock
// wins.  Every write-only address of the map becomes a one-clock pulse in
// `cmd` (writes to CSR2 and CSR3 also pulse cmd.csr2_wr / csr3_wr).  The
// I2C controller addresses (Base+20/22) are left to the I2C bridge, which
// gives their ack.
//
// Timing: a request in clock t gives ack, read data and the command pulse in
// clock t + 1; a written CSR holds the new value from clock t + 1.  The map
// and bit layouts are the specification's; the reset values (all zero but
// CSR1 = 2000h: on-board clock, VME mode, no L1ACC hold) and the firmware
// date are this design's.
module ccb_csr
  import ccb_pkg::*;
#(
  parameter int unsigned FW_DAY   = 4,
  parameter int unsigned FW_MONTH = 8,
  parameter int unsigned FW_YEAR  = 6,
  parameter logic [15:0] CSR1_RESET = 16'h2000
) (
  input  logic        clk,
  input  logic        rst,
  // internal register bus
  input  logic        bus_req,
  input  logic        bus_we,
  input  logic [7:0]  bus_addr,
  input  logic [15:0] bus_wdata,
  output logic        bus_ack,
  output logic [15:0] bus_rdata,
  // control registers and command pulses
  output logic [15:0] csr1,
  output logic [15:0] csr2,
  output logic [15:0] csr3,
  output logic [15:0] csr4,
  output logic [15:0] csr5,
  output vme_cmd_t    cmd,
  // status
  input  logic [8:0]  tmb_cfg_done,
  input  logic [8:0]  alct_cfg_done,
  input  logic [8:0]  dmb_cfg_done,
  input  logic        mpc_cfg_done,
  input  logic [8:0]  clct_status,
  input  logic [8:0]  alct_status,
  input  logic [2:0]  dmb_reserved_in,
  input  logic [4:0]  tmb_reserved_in,
  input  logic [2:1]  fp_rsv,
  input  logic        ttc_ready,
  input  logic        ttc_sinerr,
  input  logic        ttc_dberr,
  input  logic [15:0] csr12,
  input  logic [15:0] csr13,
  input  logic [15:0] csr14,
  input  logic [15:0] csr15,
  input  logic [15:0] csr16,
  input  logic [31:0] l1a_count,
  input  logic [15:0] l1a_cnt_hi
);

  logic [8:0] st9, st10;
  logic [7:0] st11;
  logic       wr, rd;
  vme_cmd_t   c;
  logic [15:0] rmux;
  logic [15:0] csr17;

  assign wr = bus_req &  bus_we;
  assign rd = bus_req & ~bus_we;
  assign csr17 = {4'b0000, 3'(FW_YEAR), 4'(FW_MONTH), 5'(FW_DAY)};

  // Write-command decode.
  always_comb begin
    c = '0;
    if (wr) begin
      unique case (bus_addr)
        A_CSR2:       c.csr2_wr        = 1'b1;
        A_CSR3:       c.csr3_wr        = 1'b1;
        A_I2C_RESET:  c.i2c_reset      = 1'b1;
        A_TTC_RESET:  c.ttc_reset      = 1'b1;
        A_CCB_RESET:  c.ccb_reset      = 1'b1;
        A_L1A:        c.l1a            = 1'b1;
        A_TMB_HR:     c.tmb_hr         = 1'b1;
        A_DMB_HR:     c.dmb_hr         = 1'b1;
        A_ALCT_HR:    c.alct_hr        = 1'b1;
        A_MPC_HR:     c.mpc_hr         = 1'b1;
        A_ALL_HR:     c.all_hr         = 1'b1;
        A_BC0:        c.bc0            = 1'b1;
        A_CLK_PULSE:  c.clk_pulse      = 1'b1;
        A_SOFT_RESET: c.soft_reset     = 1'b1;
        A_ADB_BOTH:   c.adb_both       = 1'b1;
        A_ADB_SYNC:   c.adb_sync       = 1'b1;
        A_ADB_ASYNC:  c.adb_async      = 1'b1;
        A_CLCT_EXT:   c.clct_ext       = 1'b1;
        A_ALCT_EXT:   c.alct_ext       = 1'b1;
        A_CAL0:       c.cal[0]         = 1'b1;
        A_CAL1:       c.cal[1]         = 1'b1;
        A_CAL2:       c.cal[2]         = 1'b1;
        A_CSR9_RST:   c.csr9_rst       = 1'b1;
        A_CSR10_RST:  c.csr10_rst      = 1'b1;
        A_CSR11_RST:  c.csr11_rst      = 1'b1;
        A_CLK_EN:     c.clk_en         = 1'b1;
        A_CFEB_INIT:  c.cfeb_initiate  = 1'b1;
        A_RELEASE:    c.release_hold   = 1'b1;
        A_MPC_RSV0:   c.mpc_rsv[0]     = 1'b1;
        A_MPC_RSV1:   c.mpc_rsv[1]     = 1'b1;
        A_MPC_SR:     c.mpc_sr         = 1'b1;
        A_DMB_RSV0:   c.dmb_rsv[0]     = 1'b1;
        A_DMB_RSV1:   c.dmb_rsv[1]     = 1'b1;
        A_DMB_SR:     c.dmb_sr         = 1'b1;
        8'h6c:        c.dmb_rsv_out[0] = 1'b1;
        8'h6e:        c.dmb_rsv_out[1] = 1'b1;
        8'h70:        c.dmb_rsv_out[2] = 1'b1;
        8'h72:        c.dmb_rsv_out[3] = 1'b1;
        8'h74:        c.dmb_rsv_out[4] = 1'b1;
        8'h76:        c.tmb_rsv_out[0] = 1'b1;
        8'h78:        c.tmb_rsv_out[1] = 1'b1;
        8'h7a:        c.tmb_rsv_out[2] = 1'b1;
        A_TMB_RSV0:   c.tmb_rsv0       = 1'b1;
        A_TMB_SR:     c.tmb_sr         = 1'b1;
        8'h82:        c.ccb_rsv[1]     = 1'b1;
        8'h84:        c.ccb_rsv[2]     = 1'b1;
        8'h86:        c.ccb_rsv[3]     = 1'b1;
        A_L1RESET:    c.l1reset        = 1'b1;
        A_FP_RSV1:    c.fp_rsv1_out    = 1'b1;
        A_CNT_CLR:    c.cnt_clr        = 1'b1;
        A_CNT_EN:     c.cnt_en         = 1'b1;
        A_CNT_DIS:    c.cnt_dis        = 1'b1;
        default:      ;
      endcase
    end
    if (rd && bus_addr == A_CNT_LO) c.cnt_latch = 1'b1;
  end

  // Read multiplexer.
  always_comb begin
    unique case (bus_addr)
      A_CSR1:   rmux = csr1;
      A_CSR2:   rmux = csr2;
      A_CSR3:   rmux = csr3;
      A_CSR4:   rmux = csr4;
      A_CSR5:   rmux = csr5;
      A_CSR6:   rmux = {7'b0, tmb_cfg_done};
      A_CSR7:   rmux = {7'b0, alct_cfg_done};
      A_CSR8:   rmux = {6'b0, mpc_cfg_done, dmb_cfg_done};
      A_CSR9:   rmux = {4'b0, ttc_dberr, ttc_sinerr, ttc_ready, st9};
      A_CSR10:  rmux = {7'b0, st10};
      A_CSR11:  rmux = {6'b0, fp_rsv, st11};
      A_CSR12:  rmux = csr12;
      A_CSR13:  rmux = csr13;
      A_CSR14:  rmux = csr14;
      A_CSR15:  rmux = csr15;
      A_CSR16:  rmux = csr16;
      A_CSR17:  rmux = csr17;
      A_CNT_LO: rmux = l1a_count[15:0];
      A_CNT_HI: rmux = l1a_cnt_hi;
      default:  rmux = 16'h0000;
    endcase
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      csr1 <= CSR1_RESET;
      csr2 <= '0;
      csr3 <= '0;
      csr4 <= '0;
      csr5 <= '0;
      st9  <= '0;
      st10 <= '0;
      st11 <= '0;
      cmd  <= '0;
      bus_ack   <= 1'b0;
      bus_rdata <= '0;
    end else begin
      if (wr) begin
        unique case (bus_addr)
          A_CSR1: csr1 <= bus_wdata;
          A_CSR2: csr2 <= bus_wdata;
          A_CSR3: csr3 <= bus_wdata;
          A_CSR4: csr4 <= bus_wdata;
          A_CSR5: csr5 <= bus_wdata;
          default: ;
        endcase
      end
      st9  <= (c.csr9_rst  ? '0 : st9)  | clct_status;
      st10 <= (c.csr10_rst ? '0 : st10) | alct_status;
      st11 <= (c.csr11_rst ? '0 : st11) | {tmb_reserved_in, dmb_reserved_in};
      cmd     <= c;
      bus_ack <= bus_req && bus_addr != A_I2C0 && bus_addr != A_I2C1;
      if (rd) bus_rdata <= rmux;
    end
  end

endmodule
