// ccb_pkg: types and constants shared by the Clock and Control Board (CCB) logic.
//
// The CCB sits in slot 12 of a CSC peripheral crate.  It takes timing and
// trigger information from a TTCrx receiver and VME commands from the crate
// controller and turns them into the bussed fast-control, reload and special
// purpose lines of the custom backplane.  This package holds:
//   * the bundles of signals seen at the board boundary (TTCrx outputs,
//     backplane inputs and outputs, front panel, LEDs) as packed structs,
//   * the fast-control command codes the CCB decodes (ccb_cmd[5:0]),
//   * the VME register map (byte offsets from the board base address),
//   * the pulse lengths in clocks of the 40.08 MHz LHC clock.
// The command codes, register offsets and pulse durations follow the CCB
// specification; the struct groupings and field order are this design's own.
package ccb_pkg;

  // ---------------------------------------------------------------- timing
  // 25 ns = 1 clock, 400 ns hard reset = 16 clocks, 500 ns ADB pulse = 20.
  localparam int unsigned HARD_RESET_CLKS = 16;
  localparam int unsigned ADB_SYNC_CLKS   = 20;

  // ---------------------------------------------------------------- TTCrx
  typedef struct packed {
    logic        ready;        // TTCReady
    logic        bcnt_res;     // BCntRes
    logic        evcnt_res;    // EvCntRes
    logic        l1accept;     // L1Accept
    logic [7:2]  brcst;        // Brcst<7:2>
    logic        brcst_str1;   // BrcstStr1
    logic        brcst_str2;   // BrcstStr2
    logic [11:0] bcnt;         // BCnt<11:0> (bunch or event count)
    logic        bcnt_str;     // BCntStr
    logic        evcnt_l_str;  // EvCntLStr
    logic        evcnt_h_str;  // EvCntHStr
    logic [7:0]  dout;         // Dout<7:0>
    logic [7:0]  subaddr;      // SubAddr<7:0>
    logic [3:0]  dq;           // DQ<3:0>
    logic        dout_str;     // DoutStr
    logic        sinerr_str;   // SinErrStr
    logic        dberr_str;    // DbErStr
  } ttcrx_t;

  // ------------------------------------------------- decoded ccb_cmd codes
  localparam logic [5:0] CMD_BC0            = 6'h01;
  localparam logic [5:0] CMD_L1RESET        = 6'h03;
  localparam logic [5:0] CMD_HARD_RESET     = 6'h04;
  localparam logic [5:0] CMD_TMB_HR         = 6'h10;
  localparam logic [5:0] CMD_ALCT_HR        = 6'h11;
  localparam logic [5:0] CMD_DMB_HR         = 6'h12;
  localparam logic [5:0] CMD_MPC_HR         = 6'h13;
  localparam logic [5:0] CMD_CAL0           = 6'h14;
  localparam logic [5:0] CMD_CAL1           = 6'h15;
  localparam logic [5:0] CMD_CAL2           = 6'h16;
  localparam logic [5:0] CMD_CFEB_INITIATE  = 6'h17;
  localparam logic [5:0] CMD_ADB_SYNC       = 6'h18;
  localparam logic [5:0] CMD_ADB_ASYNC      = 6'h19;
  localparam logic [5:0] CMD_CLCT_EXT       = 6'h1A;
  localparam logic [5:0] CMD_ALCT_EXT       = 6'h1B;
  localparam logic [5:0] CMD_SOFT_RESET     = 6'h1C;
  localparam logic [5:0] CMD_DMB_SR         = 6'h1D;
  localparam logic [5:0] CMD_TMB_SR         = 6'h1E;
  localparam logic [5:0] CMD_MPC_SR         = 6'h1F;
  localparam logic [5:0] CMD_SEND_BCNT      = 6'h20;
  localparam logic [5:0] CMD_SEND_EV0       = 6'h21;
  localparam logic [5:0] CMD_SEND_EV1       = 6'h22;
  localparam logic [5:0] CMD_SEND_EV2       = 6'h23;
  localparam logic [5:0] CMD_ADB_BOTH       = 6'h25;

  typedef struct packed {
    logic       bc0;
    logic       l1reset;
    logic       hard_reset;     // all hard resets
    logic       tmb_hr;
    logic       alct_hr;
    logic       dmb_hr;
    logic       mpc_hr;
    logic [2:0] cal;            // dmb_cfeb_calibrate[2:0]
    logic       cfeb_initiate;
    logic       adb_sync;
    logic       adb_async;
    logic       adb_both;
    logic       clct_ext;
    logic       alct_ext;
    logic       soft_reset;     // all soft resets
    logic       dmb_sr;
    logic       tmb_sr;
    logic       mpc_sr;
    logic       send_bcnt;
    logic       send_ev0;
    logic       send_ev1;
    logic       send_ev2;
  } ccb_dec_t;

  // ------------------------------------------------------ VME register map
  localparam logic [7:0] A_CSR1       = 8'h00;
  localparam logic [7:0] A_CSR2       = 8'h02;
  localparam logic [7:0] A_CSR3       = 8'h04;
  localparam logic [7:0] A_CSR4       = 8'h06;
  localparam logic [7:0] A_CSR5       = 8'h08;
  localparam logic [7:0] A_CSR6       = 8'h0a;
  localparam logic [7:0] A_CSR7       = 8'h0c;
  localparam logic [7:0] A_CSR8       = 8'h0e;
  localparam logic [7:0] A_CSR9       = 8'h10;
  localparam logic [7:0] A_CSR10      = 8'h12;
  localparam logic [7:0] A_CSR11      = 8'h14;
  localparam logic [7:0] A_CSR12      = 8'h16;
  localparam logic [7:0] A_CSR13      = 8'h18;
  localparam logic [7:0] A_CSR14      = 8'h1a;
  localparam logic [7:0] A_CSR15      = 8'h1c;
  localparam logic [7:0] A_CSR16      = 8'h1e;
  localparam logic [7:0] A_I2C0       = 8'h20;
  localparam logic [7:0] A_I2C1       = 8'h22;
  localparam logic [7:0] A_I2C_RESET  = 8'h24;
  localparam logic [7:0] A_TTC_RESET  = 8'h26;
  localparam logic [7:0] A_CCB_RESET  = 8'h28;
  localparam logic [7:0] A_L1A        = 8'h2a;
  localparam logic [7:0] A_TMB_HR     = 8'h2c;
  localparam logic [7:0] A_DMB_HR     = 8'h2e;
  localparam logic [7:0] A_ALCT_HR    = 8'h30;
  localparam logic [7:0] A_MPC_HR     = 8'h32;
  localparam logic [7:0] A_ALL_HR     = 8'h34;
  localparam logic [7:0] A_BC0        = 8'h36;
  localparam logic [7:0] A_CLK_PULSE  = 8'h38;
  localparam logic [7:0] A_SOFT_RESET = 8'h3c;
  localparam logic [7:0] A_ADB_BOTH   = 8'h3e;
  localparam logic [7:0] A_ADB_SYNC   = 8'h40;
  localparam logic [7:0] A_ADB_ASYNC  = 8'h42;
  localparam logic [7:0] A_CLCT_EXT   = 8'h44;
  localparam logic [7:0] A_ALCT_EXT   = 8'h46;
  localparam logic [7:0] A_CAL0       = 8'h48;
  localparam logic [7:0] A_CAL1       = 8'h4a;
  localparam logic [7:0] A_CAL2       = 8'h4c;
  localparam logic [7:0] A_CSR9_RST   = 8'h4e;
  localparam logic [7:0] A_CSR10_RST  = 8'h50;
  localparam logic [7:0] A_CSR11_RST  = 8'h52;
  localparam logic [7:0] A_CLK_EN     = 8'h58;
  localparam logic [7:0] A_CFEB_INIT  = 8'h5a;
  localparam logic [7:0] A_RELEASE    = 8'h5c;
  localparam logic [7:0] A_CSR17      = 8'h5e;
  localparam logic [7:0] A_MPC_RSV0   = 8'h60;
  localparam logic [7:0] A_MPC_RSV1   = 8'h62;
  localparam logic [7:0] A_MPC_SR     = 8'h64;
  localparam logic [7:0] A_DMB_RSV0   = 8'h66;
  localparam logic [7:0] A_DMB_RSV1   = 8'h68;
  localparam logic [7:0] A_DMB_SR     = 8'h6a;
  localparam logic [7:0] A_DMB_OUT0   = 8'h6c;   // ..8'h74 for bits 0..4
  localparam logic [7:0] A_TMB_OUT0   = 8'h76;   // ..8'h7a for bits 0..2
  localparam logic [7:0] A_TMB_RSV0   = 8'h7c;
  localparam logic [7:0] A_TMB_SR     = 8'h7e;
  localparam logic [7:0] A_CCB_RSV1   = 8'h82;   // ..8'h86 for bits 1..3
  localparam logic [7:0] A_L1RESET    = 8'h88;
  localparam logic [7:0] A_FP_RSV1    = 8'h8a;
  localparam logic [7:0] A_CNT_LO     = 8'h96;
  localparam logic [7:0] A_CNT_HI     = 8'h98;
  localparam logic [7:0] A_CNT_CLR    = 8'h9a;
  localparam logic [7:0] A_CNT_EN     = 8'h9c;
  localparam logic [7:0] A_CNT_DIS    = 8'h9e;

  // Single-clock pulses produced by VME writes (and the counter-latch read).
  typedef struct packed {
    logic       csr2_wr;
    logic       csr3_wr;
    logic       i2c_reset;
    logic       ttc_reset;
    logic       ccb_reset;
    logic       l1a;
    logic       tmb_hr;
    logic       dmb_hr;
    logic       alct_hr;
    logic       mpc_hr;
    logic       all_hr;
    logic       bc0;
    logic       clk_pulse;
    logic       soft_reset;
    logic       adb_both;
    logic       adb_sync;
    logic       adb_async;
    logic       clct_ext;
    logic       alct_ext;
    logic [2:0] cal;
    logic       csr9_rst;
    logic       csr10_rst;
    logic       csr11_rst;
    logic       clk_en;
    logic       cfeb_initiate;
    logic       release_hold;
    logic [1:0] mpc_rsv;
    logic       mpc_sr;
    logic [1:0] dmb_rsv;
    logic       dmb_sr;
    logic [4:0] dmb_rsv_out;
    logic [2:0] tmb_rsv_out;
    logic       tmb_rsv0;
    logic       tmb_sr;
    logic [3:1] ccb_rsv;
    logic       l1reset;
    logic       fp_rsv1_out;
    logic       cnt_clr;
    logic       cnt_en;
    logic       cnt_dis;
    logic       cnt_latch;
  } vme_cmd_t;

  // ------------------------------------------------------------- backplane
  // Internal (active-high) view; the top drives the complement (GTLP
  // negative logic).
  typedef struct packed {
    logic       clock40_enable;
    logic [5:0] cmd;
    logic       cmd_strobe;
    logic       ttcrx_ready;
    logic       evcntres;
    logic       bcntres;
    logic       l1reset;
    logic       bc0;
    logic       l1accept;
    logic [7:0] data;
    logic       data_strobe;
    logic [3:1] ccb_reserved;
    logic       tmb_hard_reset;
    logic       alct_hard_reset;
    logic       tmb_soft_reset;
    logic       tmb_reserved0;
    logic       mpc_hard_reset;
    logic       mpc_soft_reset;
    logic [1:0] mpc_reserved;
    logic       dmb_hard_reset;
    logic       dmb_soft_reset;
    logic [1:0] dmb_reserved;
    logic [2:0] cfeb_calibrate;
    logic [4:0] dmb_reserved_out;
    logic       adb_pulse_sync;
    logic       adb_pulse_async;
    logic       clct_ext_trig;
    logic       alct_ext_trig;
    logic [2:0] tmb_reserved_out;
  } bp_out_t;

  typedef struct packed {
    logic [8:0] tmb_cfg_done;
    logic [8:0] alct_cfg_done;
    logic [8:0] dmb_cfg_done;
    logic       mpc_cfg_done;
    logic       dmb_l1a_release;
    logic [2:0] dmb_reserved_in;
    logic [8:0] clct_status;
    logic [8:0] alct_status;
    logic       tmb_l1a_request;
    logic       tmb_l1a_release;
    logic [4:0] tmb_reserved_in;
  } bp_in_t;

  // ----------------------------------------------------------- front panel
  typedef struct packed {
    logic       clock40_enable;
    logic       l1accept;
    logic [2:0] cfeb_calibrate;
    logic       adb_sync;
    logic       adb_async;
    logic       clct_ext;
    logic       alct_ext;
    logic       bc0;
    logic       bcntres;
    logic       hard_reset;
    logic [2:1] rsv;           // FP_RSV<1..2>
  } fp_in_t;

  typedef struct packed {
    logic [8:0] clct_status;
    logic       bc0;
    logic       l1accept;
    logic       cmdstr;
    logic       reserved_out0;
    logic [8:0] alct_status;
  } fp_out_t;

  typedef struct packed {
    logic l1a;
    logic bx0;
    logic hr;
    logic i2c;
    logic mode;
    logic vme;
    logic ttc_ready;
    logic siner;
    logic dber;
  } led_t;

endpackage
