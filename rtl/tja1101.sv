// tja1101: digital core of a 100BASE-T1 automotive Ethernet PHY controller.
//
// The core sits between a MAC (MII or RMII) and the medium. On the medium
// side it exchanges whole Ethernet frames as a byte stream (mdi_tx, mdi_rx),
// the interface a 100BASE-T1 PCS/PMA would attach to. Around the data path
// it holds the management logic of the device:
//   * SMI (MDIO) slave and register file, registers 0-3 and 15-28;
//   * pin-strap capture of MASTER_SLAVE, AUTO_OP, MII_MODE, PHYAD and LDO
//     mode in POWER OFF / RESET;
//   * undervoltage and temperature supervision from digitised sense values;
//   * the power-mode state machine (POWER OFF, DISABLE, RESET, STANDBY,
//     NORMAL, SLEEP REQUEST, SILENT, SLEEP) with the LPS sleep handshake;
//   * local and remote wake-up with forwarding;
//   * interrupt source/enable registers driving INT_N;
//   * frame forwarding with internal/external/remote loopback and the
//     4 KiB / 16 KiB payload limit;
//   * two header sniffers, one on each direction of the MII.
//
// Clocking: everything runs on clk, the MII interface clock (TXC/RXC,
// 25 MHz) or, in RMII mode, REF_CLK (50 MHz); CLK_MHZ must give its
// frequency so that the microsecond tick used by the timers is right. MDC
// is oversampled. por_n is the power-on reset of the logic.
// The shared strap pins are modelled as separate inputs (config_pins,
// phyad_pins) and rx_oe, low while straps are captured, tells the pad ring
// when RXD/RXDV/RXER may be driven.
//
// The blocks and their behaviour follow the design description; the
// byte-stream medium port, the digital sense inputs and the single clock are
// this design's choices.
module tja1101
  import tja_pkg::*;
#(
  parameter int CLK_MHZ = 25
) (
  input  logic               clk,
  input  logic               por_n,
  // supplies and temperature, digitised
  input  logic [15:0]        vbat_mv,
  input  logic [15:0]        vddio_mv,
  input  logic [15:0]        vddd3v3_mv,
  input  logic [15:0]        vdda3v3_mv,
  input  logic [15:0]        vddd1v8_mv,
  input  logic signed [15:0] temp_c,
  // control pins
  input  logic               rst_pin_n,
  input  logic               en_pin,
  input  logic               sel_1v8,
  input  logic               wake_i,
  output logic               wake_o,
  output logic               wake_oe,
  output logic               inh,
  output logic               int_n,
  // SMI
  input  logic               mdc,
  input  logic               mdio_i,
  output logic               mdio_o,
  output logic               mdio_oe,
  // MII / RMII
  input  logic               txen,
  input  logic               txer,
  input  logic [3:0]         txd,
  output logic               rxdv,
  output logic               rxer,
  output logic [3:0]         rxd,
  output logic               rx_oe,
  input  logic [3:0]         config_pins,
  input  logic [1:0]         phyad_pins,
  // medium side (PCS/PMA attach here)
  output byte_stream_t       mdi_tx,
  input  byte_stream_t       mdi_rx,
  input  logic               link_up,
  input  logic               sym_err_ev,
  input  logic               link_fail_ev,
  // observation
  output pwr_state_t         state,
  output sniff_rec_t         sniff_tx,
  output logic               sniff_tx_valid,
  output sniff_rec_t         sniff_rx,
  output logic               sniff_rx_valid
);

  // ---------------------------------------------------- microsecond tick
  logic [7:0] presc;
  logic       tick_us;
  always_ff @(posedge clk or negedge por_n) begin
    if (!por_n) begin
      presc   <= '0;
      tick_us <= 1'b0;
    end else begin
      tick_us <= presc == 8'(CLK_MHZ - 1);
      presc   <= (presc == 8'(CLK_MHZ - 1)) ? 8'd0 : presc + 8'd1;
    end
  end

  // ------------------------------------------------------------- signals
  ctrl_regs_t ctrl;
  logic       smi_en, sleep_mode, regs_reset, strap_capture, xfer_en;
  logic       uv_vbat, uv_vddio, uv_vddd3v3, uv_vdda3v3, uv_vddd1v8, uv_supply;
  logic       ot, temp_warn, uv_err_ev, uv_rec_ev, temp_err_ev;
  logic       st_master, st_auto, st_ldo;
  logic [1:0] st_mii;
  logic [4:0] st_phyad;
  logic [4:0] reg_addr;
  logic       rd_en, wr_en;
  logic [15:0] rd_data, wr_data;
  logic       sw_reset, pm_cmd_valid, control_err, int_rd;
  logic [3:0] pm_cmd;
  logic [15:0] int_src, irq_events;
  logic       pwon_ev, wakeup_ev, lps_rx_ev, sleep_abort_ev, data_det_wu_ev;
  logic       en_status_ev, reset_status_ev, lps_tx_req;
  logic       loc_wake_ev, rem_wake_ev, wup_tx_req;
  logic       cls_data_det, lt_valid, lps_det, wur_det;
  logic [15:0] len_type;
  logic       gen_busy, gen_done, gen_done_lps, gen_ready;
  logic       tx_err_ev, rx_err_ev, oversize_ev, mii_data_det, mdi_data_det;
  logic       rx_ready, rx_overflow, mii_activity;
  logic       rmii;
  byte_stream_t mii_tx_bs, mii_rx_bs, gen_bs;

  assign rmii  = ctrl.r18[B18_MII_HI] ^ ctrl.r18[B18_MII_LO];
  assign rx_oe = !strap_capture;

  // ------------------------------------------------------- supervision
  env_monitor u_env (
    .clk, .rst_n(por_n),
    .vbat_mv, .vddio_mv, .vddd3v3_mv, .vdda3v3_mv, .vddd1v8_mv, .temp_c,
    .uv_vbat, .uv_vddio, .uv_vddd3v3, .uv_vdda3v3, .uv_vddd1v8, .uv_supply,
    .ot, .temp_warn, .uv_err_ev, .uv_rec_ev, .temp_err_ev
  );

  pin_strap u_strap (
    .clk, .rst_n(por_n), .capture(strap_capture),
    .config_pins, .phyad_pins, .sel_1v8,
    .master_slave(st_master), .auto_op(st_auto), .mii_mode(st_mii),
    .phy_addr(st_phyad), .ldo_ext(st_ldo)
  );

  // ---------------------------------------------------------------- SMI
  mdio_slave u_mdio (
    .clk, .rst_n(por_n), .smi_en,
    .phy_addr(ctrl.r19[B19_PHYAD_HI:B19_PHYAD_LO]),
    .mdc, .mdio_i, .mdio_o, .mdio_oe,
    .reg_addr, .rd_en, .rd_data, .wr_en, .wr_data
  );

  smi_regs u_regs (
    .clk, .rst_n(por_n), .regs_reset, .smi_en, .sleep_mode,
    .addr(reg_addr), .rd_en, .rd_data, .wr_en, .wr_data,
    .strap_master(st_master), .strap_auto_op(st_auto), .strap_mii_mode(st_mii),
    .strap_phyad(st_phyad), .strap_ldo_ext(st_ldo),
    .state, .int_src, .int_n, .link_up, .sym_err_ev, .link_fail_ev,
    .rx_err_ev(rx_err_ev | rx_overflow), .tx_err_ev(tx_err_ev | oversize_ev),
    .local_wu_ev(loc_wake_ev), .remote_wu_ev(rem_wake_ev),
    .data_det_wu_ev, .en_status_ev, .reset_status_ev,
    .uv_vddio, .uv_vddd3v3, .uv_vdda3v3, .uv_vddd1v8,
    .temp_high(ot), .temp_warn,
    .ctrl, .sw_reset, .pm_cmd_valid, .pm_cmd, .control_err, .int_rd
  );

  // ---------------------------------------------------------- interrupts
  always_comb begin
    irq_events = '0;
    irq_events[IRQ_PWON]         = pwon_ev;
    // a data-detected wake-up from SLEEP REQUEST interrupts only with REMWUPHY
    irq_events[IRQ_WAKEUP]       = wakeup_ev &
                                   ~(data_det_wu_ev & ~ctrl.r18[B18_REMWUPHY]);
    irq_events[IRQ_WUR_RECEIVED] = wur_det;
    irq_events[IRQ_LPS_RECEIVED] = lps_rx_ev;
    irq_events[IRQ_CONTROL_ERR]  = control_err;
    irq_events[IRQ_UV_ERR]       = uv_err_ev | (pwon_ev & uv_supply);
    irq_events[IRQ_UV_RECOVERY]  = uv_rec_ev;
    irq_events[IRQ_TEMP_ERR]     = temp_err_ev;
    irq_events[IRQ_SLEEP_ABORT]  = sleep_abort_ev;
  end

  irq_ctrl u_irq (
    .clk, .rst_n(por_n), .clr(regs_reset), .events(irq_events),
    .int_en(ctrl.r22), .rd_clear(int_rd), .int_src, .int_n
  );

  // --------------------------------------------------------- power modes
  power_fsm u_fsm (
    .clk, .rst_n(por_n), .tick_us,
    .uv_vbat, .uv_supply, .ot,
    .rst_pin_n, .en_pin, .sw_reset, .pm_cmd_valid, .pm_cmd,
    .auto_op(ctrl.r27[B27_AUTO_OP]),
    .sleep_ack_en(ctrl.r28[B28_SLEEP_ACK]),
    .sleep_req_to(ctrl.r19[B19_SRTO_HI:B19_SRTO_LO]),
    .loc_wake_ev, .rem_wake_ev, .lps_rx(lps_det),
    .data_det(mii_data_det | cls_data_det), .lps_tx_done(gen_done_lps),
    .state, .smi_en, .sleep_mode, .regs_reset, .strap_capture, .inh, .xfer_en,
    .lps_tx_req, .pwon_ev, .wakeup_ev, .lps_rx_ev, .sleep_abort_ev,
    .data_det_wu_ev, .en_status_ev, .reset_status_ev
  );

  wake_ctrl u_wake (
    .clk, .rst_n(por_n), .tick_us,
    .wake_pin_i(wake_i),
    .locwuphy(ctrl.r18[B18_LOCWUPHY]), .remwuphy(ctrl.r18[B18_REMWUPHY]),
    .fwdphyloc(ctrl.r18[B18_FWDPHYLOC]), .fwdphyrem(ctrl.r28[B28_FWDPHYREM]),
    .loc_wu_tim(ctrl.r27[B27_LOCWUTIM_HI:B27_LOCWUTIM_LO]),
    .wur_rx(wur_det),
    .loc_wake_ev, .rem_wake_ev, .wake_pin_o(wake_o), .wake_pin_oe(wake_oe),
    .wup_tx_req
  );

  // ------------------------------------------------------------ data path
  mii_tx_deser u_txd (
    .clk, .rst_n(por_n), .rmii, .txen, .txer, .txd,
    .out(mii_tx_bs), .activity(mii_activity)
  );

  mii_rx_ser u_rxs (
    .clk, .rst_n(por_n), .rmii, .in(mii_rx_bs), .in_ready(rx_ready),
    .rxdv, .rxer, .rxd, .overflow(rx_overflow)
  );

  frame_classifier u_cls (
    .clk, .rst_n(por_n), .in(mdi_rx),
    .data_det(cls_data_det), .lt_valid, .len_type, .lps_det, .wur_det
  );

  frame_gen u_gen (
    .clk, .rst_n(por_n), .lps_req(lps_tx_req), .wur_req(wup_tx_req),
    .ready(gen_ready), .out(gen_bs), .busy(gen_busy), .done(gen_done),
    .done_lps(gen_done_lps)
  );

  phy_datapath u_dp (
    .clk, .rst_n(por_n), .xfer_en,
    .loopback_en(ctrl.r0[B0_LOOPBACK]),
    .loopback_mode(ctrl.r17[B17_LB_HI:B17_LB_LO]),
    .jumbo_en(ctrl.r19[B19_JUMBO]),
    .mii_tx(mii_tx_bs), .mii_rx(mii_rx_bs), .mdi_rx, .mdi_tx,
    .gen(gen_bs), .gen_busy, .gen_ready,
    .tx_err_ev, .rx_err_ev, .oversize_ev, .mii_data_det, .mdi_data_det
  );

  // ------------------------------------------------------------ sniffers
  eth_sniffer #(.NS_PER_CLK(1000 / CLK_MHZ)) u_sniff_tx (
    .clk, .rst_n(por_n), .in(mii_tx_bs), .rec(sniff_tx), .rec_valid(sniff_tx_valid)
  );

  eth_sniffer #(.NS_PER_CLK(1000 / CLK_MHZ)) u_sniff_rx (
    .clk, .rst_n(por_n), .in(mii_rx_bs), .rec(sniff_rx), .rec_valid(sniff_rx_valid)
  );

endmodule
