// power_fsm: power-mode state machine of the PHY.
//
// States: POWER OFF, DISABLE, RESET, STANDBY, NORMAL, SLEEP REQUEST, SILENT
// and SLEEP. The machine is a Moore machine: the state register is updated
// from the events listed below, and the control outputs (SMI enable,
// register reset, strap capture, INH, data-path enable) decode the state.
// Durations are counted in microseconds from tick_us, a one-cycle pulse
// every microsecond.
//
// Transitions, highest priority first:
//   battery undervoltage                  -> POWER OFF (from any state)
//   POWER OFF, battery good               -> STANDBY, PWON event
//   RST_N low or software reset           -> RESET; RESET -> STANDBY once
//                                            RST_N has been high T_DET_RST_US
//   EN low                                -> DISABLE; DISABLE -> STANDBY once
//                                            EN has been high T_DET_EN_US
//   supply undervoltage for T_UVD_US      -> SLEEP (counted only once all
//                                            supplies have been present
//                                            since power-on)
//   supply undervoltage or overtemperature
//     in NORMAL/SLEEP REQUEST/SILENT      -> STANDBY
//   STANDBY: normal command, autonomous mode or a pending wake-up -> NORMAL
//            (WAKEUP event); sleep command -> SLEEP; silent command -> SILENT
//   NORMAL:  standby command -> STANDBY; sleep command, LPS received or, in
//            autonomous mode, no data for T_PD_AUTN_US -> SLEEP REQUEST;
//            silent command -> SILENT
//   SLEEP REQUEST: the request timer t_to(req)sleep starts on entry.
//            SLEEP_ACK = 1: data is ignored, a wake-up returns to NORMAL,
//            and when t_to(ack)sleep expires the LPS code group is sent.
//            SLEEP_ACK = 0: the LPS code group is sent at once; data seen
//            on MII or MDI before it has gone (until lps_tx_done) returns
//            to NORMAL with SLEEP ABORT and WAKEUP events and the
//            data-detected wake-up flag. An LPS frame already started still finishes.
//            Once the LPS frame is sent -> SILENT.
//   SILENT:  LPS received from the link partner -> SLEEP; request timer
//            expired -> NORMAL with SLEEP ABORT; normal command -> NORMAL
//   SLEEP:   local or remote wake-up -> STANDBY with the wake-up pending, so
//            the next cycle continues to NORMAL
// The request and acknowledge times are selected by SLEEP_REQUEST_TO:
// 400 us/1 ms/4 ms/16 ms and 200 us/500 us/2 ms/8 ms.
//
// Outputs: smi_en is high in every state but POWER OFF, DISABLE and RESET,
// and only once T_SPON_US has passed since STANDBY was entered from one of
// those; sleep_mode limits SMI reads in SLEEP. xfer_en enables MII/MDI data
// in NORMAL (after T_INIT_US) and SILENT. INH is low in POWER OFF and SLEEP.
//
// The states, the allowed operations per state, the timing values and the
// LPS handshake follow the design description. The transition priorities,
// the STANDBY step on the way out of SLEEP, the autonomous power-down rule
// (the lower end, 1 s, of the 1-2 s range) and the SILENT command path are
// this design's reading where the description is silent.
module power_fsm
  import tja_pkg::*;
#(
  parameter int unsigned T_SPON_US    = 2000,
  parameter int unsigned T_INIT_US    = 2000,
  parameter int unsigned T_DET_EN_US  = 20,
  parameter int unsigned T_DET_RST_US = 20,
  parameter int unsigned T_UVD_US     = 670000,
  parameter int unsigned T_PD_AUTN_US = 1000000,
  parameter int unsigned T_REQ0_US    = 400,
  parameter int unsigned T_REQ1_US    = 1000,
  parameter int unsigned T_REQ2_US    = 4000,
  parameter int unsigned T_REQ3_US    = 16000,
  parameter int unsigned T_ACK0_US    = 200,
  parameter int unsigned T_ACK1_US    = 500,
  parameter int unsigned T_ACK2_US    = 2000,
  parameter int unsigned T_ACK3_US    = 8000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_us,
  // supervision
  input  logic       uv_vbat,
  input  logic       uv_supply,
  input  logic       ot,
  // pins and commands
  input  logic       rst_pin_n,
  input  logic       en_pin,
  input  logic       sw_reset,
  input  logic       pm_cmd_valid,
  input  logic [3:0] pm_cmd,
  input  logic       auto_op,
  input  logic       sleep_ack_en,
  input  logic [1:0] sleep_req_to,
  // wake-up and link events
  input  logic       loc_wake_ev,
  input  logic       rem_wake_ev,
  input  logic       lps_rx,
  input  logic       data_det,
  input  logic       lps_tx_done,
  // outputs
  output pwr_state_t state,
  output logic       smi_en,
  output logic       sleep_mode,
  output logic       regs_reset,
  output logic       strap_capture,
  output logic       inh,
  output logic       xfer_en,
  output logic       lps_tx_req,
  // events for the interrupt and status registers
  output logic       pwon_ev,
  output logic       wakeup_ev,
  output logic       lps_rx_ev,
  output logic       sleep_abort_ev,
  output logic       data_det_wu_ev,
  output logic       en_status_ev,
  output logic       reset_status_ev
);

  localparam int TW = 21;   // enough for T_PD_AUTN_US = 1e6

  pwr_state_t nxt;
  logic [TW-1:0] t_state;   // time since the state was entered
  logic [TW-1:0] t_sleep;   // time since SLEEP REQUEST was entered
  logic [TW-1:0] t_uv;      // time in supply undervoltage
  logic [TW-1:0] t_idle;    // time without data in NORMAL
  logic          spon_done;
  logic          init_done;
  logic          wake_pend;
  logic          lps_sent;  // LPS frame requested in this SLEEP REQUEST

  logic [TW-1:0] t_req, t_ack;
  always_comb begin
    unique case (sleep_req_to)
      2'd0: begin t_req = TW'(T_REQ0_US); t_ack = TW'(T_ACK0_US); end
      2'd1: begin t_req = TW'(T_REQ1_US); t_ack = TW'(T_ACK1_US); end
      2'd2: begin t_req = TW'(T_REQ2_US); t_ack = TW'(T_ACK2_US); end
      default: begin t_req = TW'(T_REQ3_US); t_ack = TW'(T_ACK3_US); end
    endcase
  end

  logic wake;
  assign wake = loc_wake_ev | rem_wake_ev;

  logic cmd_normal, cmd_standby, cmd_sleep, cmd_silent;
  assign cmd_normal  = pm_cmd_valid && pm_cmd == PM_NORMAL;
  assign cmd_standby = pm_cmd_valid && pm_cmd == PM_STANDBY;
  assign cmd_sleep   = pm_cmd_valid && pm_cmd == PM_SLEEP;
  assign cmd_silent  = pm_cmd_valid && pm_cmd == PM_SILENT;

  logic active;   // NORMAL, SLEEP REQUEST or SILENT
  logic uv_armed; // supplies have been present since power-on
  assign active = state == ST_NORMAL || state == ST_SLEEP_REQUEST || state == ST_SILENT;

  // ---------------------------------------------------------- next state
  always_comb begin
    nxt = state;
    if (uv_vbat) begin
      nxt = ST_POWER_OFF;
    end else if (state == ST_POWER_OFF) begin
      nxt = ST_STANDBY;
    end else if (!rst_pin_n || sw_reset) begin
      nxt = ST_RESET;
    end else if (state == ST_RESET) begin
      if (t_state >= TW'(T_DET_RST_US)) nxt = ST_STANDBY;
    end else if (!en_pin) begin
      nxt = ST_DISABLE;
    end else if (state == ST_DISABLE) begin
      if (t_state >= TW'(T_DET_EN_US)) nxt = ST_STANDBY;
    end else if (state != ST_SLEEP && t_uv >= TW'(T_UVD_US)) begin
      nxt = ST_SLEEP;
    end else if (active && (uv_supply || ot)) begin
      nxt = ST_STANDBY;
    end else begin
      unique case (state)
        ST_STANDBY: begin
          if ((cmd_normal || auto_op || wake_pend || wake) && !ot && !uv_supply)
            nxt = ST_NORMAL;
          else if (cmd_sleep)  nxt = ST_SLEEP;
          else if (cmd_silent) nxt = ST_SILENT;
        end
        ST_NORMAL: begin
          if (cmd_standby)     nxt = ST_STANDBY;
          else if (cmd_sleep || lps_rx ||
                   (auto_op && t_idle >= TW'(T_PD_AUTN_US)))
                               nxt = ST_SLEEP_REQUEST;
          else if (cmd_silent) nxt = ST_SILENT;
        end
        ST_SLEEP_REQUEST: begin
          if (cmd_standby)                         nxt = ST_STANDBY;
          else if (sleep_ack_en && !lps_sent && wake) nxt = ST_NORMAL;
          else if (!sleep_ack_en && data_det)      nxt = ST_NORMAL;
          else if (lps_sent && lps_tx_done)        nxt = ST_SILENT;
        end
        ST_SILENT: begin
          if (cmd_standby)                 nxt = ST_STANDBY;
          else if (lps_rx)                 nxt = ST_SLEEP;
          else if (cmd_normal || t_sleep >= t_req) nxt = ST_NORMAL;
        end
        ST_SLEEP: begin
          if (wake) nxt = ST_STANDBY;
        end
        default: nxt = state;
      endcase
    end
  end

  // ------------------------------------------------------ state and timers
  logic entering;
  assign entering = nxt != state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= ST_POWER_OFF;
      t_state   <= '0;
      t_sleep   <= '0;
      t_uv      <= '0;
      uv_armed  <= 1'b0;
      t_idle    <= '0;
      spon_done <= 1'b0;
      init_done <= 1'b0;
      wake_pend <= 1'b0;
      lps_sent  <= 1'b0;
      lps_tx_req <= 1'b0;
      pwon_ev <= 1'b0; wakeup_ev <= 1'b0; lps_rx_ev <= 1'b0;
      sleep_abort_ev <= 1'b0; data_det_wu_ev <= 1'b0;
      en_status_ev <= 1'b0; reset_status_ev <= 1'b0;
    end else begin
      state <= nxt;

      // time in state; RESET and DISABLE count only while the pin is released
      if (entering ||
          (state == ST_RESET && !rst_pin_n) ||
          (state == ST_DISABLE && !en_pin))
        t_state <= '0;
      else if (tick_us && t_state != '1)
        t_state <= t_state + 1'b1;

      // request timer: starts on entering SLEEP REQUEST (or SILENT from
      // another state) and keeps running through SILENT
      if (entering && (nxt == ST_SLEEP_REQUEST ||
                       (nxt == ST_SILENT && state != ST_SLEEP_REQUEST)))
        t_sleep <= '0;
      else if (tick_us && t_sleep != '1)
        t_sleep <= t_sleep + 1'b1;

      // undervoltage timer, armed once all supplies have been present
      // since power-on
      if (state == ST_POWER_OFF)  uv_armed <= 1'b0;
      else if (!uv_supply)        uv_armed <= 1'b1;
      if (!uv_supply || !uv_armed || state == ST_POWER_OFF || state == ST_SLEEP ||
          state == ST_RESET || state == ST_DISABLE)
        t_uv <= '0;
      else if (tick_us && t_uv != '1)
        t_uv <= t_uv + 1'b1;

      // inactivity timer for autonomous power-down
      if (state != ST_NORMAL || data_det)
        t_idle <= '0;
      else if (tick_us && t_idle != '1)
        t_idle <= t_idle + 1'b1;

      // SMI start-up time after power-on, reset or disable
      if (state == ST_POWER_OFF || state == ST_RESET || state == ST_DISABLE)
        spon_done <= 1'b0;
      else if (state == ST_STANDBY && t_state >= TW'(T_SPON_US))
        spon_done <= 1'b1;

      // PHY initialisation time in NORMAL
      if (state == ST_NORMAL && t_state >= TW'(T_INIT_US))
        init_done <= 1'b1;
      else if (!active)
        init_done <= 1'b0;

      // wake-up pending from SLEEP to NORMAL
      if (state == ST_SLEEP && wake)
        wake_pend <= 1'b1;
      else if (state != ST_STANDBY || entering)
        wake_pend <= 1'b0;

      // LPS transmission request inside SLEEP REQUEST
      lps_tx_req <= 1'b0;
      if (state != ST_SLEEP_REQUEST || entering) begin
        lps_sent <= 1'b0;
      end else if (!lps_sent && (!sleep_ack_en || t_sleep >= t_ack) &&
                   !(sleep_ack_en ? wake : data_det)) begin
        lps_sent   <= 1'b1;
        lps_tx_req <= 1'b1;
      end

      // events
      pwon_ev         <= state == ST_POWER_OFF && nxt == ST_STANDBY;
      wakeup_ev       <= entering && nxt == ST_NORMAL &&
                         (state == ST_STANDBY || state == ST_SLEEP ||
                          (state == ST_SLEEP_REQUEST && !sleep_ack_en));
      lps_rx_ev       <= state == ST_NORMAL && lps_rx;
      sleep_abort_ev  <= entering && nxt == ST_NORMAL &&
                         (state == ST_SLEEP_REQUEST || state == ST_SILENT) &&
                         !cmd_normal;
      data_det_wu_ev  <= entering && nxt == ST_NORMAL &&
                         state == ST_SLEEP_REQUEST && !sleep_ack_en;
      en_status_ev    <= entering && nxt == ST_DISABLE;
      reset_status_ev <= entering && nxt == ST_RESET;
    end
  end

  // ------------------------------------------------------------- outputs
  assign smi_en        = spon_done && state != ST_POWER_OFF &&
                         state != ST_RESET && state != ST_DISABLE;
  assign sleep_mode    = state == ST_SLEEP;
  assign regs_reset    = state == ST_POWER_OFF || state == ST_RESET;
  assign strap_capture = state == ST_POWER_OFF || state == ST_RESET;
  assign inh           = state != ST_POWER_OFF && state != ST_SLEEP;
  assign xfer_en       = (state == ST_NORMAL && init_done) || state == ST_SILENT;

endmodule
