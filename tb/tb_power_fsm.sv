// tb_power_fsm: power-mode state machine.
// Runs with the microsecond tick high on every clock and shortened times,
// so each duration is a count of clocks that the checks measure. Walks the
// 16-step transition list (POWER OFF, STANDBY, RESET, STANDBY, DISABLE,
// STANDBY, NORMAL, STANDBY, SLEEP, STANDBY, NORMAL, SLEEP REQUEST, SILENT,
// SLEEP, STANDBY, NORMAL), then the SLEEP REQUEST variants (acknowledge
// timer expiry, wake-up during the acknowledge time, data abort before and
// during the LPS frame, request timeout in SILENT), overtemperature, supply
// undervoltage timeout (not armed until the supplies have been present) and
// autonomous power-down. The link partner's LPS frame sender is modelled:
// every lps_tx_req is answered by lps_tx_done five clocks later.
module tb_power_fsm;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int SPON = 20, INIT = 10, DET = 5, UVD = 100, PDA = 200;
  localparam int REQ0 = 40, ACK0 = 20;

  logic rst_n, tick_us, uv_vbat, uv_supply, ot, rst_pin_n, en_pin, sw_reset;
  logic pm_cmd_valid, auto_op, sleep_ack_en, loc_wake_ev, rem_wake_ev, lps_rx, data_det, lps_tx_done;
  logic [3:0] pm_cmd;
  logic [1:0] sleep_req_to;
  pwr_state_t state;
  logic smi_en, sleep_mode, regs_reset, strap_capture, inh, xfer_en, lps_tx_req;
  logic pwon_ev, wakeup_ev, lps_rx_ev, sleep_abort_ev, data_det_wu_ev, en_status_ev, reset_status_ev;
  int checks = 0, failures = 0;
  int n_pwon = 0, n_wakeup = 0, n_abort = 0, n_lpsreq = 0, n_ddwu = 0, n_lpsrx = 0;

  power_fsm #(.T_SPON_US(SPON), .T_INIT_US(INIT), .T_DET_EN_US(DET), .T_DET_RST_US(DET),
              .T_UVD_US(UVD), .T_PD_AUTN_US(PDA),
              .T_REQ0_US(REQ0), .T_REQ1_US(60), .T_REQ2_US(80), .T_REQ3_US(100),
              .T_ACK0_US(ACK0), .T_ACK1_US(30), .T_ACK2_US(40), .T_ACK3_US(50)) dut (.*);

  always @(posedge clk) begin
    if (pwon_ev) n_pwon++;
    if (wakeup_ev) n_wakeup++;
    if (sleep_abort_ev) n_abort++;
    if (data_det_wu_ev) n_ddwu++;
    if (lps_rx_ev) n_lpsrx++;
    if (lps_tx_req) begin
      n_lpsreq++;
      fork begin repeat (5) @(posedge clk); #1; lps_tx_done = 1; @(posedge clk); #1; lps_tx_done = 0; end join_none
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state=%s)", what, state.name()); end
  endtask

  task automatic step; @(posedge clk); #1; endtask

  // wait for a state, return the clocks taken
  task automatic wait_state(pwr_state_t s, int maxc, output int n);
    n = 0;
    while (state != s && n < maxc) begin step(); n++; end
  endtask

  task automatic cmd(logic [3:0] c);
    pm_cmd = c; pm_cmd_valid = 1; step(); pm_cmd_valid = 0;
  endtask

  task automatic pulse(ref logic s); s = 1; step(); s = 0; endtask

  task automatic expect_state(pwr_state_t s, int maxc, string what);
    int n;
    wait_state(s, maxc, n);
    check(state == s, what);
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, m;
    rst_n = 1; #1; rst_n = 0;
    tick_us = 1; uv_vbat = 1; uv_supply = 1; ot = 0; rst_pin_n = 1; en_pin = 1; sw_reset = 0;
    pm_cmd_valid = 0; pm_cmd = 0; auto_op = 0; sleep_ack_en = 0; sleep_req_to = 0;
    loc_wake_ev = 0; rem_wake_ev = 0; lps_rx = 0; data_det = 0; lps_tx_done = 0;
    repeat (2) @(posedge clk); rst_n = 1; step();
    // 1 POWER OFF
    check(state == ST_POWER_OFF && regs_reset && strap_capture && !inh && !smi_en, "1 POWER OFF outputs");
    // 2 STANDBY with PWON; SMI after SPON
    uv_vbat = 0;
    expect_state(ST_STANDBY, 5, "2 STANDBY after battery good");
    step();
    check(n_pwon == 1 && inh && !smi_en, "PWON event, INH high, SMI still off");
    wait_state(ST_POWER_OFF, SPON - 3, n);
    check(!smi_en, "SMI off during start-up time");
    repeat (5) step();
    check(smi_en, "SMI on after start-up time");
    // the supplies have been low since power-on: no undervoltage time-out yet
    repeat (UVD + 20) step();
    check(state == ST_STANDBY, "undervoltage time-out not armed before the supplies were present");
    uv_supply = 0; step();
    // 3 RESET and 4 STANDBY after T_DET_RST
    rst_pin_n = 0; step(); step();
    check(state == ST_RESET && regs_reset && strap_capture && !smi_en, "3 RESET");
    repeat (10) step();
    rst_pin_n = 1;
    wait_state(ST_STANDBY, 50, n);
    check(state == ST_STANDBY && n >= DET && n <= DET + 2, $sformatf("4 STANDBY %0d clocks after RST_N release", n));
    // 5 DISABLE and 6 STANDBY
    en_pin = 0; step(); step();
    check(state == ST_DISABLE && !regs_reset && !smi_en, "5 DISABLE keeps registers");
    en_pin = 1;
    wait_state(ST_STANDBY, 50, n);
    check(state == ST_STANDBY && n >= DET && n <= DET + 2, "6 STANDBY after EN");
    // 7 NORMAL by command, data only after T_INIT
    repeat (SPON + 2) step();
    n = n_wakeup;
    cmd(PM_NORMAL); step();
    check(state == ST_NORMAL && !xfer_en, "7 NORMAL, link not yet initialised");
    step();
    check(n_wakeup == n + 1, "WAKEUP event on entering NORMAL");
    repeat (INIT + 2) step();
    check(xfer_en, "data enabled after initialisation time");
    // 8 STANDBY by command; 9 SLEEP by command
    cmd(PM_STANDBY); step(); check(state == ST_STANDBY && !xfer_en, "8 STANDBY");
    cmd(PM_SLEEP);   step(); check(state == ST_SLEEP && !inh && sleep_mode && smi_en, "9 SLEEP: INH low, limited SMI");
    // 10 STANDBY on local wake-up, 11 continuing to NORMAL
    pulse(loc_wake_ev);
    check(state == ST_STANDBY, "10 STANDBY on wake-up");
    step();
    check(state == ST_NORMAL, "11 NORMAL after the wake-up");
    // 12 SLEEP REQUEST on LPS, 13 SILENT after the LPS frame, 14 SLEEP on LPS reply
    n = n_lpsreq;
    pulse(lps_rx);
    check(state == ST_SLEEP_REQUEST, "12 SLEEP REQUEST on LPS");
    step(); check(n_lpsrx == 1, "LPS received event");
    expect_state(ST_SILENT, 20, "13 SILENT after sending LPS");
    check(n_lpsreq == n + 1, "one LPS frame sent");
    pulse(lps_rx);
    check(state == ST_SLEEP, "14 SLEEP on LPS from the link partner");
    // 15 STANDBY on remote wake-up, 16 NORMAL
    pulse(rem_wake_ev);
    check(state == ST_STANDBY, "15 STANDBY on remote wake-up");
    step(); check(state == ST_NORMAL, "16 NORMAL");

    // request timeout in SILENT -> NORMAL with SLEEP ABORT
    repeat (INIT + 2) step();
    n = n_abort;
    cmd(PM_SLEEP);
    check(state == ST_SLEEP_REQUEST, "sleep command in NORMAL -> SLEEP REQUEST");
    begin
      automatic int t = 0;
      while (state != ST_NORMAL && t < 200) begin step(); t++; end
      check(state == ST_NORMAL && t >= REQ0 - 2 && t <= REQ0 + 2, $sformatf("request timeout after %0d clocks", t));
    end
    step(); check(n_abort == n + 1, "SLEEP ABORT on request timeout");

    // SLEEP_ACK: acknowledge timer, then LPS, SILENT
    sleep_ack_en = 1; sleep_req_to = 2'd1;   // request 60, acknowledge 30
    n = n_lpsreq;
    pulse(lps_rx);
    begin
      automatic int t = 0;
      data_det = 1;   // data is ignored while the acknowledge timer runs
      while (n_lpsreq == n && t < 200) begin step(); t++; end
      data_det = 0;
      check(state == ST_SLEEP_REQUEST && t >= 29 && t <= 32, $sformatf("LPS sent when acknowledge timer expires (%0d)", t));
    end
    expect_state(ST_SILENT, 20, "SILENT after acknowledge expiry");
    pulse(lps_rx);
    check(state == ST_SLEEP, "SLEEP after handshake");
    pulse(loc_wake_ev); step();
    check(state == ST_NORMAL, "back to NORMAL");
    // SLEEP_ACK: wake-up during the acknowledge time -> NORMAL
    pulse(lps_rx);
    repeat (10) step();
    n = n_lpsreq;
    pulse(rem_wake_ev);
    check(state == ST_NORMAL && n_lpsreq == n, "wake-up before acknowledge expiry returns to NORMAL");
    // no SLEEP_ACK: data before the LPS frame has gone aborts
    sleep_ack_en = 0; sleep_req_to = 2'd0;
    repeat (INIT + 2) step();
    n = n_ddwu;
    m = n_wakeup;
    pulse(lps_rx);
    data_det = 1; step(); data_det = 0;
    check(state == ST_NORMAL, "data in SLEEP REQUEST returns to NORMAL");
    step(); check(n_ddwu == n + 1, "data-detected wake-up flagged");
    check(n_wakeup == m + 1, "WAKEUP event on a data-detected wake-up");
    // data while the LPS frame is still being sent also aborts
    repeat (INIT + 2) step();
    n = n_abort;
    pulse(lps_rx);
    repeat (5) step();
    check(state == ST_SLEEP_REQUEST, "waiting for the LPS frame to go");
    data_det = 1; step(); data_det = 0;
    check(state == ST_NORMAL, "data during the LPS frame returns to NORMAL");
    step(); check(n_abort == n + 1, "SLEEP ABORT on data during the LPS frame");
    // once the LPS frame has gone, data no longer aborts
    repeat (INIT + 2) step();
    pulse(lps_rx);
    repeat (3) step();
    pulse(lps_tx_done);
    check(state == ST_SILENT, "SILENT once the LPS frame has gone");
    data_det = 1; step(); data_det = 0;
    check(state == ST_SILENT, "data in SILENT does not abort");
    cmd(PM_NORMAL); step();
    check(state == ST_NORMAL, "NORMAL command from SILENT");

    // overtemperature: NORMAL -> STANDBY, no NORMAL while hot
    ot = 1; step(); step();
    check(state == ST_STANDBY, "overtemperature -> STANDBY");
    cmd(PM_NORMAL); step();
    check(state == ST_STANDBY, "no NORMAL while overtemperature");
    ot = 0;
    // supply undervoltage: STANDBY now, SLEEP after UVD
    cmd(PM_NORMAL); step();
    check(state == ST_NORMAL, "NORMAL again");
    uv_supply = 1;
    begin
      automatic int t = 0;
      step(); step();
      check(state == ST_STANDBY, "supply undervoltage -> STANDBY");
      while (state != ST_SLEEP && t < 500) begin step(); t++; end
      check(state == ST_SLEEP && t >= UVD - 5 && t <= UVD + 2, $sformatf("undervoltage timeout -> SLEEP after %0d", t));
    end
    uv_supply = 0;
    // software reset
    pulse(sw_reset);
    check(state == ST_RESET, "software reset -> RESET");
    expect_state(ST_STANDBY, 20, "RESET -> STANDBY");
    // autonomous mode: NORMAL at once, power-down after PDA clocks without data
    auto_op = 1; step(); step();
    check(state == ST_NORMAL, "autonomous mode goes to NORMAL");
    begin
      automatic int t = 0;
      while (state == ST_NORMAL && t < 1000) begin step(); t++; end
      check(state == ST_SLEEP_REQUEST && t >= PDA - 2 && t <= PDA + 2, $sformatf("autonomous power-down after %0d", t));
    end
    auto_op = 0;
    // battery loss from anywhere
    uv_vbat = 1; step(); step();
    check(state == ST_POWER_OFF, "battery undervoltage -> POWER OFF");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
