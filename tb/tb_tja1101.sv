// tb_tja1101: end-to-end test of the PHY controller, at default parameters.
//
// The top is driven through its pins only: supply and temperature sense
// values, RST_N, EN, WAKE_IN_OUT, the SMI (a bit-level MDIO master), the MII
// of a MAC model, and the medium port of a link-partner model. The clock is
// 25 MHz and every timer runs at its real length (2 ms start-up, 2 ms link
// initialisation, 20 ms local wake-up, sleep request and acknowledge times
// at the register default SLEEP_REQUEST_TO = 01: 1 ms and
// 500 us, 670 ms undervoltage timeout).
//
// The run follows the 16-step state transition list (POWER OFF, STANDBY,
// RESET, STANDBY, DISABLE, STANDBY, NORMAL, STANDBY, SLEEP, STANDBY, NORMAL,
// SLEEP REQUEST, SILENT, SLEEP, STANDBY, NORMAL) and then exercises the
// other mechanisms: sleep abort on request timeout and on data, the 1 s
// autonomous power-down, SLEEP_ACK timing,
// wake-up forwarding both ways, SMI control error, overtemperature,
// interrupt handling, forwarding in both directions, the three kinds of
// loopback, TXER propagation, the 4 KiB and 16 KiB limits, receive
// FIFO overflow, RMII mode after a strap change, software reset, supply
// undervoltage timeout and battery loss. Register values are checked
// against values worked out from the register map, including the values
// seen in the reference run: REG21 = 0x8008 after power-on with low
// supplies, 0x4000 after a local wake-up, REG25 TEMP_HIGH = 0x0400, REG19
// low bits = 0x245. The sniffers are checked on a TCP frame. Each
// mechanism is counted, and one that never happened is a failure.
module tb_tja1101;
  import tja_pkg::*;
  logic clk = 0;
  always #20 clk = ~clk;           // 25 MHz

  logic por_n;
  logic [15:0] vbat_mv, vddio_mv, vddd3v3_mv, vdda3v3_mv, vddd1v8_mv;
  logic signed [15:0] temp_c;
  logic rst_pin_n, en_pin, sel_1v8, wake_i, wake_o, wake_oe, inh, int_n;
  logic mdc, mdio_i, mdio_o, mdio_oe;
  logic txen, txer, rxdv, rxer, rx_oe;
  logic [3:0] txd, rxd, config_pins;
  logic [1:0] phyad_pins;
  byte_stream_t mdi_tx, mdi_rx;
  logic link_up, sym_err_ev, link_fail_ev;
  pwr_state_t state;
  sniff_rec_t sniff_tx, sniff_rx;
  logic sniff_tx_valid, sniff_rx_valid;

  tja1101 dut (.*);

  int checks = 0, failures = 0;
  int mech[string];
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (state %s, t=%0t)", what, state.name(), $time); end
  endtask
  function automatic void hit(string m);
    if (mech.exists(m)) mech[m]++; else mech[m] = 1;
  endfunction
  task automatic step; @(posedge clk); #1; endtask
  task automatic wait_us(int us); repeat (us * 25) step(); endtask

  task automatic expect_state(pwr_state_t s, int max_us, string what);
    int n = 0;
    while (state != s && n < max_us * 25) begin step(); n++; end
    check(state == s, what);
  endtask

  // ------------------------------------------------------ state history
  pwr_state_t prev_state = ST_POWER_OFF;
  always @(posedge clk) if (por_n) begin
    if (state != prev_state) hit($sformatf("%s->%s", prev_state.name(), state.name()));
    prev_state <= state;
  end

  // -------------------------------------------------------- MDIO master
  localparam int HALF = 6;         // MDC about 2 MHz
  bit [4:0] phy = 5'd2;
  task automatic mbit(bit b);
    mdc = 0; mdio_i = b; repeat (HALF) step(); mdc = 1; repeat (HALF) step();
  endtask
  task automatic mhdr(bit [1:0] op, bit [4:0] ra);
    for (int i = 0; i < 32; i++) mbit(1);
    mbit(0); mbit(1); mbit(op[1]); mbit(op[0]);
    for (int i = 4; i >= 0; i--) mbit(phy[i]);
    for (int i = 4; i >= 0; i--) mbit(ra[i]);
  endtask
  task automatic smi_wr(bit [4:0] ra, bit [15:0] d);
    mhdr(2'b01, ra); mbit(1); mbit(0);
    for (int i = 15; i >= 0; i--) mbit(d[i]);
    mdio_i = 1; mdc = 0; repeat (2 * HALF) step();
    hit("smi write");
  endtask
  task automatic smi_rd(bit [4:0] ra, output bit [15:0] d, output bit drove);
    mhdr(2'b10, ra);
    drove = 0;
    for (int i = 17; i >= 0; i--) begin
      mdc = 0; mdio_i = 1; repeat (HALF) step();
      mdc = 1;
      if (i < 16) d[i] = mdio_o;
      if (i < 17) drove |= mdio_oe;
      repeat (HALF) step();
    end
    mdc = 0; repeat (2 * HALF) step();
    if (drove) hit("smi read");
  endtask
  bit [15:0] rv;
  bit        rdrv;
  task automatic rdv(bit [4:0] ra); smi_rd(ra, rv, rdrv); endtask
  task automatic set_pm(bit [3:0] pm, bit [15:0] rest = 16'h0);
    bit [15:0] v = rest;
    v[B17_PM_HI:B17_PM_LO] = pm;
    smi_wr(REG_EXT_CTRL, v);
  endtask

  // --------------------------------------------------------- MAC model
  typedef logic [7:0] bytes_t[$];
  bit rmii_mode = 0;
  task automatic mac_send(bytes_t f, int err_at = -1);
    bytes_t all = '{8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'h55, 8'hD5};
    all = {all, f};
    foreach (all[i]) begin
      if (rmii_mode) for (int k = 0; k < 4; k++) begin
        txen = 1; txer = (i - 8 == err_at); txd = {2'b00, all[i][2*k +: 2]}; step();
      end else begin
        txen = 1; txer = (i - 8 == err_at); txd = all[i][3:0]; step();
        txd = all[i][7:4]; step();
      end
    end
    txen = 0; txer = 0; txd = 0;
    repeat (24) step();
  endtask
  // receiving MAC: reassemble RXD while RXDV is high
  bytes_t mac_rx[$];
  bit     mac_rx_err[$];
  bytes_t cur_rx;
  logic [7:0] rsh; int rsub = 0; bit rerr = 0, rdv_d = 0;
  always @(posedge clk) if (por_n) begin
    if (rxdv) begin
      if (rmii_mode) rsh = {rxd[1:0], rsh[7:2]}; else rsh = {rxd, rsh[7:4]};
      rerr |= rxer;
      rsub++;
      if (rsub == (rmii_mode ? 4 : 2)) begin cur_rx.push_back(rsh); rsub = 0; end
    end else begin
      if (rdv_d) begin
        // strip preamble and delimiter
        if (cur_rx.size() >= 8 && cur_rx[7] == 8'hD5) cur_rx = cur_rx[8:$];
        mac_rx.push_back(cur_rx); mac_rx_err.push_back(rerr);
        cur_rx.delete(); rerr = 0;
      end
      rsub = 0;
    end
    rdv_d = rxdv;
  end

  // ------------------------------------------------ link partner model
  bytes_t med_rx[$];               // frames the PHY sent
  bit     med_err[$];
  bytes_t cur_med; bit cur_med_err = 0;
  bit     partner_sleeps = 0;      // answer an LPS frame with an LPS frame
  int     lps_seen = 0, wur_seen = 0;
  event   partner_lps_ev;
  always @(posedge clk) if (por_n && mdi_tx.valid) begin
    if (mdi_tx.sof) begin cur_med.delete(); cur_med_err = 0; end
    cur_med.push_back(mdi_tx.data);
    cur_med_err |= mdi_tx.err;
    if (mdi_tx.eof) begin
      med_rx.push_back(cur_med); med_err.push_back(cur_med_err);
      if (cur_med.size() >= 14 && {cur_med[12], cur_med[13]} == LT_LPS) begin
        lps_seen++; hit("LPS sent on medium");
        if (partner_sleeps) -> partner_lps_ev;
      end
      if (cur_med.size() >= 14 && {cur_med[12], cur_med[13]} == LT_WAKEUP) begin
        wur_seen++; hit("wake-up frame sent on medium");
      end
    end
  end
  bit med_busy = 0;
  task automatic med_send(bytes_t f, int spacing = 2);
    while (med_busy) step();
    med_busy = 1;
    foreach (f[i]) begin
      mdi_rx = '{valid: 1'b1, sof: i == 0, eof: i == f.size() - 1, err: 1'b0, data: f[i]};
      step();
      mdi_rx = BS_IDLE;
      repeat (spacing - 1) step();
    end
    med_busy = 0;
  endtask
  function automatic bytes_t ctrl_frame(logic [15:0] lt);
    bytes_t f;
    for (int i = 0; i < 6; i++) f.push_back(8'hFF);
    for (int i = 0; i < 6; i++) f.push_back(8'h10 + 8'(i));
    f.push_back(lt[15:8]); f.push_back(lt[7:0]);
    for (int i = 0; i < 46; i++) f.push_back(8'h00);
    return f;
  endfunction
  always @(partner_lps_ev) fork begin repeat (200) step(); med_send(ctrl_frame(LT_LPS)); end join_none

  function automatic bytes_t data_frame(int len, logic [7:0] tag);
    bytes_t f;
    for (int i = 0; i < 6; i++) f.push_back(8'h02);
    for (int i = 0; i < 6; i++) f.push_back(8'h04);
    f.push_back(8'h88); f.push_back(8'hB5);       // local experimental type
    f.push_back(tag);
    for (int i = 15; i < len; i++) f.push_back(8'($urandom));
    return f;
  endfunction
  function automatic bytes_t tcp_frame();
    bytes_t f = '{8'h7c, 8'hc2, 8'hc6, 8'h48, 8'h10, 8'h3d, 8'h74, 8'h36, 8'h6d, 8'h09, 8'h44, 8'h60,
                  8'h08, 8'h00,
                  8'h45, 8'h00, 8'h00, 8'h34, 8'hc6, 8'h9d, 8'h40, 8'h00, 8'hf0, 8'h06, 8'h47, 8'hbb,
                  8'h82, 8'hc0, 8'h37, 8'hf0, 8'hc0, 8'ha8, 8'h01, 8'h12,
                  8'h01, 8'hbb, 8'h9a, 8'h26, 8'h7c, 8'hb0, 8'h38, 8'ha3, 8'h44, 8'hae, 8'h86, 8'hbc,
                  8'h80, 8'h10, 8'h10, 8'h00, 8'h1e, 8'hcd, 8'h00, 8'h00,
                  8'h01, 8'h01, 8'h08, 8'h0a, 8'hed, 8'h4b, 8'h3e, 8'h40, 8'hfc, 8'h61, 8'h86, 8'hf7,
                  8'hde, 8'had, 8'hbe, 8'hef};
    return f;
  endfunction
  function automatic bit same(bytes_t a, bytes_t b);
    if (a.size() != b.size()) return 0;
    foreach (a[i]) if (a[i] != b[i]) return 0;
    return 1;
  endfunction
  task automatic clear_frames; mac_rx.delete(); mac_rx_err.delete(); med_rx.delete(); med_err.delete(); endtask

  // INT_N watcher
  int int_falls = 0; bit int_d = 1;
  always @(posedge clk) if (por_n) begin
    if (int_d && !int_n) begin int_falls++; hit("INT_N asserted"); end
    int_d <= int_n;
  end

  // ---------------------------------------------------------- watchdog
  initial begin
    #(64'd3_000_000_000);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic supplies_ok;
    vddio_mv = 3400; vddd3v3_mv = 3400; vdda3v3_mv = 3400; vddd1v8_mv = 1900;
  endtask

  // ------------------------------------------------------------- test
  initial begin
    bytes_t f, g;
    int t, n;
    por_n = 1; #1; por_n = 0;
    vbat_mv = 1200; vddio_mv = 0; vddd3v3_mv = 0; vdda3v3_mv = 0; vddd1v8_mv = 0; temp_c = 25;
    rst_pin_n = 1; en_pin = 1; sel_1v8 = 0; wake_i = 0;
    mdc = 0; mdio_i = 1; txen = 0; txer = 0; txd = 0;
    config_pins = 4'b0000; phyad_pins = 2'b01;      // slave, managed, MII, PHY address 2
    mdi_rx = BS_IDLE; link_up = 1; sym_err_ev = 0; link_fail_ev = 0;
    repeat (4) @(posedge clk); por_n = 1; step();

    // 1 POWER OFF
    wait_us(10);
    check(state == ST_POWER_OFF && !inh && !rx_oe, "1 POWER OFF with low battery, straps sampled");
    // 2 STANDBY: battery up, other supplies still low
    vbat_mv = 5000;
    expect_state(ST_STANDBY, 5, "2 STANDBY after battery rises");
    check(inh && rx_oe, "INH high and RXD released in STANDBY");
    rdv(REG_INT_SRC);
    check(!rdrv, "SMI silent during start-up time");
    wait_us(2000);
    check(!int_n, "INT_N low after power-on");
    rdv(REG_INT_SRC);
    check(rdrv && rv == 16'h8008, $sformatf("REG21 after power-on = %h (PWON, UV_ERR)", rv));
    if (rv[IRQ_PWON]) hit("PWON interrupt");
    if (rv[IRQ_UV_ERR]) hit("UV_ERR interrupt");
    step(); step();
    check(int_n, "INT_N released by reading REG21");
    rdv(REG_INT_SRC);
    check(rv == 16'h0000, "REG21 cleared by read");
    rdv(REG_EXTERN_STAT);
    check(rv[B25_UV_VDDIO] && rv[B25_UV_VDDD3V3] && rv[B25_UV_VDDA3V3] && rv[B25_UV_VDDD1V8], "REG25 undervoltage flags");
    supplies_ok();
    wait_us(5);
    rdv(REG_INT_SRC);
    check(rv == 16'h0004, $sformatf("UV_RECOVERY after supplies rise (%h)", rv));
    if (rv[IRQ_UV_RECOVERY]) hit("UV recovery interrupt");
    rdv(REG_EXTERN_STAT);
    check(rv[15:11] == 0, "REG25 undervoltage flags clear");
    // identity and strap defaults
    rdv(REG_PHY_ID1); check(rv == 16'h0180, "PHY identifier 1");
    rdv(REG_CONFIG2);
    check(rv[B19_PHYAD_HI:B19_PHYAD_LO] == 5'd2 && rv[10:0] == 11'h245, $sformatf("REG19 = %h", rv));
    rdv(REG_CONFIG1);
    check(rv[B18_MII_HI:B18_MII_LO] == 2'b00 && !rv[B18_MASTER_SLAVE] && rv[B18_LOCWUPHY] && rv[B18_REMWUPHY], "REG18 strap defaults");
    hit("strap capture");

    // 3 RESET, recapture the PHY address; 4 STANDBY
    smi_wr(REG_INT_EN, 16'h1234);
    phyad_pins = 2'b11;
    rst_pin_n = 0; wait_us(5);
    check(state == ST_RESET && !rx_oe, "3 RESET on RST_N");
    rst_pin_n = 1;
    wait_us(15);
    check(state == ST_RESET, "RESET held until RST_N high for the detection time");
    expect_state(ST_STANDBY, 10, "4 STANDBY after RESET");
    wait_us(2000);
    phy = 5'd6;
    rdv(REG_INT_EN);
    check(rdrv && rv == 16'hFFFF, "registers back to defaults, new PHY address 6 answers");
    rdv(REG_GEN_STAT);
    check(rv[B24_RESET_STATUS], "RESET_STATUS flagged");
    // 5 DISABLE, 6 STANDBY
    en_pin = 0; wait_us(2);
    check(state == ST_DISABLE, "5 DISABLE on EN low");
    rdv(REG_INT_EN);
    check(!rdrv, "no SMI in DISABLE");
    en_pin = 1;
    expect_state(ST_STANDBY, 30, "6 STANDBY after EN high");
    wait_us(2000);
    rdv(REG_GEN_STAT);
    check(rv[B24_EN_STATUS], "EN_STATUS flagged");
    // 7 NORMAL
    smi_wr(REG_CONFIG3, 16'h0001 << B28_FWDPHYREM);   // local wake-ups are forwarded to the medium
    set_pm(PM_NORMAL);
    expect_state(ST_NORMAL, 5, "7 NORMAL on command");
    hit("NORMAL command");
    // a frame during link initialisation is not passed
    clear_frames();
    mac_send(data_frame(64, 8'h01));
    check(med_rx.size() == 0, "no transfer during link initialisation");
    wait_us(2000);
    rdv(REG_INT_SRC);
    check(rv[IRQ_WAKEUP], "WAKEUP interrupt on entering NORMAL");
    // forwarding both ways, TCP frame sniffed
    clear_frames();
    f = tcp_frame();
    g = data_frame(100, 8'h02);
    fork mac_send(f); med_send(g); join
    repeat (400) step();
    check(med_rx.size() == 1 && same(med_rx[0], f), "MAC frame forwarded to the medium");
    check(mac_rx.size() == 1 && same(mac_rx[0], g), "medium frame forwarded to the MAC");
    if (med_rx.size() == 1) hit("forward MII to MDI");
    if (mac_rx.size() == 1) hit("forward MDI to MII");
    check(sniff_tx.tcp.frame_no != 0 && sniff_tx.tcp.src_port == 443 && sniff_tx.tcp.dst_port == 39462 &&
          sniff_tx.tcp.seq_no == 32'd2091923619 && sniff_tx.ip.ttl == 240 &&
          sniff_tx.ip.src_addr == 32'h82c037f0 && sniff_tx.dl.crc == 32'hdeadbeef, "sniffer on transmit side");
    check(sniff_rx.dl.frame_no == 1 && sniff_rx.dl.len_type == 16'h88B5, "sniffer on receive side");
    hit("sniffed TCP frame");
    // 8 STANDBY; frames dropped
    set_pm(PM_STANDBY);
    expect_state(ST_STANDBY, 5, "8 STANDBY on command");
    clear_frames();
    fork mac_send(data_frame(64, 8'h03)); med_send(data_frame(64, 8'h04)); join
    repeat (300) step();
    check(med_rx.size() == 0 && mac_rx.size() == 0, "no transfer in STANDBY");
    // 9 SLEEP
    set_pm(PM_SLEEP);
    expect_state(ST_SLEEP, 5, "9 SLEEP on command");
    check(!inh, "INH low in SLEEP");
    rdv(REG_EXT_CTRL);
    check(rv[B17_PM_HI:B17_PM_LO] == PM_SLEEP, "POWER_MODE readable in SLEEP");
    rdv(REG_INT_EN);
    check(rv == 0, "other registers hidden in SLEEP");
    // 10 STANDBY, 11 NORMAL: local wake-up, LOC_WU_TIM = 0 (20 ms)
    clear_frames();
    wake_i = 1;
    t = 0;
    while (state == ST_SLEEP && t < 30000 * 25) begin step(); t++; end
    wake_i = 0;
    check(t >= 20000 * 25 && t <= 20010 * 25, $sformatf("local wake-up after %0d us", t / 25));
    check(state == ST_STANDBY, "10 STANDBY on local wake-up");
    hit("local wake-up");
    expect_state(ST_NORMAL, 5, "11 NORMAL after wake-up");
    repeat (200) step();
    check(wur_seen == 1, "local wake-up forwarded as a wake-up frame (FWDPHYREM)");
    rdv(REG_INT_SRC);
    check(rv == 16'h4000, $sformatf("REG21 after local wake-up = %h", rv));
    rdv(REG_GEN_STAT);
    check(rv[B24_LOCAL_WU], "LOCAL_WU flagged");
    wait_us(2000);
    // 12 SLEEP REQUEST on LPS from the partner, 13 SILENT, 14 SLEEP
    partner_sleeps = 1;
    n = lps_seen;
    med_send(ctrl_frame(LT_LPS));
    check(state == ST_SLEEP_REQUEST || state == ST_SILENT, "12 SLEEP REQUEST on received LPS");
    expect_state(ST_SILENT, 100, "13 SILENT after the LPS frame is sent");
    check(lps_seen == n + 1, "PHY sent one LPS frame");
    expect_state(ST_SLEEP, 100, "14 SLEEP on the partner's LPS");
    hit("LPS handshake");
    // 15 STANDBY, 16 NORMAL: remote wake-up frame
    partner_sleeps = 0;
    n = mech["ST_SLEEP->ST_STANDBY"];
    med_send(ctrl_frame(LT_WAKEUP));
    check(mech["ST_SLEEP->ST_STANDBY"] == n + 1, "15 STANDBY on remote wake-up");
    hit("remote wake-up");
    expect_state(ST_NORMAL, 5, "16 NORMAL after remote wake-up");
    rdv(REG_INT_SRC);
    check(rv[IRQ_WUR_RECEIVED] && rv[IRQ_LPS_RECEIVED] && rv[IRQ_WAKEUP], $sformatf("REG21 after the handshake = %h", rv));
    rdv(REG_GEN_STAT);
    check(rv[B24_REMOTE_WU], "REMOTE_WU flagged");

    // ----- sleep request without an answer: abort when the request time
    // ends (SLEEP_REQUEST_TO defaults to 01: 1 ms request, 500 us acknowledge)
    wait_us(2000);
    n = lps_seen;
    set_pm(PM_SLEEP);
    expect_state(ST_SILENT, 100, "sleep command leads to SILENT");
    t = 0;
    while (state == ST_SILENT && t < 1000 * 25) begin step(); t++; end
    check(state == ST_NORMAL && t > 990 * 25 && t < 1010 * 25, $sformatf("request timeout after %0d us", t / 25));
    rdv(REG_INT_SRC);
    check(rv[IRQ_SLEEP_ABORT], "SLEEP_ABORT interrupt");
    if (rv[IRQ_SLEEP_ABORT]) hit("sleep abort");

    // ----- data while the LPS frame is going out aborts the request; the
    // WAKEUP interrupt only comes with REMWUPHY set
    smi_wr(REG_EXT_CTRL, 16'h0001 << B17_CONFIG_EN);
    rdv(REG_CONFIG1);
    smi_wr(REG_CONFIG1, rv & ~(16'h1 << B18_REMWUPHY));
    fork
      set_pm(PM_SLEEP);
      begin wait (state == ST_SLEEP_REQUEST); med_send(data_frame(64, 8'h09)); end
    join
    wait_us(2);
    check(state == ST_NORMAL, "data during SLEEP REQUEST returns to NORMAL (REMWUPHY = 0)");
    rdv(REG_INT_SRC);
    check(rv[IRQ_SLEEP_ABORT] && !rv[IRQ_WAKEUP], $sformatf("SLEEP_ABORT without WAKEUP when REMWUPHY = 0, REG21 = %h", rv));
    smi_wr(REG_EXT_CTRL, 16'h0001 << B17_CONFIG_EN);   // the sleep command cleared it
    rdv(REG_CONFIG1);
    smi_wr(REG_CONFIG1, rv | (16'h1 << B18_REMWUPHY));
    smi_wr(REG_EXT_CTRL, 16'h0000);
    rdv(REG_CONFIG1);
    check(rv[B18_REMWUPHY], "REMWUPHY set again");
    n = mech.exists("ST_SLEEP_REQUEST->ST_NORMAL") ? mech["ST_SLEEP_REQUEST->ST_NORMAL"] : 0;
    fork
      set_pm(PM_SLEEP);
      begin wait (state == ST_SLEEP_REQUEST); med_send(data_frame(64, 8'h0A)); end
    join
    wait_us(2);
    check(state == ST_NORMAL && mech.exists("ST_SLEEP_REQUEST->ST_NORMAL") &&
          mech["ST_SLEEP_REQUEST->ST_NORMAL"] == n + 1, "data during SLEEP REQUEST returns to NORMAL");
    rdv(REG_INT_SRC);
    check(rv[IRQ_SLEEP_ABORT] && rv[IRQ_WAKEUP], $sformatf("SLEEP_ABORT and WAKEUP interrupts on data, REG21 = %h", rv));
    rdv(REG_GEN_STAT);
    check(rv[B24_DATA_DET_WU], "DATA_DET_WU flagged");
    if (rv[B24_DATA_DET_WU]) hit("data abort");

    // ----- autonomous operation: 1 s without data starts the handshake
    partner_sleeps = 1;
    rdv(REG_COMMON_CFG);
    smi_wr(REG_COMMON_CFG, rv | (16'h1 << B27_AUTO_OP));
    med_send(data_frame(64, 8'h0B));                   // data restarts the idle time
    t = 0;
    while (state == ST_NORMAL && t < 1100000) begin wait_us(1); t++; end
    check(state == ST_SLEEP_REQUEST && t >= 999990 && t <= 1000010,
          $sformatf("autonomous power-down after %0d us without data", t));
    expect_state(ST_SLEEP, 200, "SLEEP after the autonomous handshake");
    if (state == ST_SLEEP) hit("autonomous power-down");
    partner_sleeps = 0;
    med_send(ctrl_frame(LT_WAKEUP));
    expect_state(ST_NORMAL, 5, "NORMAL after wake-up");
    smi_wr(REG_COMMON_CFG, rv);                        // back to managed operation
    rdv(REG_INT_SRC);

    // ----- SLEEP_ACK: LPS sent after the 500 us acknowledge time
    wait_us(2000);
    smi_wr(REG_CONFIG3, 16'h0001 << B28_SLEEP_ACK);
    partner_sleeps = 1;
    n = lps_seen;
    med_send(ctrl_frame(LT_LPS));
    t = 0;
    while (lps_seen == n && t < 1000 * 25) begin step(); t++; end
    check(t > 495 * 25 && t < 505 * 25, $sformatf("LPS sent %0d us after the request with SLEEP_ACK", t / 25));
    hit("sleep acknowledge time");
    expect_state(ST_SLEEP, 100, "SLEEP after acknowledged handshake");
    partner_sleeps = 0;
    // remote wake-up forwarded to the WAKE pin (FWDPHYLOC)
    // (register 18 cannot be written in SLEEP: wake first, then set it)
    med_send(ctrl_frame(LT_WAKEUP));
    expect_state(ST_NORMAL, 5, "NORMAL after wake-up");
    smi_wr(REG_EXT_CTRL, 16'h0001 << B17_CONFIG_EN);
    rdv(REG_CONFIG1);
    smi_wr(REG_CONFIG1, rv | (16'h1 << B18_FWDPHYLOC));
    smi_wr(REG_CONFIG3, 16'h0000);
    med_send(ctrl_frame(LT_WAKEUP));
    t = 0;
    while (!wake_oe && t < 200) begin step(); t++; end
    check(wake_oe && wake_o, "remote wake-up forwarded to the WAKE pin");
    if (wake_oe) hit("wake-up forwarded to pin");
    wait_us(100);
    check(!wake_oe, "forwarded pulse ends");

    // ----- SMI control error
    set_pm(4'b0101);
    rdv(REG_INT_SRC);
    check(rv[IRQ_CONTROL_ERR], "CONTROL_ERR on an invalid POWER_MODE");
    if (rv[IRQ_CONTROL_ERR]) hit("control error");

    // ----- overtemperature
    temp_c = 200;
    expect_state(ST_STANDBY, 5, "overtemperature: NORMAL -> STANDBY");
    rdv(REG_INT_SRC);
    check(rv[IRQ_TEMP_ERR], $sformatf("TEMP_ERR interrupt (%h)", rv));
    rdv(REG_EXTERN_STAT);
    check(rv == 16'h0600, $sformatf("REG25 TEMP_HIGH and warning (%h)", rv));
    hit("overtemperature");
    set_pm(PM_NORMAL);
    wait_us(5);
    check(state == ST_STANDBY, "NORMAL refused while hot");
    temp_c = 25;
    wait_us(2);
    set_pm(PM_NORMAL);
    expect_state(ST_NORMAL, 5, "NORMAL after cooling");
    wait_us(2000);

    // ----- loopbacks: internal (00), external (01, 10), remote (11)
    for (int m = 0; m < 3; m++) begin
      smi_wr(REG_EXT_CTRL, 16'(m) << B17_LB_LO);
      smi_wr(REG_BASIC_CTRL, 16'h2100 | (16'h1 << B0_LOOPBACK));
      clear_frames();
      f = data_frame(80, 8'(8'h10 + m));
      fork mac_send(f); med_send(data_frame(70, 8'h20)); join
      repeat (400) step();
      check(mac_rx.size() == 1 && same(mac_rx[0], f) && med_rx.size() == 0, $sformatf("local loopback mode %0d", m));
      if (mac_rx.size() == 1) hit(m == 0 ? "internal loopback" : "external loopback");
    end
    smi_wr(REG_EXT_CTRL, 16'd3 << B17_LB_LO);
    clear_frames();
    g = data_frame(90, 8'h30);
    fork mac_send(data_frame(70, 8'h31)); med_send(g); join
    repeat (400) step();
    check(med_rx.size() == 1 && same(med_rx[0], g) && mac_rx.size() == 0, "remote loopback");
    if (med_rx.size() == 1) hit("remote loopback");
    smi_wr(REG_BASIC_CTRL, 16'h2100);
    smi_wr(REG_EXT_CTRL, 16'h0000);

    // ----- TXER, frame size limit, jumbo frames, receive overflow
    rdv(REG_COMM_STAT);
    clear_frames();
    mac_send(data_frame(64, 8'h40), 20);
    repeat (100) step();
    check(med_rx.size() == 1 && med_err[0], "TXER propagated to the medium");
    rdv(REG_COMM_STAT);
    check(rv[B23_TRANSMIT_ERR], "TRANSMIT_ERR latched");
    if (rv[B23_TRANSMIT_ERR]) hit("transmit error");
    rdv(REG_CONFIG2);
    check(rv[B19_JUMBO], "jumbo frames enabled by default");
    smi_wr(REG_CONFIG2, rv & ~(16'h1 << B19_JUMBO));
    clear_frames();
    mac_send(data_frame(4096 + 18 + 6, 8'h41));
    repeat (100) step();
    check(med_rx.size() == 1 && med_err[0], "frame over 4 KiB payload marked");
    rdv(REG_COMM_STAT);
    check(rv[B23_TRANSMIT_ERR], "oversize frame flagged");
    if (med_rx.size() == 1 && med_err[0]) hit("oversize frame");
    clear_frames();
    f = data_frame(4096 + 18, 8'h44);                // exactly 4 KiB of payload
    mac_send(f);
    repeat (100) step();
    check(med_rx.size() == 1 && same(med_rx[0], f) && !med_err[0], "4 KiB payload passes unmarked");
    rdv(REG_CONFIG2);
    smi_wr(REG_CONFIG2, rv | (16'h1 << B19_JUMBO));
    clear_frames();
    f = data_frame(16384 + 18, 8'h45);               // 16 KiB jumbo limit
    mac_send(f);
    mac_send(data_frame(16384 + 18 + 1, 8'h46));
    repeat (100) step();
    check(med_rx.size() == 2 && same(med_rx[0], f) && !med_err[0] && med_err[1],
          "16 KiB payload passes, one byte more is marked");
    clear_frames();
    f = data_frame(6000, 8'h42);
    med_send(f);
    repeat (200) step();
    check(mac_rx.size() == 1 && same(mac_rx[0], f) && !mac_rx_err[0], "jumbo frame received whole");
    if (mac_rx.size() == 1 && !mac_rx_err[0]) hit("jumbo frame");
    rdv(REG_COMM_STAT);
    clear_frames();
    med_send(data_frame(200, 8'h43), 1);          // twice the MII byte rate
    repeat (600) step();
    rdv(REG_COMM_STAT);
    check(rv[B23_RECEIVE_ERR], "receive FIFO overflow flagged");
    if (rv[B23_RECEIVE_ERR]) hit("receive overflow");
    check(mac_rx.size() >= 1 && mac_rx[0].size() < 200, "overflowing frame cut short");

    // ----- interrupt masking: PWON masked, nothing else pending
    smi_wr(REG_INT_EN, 16'h0000);
    set_pm(4'b0101);
    step(); step();
    check(int_n, "masked interrupt leaves INT_N high");
    rdv(REG_INT_SRC);
    smi_wr(REG_INT_EN, 16'hFFFF);
    hit("interrupt mask");

    // ----- RMII mode by strap change and software reset
    config_pins = 4'b0100;                        // MII_MODE = 01
    smi_wr(REG_BASIC_CTRL, 16'h2100 | (16'h1 << B0_RESET));
    wait_us(1);
    check(state == ST_RESET || state == ST_STANDBY, "software reset");
    hit("software reset");
    expect_state(ST_STANDBY, 50, "STANDBY after software reset");
    wait_us(2000);
    rdv(REG_CONFIG1);
    check(rv[B18_MII_HI:B18_MII_LO] == 2'b01, "RMII strap captured");
    rmii_mode = 1;
    set_pm(PM_NORMAL);
    wait_us(2100);
    smi_wr(REG_BASIC_CTRL, 16'h2100 | (16'h1 << B0_LOOPBACK));
    clear_frames();
    f = data_frame(120, 8'h50);
    mac_send(f);
    repeat (800) step();
    check(mac_rx.size() == 1 && same(mac_rx[0], f), "RMII internal loopback");
    if (mac_rx.size() == 1) hit("RMII mode");
    smi_wr(REG_BASIC_CTRL, 16'h2100);

    // ----- supply undervoltage: STANDBY at once, SLEEP after 670 ms
    vddd1v8_mv = 1500;
    expect_state(ST_STANDBY, 5, "supply undervoltage: NORMAL -> STANDBY");
    t = 0;
    while (state == ST_STANDBY && t < 700000) begin wait_us(1); t++; end
    check(state == ST_SLEEP && t > 665000 && t < 675000, $sformatf("undervoltage timeout to SLEEP after %0d us", t));
    hit("undervoltage timeout");
    supplies_ok();

    // ----- battery loss
    vbat_mv = 2000;
    expect_state(ST_POWER_OFF, 5, "battery undervoltage -> POWER OFF");
    hit("battery loss");
    wait_us(1);

    // ---------------------------------------------- mechanism coverage
    begin
      string need[$] = '{
        "ST_POWER_OFF->ST_STANDBY", "ST_STANDBY->ST_RESET", "ST_RESET->ST_STANDBY",
        "ST_STANDBY->ST_DISABLE", "ST_DISABLE->ST_STANDBY", "ST_STANDBY->ST_NORMAL",
        "ST_NORMAL->ST_STANDBY", "ST_STANDBY->ST_SLEEP", "ST_SLEEP->ST_STANDBY",
        "ST_NORMAL->ST_SLEEP_REQUEST", "ST_SLEEP_REQUEST->ST_SILENT", "ST_SILENT->ST_SLEEP",
        "ST_SILENT->ST_NORMAL", "ST_NORMAL->ST_RESET", "ST_SLEEP->ST_POWER_OFF",
        "smi write", "smi read", "strap capture", "PWON interrupt", "UV_ERR interrupt",
        "UV recovery interrupt", "INT_N asserted", "interrupt mask", "NORMAL command",
        "forward MII to MDI", "forward MDI to MII", "sniffed TCP frame",
        "local wake-up", "remote wake-up", "wake-up frame sent on medium", "wake-up forwarded to pin",
        "LPS sent on medium", "LPS handshake", "sleep abort", "sleep acknowledge time",
        "data abort", "autonomous power-down", "control error", "overtemperature", "internal loopback", "external loopback",
        "remote loopback", "transmit error", "oversize frame", "jumbo frame", "receive overflow",
        "software reset", "RMII mode", "undervoltage timeout", "battery loss"};
      foreach (need[i])
        check(mech.exists(need[i]) && mech[need[i]] > 0, $sformatf("mechanism happened: %s", need[i]));
      foreach (mech[k]) $display("  %-28s %0d", k, mech[k]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
