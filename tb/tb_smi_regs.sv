// tb_smi_regs: register file access rules and callbacks.
// Drives the register bus directly and checks defaults (including strap
// fields), the RESET self-clear, POWER_MODE commands and SMI error, the
// CONFIG_EN lock of register 18, clear-on-read of registers 21/23/24/26,
// live status in register 25, the SMI-disabled and SLEEP restrictions, and
// that read-only registers ignore writes.
module tb_smi_regs;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, regs_reset, smi_en, sleep_mode;
  logic [4:0] addr;
  logic rd_en, wr_en;
  logic [15:0] rd_data, wr_data;
  logic strap_master, strap_auto_op, strap_ldo_ext;
  logic [1:0] strap_mii_mode;
  logic [4:0] strap_phyad;
  pwr_state_t state;
  logic [15:0] int_src;
  logic int_n, link_up, sym_err_ev, link_fail_ev, rx_err_ev, tx_err_ev;
  logic local_wu_ev, remote_wu_ev, data_det_wu_ev, en_status_ev, reset_status_ev;
  logic uv_vddio, uv_vddd3v3, uv_vdda3v3, uv_vddd1v8, temp_high, temp_warn;
  ctrl_regs_t ctrl;
  logic sw_reset, pm_cmd_valid, control_err, int_rd;
  logic [3:0] pm_cmd;
  int checks = 0, failures = 0;
  int n_swr = 0, n_pm = 0, n_cerr = 0, n_intrd = 0;
  logic [3:0] last_pm;

  smi_regs dut (.*);

  always @(posedge clk) begin
    if (sw_reset) n_swr++;
    if (pm_cmd_valid) begin n_pm++; last_pm = pm_cmd; end
    if (control_err) n_cerr++;
    if (int_rd) n_intrd++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s (rd_data=%h)", what, rd_data); end
  endtask

  task automatic wr(logic [4:0] a, logic [15:0] d);
    addr = a; wr_data = d; wr_en = 1; @(posedge clk); #1; wr_en = 0; @(posedge clk); #1;
  endtask

  task automatic rd(logic [4:0] a, output logic [15:0] d);
    addr = a; #1; d = rd_data; rd_en = 1; @(posedge clk); #1; rd_en = 0; @(posedge clk); #1;
  endtask

  task automatic pulse(ref logic s);
    s = 1; @(posedge clk); #1; s = 0; @(posedge clk); #1;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] d;
    rst_n = 1; #1; rst_n = 0;
    {regs_reset, smi_en, sleep_mode, rd_en, wr_en} = '0; addr = 0; wr_data = 0;
    strap_master = 1; strap_auto_op = 1; strap_ldo_ext = 1; strap_mii_mode = 2'b01; strap_phyad = 5'b00110;
    state = ST_STANDBY; int_src = 16'h8008; int_n = 0; link_up = 0;
    {sym_err_ev, link_fail_ev, rx_err_ev, tx_err_ev, local_wu_ev, remote_wu_ev, data_det_wu_ev, en_status_ev, reset_status_ev} = '0;
    {uv_vddio, uv_vddd3v3, uv_vdda3v3, uv_vddd1v8, temp_high, temp_warn} = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    regs_reset = 1; @(posedge clk); #1; regs_reset = 0;
    // SMI disabled
    rd(REG_PHY_ID1, d); check(d == 16'h0000, "read while SMI disabled gives 0");
    wr(REG_CONFIG2, 16'h1234); smi_en = 1;
    rd(REG_CONFIG2, d); check(d == {5'b00110, 11'h245}, "write while disabled ignored; reg19 default");
    // defaults
    rd(REG_BASIC_CTRL, d); check(d == 16'h2100, "reg0 default");
    rd(REG_PHY_ID1, d);    check(d == 16'h0180, "PHY id 1");
    rd(REG_CONFIG1, d);    check(d == 16'h8D00, "reg18 default from straps");
    rd(REG_COMMON_CFG, d); check(d == 16'h9000, "reg27 default from straps");
    check(ctrl.r19[B19_PHYAD_HI:B19_PHYAD_LO] == 5'b00110, "PHYAD exported");
    // register 0: RESET self-clears and pulses, LOOPBACK kept
    wr(REG_BASIC_CTRL, 16'hC100);
    check(n_swr == 1, "software reset pulse");
    rd(REG_BASIC_CTRL, d); check(d == 16'h4100 && ctrl.r0[B0_LOOPBACK], "RESET reads 0, LOOPBACK kept");
    // register 17: POWER_MODE commands
    wr(REG_EXT_CTRL, {1'b0, PM_NORMAL, 11'h004});
    check(n_pm == 1 && last_pm == PM_NORMAL && n_cerr == 0, "normal command");
    wr(REG_EXT_CTRL, {1'b0, 4'b0101, 11'h004});
    check(n_pm == 1 && n_cerr == 1, "invalid POWER_MODE raises SMI error");
    wr(REG_EXT_CTRL, {1'b0, PM_NO_CHANGE, 11'h01C});
    check(n_pm == 1 && n_cerr == 1 && ctrl.r17[B17_LB_HI:B17_LB_LO] == 2'b11, "no-change write sets loopback mode");
    foreach (state_list[i]) begin
      state = state_list[i];
      rd(REG_EXT_CTRL, d);
      check(d[B17_PM_HI:B17_PM_LO] == state_pm_code(state_list[i]), "POWER_MODE reads the state");
    end
    state = ST_NORMAL;
    // register 18 is locked unless CONFIG_EN
    wr(REG_EXT_CTRL, 16'h0000);
    wr(REG_CONFIG1, 16'h0000);
    rd(REG_CONFIG1, d); check(d == 16'h8D00, "reg18 write without CONFIG_EN ignored");
    wr(REG_EXT_CTRL, 16'h0004);
    wr(REG_CONFIG1, 16'h4C00);
    rd(REG_CONFIG1, d); check(d == 16'h4C00, "reg18 write with CONFIG_EN");
    // register 21 read strobe
    rd(REG_INT_SRC, d); check(d == 16'h8008 && n_intrd == 1, "reg21 read pulses int_rd");
    rd(REG_INT_EN, d);  check(n_intrd == 1 && d == 16'hFFFF, "other reads do not");
    // register 23 error latches
    pulse(rx_err_ev); pulse(tx_err_ev);
    rd(REG_COMM_STAT, d); check(d[B23_RECEIVE_ERR] && d[B23_TRANSMIT_ERR], "error bits latched");
    rd(REG_COMM_STAT, d); check(!d[B23_RECEIVE_ERR] && !d[B23_TRANSMIT_ERR], "error bits cleared by read");
    // register 24
    pulse(local_wu_ev); pulse(remote_wu_ev); pulse(en_status_ev); pulse(reset_status_ev);
    rd(REG_GEN_STAT, d);
    check(d[B24_LOCAL_WU] && d[B24_REMOTE_WU] && d[B24_EN_STATUS] && d[B24_RESET_STATUS] && d[B24_INT_STATUS], "reg24 latched");
    rd(REG_GEN_STAT, d);
    check(!d[B24_LOCAL_WU] && !d[B24_REMOTE_WU] && !d[B24_EN_STATUS] && d[B24_RESET_STATUS], "reg24 read clears wake-up and EN bits");
    // register 25 live
    temp_high = 1; uv_vddio = 1;
    rd(REG_EXTERN_STAT, d); check(d == 16'h0C00, "TEMP_HIGH and UV_VDDIO");
    temp_high = 0; uv_vddio = 0;
    rd(REG_EXTERN_STAT, d); check(d == 16'h0000, "reg25 follows inputs");
    // register 26 counter, cleared by read; register 20 counter
    repeat (5) pulse(link_fail_ev);
    repeat (3) pulse(sym_err_ev);
    rd(REG_LINK_FAIL, d);   check(d == 5, "link-fail count");
    rd(REG_LINK_FAIL, d);   check(d == 0, "link-fail count cleared");
    rd(REG_SYM_ERR_CNT, d); check(d == 3, "symbol error count");
    // read-only register
    wr(REG_PHY_ID2, 16'h0000);
    rd(REG_PHY_ID2, d); check(d == 16'hDD01, "read-only register ignores writes");
    // SLEEP: only POWER_MODE readable, writes ignored
    sleep_mode = 1; state = ST_SLEEP;
    rd(REG_CONFIG2, d); check(d == 0, "SLEEP: other registers read 0");
    rd(REG_EXT_CTRL, d); check(d == {1'b0, PM_SLEEP, 11'h000}, "SLEEP: POWER_MODE readable");
    wr(REG_EXT_CTRL, {1'b0, PM_NORMAL, 11'h0});
    check(n_pm == 1, "SLEEP: writes ignored");
    sleep_mode = 0;
    // register reset
    regs_reset = 1; @(posedge clk); #1; regs_reset = 0;
    rd(REG_CONFIG1, d); check(d == 16'h8D00, "register reset restores defaults");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pwr_state_t state_list [4] = '{ST_STANDBY, ST_NORMAL, ST_SILENT, ST_SLEEP_REQUEST};
endmodule
