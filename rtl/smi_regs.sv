// smi_regs: SMI register file of the PHY.
//
// Implements the 16-bit registers at indices 0-3 and 15-28 behind the SMI
// frame decoder. Reads are combinational (rd_data follows addr); the side
// effects of a read happen on the rd_en strobe, and writes happen on wr_en.
//
// Access rules and callbacks:
//   * smi_en low: reads return 0 and writes are ignored (POWER OFF, DISABLE,
//     RESET, and the start-up time after power-on).
//   * sleep_mode high (SLEEP state): only the POWER_MODE field of register
//     17 can be read; other reads return 0 and all writes are ignored.
//   * register 0: writing RESET = 1 gives a one-cycle sw_reset pulse; the bit
//     reads back 0.
//   * register 17: a write with POWER_MODE = normal, standby, sleep or
//     silent issues pm_cmd_valid with the code; any other nonzero code raises
//     control_err (the SMI error interrupt); 0000 means "no change". Reading
//     POWER_MODE returns the code of the current power state.
//   * register 18: written only while CONFIG_EN (register 17) is 1.
//   * register 21: a read pulses int_rd so the interrupt block clears it.
//   * register 23: RECEIVE_ERR and TRANSMIT_ERR latch error events and are
//     cleared by a read.
//   * register 24: LOCAL_WU, REMOTE_WU and EN_STATUS are cleared by a read.
//   * register 26: the link-fail counter is cleared by a read.
// regs_reset (POWER OFF and RESET states) returns every register to its
// default; the defaults of the strap-controlled fields come from the strap
// inputs. An event in the same cycle as a clearing read is kept.
//
// The register numbering and the callbacks follow the design description,
// except that register 23's error bits are cleared, not set, by a read (the
// description says "set to 1", which would make them useless as latches).
// Field positions, default values and the PHY identifier are this design's
// choices; the default of register 19's low bits, 0x245, is the value seen in
// the reference simulation.
module smi_regs
  import tja_pkg::*;
#(
  parameter logic [15:0] PHY_ID1 = 16'h0180,
  parameter logic [15:0] PHY_ID2 = 16'hDD01,
  parameter logic [15:0] PHY_ID3 = 16'h0000
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        regs_reset,
  input  logic        smi_en,
  input  logic        sleep_mode,
  // bus from the SMI frame decoder
  input  logic [4:0]  addr,
  input  logic        rd_en,
  output logic [15:0] rd_data,
  input  logic        wr_en,
  input  logic [15:0] wr_data,
  // strap defaults
  input  logic        strap_master,
  input  logic        strap_auto_op,
  input  logic [1:0]  strap_mii_mode,
  input  logic [4:0]  strap_phyad,
  input  logic        strap_ldo_ext,
  // status inputs
  input  pwr_state_t  state,
  input  logic [15:0] int_src,
  input  logic        int_n,
  input  logic        link_up,
  input  logic        sym_err_ev,
  input  logic        link_fail_ev,
  input  logic        rx_err_ev,
  input  logic        tx_err_ev,
  input  logic        local_wu_ev,
  input  logic        remote_wu_ev,
  input  logic        data_det_wu_ev,
  input  logic        en_status_ev,
  input  logic        reset_status_ev,
  input  logic        uv_vddio,
  input  logic        uv_vddd3v3,
  input  logic        uv_vdda3v3,
  input  logic        uv_vddd1v8,
  input  logic        temp_high,
  input  logic        temp_warn,
  // control outputs
  output ctrl_regs_t  ctrl,
  output logic        sw_reset,
  output logic        pm_cmd_valid,
  output logic [3:0]  pm_cmd,
  output logic        control_err,
  output logic        int_rd
);

  logic [15:0] r0, r17, r18, r19, r22, r27, r28;
  logic [15:0] sym_err_cnt, link_fail_cnt;
  logic        rx_err_l, tx_err_l;
  logic        local_wu_l, remote_wu_l, data_det_l, en_status_l, reset_status_l;

  logic [15:0] d0, d17, d18, d19, d22, d27, d28;
  assign d0  = 16'h2100;
  assign d17 = 16'h0000;
  assign d18 = {strap_master, 3'b000, 1'b1, 1'b1, strap_mii_mode, 8'h00};
  assign d19 = {strap_phyad, 11'h245};
  assign d22 = 16'hFFFF;
  assign d27 = {strap_auto_op, 2'b00, strap_ldo_ext, 12'h000};
  assign d28 = 16'h0000;

  logic acc_ok, wr_ok, rd_ok;
  assign acc_ok = smi_en && !sleep_mode;
  assign wr_ok  = wr_en && acc_ok;
  assign rd_ok  = rd_en && acc_ok;

  logic [3:0] wr_pm;
  logic       wr_pm_valid;
  assign wr_pm = wr_data[B17_PM_HI:B17_PM_LO];
  assign wr_pm_valid = (wr_pm == PM_NORMAL) || (wr_pm == PM_STANDBY) ||
                       (wr_pm == PM_SLEEP)  || (wr_pm == PM_SILENT);

  // ------------------------------------------------------------- writes
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r0 <= 16'h2100; r17 <= '0; r18 <= '0; r19 <= '0; r22 <= '1; r27 <= '0; r28 <= '0;
      sw_reset <= 1'b0; pm_cmd_valid <= 1'b0; pm_cmd <= '0; control_err <= 1'b0;
    end else if (regs_reset) begin
      r0 <= d0; r17 <= d17; r18 <= d18; r19 <= d19; r22 <= d22; r27 <= d27; r28 <= d28;
      sw_reset <= 1'b0; pm_cmd_valid <= 1'b0; control_err <= 1'b0;
    end else begin
      sw_reset     <= 1'b0;
      pm_cmd_valid <= 1'b0;
      control_err  <= 1'b0;
      if (wr_ok) begin
        unique case (addr)
          REG_BASIC_CTRL: begin
            r0 <= {1'b0, wr_data[14:0]};
            sw_reset <= wr_data[B0_RESET];
          end
          REG_EXT_CTRL: begin
            r17 <= {wr_data[15], 4'b0000, wr_data[10:0]};
            if (wr_pm_valid) begin
              pm_cmd_valid <= 1'b1;
              pm_cmd       <= wr_pm;
            end else if (wr_pm != PM_NO_CHANGE) begin
              control_err <= 1'b1;
            end
          end
          REG_CONFIG1:    if (r17[B17_CONFIG_EN]) r18 <= wr_data;
          REG_CONFIG2:    r19 <= wr_data;
          REG_INT_EN:     r22 <= wr_data;
          REG_COMMON_CFG: r27 <= wr_data;
          REG_CONFIG3:    r28 <= wr_data;
          default: ;
        endcase
      end
    end
  end

  // --------------------------------------------- latched status and counters
  logic rd23, rd24, rd26;
  assign rd23 = rd_ok && addr == REG_COMM_STAT;
  assign rd24 = rd_ok && addr == REG_GEN_STAT;
  assign rd26 = rd_ok && addr == REG_LINK_FAIL;
  assign int_rd = rd_ok && addr == REG_INT_SRC;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sym_err_cnt <= '0; link_fail_cnt <= '0;
      rx_err_l <= 1'b0; tx_err_l <= 1'b0;
      local_wu_l <= 1'b0; remote_wu_l <= 1'b0; data_det_l <= 1'b0;
      en_status_l <= 1'b0; reset_status_l <= 1'b0;
    end else if (regs_reset) begin
      sym_err_cnt <= '0; link_fail_cnt <= '0;
      rx_err_l <= 1'b0; tx_err_l <= 1'b0;
      local_wu_l <= 1'b0; remote_wu_l <= 1'b0; data_det_l <= 1'b0;
      en_status_l <= 1'b0;
      reset_status_l <= reset_status_ev | reset_status_l;
    end else begin
      if (sym_err_ev && sym_err_cnt != 16'hFFFF) sym_err_cnt <= sym_err_cnt + 16'd1;
      if (rd26)                                   link_fail_cnt <= {15'd0, link_fail_ev};
      else if (link_fail_ev && link_fail_cnt != 16'hFFFF) link_fail_cnt <= link_fail_cnt + 16'd1;
      rx_err_l    <= rx_err_ev    | (rx_err_l    & ~rd23);
      tx_err_l    <= tx_err_ev    | (tx_err_l    & ~rd23);
      local_wu_l  <= local_wu_ev  | (local_wu_l  & ~rd24);
      remote_wu_l <= remote_wu_ev | (remote_wu_l & ~rd24);
      en_status_l <= en_status_ev | (en_status_l & ~rd24);
      data_det_l  <= data_det_wu_ev | data_det_l;
      reset_status_l <= reset_status_ev | reset_status_l;
    end
  end

  // --------------------------------------------------------------- reads
  logic [15:0] r17_rd, r23_rd, r24_rd, r25_rd;
  always_comb begin
    r17_rd = r17;
    r17_rd[B17_PM_HI:B17_PM_LO] = state_pm_code(state);
    r23_rd = '0;
    r23_rd[15] = link_up;
    r23_rd[B23_RECEIVE_ERR]  = rx_err_l;
    r23_rd[B23_TRANSMIT_ERR] = tx_err_l;
    r24_rd = '0;
    r24_rd[B24_INT_STATUS]   = ~int_n;
    r24_rd[B24_LOCAL_WU]     = local_wu_l;
    r24_rd[B24_REMOTE_WU]    = remote_wu_l;
    r24_rd[B24_DATA_DET_WU]  = data_det_l;
    r24_rd[B24_EN_STATUS]    = en_status_l;
    r24_rd[B24_RESET_STATUS] = reset_status_l;
    r25_rd = '0;
    r25_rd[B25_UV_VDDD3V3] = uv_vddd3v3;
    r25_rd[B25_UV_VDDA3V3] = uv_vdda3v3;
    r25_rd[B25_UV_VDDD1V8] = uv_vddd1v8;
    r25_rd[B25_UV_VDDIO]   = uv_vddio;
    r25_rd[B25_TEMP_HIGH]  = temp_high;
    r25_rd[B25_TEMP_WARN]  = temp_warn;

    rd_data = '0;
    if (smi_en && sleep_mode) begin
      if (addr == REG_EXT_CTRL)
        rd_data[B17_PM_HI:B17_PM_LO] = state_pm_code(state);
    end else if (smi_en) begin
      unique case (addr)
        REG_BASIC_CTRL:  rd_data = r0;
        REG_BASIC_STAT:  rd_data = {9'b0000_0001_0, 1'b1, 3'b000, link_up, 2'b01};
        REG_PHY_ID1:     rd_data = PHY_ID1;
        REG_PHY_ID2:     rd_data = PHY_ID2;
        REG_EXT_STAT:    rd_data = 16'h0080;
        REG_PHY_ID3:     rd_data = PHY_ID3;
        REG_EXT_CTRL:    rd_data = r17_rd;
        REG_CONFIG1:     rd_data = r18;
        REG_CONFIG2:     rd_data = r19;
        REG_SYM_ERR_CNT: rd_data = sym_err_cnt;
        REG_INT_SRC:     rd_data = int_src;
        REG_INT_EN:      rd_data = r22;
        REG_COMM_STAT:   rd_data = r23_rd;
        REG_GEN_STAT:    rd_data = r24_rd;
        REG_EXTERN_STAT: rd_data = r25_rd;
        REG_LINK_FAIL:   rd_data = link_fail_cnt;
        REG_COMMON_CFG:  rd_data = r27;
        REG_CONFIG3:     rd_data = r28;
        default:         rd_data = '0;
      endcase
    end
  end

  assign ctrl = '{r0: r0, r17: r17, r18: r18, r19: r19, r22: r22, r27: r27, r28: r28};

endmodule
