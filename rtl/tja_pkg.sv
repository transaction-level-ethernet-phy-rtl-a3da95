// tja_pkg: types and constants shared by the 100BASE-T1 PHY controller.
//
// Holds the power-mode state encoding, the SMI register indices (the
// register numbering follows the PHY's register map: 0-3 and 15-28), the
// bit positions of the fields the logic uses, the POWER_MODE command codes,
// the length/type codes of the LPS and wake-up frames, and the byte-stream
// struct that carries Ethernet frames between the blocks.
//
// The register indices, the LPS code 0x0900 and the wake-up code 0x0842
// follow the design description. Bit positions of the register fields and
// the POWER_MODE command values are this design's choice, laid out after the
// public register map of the device family; the positions PWON (bit 15),
// WAKEUP (bit 14), UV_ERR (bit 3), TEMP_ERR (bit 1) and TEMP_HIGH (bit 10)
// agree with the register values observed in the reference simulations.
package tja_pkg;

  // ---------------------------------------------------------------- states
  typedef enum logic [2:0] {
    ST_POWER_OFF     = 3'd0,
    ST_DISABLE       = 3'd1,
    ST_RESET         = 3'd2,
    ST_STANDBY       = 3'd3,
    ST_NORMAL        = 3'd4,
    ST_SLEEP_REQUEST = 3'd5,
    ST_SILENT        = 3'd6,
    ST_SLEEP         = 3'd7
  } pwr_state_t;

  // ------------------------------------------------------ register indices
  localparam logic [4:0] REG_BASIC_CTRL   = 5'd0;
  localparam logic [4:0] REG_BASIC_STAT   = 5'd1;
  localparam logic [4:0] REG_PHY_ID1      = 5'd2;
  localparam logic [4:0] REG_PHY_ID2      = 5'd3;
  localparam logic [4:0] REG_EXT_STAT     = 5'd15;
  localparam logic [4:0] REG_PHY_ID3      = 5'd16;
  localparam logic [4:0] REG_EXT_CTRL     = 5'd17;
  localparam logic [4:0] REG_CONFIG1      = 5'd18;
  localparam logic [4:0] REG_CONFIG2      = 5'd19;
  localparam logic [4:0] REG_SYM_ERR_CNT  = 5'd20;
  localparam logic [4:0] REG_INT_SRC      = 5'd21;
  localparam logic [4:0] REG_INT_EN       = 5'd22;
  localparam logic [4:0] REG_COMM_STAT    = 5'd23;
  localparam logic [4:0] REG_GEN_STAT     = 5'd24;
  localparam logic [4:0] REG_EXTERN_STAT  = 5'd25;
  localparam logic [4:0] REG_LINK_FAIL    = 5'd26;
  localparam logic [4:0] REG_COMMON_CFG   = 5'd27;
  localparam logic [4:0] REG_CONFIG3      = 5'd28;

  // --------------------------------------------------------- field layout
  // register 0
  localparam int B0_RESET    = 15;
  localparam int B0_LOOPBACK = 14;
  // register 17
  localparam int B17_PM_HI   = 14;  // POWER_MODE[3:0] = bits 14:11
  localparam int B17_PM_LO   = 11;
  localparam int B17_LB_HI   = 4;   // LOOPBACK_MODE[1:0] = bits 4:3
  localparam int B17_LB_LO   = 3;
  localparam int B17_CONFIG_EN = 2;
  // register 18
  localparam int B18_MASTER_SLAVE = 15;
  localparam int B18_FWDPHYLOC    = 14;
  localparam int B18_REMWUPHY     = 11;
  localparam int B18_LOCWUPHY     = 10;
  localparam int B18_MII_HI       = 9;  // MII_MODE[1:0] = bits 9:8
  localparam int B18_MII_LO       = 8;
  // register 19
  localparam int B19_PHYAD_HI  = 15;   // PHYAD[4:0] = bits 15:11
  localparam int B19_PHYAD_LO  = 11;
  localparam int B19_JUMBO     = 2;
  localparam int B19_SRTO_HI   = 1;    // SLEEP_REQUEST_TO[1:0] = bits 1:0
  localparam int B19_SRTO_LO   = 0;
  // register 21/22 interrupt bits
  localparam int IRQ_PWON        = 15;
  localparam int IRQ_WAKEUP      = 14;
  localparam int IRQ_WUR_RECEIVED = 13;
  localparam int IRQ_LPS_RECEIVED = 12;
  localparam int IRQ_CONTROL_ERR = 5;
  localparam int IRQ_UV_ERR      = 3;
  localparam int IRQ_UV_RECOVERY = 2;
  localparam int IRQ_TEMP_ERR    = 1;
  localparam int IRQ_SLEEP_ABORT = 0;
  // register 23
  localparam int B23_RECEIVE_ERR  = 4;
  localparam int B23_TRANSMIT_ERR = 3;
  // register 24
  localparam int B24_INT_STATUS  = 15;
  localparam int B24_LOCAL_WU    = 13;
  localparam int B24_REMOTE_WU   = 12;
  localparam int B24_DATA_DET_WU = 11;
  localparam int B24_EN_STATUS   = 10;
  localparam int B24_RESET_STATUS = 9;
  // register 25
  localparam int B25_UV_VDDD3V3 = 15;
  localparam int B25_UV_VDDA3V3 = 14;
  localparam int B25_UV_VDDD1V8 = 13;
  localparam int B25_UV_VDDIO   = 11;
  localparam int B25_TEMP_HIGH  = 10;
  localparam int B25_TEMP_WARN  = 9;
  // register 27
  localparam int B27_AUTO_OP     = 15;
  localparam int B27_LDO_MODE    = 12;
  localparam int B27_LOCWUTIM_HI = 9;  // LOC_WU_TIM[1:0] = bits 9:8
  localparam int B27_LOCWUTIM_LO = 8;
  // register 28
  localparam int B28_FWDPHYREM = 1;
  localparam int B28_SLEEP_ACK = 0;

  // ------------------------------------------------- POWER_MODE commands
  localparam logic [3:0] PM_NO_CHANGE = 4'b0000;
  localparam logic [3:0] PM_NORMAL    = 4'b0011;
  localparam logic [3:0] PM_SILENT    = 4'b1001;
  localparam logic [3:0] PM_SLEEP     = 4'b1010;
  localparam logic [3:0] PM_SLEEP_REQ = 4'b1011;
  localparam logic [3:0] PM_STANDBY   = 4'b1100;

  // --------------------------------------------------- frame type codes
  localparam logic [15:0] LT_LPS    = 16'h0900;
  localparam logic [15:0] LT_WAKEUP = 16'h0842;

  // MII_MODE strap / register encoding
  typedef enum logic [1:0] {
    MII_NORMAL  = 2'b00,
    RMII_50_IN  = 2'b01,
    RMII_50_OUT = 2'b10,
    MII_REVERSE = 2'b11
  } mii_mode_t;

  // One byte of an Ethernet frame (destination address first, no
  // preamble/SFD). sof marks the first byte, eof the last, err a byte that
  // was received or sent with an error indication.
  typedef struct packed {
    logic       valid;
    logic       sof;
    logic       eof;
    logic       err;
    logic [7:0] data;
  } byte_stream_t;

  localparam byte_stream_t BS_IDLE = '{valid: 1'b0, sof: 1'b0, eof: 1'b0, err: 1'b0, data: 8'h00};


  // Control registers exported by the register file to the logic
  typedef struct packed {
    logic [15:0] r0;
    logic [15:0] r17;
    logic [15:0] r18;
    logic [15:0] r19;
    logic [15:0] r22;
    logic [15:0] r27;
    logic [15:0] r28;
  } ctrl_regs_t;

  // Records published by the Ethernet sniffer at the end of each frame.
  // frame_no counts frames from 1; 0 means no such frame seen yet.
  typedef struct packed {
    logic [31:0] frame_no;
    logic [47:0] time_ns;
    logic [23:0] vendor_dst;
    logic [23:0] host_dst;
    logic [23:0] vendor_src;
    logic [23:0] host_src;
    logic [15:0] len_type;
    logic [31:0] crc;
  } dl_rec_t;

  typedef struct packed {
    logic [31:0] frame_no;
    logic [47:0] time_ns;
    logic [3:0]  version;
    logic [3:0]  ihl;
    logic [7:0]  tos;
    logic [15:0] total_len;
    logic [15:0] ident;
    logic [2:0]  flags;
    logic [12:0] frag_off;
    logic [7:0]  ttl;
    logic [7:0]  protocol;
    logic [15:0] checksum;
    logic [31:0] src_addr;
    logic [31:0] dst_addr;
    logic [31:0] options;     // first option word, 0 when IHL = 5
  } ip_rec_t;

  localparam int TCP_OPT_BYTES = 12;

  typedef struct packed {
    logic [31:0] frame_no;
    logic [47:0] time_ns;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [31:0] seq_no;
    logic [31:0] ack_no;
    logic [3:0]  hdr_len;
    logic [3:0]  reserved;
    logic [7:0]  flags;
    logic [15:0] window;
    logic [15:0] checksum;
    logic [15:0] urgent;
    logic [TCP_OPT_BYTES*8-1:0] options;  // first option bytes, first byte in the top bits
  } tcp_rec_t;

  typedef struct packed {
    logic [31:0] frame_no;
    logic [47:0] time_ns;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [15:0] length;
    logic [15:0] checksum;
  } udp_rec_t;

  typedef struct packed {
    dl_rec_t  dl;
    ip_rec_t  ip;
    tcp_rec_t tcp;
    udp_rec_t udp;
  } sniff_rec_t;

  // POWER_MODE code reported for each state when register 17 is read
  function automatic logic [3:0] state_pm_code(pwr_state_t s);
    case (s)
      ST_NORMAL:        return PM_NORMAL;
      ST_SILENT:        return PM_SILENT;
      ST_SLEEP:         return PM_SLEEP;
      ST_SLEEP_REQUEST: return PM_SLEEP_REQ;
      default:          return PM_STANDBY;
    endcase
  endfunction

endpackage
