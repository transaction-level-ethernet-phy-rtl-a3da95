// mdio_slave: serial management interface (SMI / MDIO) slave.
//
// Decodes the management frame
//   preamble (32 ones) | start 01 | op 10=read 01=write | PHYAD[4:0] |
//   REGAD[4:0] | turnaround | data[15:0] | idle
// with every bit sampled on a rising edge of MDC, MSB first. On a read
// addressed to this PHY the turnaround is "Z0": the first turnaround bit is
// left undriven, then the slave drives 0 and the 16 data bits. On a write the
// master drives "10" and the data, and the slave raises wr_en for one clk
// cycle after the last data bit.
//
// MDC and MDIO are oversampled with the core clock clk through two-flop
// synchronisers, so clk must run at least four times faster than MDC. The
// slave changes mdio_o one clk cycle after it has seen an MDC rising edge,
// which leaves the rest of the MDC period for the master to sample it on the
// next rising edge. rd_en is a one-cycle pulse at the moment the register
// index is known; rd_data must be valid in that same cycle (the register
// file answers combinationally). Frames are ignored while smi_en is low or
// when PHYAD differs from phy_addr.
//
// The frame layout and the rising-edge sampling follow the design
// description; the oversampling scheme, the restart-on-bad-start rule and the
// one-cycle strobes are this design's choices.
module mdio_slave #(
  parameter int PREAMBLE_BITS = 32
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        smi_en,
  input  logic [4:0]  phy_addr,
  input  logic        mdc,
  input  logic        mdio_i,
  output logic        mdio_o,
  output logic        mdio_oe,
  output logic [4:0]  reg_addr,
  output logic        rd_en,
  input  logic [15:0] rd_data,
  output logic        wr_en,
  output logic [15:0] wr_data
);

  typedef enum logic [2:0] {
    M_PREAMBLE, M_START, M_HEADER, M_TA, M_DATA
  } mstate_t;

  logic [2:0]  mdc_sync;
  logic [1:0]  mdio_sync;
  logic        mdc_rise;
  logic        bit_in;

  mstate_t     st;
  logic [5:0]  cnt;
  logic [10:0] hdr;       // the header bits received so far
  logic        is_read;
  logic        addressed;
  logic [15:0] shreg;
  logic [15:0] rd_data_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mdc_sync  <= '0;
      mdio_sync <= '1;
    end else begin
      mdc_sync  <= {mdc_sync[1:0], mdc};
      mdio_sync <= {mdio_sync[0], mdio_i};
    end
  end

  assign mdc_rise = mdc_sync[1] & ~mdc_sync[2];
  assign bit_in   = mdio_sync[1];

  // header fields as they become complete
  logic [1:0] hdr_op;
  logic [4:0] hdr_phy;
  logic [4:0] hdr_reg;
  assign hdr_op  = hdr[10:9];
  assign hdr_phy = hdr[8:4];
  assign hdr_reg = {hdr[3:0], bit_in};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= M_PREAMBLE;
      cnt       <= '0;
      hdr       <= '0;
      is_read   <= 1'b0;
      addressed <= 1'b0;
      shreg     <= '0;
      mdio_o    <= 1'b1;
      mdio_oe   <= 1'b0;
      reg_addr  <= '0;
      rd_en     <= 1'b0;
      wr_en     <= 1'b0;
      wr_data   <= '0;
    end else begin
      rd_en <= 1'b0;
      wr_en <= 1'b0;
      if (mdc_rise) begin
        unique case (st)
          M_PREAMBLE: begin
            mdio_oe <= 1'b0;
            if (bit_in) begin
              if (cnt != 6'(PREAMBLE_BITS)) cnt <= cnt + 6'd1;
            end else if (cnt == 6'(PREAMBLE_BITS)) begin
              st <= M_START;            // first start bit (0) seen
            end else begin
              cnt <= '0;
            end
          end
          M_START: begin
            if (bit_in) begin
              st  <= M_HEADER;          // second start bit (1)
              cnt <= '0;
            end else begin
              st  <= M_PREAMBLE;
              cnt <= '0;
            end
          end
          M_HEADER: begin
            hdr <= {hdr[9:0], bit_in};
            cnt <= cnt + 6'd1;
            if (cnt == 6'd11) begin
              reg_addr  <= hdr_reg;
              is_read   <= (hdr_op == 2'b10);
              addressed <= smi_en && (hdr_phy == phy_addr) &&
                           (hdr_op == 2'b10 || hdr_op == 2'b01);
              if (smi_en && hdr_phy == phy_addr && hdr_op == 2'b10)
                rd_en <= 1'b1;
              st  <= M_TA;
              cnt <= '0;
            end
          end
          M_TA: begin
            cnt <= cnt + 6'd1;
            if (cnt == 6'd0) begin
              // first turnaround bit has just been sampled (Z on a read);
              // drive the second one (0) on a read
              if (is_read && addressed) begin
                mdio_oe <= 1'b1;
                mdio_o  <= 1'b0;
                shreg   <= rd_data_q;
              end
            end else begin
              st  <= M_DATA;
              cnt <= '0;
              if (is_read && addressed) begin
                mdio_o <= shreg[15];
                shreg  <= {shreg[14:0], 1'b0};
              end
            end
          end
          M_DATA: begin
            cnt <= cnt + 6'd1;
            if (!is_read) shreg <= {shreg[14:0], bit_in};
            else if (addressed) begin
              mdio_o <= shreg[15];
              shreg  <= {shreg[14:0], 1'b0};
            end
            if (cnt == 6'd15) begin
              st      <= M_PREAMBLE;
              cnt     <= '0;
              mdio_oe <= 1'b0;
              mdio_o  <= 1'b1;
              if (!is_read && addressed) begin
                wr_en   <= 1'b1;
                wr_data <= {shreg[14:0], bit_in};
              end
            end
          end
          default: st <= M_PREAMBLE;
        endcase
      end
    end
  end

  // read data captured in the cycle of the rd_en strobe
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     rd_data_q <= '0;
    else if (rd_en) rd_data_q <= rd_data;
  end

endmodule
