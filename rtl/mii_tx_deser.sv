// mii_tx_deser: transmit side of the MII/RMII logic.
//
// Collects TXD from the MAC while TXEN is high and assembles frame bytes:
// in MII mode (rmii = 0) one nibble per clock, low nibble first; in RMII mode
// one dibit per clock, least significant dibit first. Bytes are aligned to
// the rising edge of TXEN. The preamble is dropped: the first byte equal to
// the start-of-frame delimiter 0xD5 opens the frame, and the bytes after it
// leave on the byte stream, the destination address first, with sof on the
// first and eof on the last. Because the end of the frame is only known when
// TXEN falls, each byte is held until the next one is complete, so a byte
// leaves one byte time after it arrived and the last one leaves the clock
// after TXEN falls. A byte received while TXER was high carries err
// (transmit error propagation, TXEN = 1 and TXER = 1); TXER with TXEN low is
// the reserved code and is ignored. A frame that ends on a partial byte
// has err set on its last byte.
//
// The nibble/dibit widths and the TXEN/TXER encoding follow the design
// description; the bit order and preamble handling follow IEEE 802.3 and
// are this design's choice. The clock is TXC (25 MHz) in MII mode and
// REF_CLK (50 MHz) in RMII mode.
module mii_tx_deser
  import tja_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rmii,
  input  logic         txen,
  input  logic         txer,
  input  logic [3:0]   txd,
  output byte_stream_t out,
  output logic         activity    // TXEN seen high
);

  logic [7:0] sh;
  logic [1:0] cnt;          // nibbles (MII) or dibits (RMII) gathered
  logic       err_acc;
  logic       in_frame;     // SFD seen
  logic       held_v;
  logic       held_sof;
  logic       held_err;
  logic [7:0] held;
  logic       first;        // next byte is the first after SFD
  logic       txen_d;

  logic [7:0] nb;           // byte completed this clock
  logic       nb_v;
  logic       nb_err;
  always_comb begin
    if (rmii) nb = {txd[1:0], sh[7:2]};
    else      nb = {txd, sh[7:4]};
    nb_v   = txen && (rmii ? cnt == 2'd3 : cnt[0] == 1'b1);
    nb_err = err_acc | txer;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sh <= '0; cnt <= '0; err_acc <= 1'b0; in_frame <= 1'b0;
      held_v <= 1'b0; held_sof <= 1'b0; held_err <= 1'b0; held <= '0;
      first <= 1'b0; txen_d <= 1'b0; out <= BS_IDLE;
    end else begin
      out    <= BS_IDLE;
      txen_d <= txen;
      if (txen) begin
        sh  <= nb;
        cnt <= nb_v ? 2'd0 : cnt + 2'd1;
        err_acc <= nb_v ? 1'b0 : nb_err;
        if (nb_v) begin
          if (!in_frame) begin
            if (nb == 8'hD5) begin
              in_frame <= 1'b1;
              first    <= 1'b1;
            end
          end else begin
            if (held_v) begin
              out <= '{valid: 1'b1, sof: held_sof, eof: 1'b0, err: held_err, data: held};
            end
            held_v   <= 1'b1;
            held     <= nb;
            held_sof <= first;
            held_err <= nb_err;
            first    <= 1'b0;
          end
        end
      end else begin
        if (txen_d && held_v) begin
          out <= '{valid: 1'b1, sof: held_sof, eof: 1'b1,
                   err: held_err | (cnt != 2'd0), data: held};
        end
        sh <= '0; cnt <= '0; err_acc <= 1'b0; in_frame <= 1'b0;
        held_v <= 1'b0; first <= 1'b0;
      end
    end
  end

  assign activity = txen;

endmodule
