// frame_gen: sends the PHY's own control frames on the medium side.
//
// On lps_req it sends an LPS code group frame (length/type 0x0900), on
// wur_req a wake-up frame (length/type 0x0842). Each frame is 60 bytes:
// destination address FF:FF:FF:FF:FF:FF, source address SRC_MAC,
// length/type, and 46 zero bytes of padding; no frame check sequence. One
// byte is sent per clock in which ready is high, so the data path can hold
// the generator while the medium is busy. A request that arrives while a
// frame is being sent is remembered and served next; LPS wins when both
// are pending. done pulses with the last byte, and busy is high from the
// request until the last byte.
//
// The two codes and the idea of sending the LPS and wake-up requests as
// frames follow the design description. The addresses, the minimum-size
// padding and the missing frame check sequence are this design's choices.
module frame_gen
  import tja_pkg::*;
#(
  parameter logic [47:0] SRC_MAC = 48'h00_60_37_00_00_01
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         lps_req,
  input  logic         wur_req,
  input  logic         ready,
  output byte_stream_t out,
  output logic         busy,
  output logic         done,
  output logic         done_lps
);

  localparam int LEN = 60;

  logic        active;
  logic        cur_lps;
  logic [5:0]  idx;
  logic        pend_lps, pend_wur;

  logic [7:0] byte_val;
  always_comb begin
    if (idx < 6'd6)       byte_val = 8'hFF;
    else if (idx < 6'd12) byte_val = SRC_MAC[8*(11-int'(idx)) +: 8];
    else if (idx == 6'd12) byte_val = cur_lps ? LT_LPS[15:8] : LT_WAKEUP[15:8];
    else if (idx == 6'd13) byte_val = cur_lps ? LT_LPS[7:0]  : LT_WAKEUP[7:0];
    else                  byte_val = 8'h00;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      cur_lps  <= 1'b0;
      idx      <= '0;
      pend_lps <= 1'b0;
      pend_wur <= 1'b0;
      out      <= BS_IDLE;
      done     <= 1'b0;
      done_lps <= 1'b0;
    end else begin
      out      <= BS_IDLE;
      done     <= 1'b0;
      done_lps <= 1'b0;
      pend_lps <= pend_lps | lps_req;
      pend_wur <= pend_wur | wur_req;
      if (!active) begin
        if (pend_lps || pend_wur) begin
          active  <= 1'b1;
          cur_lps <= pend_lps;
          idx     <= '0;
          if (pend_lps) pend_lps <= lps_req;
          else          pend_wur <= wur_req;
        end
      end else if (ready) begin
        out.valid <= 1'b1;
        out.sof   <= idx == 6'd0;
        out.eof   <= idx == 6'(LEN - 1);
        out.err   <= 1'b0;
        out.data  <= byte_val;
        if (idx == 6'(LEN - 1)) begin
          active   <= 1'b0;
          done     <= 1'b1;
          done_lps <= cur_lps;
        end else begin
          idx <= idx + 6'd1;
        end
      end
    end
  end

  assign busy = active || pend_lps || pend_wur;

endmodule
