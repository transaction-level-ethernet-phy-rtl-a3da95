// mii_rx_ser: receive side of the MII/RMII logic.
//
// Takes frame bytes (destination address first) from the byte stream into
// a FIFO of FIFO_DEPTH entries and sends them to the MAC: seven preamble
// bytes 0x55 and the delimiter 0xD5, then the frame, with RXDV (CRSDV in
// RMII mode) high throughout. MII mode (rmii = 0) sends one nibble per clock,
// low nibble first; RMII mode one dibit per clock on RXD[1:0], least
// significant first. RXER is high while a byte marked err is sent (data
// reception with errors). If the FIFO runs empty inside a frame the frame
// is cut short: RXDV falls after the byte being sent. A frame starts once its first byte
// is at the head of the FIFO; the eight preamble bytes give the FIFO time to
// fill, so the producer may deliver bytes at the MII byte rate. in_ready is
// low when the FIFO is full. RXDV is low for at least one clock between
// frames.
//
// The nibble/dibit widths and the RXDV/RXER encoding follow the design
// description; the FIFO, the bit order and the preamble follow IEEE 802.3
// practice and are this design's choice.
module mii_rx_ser
  import tja_pkg::*;
#(
  parameter int FIFO_DEPTH = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         rmii,
  input  byte_stream_t in,
  output logic         in_ready,
  output logic         rxdv,
  output logic         rxer,
  output logic [3:0]   rxd,
  output logic         overflow
);

  localparam int AW = $clog2(FIFO_DEPTH);

  // ------------------------------------------------------------------ FIFO
  logic [10:0] mem [FIFO_DEPTH];   // {sof, eof, err, data}
  logic [AW:0] wp, rp;
  logic        empty, full;
  logic        pop;
  assign empty = wp == rp;
  assign full  = (wp[AW-1:0] == rp[AW-1:0]) && (wp[AW] != rp[AW]);
  assign in_ready = !full;

  always_ff @(posedge clk) begin
    if (in.valid && !full) mem[wp[AW-1:0]] <= {in.sof, in.eof, in.err, in.data};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
      overflow <= 1'b0;
    end else begin
      overflow <= in.valid && full;
      if (in.valid && !full) wp <= wp + 1'b1;
      if (pop) rp <= rp + 1'b1;
    end
  end

  logic [10:0] head;
  assign head = mem[rp[AW-1:0]];

  // ------------------------------------------------------------ serialiser
  typedef enum logic [1:0] { S_IDLE, S_PRE, S_DATA, S_GAP } sstate_t;
  sstate_t    st;
  logic [2:0] pre_cnt;     // preamble byte index 0..7
  logic [1:0] sub;         // nibble/dibit index within the byte
  logic [7:0] cur;
  logic       cur_err;
  logic       cur_eof;

  logic last_sub;
  assign last_sub = rmii ? sub == 2'd3 : sub[0] == 1'b1;

  logic [3:0] piece;
  always_comb begin
    if (rmii) piece = {2'b00, cur[2*sub +: 2]};
    else      piece = sub[0] ? cur[7:4] : cur[3:0];
  end

  // pop when a byte is loaded from the FIFO
  always_comb begin
    pop = 1'b0;
    if (!empty) begin
      if (st == S_IDLE && head[10]) pop = 1'b0;
      if (st == S_PRE && last_sub && pre_cnt == 3'd7) pop = 1'b1;
      if (st == S_DATA && last_sub && !cur_eof) pop = 1'b1;
      if (st == S_IDLE && !head[10]) pop = 1'b1;   // drop bytes outside a frame
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_IDLE; pre_cnt <= '0; sub <= '0; cur <= '0; cur_err <= 1'b0; cur_eof <= 1'b0;
      rxdv <= 1'b0; rxer <= 1'b0; rxd <= '0;
    end else begin
      unique case (st)
        S_IDLE: begin
          rxdv <= 1'b0; rxer <= 1'b0; rxd <= '0;
          if (!empty && head[10]) begin
            st <= S_PRE; pre_cnt <= '0; sub <= '0;
            cur <= 8'h55; cur_err <= 1'b0; cur_eof <= 1'b0;
          end
        end
        S_PRE, S_DATA: begin
          rxdv <= 1'b1;
          rxer <= cur_err;
          rxd  <= piece;
          sub  <= last_sub ? 2'd0 : sub + 2'd1;
          if (last_sub) begin
            if (st == S_PRE && pre_cnt != 3'd7) begin
              pre_cnt <= pre_cnt + 3'd1;
              cur     <= (pre_cnt == 3'd6) ? 8'hD5 : 8'h55;
            end else if (cur_eof && st == S_DATA) begin
              st <= S_GAP;
            end else if (empty) begin
              // underrun inside a frame: end it; the rest of the frame is dropped in S_IDLE
              st <= S_GAP;
            end else begin
              st      <= S_DATA;
              cur     <= head[7:0];
              cur_err <= head[8];
              cur_eof <= head[9];
            end
          end
        end
        S_GAP: begin
          rxdv <= 1'b0; rxer <= 1'b0; rxd <= '0;
          st <= S_IDLE;
        end
        default: st <= S_IDLE;
      endcase
    end
  end

endmodule
