// phy_datapath: frame forwarding between the MII side and the medium side,
// with the three loopbacks and the frame-size limit.
//
// Four frame streams meet here: frames from the MAC (mii_tx, assembled by
// the MII/RMII logic), frames to the MAC (mii_rx), frames from the medium
// (mdi_rx) and frames to the medium (mdi_tx). Each frame is routed as a
// whole, by a decision taken on its first byte:
//   * from the MAC, with xfer_en: to the medium, or back to the MAC when
//     the internal or external loopback is selected (LOOPBACK set,
//     LOOPBACK_MODE 00, 01 or 10);
//   * from the medium, with xfer_en: to the MAC, or back to the medium when
//     the remote loopback is selected (LOOPBACK set, LOOPBACK_MODE 11);
//   * without xfer_en (any state but NORMAL after initialisation and
//     SILENT) the frame is dropped.
// The PHY's own LPS and wake-up frames (gen) go to the medium whatever the
// state; gen_ready tells the generator when it may send a byte: while no
// MAC or remote-loopback frame is being sent to the medium. A frame for
// the medium that starts while the generator is busy (gen_busy) is dropped.
// While a local loopback is selected, frames from the medium are dropped;
// while the remote loopback is selected, frames from the MAC are dropped.
// A frame whose payload (bytes after the 14-byte header, excluding the
// 4-byte frame check sequence) exceeds 4 KiB, or 16 KiB with jumbo_en, gets
// err on every byte past the limit, and oversize_ev pulses once.
// tx_err_ev pulses for every MAC byte marked err, rx_err_ev for every medium
// byte marked err. mii_data_det / mdi_data_det pulse on the first byte of
// every frame on each input, forwarded or not.
// Forwarded bytes leave one clock after they arrive.
//
// Forwarding only in NORMAL, the loopback paths, the error indications and
// the two size limits follow the design description; loopbacks are modelled
// at frame level as in the description. Frame-atomic routing, the
// generator's priority rule and where the size limit is counted are this
// design's choices.
module phy_datapath
  import tja_pkg::*;
#(
  parameter int MAX_PAYLOAD       = 4096,
  parameter int MAX_PAYLOAD_JUMBO = 16384
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         xfer_en,
  input  logic         loopback_en,
  input  logic [1:0]   loopback_mode,
  input  logic         jumbo_en,
  input  byte_stream_t mii_tx,
  output byte_stream_t mii_rx,
  input  byte_stream_t mdi_rx,
  output byte_stream_t mdi_tx,
  input  byte_stream_t gen,
  input  logic         gen_busy,
  output logic         gen_ready,
  output logic         tx_err_ev,
  output logic         rx_err_ev,
  output logic         oversize_ev,
  output logic         mii_data_det,
  output logic         mdi_data_det
);

  typedef enum logic [1:0] { R_DROP, R_FWD, R_LOOP } route_t;

  logic   lb_remote, lb_local;
  assign lb_remote = loopback_en && loopback_mode == 2'b11;
  assign lb_local  = loopback_en && loopback_mode != 2'b11;

  route_t tx_route, rx_route;   // route of the frame in flight
  logic   tx_act, rx_act;       // a frame is in flight
  logic   gen_act;
  logic   gen_hold;             // generator wants or owns the medium
  assign gen_hold = gen_busy || gen_act || gen.valid;

  // routes chosen for a frame starting now
  route_t tx_new, rx_new;
  always_comb begin
    tx_new = R_DROP;
    if (xfer_en && !lb_remote) tx_new = lb_local ? R_LOOP : (gen_hold ? R_DROP : R_FWD);
    rx_new = R_DROP;
    if (xfer_en && !lb_local) rx_new = lb_remote ? (gen_hold ? R_DROP : R_LOOP) : R_FWD;
  end

  route_t tx_cur, rx_cur;
  assign tx_cur = (mii_tx.valid && mii_tx.sof) ? tx_new : (tx_act ? tx_route : R_DROP);
  assign rx_cur = (mdi_rx.valid && mdi_rx.sof) ? rx_new : (rx_act ? rx_route : R_DROP);

  // medium busy with a MAC or remote-loopback frame
  logic mdi_busy;
  assign mdi_busy = (tx_act && tx_route == R_FWD) || (rx_act && rx_route == R_LOOP) ||
                    (mii_tx.valid && tx_cur == R_FWD) || (mdi_rx.valid && rx_cur == R_LOOP);
  assign gen_ready = !mdi_busy;

  // payload length limit
  logic [15:0] tx_len, rx_len;
  logic [15:0] limit;
  assign limit = 16'((jumbo_en ? MAX_PAYLOAD_JUMBO : MAX_PAYLOAD) + 18);
  logic tx_over, rx_over;
  assign tx_over = mii_tx.valid && (mii_tx.sof ? 16'd1 : tx_len + 16'd1) > limit;
  assign rx_over = mdi_rx.valid && (mdi_rx.sof ? 16'd1 : rx_len + 16'd1) > limit;

  function automatic byte_stream_t mark(byte_stream_t b, logic over);
    byte_stream_t r = b;
    r.err = b.err | over;
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tx_route <= R_DROP; rx_route <= R_DROP;
      tx_act <= 1'b0; rx_act <= 1'b0; gen_act <= 1'b0;
      tx_len <= '0; rx_len <= '0;
      mii_rx <= BS_IDLE; mdi_tx <= BS_IDLE;
      tx_err_ev <= 1'b0; rx_err_ev <= 1'b0; oversize_ev <= 1'b0;
      mii_data_det <= 1'b0; mdi_data_det <= 1'b0;
    end else begin
      // frame tracking
      if (mii_tx.valid) begin
        if (mii_tx.sof) tx_route <= tx_new;
        tx_act <= !mii_tx.eof;
        tx_len <= mii_tx.sof ? 16'd1 : tx_len + 16'd1;
      end
      if (mdi_rx.valid) begin
        if (mdi_rx.sof) rx_route <= rx_new;
        rx_act <= !mdi_rx.eof;
        rx_len <= mdi_rx.sof ? 16'd1 : rx_len + 16'd1;
      end
      if (gen.valid) gen_act <= !gen.eof;

      // to the medium
      mdi_tx <= BS_IDLE;
      if (gen.valid)                              mdi_tx <= gen;
      else if (mii_tx.valid && tx_cur == R_FWD)   mdi_tx <= mark(mii_tx, tx_over);
      else if (mdi_rx.valid && rx_cur == R_LOOP)  mdi_tx <= mark(mdi_rx, rx_over);

      // to the MAC
      mii_rx <= BS_IDLE;
      if (mii_tx.valid && tx_cur == R_LOOP)       mii_rx <= mark(mii_tx, tx_over);
      else if (mdi_rx.valid && rx_cur == R_FWD)   mii_rx <= mark(mdi_rx, rx_over);

      // events
      tx_err_ev    <= mii_tx.valid && mii_tx.err;
      rx_err_ev    <= mdi_rx.valid && mdi_rx.err;
      oversize_ev  <= (tx_over && tx_len + 16'd1 == limit + 16'd1 && !mii_tx.sof) ||
                      (rx_over && rx_len + 16'd1 == limit + 16'd1 && !mdi_rx.sof);
      mii_data_det <= mii_tx.valid && mii_tx.sof;
      mdi_data_det <= mdi_rx.valid && mdi_rx.sof;
    end
  end

endmodule
