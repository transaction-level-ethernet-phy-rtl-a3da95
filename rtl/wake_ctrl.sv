// wake_ctrl: local and remote wake-up detection and wake-up forwarding.
//
// Local wake-up: while LOCWUPHY is set, a high level on WAKE_IN_OUT starts a
// timer; when the pin has stayed high for the time chosen by LOC_WU_TIM
// (00: 20 ms, 01: 500 us, 10: 200 us, 11: 40 us) loc_wake_ev pulses once. The
// pin must go low again before another local wake-up can be seen. While
// the block drives the pin itself (forwarding) the pin is not watched.
//
// Remote wake-up: a wake-up frame from the link partner (wur_rx, flagged by
// the frame classifier) gives rem_wake_ev when REMWUPHY is set.
//
// Forwarding: with FWDPHYLOC set, a remote wake-up drives WAKE_IN_OUT high
// for T_FWD_US; with FWDPHYREM set, a local wake-up asks the frame generator
// to send a wake-up frame on the medium (wup_tx_req, one-cycle pulse).
//
// tick_us is a one-cycle pulse every microsecond. The enables, the wake-up
// times and the forwarding rules follow the design description; taking
// 20 ms from the 10-20 ms range given for LOC_WU_TIM = 00, and the length of
// the forwarded pulse, T_FWD_US, are this design's choices.
module wake_ctrl #(
  parameter int unsigned T_LWU0_US = 20000,
  parameter int unsigned T_LWU1_US = 500,
  parameter int unsigned T_LWU2_US = 200,
  parameter int unsigned T_LWU3_US = 40,
  parameter int unsigned T_FWD_US  = 50
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       tick_us,
  input  logic       wake_pin_i,
  input  logic       locwuphy,
  input  logic       remwuphy,
  input  logic       fwdphyloc,
  input  logic       fwdphyrem,
  input  logic [1:0] loc_wu_tim,
  input  logic       wur_rx,
  output logic       loc_wake_ev,
  output logic       rem_wake_ev,
  output logic       wake_pin_o,
  output logic       wake_pin_oe,
  output logic       wup_tx_req
);

  localparam int TW = 16;

  logic [1:0]    pin_sync;
  logic [TW-1:0] t_pin;
  logic          fired;
  logic [TW-1:0] t_fwd;
  logic [TW-1:0] t_lwu;

  always_comb begin
    unique case (loc_wu_tim)
      2'd0:    t_lwu = TW'(T_LWU0_US);
      2'd1:    t_lwu = TW'(T_LWU1_US);
      2'd2:    t_lwu = TW'(T_LWU2_US);
      default: t_lwu = TW'(T_LWU3_US);
    endcase
  end

  logic pin_hi;
  assign pin_hi = pin_sync[1] && !wake_pin_oe;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pin_sync    <= '0;
      t_pin       <= '0;
      fired       <= 1'b0;
      loc_wake_ev <= 1'b0;
      rem_wake_ev <= 1'b0;
      wup_tx_req  <= 1'b0;
      wake_pin_o  <= 1'b0;
      wake_pin_oe <= 1'b0;
      t_fwd       <= '0;
    end else begin
      pin_sync    <= {pin_sync[0], wake_pin_i};
      loc_wake_ev <= 1'b0;
      rem_wake_ev <= 1'b0;
      wup_tx_req  <= 1'b0;

      // local wake-up
      if (!pin_hi || !locwuphy) begin
        t_pin <= '0;
        fired <= 1'b0;
      end else if (!fired) begin
        if (t_pin >= t_lwu) begin
          fired       <= 1'b1;
          loc_wake_ev <= 1'b1;
          wup_tx_req  <= fwdphyrem;
        end else if (tick_us) begin
          t_pin <= t_pin + 1'b1;
        end
      end

      // remote wake-up and forwarding to the wake pin
      if (wur_rx && remwuphy) begin
        rem_wake_ev <= 1'b1;
        if (fwdphyloc) begin
          wake_pin_o  <= 1'b1;
          wake_pin_oe <= 1'b1;
          t_fwd       <= '0;
        end
      end else if (wake_pin_oe) begin
        if (t_fwd >= TW'(T_FWD_US)) begin
          wake_pin_o  <= 1'b0;
          wake_pin_oe <= 1'b0;
        end else if (tick_us) begin
          t_fwd <= t_fwd + 1'b1;
        end
      end
    end
  end

endmodule
