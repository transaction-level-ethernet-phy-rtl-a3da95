// env_monitor: undervoltage, overtemperature and temperature-warning
// detection.
//
// The supply voltages (in millivolts) and the die temperature (in degrees
// Celsius, signed) arrive as digital codes from the analog sense circuits.
// Each supply is compared with its threshold: a value below the threshold is
// an undervoltage. The temperature is compared with OT_C (overtemperature)
// and WARN_C (temperature warning). All flags are registered, so they follow
// the inputs with one clock of latency. The event outputs are one-cycle
// pulses: uv_err_ev when any supply other than the battery enters
// undervoltage, uv_rec_ev when the last of them recovers, temp_err_ev when
// overtemperature begins.
//
// The thresholds (3.3 V for VDD(IO), VDDD(3V3), VDDA(3V3) and the battery,
// 1.8 V for VDDD(1V8)) and the temperature trip bands (overtemperature
// 180-200 C, warning 155-175 C; the lower ends are used) follow the design
// description. Comparing digital codes, rather than modelling the analog
// comparators, is this design's choice.
module env_monitor #(
  parameter logic [15:0] VBAT_UV_MV  = 16'd3300,
  parameter logic [15:0] VDDIO_UV_MV = 16'd3300,
  parameter logic [15:0] V3V3_UV_MV  = 16'd3300,
  parameter logic [15:0] V1V8_UV_MV  = 16'd1800,
  parameter int          OT_C        = 180,
  parameter int          WARN_C      = 155
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [15:0]        vbat_mv,
  input  logic [15:0]        vddio_mv,
  input  logic [15:0]        vddd3v3_mv,
  input  logic [15:0]        vdda3v3_mv,
  input  logic [15:0]        vddd1v8_mv,
  input  logic signed [15:0] temp_c,
  output logic               uv_vbat,
  output logic               uv_vddio,
  output logic               uv_vddd3v3,
  output logic               uv_vdda3v3,
  output logic               uv_vddd1v8,
  output logic               uv_supply,     // any supply except the battery
  output logic               ot,
  output logic               temp_warn,
  output logic               uv_err_ev,
  output logic               uv_rec_ev,
  output logic               temp_err_ev
);

  logic uv_supply_next;
  localparam logic signed [15:0] OT_S   = 16'(OT_C);
  localparam logic signed [15:0] WARN_S = 16'(WARN_C);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      uv_vbat     <= 1'b1;
      uv_vddio    <= 1'b1;
      uv_vddd3v3  <= 1'b1;
      uv_vdda3v3  <= 1'b1;
      uv_vddd1v8  <= 1'b1;
      ot          <= 1'b0;
      temp_warn   <= 1'b0;
      uv_err_ev   <= 1'b0;
      uv_rec_ev   <= 1'b0;
      temp_err_ev <= 1'b0;
    end else begin
      uv_vbat     <= vbat_mv    < VBAT_UV_MV;
      uv_vddio    <= vddio_mv   < VDDIO_UV_MV;
      uv_vddd3v3  <= vddd3v3_mv < V3V3_UV_MV;
      uv_vdda3v3  <= vdda3v3_mv < V3V3_UV_MV;
      uv_vddd1v8  <= vddd1v8_mv < V1V8_UV_MV;
      ot          <= temp_c >= OT_S;
      temp_warn   <= temp_c >= WARN_S;
      uv_err_ev   <= uv_supply_next & ~uv_supply;
      uv_rec_ev   <= ~uv_supply_next & uv_supply;
      temp_err_ev <= (temp_c >= OT_S) & ~ot;
    end
  end

  assign uv_supply_next = (vddio_mv < VDDIO_UV_MV) | (vddd3v3_mv < V3V3_UV_MV) |
                          (vdda3v3_mv < V3V3_UV_MV) | (vddd1v8_mv < V1V8_UV_MV);
  assign uv_supply = uv_vddio | uv_vddd3v3 | uv_vdda3v3 | uv_vddd1v8;

endmodule
