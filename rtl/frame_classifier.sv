// frame_classifier: length/type decoder for frames arriving from the medium.
//
// Counts the bytes of each frame of the byte stream (destination address
// first) and assembles bytes 12 and 13, the length/type field. When byte 13
// has been seen it pulses lt_valid with the value on len_type, and pulses
// lps_det when the value is the LPS code 0x0900 or wur_det when it is the
// wake-up code 0x0842. A frame ending before byte 13 is not classified.
// data_det pulses on the first byte of every frame (data detected on the
// interface).
//
// The two codes and their position in the length/type field follow the
// design description; the streaming byte counter is this design's choice.
// Outputs are registered: they appear one clock after byte 13.
module frame_classifier
  import tja_pkg::*;
(
  input  logic         clk,
  input  logic         rst_n,
  input  byte_stream_t in,
  output logic         data_det,
  output logic         lt_valid,
  output logic [15:0]  len_type,
  output logic         lps_det,
  output logic         wur_det
);

  logic [3:0] idx;      // byte index, saturates at 14
  logic [7:0] b12;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx      <= '0;
      b12      <= '0;
      data_det <= 1'b0;
      lt_valid <= 1'b0;
      len_type <= '0;
      lps_det  <= 1'b0;
      wur_det  <= 1'b0;
    end else begin
      data_det <= in.valid && in.sof;
      lt_valid <= 1'b0;
      lps_det  <= 1'b0;
      wur_det  <= 1'b0;
      if (in.valid) begin
        automatic logic [3:0] i = in.sof ? 4'd0 : idx;
        if (i == 4'd12) b12 <= in.data;
        if (i == 4'd13) begin
          lt_valid <= 1'b1;
          len_type <= {b12, in.data};
          lps_det  <= {b12, in.data} == LT_LPS;
          wur_det  <= {b12, in.data} == LT_WAKEUP;
        end
        idx <= (in.eof) ? 4'd0 : ((i == 4'd14) ? 4'd14 : i + 4'd1);
      end
    end
  end

endmodule
