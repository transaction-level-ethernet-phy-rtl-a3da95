// irq_ctrl: interrupt source latch and INT_N generation.
//
// Each bit of int_src (register 21) is set by a one-cycle pulse on the
// matching bit of events and stays set until register 21 is read. int_n, the
// active-low interrupt pin, is low while any latched source is also enabled
// in int_en (register 22). A read of register 21 (rd_clear) clears every
// source in the cycle after the read, so INT_N returns high; an event arriving
// in the same cycle as the read is kept. clr clears everything (register
// reset in POWER OFF and RESET).
//
// Latching, masking with register 22, INT_N low on an enabled source and
// clear-on-read follow the design description; giving an event priority over
// a simultaneous clear is this design's choice. int_n is registered.
module irq_ctrl (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        clr,
  input  logic [15:0] events,
  input  logic [15:0] int_en,
  input  logic        rd_clear,
  output logic [15:0] int_src,
  output logic        int_n
);

  logic [15:0] next_src;

  always_comb begin
    next_src = rd_clear ? events : (int_src | events);
    if (clr) next_src = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      int_src <= '0;
      int_n   <= 1'b1;
    end else begin
      int_src <= next_src;
      int_n   <= ~|(next_src & int_en);
    end
  end

endmodule
