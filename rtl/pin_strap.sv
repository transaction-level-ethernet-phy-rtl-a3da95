// pin_strap: hardware configuration by pin strapping.
//
// While capture is high (the power-mode state machine holds it high in the
// POWER OFF and RESET states) the levels on the shared configuration pins
// are sampled every clock; when capture falls the last sample is kept and
// becomes the default of the matching register fields:
//   CONFIG0 (pin 22)          MASTER_SLAVE  0 = slave, 1 = master
//   CONFIG1 (pin 21)          AUTO_OP       0 = managed, 1 = autonomous
//   CONFIG3, CONFIG2 (17, 18) MII_MODE      00 MII, 01 RMII 50 MHz input,
//                                           10 RMII 50 MHz output, 11 reverse MII
//   PHYAD2, PHYAD1 (23, 24)   PHY address bits 2 and 1
//   SEL_1V8 (pin 4)           LDO mode      0 = internal 1.8 V LDO, 1 = external
// The remaining PHY address bits (4, 3 and 0) come from the parameter
// PHYAD_FIXED. The pins and their meanings follow the design description;
// the fixed address bits and the continuous sampling during capture are this
// design's choices. Outputs are registered and reset to 0.
module pin_strap #(
  parameter logic [4:0] PHYAD_FIXED = 5'b00000
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       capture,
  input  logic [3:0] config_pins,   // CONFIG3..CONFIG0
  input  logic [1:0] phyad_pins,    // {PHYAD2, PHYAD1}
  input  logic       sel_1v8,
  output logic       master_slave,
  output logic       auto_op,
  output logic [1:0] mii_mode,
  output logic [4:0] phy_addr,
  output logic       ldo_ext
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      master_slave <= 1'b0;
      auto_op      <= 1'b0;
      mii_mode     <= 2'b00;
      phy_addr     <= PHYAD_FIXED;
      ldo_ext      <= 1'b0;
    end else if (capture) begin
      master_slave <= config_pins[0];
      auto_op      <= config_pins[1];
      mii_mode     <= {config_pins[3], config_pins[2]};
      phy_addr     <= {PHYAD_FIXED[4:3], phyad_pins[1], phyad_pins[0], PHYAD_FIXED[0]};
      ldo_ext      <= sel_1v8;
    end
  end

endmodule
