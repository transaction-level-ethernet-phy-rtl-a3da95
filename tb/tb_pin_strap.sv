// tb_pin_strap: checks that strap pins are sampled during capture and held
// afterwards, with each pin mapped to its field.
module tb_pin_strap;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, capture, sel_1v8, master_slave, auto_op, ldo_ext;
  logic [3:0] config_pins;
  logic [1:0] phyad_pins, mii_mode;
  logic [4:0] phy_addr;
  int checks = 0, failures = 0;

  pin_strap #(.PHYAD_FIXED(5'b10001)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1; rst_n = 0; capture = 0; config_pins = 0; phyad_pins = 0; sel_1v8 = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 64; i++) begin
      logic [3:0] c; logic [1:0] p; logic s;
      c = 4'($urandom); p = 2'($urandom); s = 1'($urandom);
      config_pins = c; phyad_pins = p; sel_1v8 = s; capture = 1;
      @(posedge clk); #1;
      capture = 0;
      config_pins = ~c; phyad_pins = ~p; sel_1v8 = ~s;   // pins now carry RX data
      repeat (3) @(posedge clk); #1;
      check(master_slave == c[0], "MASTER_SLAVE from CONFIG0");
      check(auto_op == c[1], "AUTO_OP from CONFIG1");
      check(mii_mode == {c[3], c[2]}, "MII_MODE from CONFIG3/CONFIG2");
      check(phy_addr == {2'b10, p[1], p[0], 1'b1}, "PHYAD bits 2:1 from pins");
      check(ldo_ext == s, "LDO mode from SEL_1V8");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
