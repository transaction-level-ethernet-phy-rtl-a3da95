// tb_wake_ctrl: local and remote wake-up.
// The microsecond tick is high on every clock and the default wake-up times
// are kept, so each LOC_WU_TIM setting is measured in clocks: the pin is held
// high and the clocks to the wake-up event are counted, and a pulse shorter
// than the setting must give nothing. Also checks the LOCWUPHY / REMWUPHY
// enables, one event per pin pulse, forwarding of a remote wake-up to the
// pin (FWDPHYLOC) and of a local wake-up to the medium (FWDPHYREM).
module tb_wake_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, tick_us, wake_pin_i, locwuphy, remwuphy, fwdphyloc, fwdphyrem, wur_rx;
  logic [1:0] loc_wu_tim;
  logic loc_wake_ev, rem_wake_ev, wake_pin_o, wake_pin_oe, wup_tx_req;
  int checks = 0, failures = 0;
  int n_loc = 0, n_rem = 0, n_wup = 0;

  wake_ctrl dut (.*);

  always @(posedge clk) begin
    if (loc_wake_ev) n_loc++;
    if (rem_wake_ev) n_rem++;
    if (wup_tx_req)  n_wup++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int times[4] = '{20000, 500, 200, 40};

  initial begin
    rst_n = 1; #1; rst_n = 0;
    tick_us = 1; wake_pin_i = 0; locwuphy = 1; remwuphy = 1; fwdphyloc = 0; fwdphyrem = 0;
    wur_rx = 0; loc_wu_tim = 0;
    repeat (2) @(posedge clk); rst_n = 1; step();
    for (int s = 0; s < 4; s++) begin
      int t, n0;
      loc_wu_tim = 2'(s);
      // too short a pulse
      n0 = n_loc;
      wake_pin_i = 1; repeat (times[s] - 5) step(); wake_pin_i = 0; repeat (5) step();
      check(n_loc == n0, $sformatf("setting %0d: short pulse ignored", s));
      // long pulse: one event after the time
      wake_pin_i = 1; t = 0;
      while (n_loc == n0 && t < 30000) begin step(); t++; end
      check(t >= times[s] && t <= times[s] + 4, $sformatf("setting %0d: wake-up after %0d clocks", s, t));
      repeat (3 * times[s] / 2 + 10) step();
      check(n_loc == n0 + 1, $sformatf("setting %0d: one event per pulse", s));
      wake_pin_i = 0; repeat (5) step();
    end
    // disabled local wake-up
    locwuphy = 0; loc_wu_tim = 3; begin
      automatic int n0 = n_loc;
      wake_pin_i = 1; repeat (100) step(); wake_pin_i = 0; repeat (5) step();
      check(n_loc == n0, "LOCWUPHY = 0 ignores the pin");
    end
    locwuphy = 1;
    // forwarding to the medium
    fwdphyrem = 1; begin
      automatic int n0 = n_wup;
      wake_pin_i = 1; repeat (60) step(); wake_pin_i = 0; repeat (5) step();
      check(n_wup == n0 + 1, "FWDPHYREM: local wake-up sends a wake-up frame");
    end
    fwdphyrem = 0; begin
      automatic int n0 = n_wup;
      wake_pin_i = 1; repeat (60) step(); wake_pin_i = 0; repeat (5) step();
      check(n_wup == n0, "no frame without FWDPHYREM");
    end
    // remote wake-up
    begin
      automatic int n0 = n_rem;
      wur_rx = 1; step(); wur_rx = 0; step();
      check(n_rem == n0 + 1 && !wake_pin_oe, "remote wake-up event, pin not driven");
      remwuphy = 0;
      wur_rx = 1; step(); wur_rx = 0; step();
      check(n_rem == n0 + 1, "REMWUPHY = 0 ignores wake-up frames");
      remwuphy = 1;
    end
    // forwarding to the pin
    fwdphyloc = 1; begin
      automatic int t = 0; automatic int n0 = n_loc;
      wur_rx = 1; step(); wur_rx = 0;
      check(wake_pin_oe && wake_pin_o, "FWDPHYLOC drives the wake pin");
      wake_pin_i = 1;   // the pin reads back high while driven
      while (wake_pin_oe && t < 500) begin step(); t++; end
      wake_pin_i = 0;
      check(t >= 50 && t <= 53, $sformatf("forwarded pulse lasts %0d clocks", t));
      repeat (5) step();
      check(n_loc == n0, "own forwarded pulse is not a local wake-up");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
