// tb_env_monitor: undervoltage and temperature thresholds and the event
// pulses, using the voltages and temperatures of the reference scenarios
// (battery 1.2 V then 5 V, supplies 0 V then 3.3 V, 200 C then 100 C).
module tb_env_monitor;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n;
  logic [15:0] vbat_mv, vddio_mv, vddd3v3_mv, vdda3v3_mv, vddd1v8_mv;
  logic signed [15:0] temp_c;
  logic uv_vbat, uv_vddio, uv_vddd3v3, uv_vdda3v3, uv_vddd1v8, uv_supply;
  logic ot, temp_warn, uv_err_ev, uv_rec_ev, temp_err_ev;
  int checks = 0, failures = 0;
  int n_uv_err = 0, n_uv_rec = 0, n_temp_err = 0;

  env_monitor dut (.*);

  always @(posedge clk) begin
    if (uv_err_ev) n_uv_err++;
    if (uv_rec_ev) n_uv_rec++;
    if (temp_err_ev) n_temp_err++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic settle; repeat (3) @(posedge clk); #1; endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1; rst_n = 0; vbat_mv = 1200; vddio_mv = 0; vddd3v3_mv = 0; vdda3v3_mv = 0; vddd1v8_mv = 0; temp_c = 25;
    repeat (2) @(posedge clk); rst_n = 1; settle();
    check(uv_vbat && uv_supply, "1.2 V battery and 0 V supplies are undervoltage");
    vbat_mv = 5000; settle();
    check(!uv_vbat, "5 V battery is good");
    vddio_mv = 3300; vddd3v3_mv = 3300; vdda3v3_mv = 3300; settle();
    check(uv_supply && uv_vddd1v8 && !uv_vddio, "1.8 V supply still missing");
    vddd1v8_mv = 1800; settle();
    check(!uv_supply && n_uv_rec == 1, "all supplies good, one recovery event");
    vdda3v3_mv = 3299; settle();
    check(uv_vdda3v3 && uv_supply && n_uv_err == 1, "3.299 V is below the 3.3 V threshold");
    vdda3v3_mv = 3300; vddd1v8_mv = 1799; settle();
    check(uv_vddd1v8 && !uv_vdda3v3 && n_uv_err == 1 && n_uv_rec == 1, "moving undervoltage: no new events");
    vddd1v8_mv = 1800; settle();
    check(n_uv_rec == 2, "second recovery");
    temp_c = 154; settle(); check(!temp_warn && !ot, "154 C: nothing");
    temp_c = 155; settle(); check(temp_warn && !ot, "155 C: warning");
    temp_c = 179; settle(); check(temp_warn && !ot && n_temp_err == 0, "179 C: warning only");
    temp_c = 200; settle(); check(ot && n_temp_err == 1, "200 C: overtemperature event");
    temp_c = 100; settle(); check(!ot && !temp_warn, "100 C: clear");
    temp_c = -40; settle(); check(!ot && !temp_warn, "-40 C: clear (signed compare)");
    temp_c = 180; settle(); check(ot && n_temp_err == 2, "180 C: second event");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
