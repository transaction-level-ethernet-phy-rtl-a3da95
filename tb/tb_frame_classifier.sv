// tb_frame_classifier: length/type decoder.
// Sends frames with the LPS code, the wake-up code and other length/type
// values, some back to back and some shorter than 14 bytes, with idle
// clocks between bytes. Checks that lt_valid and len_type appear exactly
// one clock after byte 13 of each frame of 14 bytes or more, that lps_det
// and wur_det pulse only for their own code, and that data_det pulses once
// on the first byte of every frame, short ones included.
module tb_frame_classifier;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, data_det, lt_valid, lps_det, wur_det;
  logic [15:0] len_type;
  byte_stream_t in;
  int checks = 0, failures = 0;
  int n_dd = 0, n_lt = 0, n_lps = 0, n_wur = 0;

  frame_classifier dut (.*);

  always @(posedge clk) if (rst_n) begin
    if (data_det) n_dd++;
    if (lt_valid) n_lt++;
    if (lps_det) n_lps++;
    if (wur_det) n_wur++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  task automatic send(logic [15:0] lt, int len, bit gaps);
    automatic int dd = n_dd, lv = n_lt, lp = n_lps, wu = n_wur;
    for (int i = 0; i < len; i++) begin
      logic [7:0] b = (i == 12) ? lt[15:8] : (i == 13) ? lt[7:0] : 8'($urandom);
      in = '{valid: 1'b1, sof: i == 0, eof: i == len - 1, err: 1'b0, data: b};
      step();
      in = BS_IDLE;
      if (i == 13) check(lt_valid && len_type == lt, $sformatf("len/type %h one clock after byte 13", lt));
      else         check(!lt_valid, "no lt_valid on other bytes");
      if (gaps) repeat ($urandom % 3) step();
    end
    step();
    check(n_dd == dd + 1, "data_det once per frame");
    check(n_lt == lv + (len >= 14), "lt_valid once for a long frame, never for a short one");
    check(n_lps == lp + (len >= 14 && lt == LT_LPS), $sformatf("lps_det for %h", lt));
    check(n_wur == wu + (len >= 14 && lt == LT_WAKEUP), $sformatf("wur_det for %h", lt));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] lts[6] = '{LT_LPS, LT_WAKEUP, 16'h0800, 16'h0901, 16'h0842 ^ 16'h0100, 16'h05DC};
    rst_n = 1; #1; rst_n = 0;
    in = BS_IDLE;
    repeat (2) @(posedge clk); rst_n = 1; step();
    for (int r = 0; r < 40; r++) begin
      automatic int k = r % 6;
      automatic int len = (r % 7 == 3) ? 1 + int'($urandom % 13) : 14 + int'($urandom % 60);
      send(lts[k], len, r[0]);
    end
    // a short frame must not leave its byte count to the next frame
    send(16'h0900, 13, 0);
    send(LT_WAKEUP, 20, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
