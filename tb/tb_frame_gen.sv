// tb_frame_gen: LPS and wake-up frame generator.
// Requests LPS and wake-up frames, alone, together and while a frame is
// being sent, with ready dropping at random. Every frame is captured and
// checked byte for byte (broadcast destination, the source address, the
// length/type code, zero padding, 60 bytes, sof/eof), together with the
// order of service (LPS first), done/done_lps on the last byte, busy from
// the request to the end, and that no byte leaves while ready is low.
module tb_frame_gen;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam logic [47:0] MAC = 48'h02_11_22_33_44_55;
  logic rst_n, lps_req, wur_req, ready, busy, done, done_lps;
  byte_stream_t out;
  int checks = 0, failures = 0;

  frame_gen #(.SRC_MAC(MAC)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  logic [7:0] fr[$];
  logic [15:0] got_lt[$];
  bit ready_d = 0;
  always @(posedge clk) if (rst_n) begin
    if (out.valid) begin
      check(ready_d, "byte only after a ready clock");
      check(out.sof == (fr.size() == 0), "sof on first byte");
      fr.push_back(out.data);
      check(out.eof == (fr.size() == 60), "eof on byte 60");
      check(done == out.eof, "done with the last byte");
      if (out.eof) begin
        automatic bit ok = 1;
        for (int i = 0; i < 6; i++) ok &= fr[i] == 8'hFF;
        for (int i = 0; i < 6; i++) ok &= fr[6 + i] == MAC[8*(5-i) +: 8];
        for (int i = 14; i < 60; i++) ok &= fr[i] == 8'h00;
        check(ok, "addresses and padding");
        got_lt.push_back({fr[12], fr[13]});
        check(done_lps == ({fr[12], fr[13]} == LT_LPS), "done_lps only for LPS");
        fr.delete();
      end
    end else check(!done, "no done without a byte");
    ready_d = ready;
  end

  task automatic wait_idle;
    automatic int t = 0;
    while (busy && t < 2000) begin ready = ($urandom % 4) != 0; step(); t++; end
    ready = 1; repeat (3) step();
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1; rst_n = 0;
    lps_req = 0; wur_req = 0; ready = 1;
    repeat (2) @(posedge clk); rst_n = 1; step();
    check(!busy && !out.valid, "idle after reset");
    lps_req = 1; step(); lps_req = 0;
    check(busy, "busy after request");
    wait_idle();
    check(got_lt.size() == 1 && got_lt[0] == LT_LPS, "LPS frame");
    wur_req = 1; step(); wur_req = 0;
    wait_idle();
    check(got_lt.size() == 2 && got_lt[1] == LT_WAKEUP, "wake-up frame");
    // both at once: LPS first
    lps_req = 1; wur_req = 1; step(); lps_req = 0; wur_req = 0;
    wait_idle();
    check(got_lt.size() == 4 && got_lt[2] == LT_LPS && got_lt[3] == LT_WAKEUP, "LPS served before wake-up");
    // request during a frame is kept
    wur_req = 1; step(); wur_req = 0;
    repeat (20) step();
    lps_req = 1; step(); lps_req = 0;
    wait_idle();
    check(got_lt.size() == 6 && got_lt[4] == LT_WAKEUP && got_lt[5] == LT_LPS, "request during a frame served next");
    // ready held low: nothing leaves
    ready = 0; lps_req = 1; step(); lps_req = 0;
    repeat (30) step();
    check(fr.size() == 0 && busy, "held while ready is low");
    wait_idle();
    check(got_lt.size() == 7, "held frame sent afterwards");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
