// tb_mii_tx_deser: MII/RMII transmit deserialiser.
// A MAC model sends frames of random length and content with preamble and
// delimiter, in MII mode (nibbles) and RMII mode (dibits). A scoreboard
// compares every byte on the output stream with the bytes sent, and checks
// sof on the first byte, eof on the last, err on exactly the bytes sent with
// TXER high, err on the last byte of a frame that ends on a partial byte,
// that TXER with TXEN low does nothing, and that activity follows TXEN.
module tb_mii_tx_deser;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rmii, txen, txer, activity;
  logic [3:0] txd;
  byte_stream_t out;
  int checks = 0, failures = 0;

  mii_tx_deser dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  // expected bytes of the current frame
  logic [7:0] exp_d[$];
  bit         exp_e[$];
  int         got = 0, got_frames = 0;
  bit         partial = 0;
  int         exp_len = 0;

  always @(posedge clk) if (rst_n && out.valid) begin
    check(exp_d.size() > 0, "byte expected");
    if (exp_d.size() > 0) begin
      automatic logic [7:0] d = exp_d.pop_front();
      automatic bit e = exp_e.pop_front();
      check(out.data == d, $sformatf("byte %0d data %h expected %h", got, out.data, d));
      check(out.sof == (got == 0), $sformatf("sof on byte %0d", got));
      check(out.eof == (got == exp_len - 1), $sformatf("eof on byte %0d", got));
      check(out.err == (e || (partial && got == exp_len - 1)), $sformatf("err on byte %0d", got));
    end
    got++;
    if (out.eof) begin got = 0; got_frames++; end
  end

  task automatic send_piece(logic [3:0] v, bit er);
    txen = 1; txer = er; txd = v; step();
  endtask

  task automatic send_byte(logic [7:0] b, bit er);
    if (rmii) for (int k = 0; k < 4; k++) send_piece({2'b00, b[2*k +: 2]}, er);
    else begin send_piece(b[3:0], er); send_piece(b[7:4], er); end
  endtask

  task automatic send_frame(int len, int err_at, bit add_partial);
    logic [7:0] b;
    exp_len = len; partial = add_partial;
    for (int i = 0; i < 7; i++) send_byte(8'h55, 0);
    send_byte(8'hD5, 0);
    for (int i = 0; i < len; i++) begin
      b = 8'($urandom);
      exp_d.push_back(b); exp_e.push_back(i == err_at);
      send_byte(b, i == err_at);
    end
    if (add_partial) send_piece(4'h3, 0);
    txen = 0; txer = 0; txd = 0;
    repeat (12) step();
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1; rst_n = 0;
    rmii = 0; txen = 0; txer = 0; txd = 0;
    repeat (2) @(posedge clk); rst_n = 1; step();
    for (int m = 0; m < 2; m++) begin
      rmii = m[0];
      for (int f = 0; f < 20; f++) begin
        automatic int len = 1 + ($urandom % 100);
        automatic int ea = (f % 3 == 0) ? int'($urandom % len) : -1;
        automatic int fr = got_frames;
        send_frame(len, ea, 0);
        check(got_frames == fr + 1 && exp_d.size() == 0, $sformatf("frame %0d/%0d delivered", m, f));
      end
      begin
        automatic int fr = got_frames;
        send_frame(64, -1, 1);
        check(got_frames == fr + 1, "frame ending on a partial byte delivered");
      end
    end
    // false carrier / reserved code: TXER with TXEN low
    begin
      automatic int fr = got_frames;
      txer = 1; txd = 4'hE; repeat (20) step(); txer = 0;
      check(got_frames == fr && exp_d.size() == 0, "TXER without TXEN ignored");
    end
    txen = 1; step(); check(activity, "activity follows TXEN");
    txen = 0; step(); check(!activity, "activity low");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
