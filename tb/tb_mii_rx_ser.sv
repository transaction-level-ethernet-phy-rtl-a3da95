// tb_mii_rx_ser: MII/RMII receive serialiser.
// Frames of random length are fed into the byte stream at the MII byte rate
// (one byte per two clocks in MII mode, per four clocks in RMII mode). A MAC
// model reassembles RXD while RXDV is high and checks the seven 0x55
// preamble bytes and the 0xD5 delimiter, every data byte, RXER on the bytes
// marked err, a gap with RXDV low between frames, and back-to-back frames.
// A slow producer must make the frame end early (underrun) with the rest
// of it dropped, and bytes pushed into a full FIFO must raise overflow.
module tb_mii_rx_ser;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, rmii, in_ready, rxdv, rxer, overflow;
  logic [3:0] rxd;
  byte_stream_t in;
  int checks = 0, failures = 0;

  mii_rx_ser #(.FIFO_DEPTH(16)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  // MAC model
  logic [7:0] rx_bytes[$];
  bit         rx_errs[$];
  int         frames = 0, ovf = 0;
  logic [7:0] sh;
  int         sub = 0;
  bit         err_acc = 0;
  bit         rxdv_d = 0;
  int         gap_min = 1000, gap = 0;
  always @(posedge clk) if (rst_n) begin
    if (overflow) ovf++;
    if (rxdv) begin
      if (!rxdv_d && gap < gap_min && frames > 0) gap_min = gap;
      if (rmii) sh = {rxd[1:0], sh[7:2]}; else sh = {rxd, sh[7:4]};
      err_acc |= rxer;
      sub++;
      if (sub == (rmii ? 4 : 2)) begin
        rx_bytes.push_back(sh); rx_errs.push_back(err_acc); sub = 0; err_acc = 0;
      end
      gap = 0;
    end else begin
      if (rxdv_d) frames++;
      sub = 0; gap++;
    end
    rxdv_d = rxdv;
  end

  task automatic feed(logic [7:0] data[$], int err_at, int spacing);
    for (int i = 0; i < data.size(); i++) begin
      while (!in_ready) step();
      in = '{valid: 1'b1, sof: i == 0, eof: i == data.size() - 1, err: i == err_at, data: data[i]};
      step();
      in = BS_IDLE;
      repeat (spacing - 1) step();
    end
  endtask

  task automatic check_frame(logic [7:0] data[$], int err_at, string what);
    bit ok = rx_bytes.size() == data.size() + 8;
    for (int i = 0; i < 7 && ok; i++) ok = rx_bytes[i] == 8'h55;
    if (ok) ok = rx_bytes[7] == 8'hD5;
    for (int i = 0; i < data.size() && ok; i++)
      ok = rx_bytes[8 + i] == data[i] && rx_errs[8 + i] == (i == err_at);
    check(ok, $sformatf("%s (%0d bytes for %0d)", what, rx_bytes.size(), data.size() + 8));
    rx_bytes.delete(); rx_errs.delete();
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] d[$];
    rst_n = 1; #1; rst_n = 0;
    rmii = 0; in = BS_IDLE;
    repeat (2) @(posedge clk); rst_n = 1; step();
    for (int m = 0; m < 2; m++) begin
      rmii = m[0];
      for (int f = 0; f < 15; f++) begin
        automatic int len = 1 + ($urandom % 200);
        automatic int ea = (f % 4 == 1) ? int'($urandom % len) : -1;
        automatic int fr = frames;
        d.delete();
        for (int i = 0; i < len; i++) d.push_back(8'($urandom));
        feed(d, ea, rmii ? 4 : 2);
        repeat (40) step();
        check(frames == fr + 1, $sformatf("mode %0d frame %0d seen", m, f));
        check_frame(d, ea, $sformatf("mode %0d frame %0d content", m, f));
      end
    end
    // two frames back to back: both arrive, separated by RXDV low
    rmii = 0; gap_min = 1000;
    begin
      logic [7:0] a[$], b[$];
      automatic int fr = frames;
      for (int i = 0; i < 30; i++) begin a.push_back(8'(i)); b.push_back(8'(100 + i)); end
      feed(a, -1, 2); feed(b, -1, 2);
      repeat (150) step();
      check(frames == fr + 2, "back-to-back frames both sent");
      check(gap_min >= 1, $sformatf("RXDV gap between frames (%0d)", gap_min));
      a = {a, b};
      check(rx_bytes.size() == 2 * 38 && rx_bytes[8] == 8'd0 && rx_bytes[38 + 8] == 8'd100, "back-to-back contents");
      rx_bytes.delete(); rx_errs.delete();
    end
    // underrun: producer slower than the line
    begin
      automatic int fr = frames;
      d.delete();
      for (int i = 0; i < 40; i++) d.push_back(8'(i));
      feed(d, -1, 6);
      repeat (100) step();
      check(frames == fr + 1 && rx_bytes.size() < 48, $sformatf("slow producer: frame cut short (%0d bytes)", rx_bytes.size()));
      rx_bytes.delete(); rx_errs.delete();
      repeat (50) step();
      rx_bytes.delete(); rx_errs.delete();
    end
    // overflow: push a burst into the FIFO ignoring in_ready
    begin
      automatic int o = ovf;
      for (int i = 0; i < 40; i++) begin
        in = '{valid: 1'b1, sof: i == 0, eof: i == 39, err: 1'b0, data: 8'(i)};
        step();
      end
      in = BS_IDLE;
      step();
      check(ovf > o, "overflow flagged when the FIFO is full");
      repeat (400) step();
      rx_bytes.delete(); rx_errs.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
