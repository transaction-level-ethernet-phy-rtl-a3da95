// tb_phy_datapath: frame routing, loopbacks and size limit.
// Random frames are driven into the MAC side and the medium side, often at
// the same time, under every routing condition: transfer disabled,
// forwarding, the three local loopbacks, the remote loopback, the PHY's own
// control frames competing for the medium, and frames over the 4 KiB and
// 16 KiB payload limits. Output frames are collected on both outputs and
// compared with the expected ones byte for byte, including err marks. A
// small model of the control-frame generator answers gen_ready like the
// real one (one byte per ready clock, registered). Every error and
// data-detect event is counted against the number expected.
module tb_phy_datapath;
  import tja_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, xfer_en, loopback_en, jumbo_en, gen_busy, gen_ready;
  logic tx_err_ev, rx_err_ev, oversize_ev, mii_data_det, mdi_data_det;
  logic [1:0] loopback_mode;
  byte_stream_t mii_tx, mii_rx, mdi_rx, mdi_tx, gen;
  int checks = 0, failures = 0;

  phy_datapath dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  // ------------------------------------------------------ output capture
  typedef logic [8:0] fbyte_t;          // {err, data}
  typedef fbyte_t frame_t[$];
  frame_t mac_frames[$], mdi_frames[$];
  frame_t cur_mac, cur_mdi;
  int n_txerr = 0, n_rxerr = 0, n_over = 0, n_mdd = 0, n_ddd = 0;
  always @(posedge clk) if (rst_n) begin
    if (mii_rx.valid) begin
      if (mii_rx.sof) cur_mac.delete();
      cur_mac.push_back({mii_rx.err, mii_rx.data});
      if (mii_rx.eof) mac_frames.push_back(cur_mac);
    end
    if (mdi_tx.valid) begin
      if (mdi_tx.sof) cur_mdi.delete();
      cur_mdi.push_back({mdi_tx.err, mdi_tx.data});
      if (mdi_tx.eof) mdi_frames.push_back(cur_mdi);
    end
    if (tx_err_ev) n_txerr++;
    if (rx_err_ev) n_rxerr++;
    if (oversize_ev) n_over++;
    if (mii_data_det) n_mdd++;
    if (mdi_data_det) n_ddd++;
  end

  // --------------------------------------------------- generator model
  int gen_left = 0;
  int gen_sent = 0;
  always @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin gen <= BS_IDLE; end
    else begin
      gen <= BS_IDLE;
      if (gen_left > 0 && gen_ready) begin
        gen <= '{valid: 1'b1, sof: gen_left == 60, eof: gen_left == 1, err: 1'b0, data: 8'hA0};
        gen_left <= gen_left - 1;
        if (gen_left == 1) gen_sent <= gen_sent + 1;
      end
    end
  end
  assign gen_busy = gen_left > 0;

  // ------------------------------------------------------------ drivers
  frame_t f_mac, f_mdi;
  function automatic frame_t rand_frame(int len, int err_at, logic [7:0] tag);
    frame_t f;
    for (int i = 0; i < len; i++) f.push_back({i == err_at, (i == 0) ? tag : 8'($urandom)});
    return f;
  endfunction

  task automatic drive_mac(frame_t f);
    for (int i = 0; i < f.size(); i++) begin
      mii_tx <= '{valid: 1'b1, sof: i == 0, eof: i == f.size() - 1, err: f[i][8], data: f[i][7:0]};
      @(posedge clk);
    end
    mii_tx <= BS_IDLE;
  endtask
  task automatic drive_mdi(frame_t f);
    for (int i = 0; i < f.size(); i++) begin
      mdi_rx <= '{valid: 1'b1, sof: i == 0, eof: i == f.size() - 1, err: f[i][8], data: f[i][7:0]};
      @(posedge clk);
    end
    mdi_rx <= BS_IDLE;
  endtask
  task automatic both(frame_t a, frame_t b);
    fork drive_mac(a); drive_mdi(b); join
    #1; repeat (5) step();
  endtask

  function automatic bit same(frame_t a, frame_t b);
    if (a.size() != b.size()) return 0;
    for (int i = 0; i < a.size(); i++) if (a[i] != b[i]) return 0;
    return 1;
  endfunction

  task automatic expect_out(int nmac, frame_t mac0, int nmdi, frame_t mdi0, string what);
    check(mac_frames.size() == nmac && mdi_frames.size() == nmdi,
          $sformatf("%s: %0d/%0d frames to MAC/medium", what, mac_frames.size(), mdi_frames.size()));
    if (nmac > 0 && mac_frames.size() > 0) check(same(mac_frames[0], mac0), {what, ": MAC side content"});
    if (nmdi > 0 && mdi_frames.size() > 0) check(same(mdi_frames[0], mdi0), {what, ": medium side content"});
    mac_frames.delete(); mdi_frames.delete();
  endtask

  function automatic frame_t over_marked(frame_t f, int limit);
    frame_t r = f;
    for (int i = limit; i < r.size(); i++) r[i][8] = 1'b1;
    return r;
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    frame_t a, b, e;
    frame_t none;
    rst_n = 1; #1; rst_n = 0;
    xfer_en = 0; loopback_en = 0; loopback_mode = 0; jumbo_en = 0;
    mii_tx = BS_IDLE; mdi_rx = BS_IDLE;
    repeat (2) @(posedge clk); rst_n = 1; step();

    // transfer disabled: everything dropped, data still detected
    a = rand_frame(64, -1, 8'h01); b = rand_frame(80, -1, 8'h02);
    both(a, b);
    expect_out(0, none, 0, none, "transfer disabled");
    check(n_mdd == 1 && n_ddd == 1, "data detected on both inputs while disabled");

    // forwarding in both directions at once, with error bytes
    xfer_en = 1;
    for (int r = 0; r < 10; r++) begin
      automatic int la = 14 + int'($urandom % 200), lb = 14 + int'($urandom % 200);
      automatic int te = n_txerr, re = n_rxerr;
      a = rand_frame(la, (r % 3 == 0) ? 5 : -1, 8'(r));
      b = rand_frame(lb, (r % 3 == 1) ? 7 : -1, 8'(100 + r));
      both(a, b);
      expect_out(1, b, 1, a, $sformatf("forward %0d", r));
      check(n_txerr == te + (r % 3 == 0) && n_rxerr == re + (r % 3 == 1), "error events");
    end

    // local loopbacks: MAC frame returns, medium frame dropped
    loopback_en = 1;
    for (int m = 0; m < 3; m++) begin
      loopback_mode = 2'(m);
      a = rand_frame(100, -1, 8'h30); b = rand_frame(90, -1, 8'h31);
      both(a, b);
      expect_out(1, a, 0, none, $sformatf("local loopback mode %0d", m));
    end
    // remote loopback: medium frame returns, MAC frame dropped
    loopback_mode = 2'b11;
    a = rand_frame(100, -1, 8'h40); b = rand_frame(90, 3, 8'h41);
    both(a, b);
    expect_out(0, none, 1, b, "remote loopback");
    loopback_en = 0;

    // control frame while a MAC frame is on the medium: waits for its end
    a = rand_frame(150, -1, 8'h50);
    fork
      drive_mac(a);
      begin repeat (10) @(posedge clk); gen_left = 60; end
    join
    #1; repeat (80) step();
    check(mdi_frames.size() == 2 && same(mdi_frames[0], a) && mdi_frames[1].size() == 60 &&
          mdi_frames[1][12] == 9'h0A0, "control frame sent after the MAC frame");
    mac_frames.delete(); mdi_frames.delete();
    // MAC frame starting while a control frame is pending: dropped
    gen_left = 60; step();
    a = rand_frame(40, -1, 8'h51);
    both(a, rand_frame(20, -1, 8'h52));
    repeat (60) step();
    check(mdi_frames.size() == 1 && mdi_frames[0].size() == 60, "MAC frame dropped while the medium is taken");
    mac_frames.delete(); mdi_frames.delete();
    // control frames go out with transfer disabled
    xfer_en = 0; gen_left = 60; repeat (70) step();
    check(mdi_frames.size() == 1, "control frame sent outside NORMAL");
    mdi_frames.delete(); mac_frames.delete();
    xfer_en = 1;

    // size limits
    begin
      automatic int o = n_over;
      a = rand_frame(4096 + 18, -1, 8'h60);           // exactly at the limit
      b = rand_frame(4096 + 18 + 3, -1, 8'h61);       // 3 bytes over
      both(a, b);
      expect_out(1, over_marked(b, 4096 + 18), 1, a, "4 KiB limit");
      check(n_over == o + 1, "one oversize event");
      a = rand_frame(10000, -1, 8'h62);
      drive_mac(a); #1; repeat (5) step();
      expect_out(0, none, 1, over_marked(a, 4096 + 18), "10000-byte frame without jumbo");
      jumbo_en = 1;
      drive_mac(a); #1; repeat (5) step();
      expect_out(0, none, 1, a, "10000-byte frame with jumbo");
      a = rand_frame(16384 + 18 + 1, -1, 8'h63);
      drive_mdi(a); #1; repeat (5) step();
      expect_out(1, over_marked(a, 16384 + 18), 0, none, "16 KiB limit");
      check(n_over == o + 3, $sformatf("oversize events %0d", n_over - o));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
