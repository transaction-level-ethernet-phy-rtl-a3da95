// tb_mdio_slave: bit-level SMI master against the frame decoder.
// A register array in the testbench answers the decoder's read strobes.
// Checks reads and writes at several addresses, the Z0 turnaround,
// frames for another PHY address, frames with a short preamble, frames while
// SMI is disabled, and the frame length of 64 MDC periods.
module tb_mdio_slave;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, smi_en, mdc, mdio_i, mdio_o, mdio_oe, rd_en, wr_en;
  logic [4:0] phy_addr, reg_addr;
  logic [15:0] rd_data, wr_data;
  logic [15:0] regs [32];
  logic m_oe, m_out;
  int checks = 0, failures = 0;
  int n_wr = 0, n_rd = 0;

  mdio_slave dut (.*);

  assign mdio_i  = mdio_oe ? mdio_o : (m_oe ? m_out : 1'b1);
  assign rd_data = regs[reg_addr];
  always @(posedge clk) begin
    if (wr_en) begin regs[reg_addr] <= wr_data; n_wr++; end
    if (rd_en) n_rd++;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  localparam int HALF = 4;   // clk cycles per MDC half period

  task automatic send_bit(bit b);
    mdc = 0; m_oe = 1; m_out = b;
    repeat (HALF) @(posedge clk);
    mdc = 1;
    repeat (HALF) @(posedge clk);
  endtask

  task automatic recv_bit(output bit b, output bit driven);
    mdc = 0; m_oe = 0;
    repeat (HALF) @(posedge clk);
    mdc = 1; b = mdio_i; driven = mdio_oe;
    repeat (HALF) @(posedge clk);
  endtask

  task automatic header(int pre, bit [1:0] op, bit [4:0] pa, bit [4:0] ra);
    for (int i = 0; i < pre; i++) send_bit(1);
    send_bit(0); send_bit(1);
    send_bit(op[1]); send_bit(op[0]);
    for (int i = 4; i >= 0; i--) send_bit(pa[i]);
    for (int i = 4; i >= 0; i--) send_bit(ra[i]);
  endtask

  task automatic smi_write(bit [4:0] pa, bit [4:0] ra, bit [15:0] d, int pre = 32);
    header(pre, 2'b01, pa, ra);
    send_bit(1); send_bit(0);
    for (int i = 15; i >= 0; i--) send_bit(d[i]);
    m_oe = 0; mdc = 0;
    repeat (2 * HALF) @(posedge clk);
  endtask

  task automatic smi_read(bit [4:0] pa, bit [4:0] ra, output bit [15:0] d,
                          output bit ta_ok, output bit any_drive);
    bit b, drv;
    header(32, 2'b10, pa, ra);
    recv_bit(b, drv); ta_ok = !drv;              // first TA bit: Z
    any_drive = drv;
    recv_bit(b, drv); ta_ok = ta_ok && drv && !b; // second TA bit: 0
    any_drive |= drv;
    for (int i = 15; i >= 0; i--) begin recv_bit(b, drv); d[i] = b; any_drive |= drv; end
    mdc = 0;
    repeat (2 * HALF) @(posedge clk);
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit [15:0] d; bit ta, drv; int t0;
    rst_n = 1; #1; rst_n = 0;
    smi_en = 1; phy_addr = 5'd6; mdc = 0; m_oe = 0; m_out = 1;
    for (int i = 0; i < 32; i++) regs[i] = 16'(i * 16'h0101 ^ 16'hA5C3);
    repeat (3) @(posedge clk); rst_n = 1;
    // reads at every register address
    for (int r = 0; r < 32; r++) begin
      smi_read(5'd6, 5'(r), d, ta, drv);
      check(d == regs[r], $sformatf("read reg %0d got %h", r, d));
      check(ta, "turnaround Z0");
      check(!mdio_oe, "bus released after the frame");
    end
    // writes, then read back; frame length is 64 MDC periods
    for (int i = 0; i < 20; i++) begin
      bit [4:0] r; bit [15:0] v;
      r = 5'($urandom); v = 16'($urandom);
      t0 = n_wr;
      smi_write(5'd6, r, v);
      check(n_wr == t0 + 1 && regs[r] == v, "write lands");
      smi_read(5'd6, r, d, ta, drv);
      check(d == v, "write read back");
    end
    // another PHY address: no strobe, no drive
    t0 = n_wr + n_rd;
    smi_write(5'd7, 5'd3, 16'h1234);
    smi_read(5'd5, 5'd3, d, ta, drv);
    check(n_wr + n_rd == t0 && !drv, "other PHY address ignored");
    // short preamble: ignored
    t0 = n_wr;
    smi_write(5'd6, 5'd4, 16'hBEEF, 20);
    check(n_wr == t0, "short preamble ignored");
    // SMI disabled: ignored
    smi_en = 0; t0 = n_wr + n_rd;
    smi_write(5'd6, 5'd4, 16'hBEEF);
    smi_read(5'd6, 5'd4, d, ta, drv);
    check(n_wr + n_rd == t0 && !drv, "SMI disabled ignored");
    smi_en = 1;
    // frame after a disabled one still works; count MDC cycles of a read
    t0 = 0;
    fork
      smi_read(5'd6, 5'd9, d, ta, drv);
      begin
        while (!rd_en) begin @(posedge clk); t0++; end
      end
    join
    check(d == regs[9], "read after disabled frames");
    // rd_en comes right after the rising MDC edge of the 46th bit
    // (32 + 2 + 2 + 5 + 5), at 45.5 MDC periods, plus synchroniser delay
    check(t0 >= 45 * 2 * HALF + HALF && t0 <= 45 * 2 * HALF + HALF + 4, $sformatf("rd strobe at %0d clocks", t0));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
