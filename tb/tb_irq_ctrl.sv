// tb_irq_ctrl: self-checking test of the interrupt latch.
// Drives event pulses, masks and clearing reads, and compares int_src and
// INT_N with a reference model kept in the testbench.
module tb_irq_ctrl;
  logic clk = 0;
  always #5 clk = ~clk;
  logic rst_n, clr, rd_clear, int_n;
  logic [15:0] events, int_en, int_src;
  int checks = 0, failures = 0;
  logic [15:0] ref_src;

  irq_ctrl dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s: src=%h ref=%h int_n=%b", what, int_src, ref_src, int_n); end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1; #1; rst_n = 0; clr = 0; rd_clear = 0; events = 0; int_en = 16'h8000; ref_src = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    check(int_src == 0 && int_n == 1, "after reset");
    // power-on event, enabled: INT_N low
    events = 16'h8000; @(posedge clk); #1; events = 0;
    ref_src = 16'h8000;
    check(int_src == ref_src && int_n == 0, "PWON sets and pulls INT_N low");
    // masked event: latched but INT_N unaffected after clear of PWON
    events = 16'h0008; @(posedge clk); #1; events = 0;
    ref_src |= 16'h0008;
    check(int_src == ref_src, "UV_ERR latched");
    // read clears; an event in the same cycle is kept
    rd_clear = 1; events = 16'h0002; @(posedge clk); #1; rd_clear = 0; events = 0;
    ref_src = 16'h0002;
    check(int_src == ref_src && int_n == 1, "read clears, masked TEMP_ERR kept, INT_N high");
    int_en = 16'h0002; @(posedge clk); #1;
    check(int_n == 0, "enabling TEMP_ERR pulls INT_N low");
    clr = 1; @(posedge clk); #1; clr = 0;
    check(int_src == 0 && int_n == 1, "clr");
    // random sequence against the model
    for (int i = 0; i < 200; i++) begin
      logic [15:0] e; logic r;
      e = 16'($urandom) & 16'($urandom); r = ($urandom % 5) == 0;
      int_en = 16'($urandom);
      events = e; rd_clear = r;
      @(posedge clk); #1;
      ref_src = r ? e : (ref_src | e);
      events = 0; rd_clear = 0;
      check(int_src == ref_src && int_n == ~|(ref_src & int_en), "random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
