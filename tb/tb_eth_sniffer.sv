// tb_eth_sniffer: header monitor.
// The main workload is a TCP/IPv4 frame with the header values of the
// reference sniffer output (addresses 7c:c2:c6:48:10:3d and
// 74:36:6d:09:44:60, 130.192.55.240 to 192.168.1.18, port 443 to 39462,
// timestamp options), followed by a real CRC-32 frame check sequence. Also
// sends a UDP frame, an IPv4 frame with a header option word, and a non-IP
// frame. Checks every recorded field, that the IP/TCP/UDP records are only
// replaced by frames of their own kind, the frame numbers, and the
// nanosecond time stamps against the clock count between frames.
module tb_eth_sniffer;
  import tja_pkg::*;
  logic clk = 0;
  always #20 clk = ~clk;      // 25 MHz

  logic rst_n, rec_valid;
  byte_stream_t in;
  sniff_rec_t rec;
  int checks = 0, failures = 0;

  eth_sniffer #(.NS_PER_CLK(40)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask
  task automatic step; @(posedge clk); #1; endtask

  typedef logic [7:0] bytes_t[$];

  function automatic logic [31:0] crc32(bytes_t b);
    logic [31:0] c = 32'hFFFF_FFFF;
    foreach (b[i]) begin
      c ^= {24'd0, b[i]};
      for (int k = 0; k < 8; k++) c = c[0] ? (c >> 1) ^ 32'hEDB8_8320 : c >> 1;
    end
    return ~c;
  endfunction

  function automatic bytes_t with_fcs(bytes_t b);
    logic [31:0] c = crc32(b);
    bytes_t r = b;
    for (int i = 0; i < 4; i++) r.push_back(c[8*i +: 8]);
    return r;
  endfunction

  function automatic bytes_t eth_hdr(logic [15:0] lt);
    bytes_t b = '{8'h7c, 8'hc2, 8'hc6, 8'h48, 8'h10, 8'h3d,
                  8'h74, 8'h36, 8'h6d, 8'h09, 8'h44, 8'h60};
    b.push_back(lt[15:8]); b.push_back(lt[7:0]);
    return b;
  endfunction

  int cyc = 0;
  always @(posedge clk) if (rst_n) cyc++;
  int n_valid = 0;
  always @(posedge clk) if (rst_n && rec_valid) n_valid++;

  int sof_cyc;
  task automatic send(bytes_t b);
    sof_cyc = cyc;
    for (int i = 0; i < b.size(); i++) begin
      in = '{valid: 1'b1, sof: i == 0, eof: i == b.size() - 1, err: 1'b0, data: b[i]};
      step();
    end
    in = BS_IDLE;
    step();
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bytes_t f, tcp_f;
    logic [47:0] t1;
    int c1;
    rst_n = 1; #1; rst_n = 0;
    in = BS_IDLE;
    repeat (2) @(posedge clk); rst_n = 1; step();
    check(rec.dl.frame_no == 0 && rec.tcp.frame_no == 0, "no records after reset");

    // frame 1: TCP
    f = eth_hdr(16'h0800);
    f = {f, 8'h45, 8'h00, 8'h00, 8'h34, 8'hc6, 8'h9d, 8'h40, 8'h00,
            8'hf0, 8'h06, 8'h47, 8'hbb, 8'h82, 8'hc0, 8'h37, 8'hf0,
            8'hc0, 8'ha8, 8'h01, 8'h12};
    f = {f, 8'h01, 8'hbb, 8'h9a, 8'h26, 8'h7c, 8'hb0, 8'h38, 8'ha3,
            8'h44, 8'hae, 8'h86, 8'hbc, 8'h80, 8'h10, 8'h10, 8'h00,
            8'h1e, 8'hcd, 8'h00, 8'h00,
            8'h01, 8'h01, 8'h08, 8'h0a, 8'hed, 8'h4b, 8'h3e, 8'h40, 8'hfc, 8'h61, 8'h86, 8'hf7};
    tcp_f = with_fcs(f);
    repeat (7) step();
    send(tcp_f);
    c1 = sof_cyc; t1 = rec.dl.time_ns;
    check(n_valid == 1, "record published");
    check(rec.dl.frame_no == 1 && rec.ip.frame_no == 1 && rec.tcp.frame_no == 1 && rec.udp.frame_no == 0, "frame numbers");
    check(rec.dl.vendor_dst == 24'h7cc2c6 && rec.dl.host_dst == 24'h48103d, "destination address");
    check(rec.dl.vendor_src == 24'h74366d && rec.dl.host_src == 24'h094460, "source address");
    check(rec.dl.len_type == 16'h0800, "length/type");
    check(rec.dl.crc == {tcp_f[tcp_f.size()-4], tcp_f[tcp_f.size()-3], tcp_f[tcp_f.size()-2], tcp_f[tcp_f.size()-1]}, "frame check sequence");
    check(rec.ip.version == 4 && rec.ip.ihl == 5 && rec.ip.tos == 0 && rec.ip.total_len == 52, "IP version, IHL, TOS, length");
    check(rec.ip.ident == 16'hc69d && rec.ip.flags == 3'd2 && rec.ip.frag_off == 0, "IP identification and flags");
    check(rec.ip.ttl == 240 && rec.ip.protocol == 6 && rec.ip.checksum == 16'h47bb, "IP TTL, protocol, checksum");
    check(rec.ip.src_addr == {8'd130, 8'd192, 8'd55, 8'd240} && rec.ip.dst_addr == {8'd192, 8'd168, 8'd1, 8'd18}, "IP addresses");
    check(rec.ip.options == 0, "no IP options");
    check(rec.tcp.src_port == 443 && rec.tcp.dst_port == 39462, "TCP ports");
    check(rec.tcp.seq_no == 32'd2091923619 && rec.tcp.ack_no == 32'd1152288444, "TCP sequence and acknowledgment");
    check(rec.tcp.hdr_len == 8 && rec.tcp.reserved == 0 && rec.tcp.flags == 8'h10, "TCP header length and flags");
    check(rec.tcp.window == 4096 && rec.tcp.checksum == 16'h1ecd && rec.tcp.urgent == 0, "TCP window, checksum, urgent");
    check(rec.tcp.options == 96'h0101080aed4b3e40fc6186f7, "TCP options");

    // frame 2: UDP
    f = eth_hdr(16'h0800);
    f = {f, 8'h45, 8'h00, 8'h00, 8'h24, 8'h12, 8'h34, 8'h00, 8'h00,
            8'h40, 8'h11, 8'hab, 8'hcd, 8'h0a, 8'h00, 8'h00, 8'h01,
            8'h0a, 8'h00, 8'h00, 8'h02,
            8'h13, 8'h88, 8'h00, 8'h35, 8'h00, 8'h10, 8'hbe, 8'hef,
            8'h01, 8'h02, 8'h03, 8'h04, 8'h05, 8'h06, 8'h07, 8'h08};
    repeat (13) step();
    send(with_fcs(f));
    check(rec.dl.frame_no == 2 && rec.ip.frame_no == 2 && rec.udp.frame_no == 2 && rec.tcp.frame_no == 1, "UDP frame numbers; TCP record kept");
    check(rec.udp.src_port == 5000 && rec.udp.dst_port == 53 && rec.udp.length == 16 && rec.udp.checksum == 16'hbeef, "UDP fields");
    check(rec.tcp.seq_no == 32'd2091923619, "TCP record unchanged");
    check(rec.dl.time_ns - t1 == 48'(40 * (sof_cyc - c1)), $sformatf("time stamp difference %0d ns", rec.dl.time_ns - t1));

    // frame 3: IPv4 with one option word, TCP behind it
    f = eth_hdr(16'h0800);
    f = {f, 8'h46, 8'h10, 8'h00, 8'h2c, 8'h00, 8'h01, 8'h20, 8'h05,
            8'h01, 8'h06, 8'h00, 8'h00, 8'h01, 8'h02, 8'h03, 8'h04,
            8'h05, 8'h06, 8'h07, 8'h08, 8'h94, 8'h04, 8'h00, 8'h00,
            8'h00, 8'h50, 8'h00, 8'h51, 8'h00, 8'h00, 8'h00, 8'h07,
            8'h00, 8'h00, 8'h00, 8'h09, 8'h50, 8'h02, 8'h01, 8'h00,
            8'h12, 8'h34, 8'h00, 8'h00};
    send(with_fcs(f));
    check(rec.ip.frame_no == 3 && rec.ip.ihl == 6 && rec.ip.options == 32'h94040000, "IP option word");
    check(rec.ip.tos == 8'h10 && rec.ip.flags == 3'd1 && rec.ip.frag_off == 13'd5, "IP TOS, flags, offset");
    check(rec.tcp.frame_no == 3 && rec.tcp.src_port == 80 && rec.tcp.dst_port == 81 && rec.tcp.seq_no == 7 &&
          rec.tcp.ack_no == 9 && rec.tcp.hdr_len == 5 && rec.tcp.flags == 8'h02 && rec.tcp.options == 0,
          "TCP after an IP option word");

    // frame 4: not IP (ARP type), 60 bytes
    f = eth_hdr(16'h0806);
    for (int i = 0; i < 46; i++) f.push_back(8'(i));
    send(with_fcs(f));
    check(rec.dl.frame_no == 4 && rec.dl.len_type == 16'h0806, "non-IP frame recorded at data link level");
    check(rec.ip.frame_no == 3 && rec.tcp.frame_no == 3 && rec.udp.frame_no == 2, "higher records kept");
    check(n_valid == 4, "one record per frame");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
