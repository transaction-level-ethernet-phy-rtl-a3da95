// eth_sniffer: header monitor for frames crossing the MII.
//
// Watches a frame byte stream (destination address first, no preamble) and
// records header fields by their byte offset. At the end of every frame it
// publishes, in rec:
//   dl   data link: destination and source address (vendor id = first
//        three bytes, host id = last three), length/type, and the last four
//        bytes of the frame (the frame check sequence);
//   ip   for length/type 0x0800 and version 4: version, header length, TOS,
//        total length, identification, flags, fragment offset, TTL,
//        protocol, checksum, source and destination address, first option
//        word;
//   tcp  for IP protocol 6: ports, sequence and acknowledgment numbers,
//        header length, reserved bits, control flags, window, checksum,
//        urgent pointer and the first TCP_OPT_BYTES option bytes;
//   udp  for IP protocol 17: ports, length, checksum.
// Every record carries the frame number (frames counted from 1 since reset)
// and the time, in nanoseconds since reset, of the frame's first byte. A
// record keeps its last value until a frame of its kind arrives, so
// frame_no tells which frame it belongs to; 0 means none yet. rec_valid
// pulses when rec has been updated (one clock after the last byte).
// Payload data is not recorded.
//
// The recorded fields, the frame number and the nanosecond time stamp
// follow the design description. Offsets follow the IEEE 802.3, IPv4 and
// TCP/UDP header layouts. The time base NS_PER_CLK (40 ns for a 25 MHz
// clock) and publishing at the end of the frame are this design's choices.
module eth_sniffer
  import tja_pkg::*;
#(
  parameter int NS_PER_CLK = 40
) (
  input  logic         clk,
  input  logic         rst_n,
  input  byte_stream_t in,
  output sniff_rec_t   rec,
  output logic         rec_valid
);

  logic [47:0] now_ns;
  logic [31:0] frame_cnt;
  logic [15:0] idx;          // index of the byte now on the input
  logic [15:0] pos;          // index counter for the next byte
  logic [15:0] l4;           // first byte of the TCP/UDP header
  logic [3:0]  tcp_hl;
  logic [31:0] crc_sh;

  dl_rec_t  dl_w;
  ip_rec_t  ip_w;
  tcp_rec_t tcp_w;
  udp_rec_t udp_w;

  assign idx = in.sof ? 16'd0 : pos;

  logic [15:0] k;            // offset inside the L4 header
  assign k = idx - l4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      now_ns    <= '0;
      frame_cnt <= '0;
      pos       <= '0;
      l4        <= 16'd34;
      tcp_hl    <= '0;
      crc_sh    <= '0;
      dl_w      <= '0;
      ip_w      <= '0;
      tcp_w     <= '0;
      udp_w     <= '0;
      rec       <= '0;
      rec_valid <= 1'b0;
    end else begin
      now_ns    <= now_ns + 48'(NS_PER_CLK);
      rec_valid <= 1'b0;
      if (in.valid) begin
        pos    <= idx + 16'd1;
        crc_sh <= {crc_sh[23:0], in.data};
        if (in.sof) begin
          frame_cnt     <= frame_cnt + 32'd1;
          dl_w          <= '0;
          ip_w          <= '0;
          tcp_w         <= '0;
          udp_w         <= '0;
          l4            <= 16'd34;
          tcp_hl        <= '0;
          dl_w.frame_no <= frame_cnt + 32'd1;
          dl_w.time_ns  <= now_ns;
        end
        // data link header
        unique case (idx)
          16'd0, 16'd1, 16'd2:   dl_w.vendor_dst <= {dl_w.vendor_dst[15:0], in.data};
          16'd3, 16'd4, 16'd5:   dl_w.host_dst   <= {dl_w.host_dst[15:0], in.data};
          16'd6, 16'd7, 16'd8:   dl_w.vendor_src <= {dl_w.vendor_src[15:0], in.data};
          16'd9, 16'd10, 16'd11: dl_w.host_src   <= {dl_w.host_src[15:0], in.data};
          16'd12, 16'd13:        dl_w.len_type   <= {dl_w.len_type[7:0], in.data};
          // IPv4 header
          16'd14: begin
            ip_w.version <= in.data[7:4];
            ip_w.ihl     <= in.data[3:0];
            l4           <= 16'd14 + {10'd0, in.data[3:0], 2'b00};
          end
          16'd15:         ip_w.tos       <= in.data;
          16'd16, 16'd17: ip_w.total_len <= {ip_w.total_len[7:0], in.data};
          16'd18, 16'd19: ip_w.ident     <= {ip_w.ident[7:0], in.data};
          16'd20: begin
            ip_w.flags           <= in.data[7:5];
            ip_w.frag_off[12:8]  <= in.data[4:0];
          end
          16'd21:         ip_w.frag_off[7:0] <= in.data;
          16'd22:         ip_w.ttl      <= in.data;
          16'd23:         ip_w.protocol <= in.data;
          16'd24, 16'd25: ip_w.checksum <= {ip_w.checksum[7:0], in.data};
          16'd26, 16'd27, 16'd28, 16'd29: ip_w.src_addr <= {ip_w.src_addr[23:0], in.data};
          16'd30, 16'd31, 16'd32, 16'd33: ip_w.dst_addr <= {ip_w.dst_addr[23:0], in.data};
          16'd34, 16'd35, 16'd36, 16'd37:
            if (ip_w.ihl > 4'd5) ip_w.options <= {ip_w.options[23:0], in.data};
          default: ;
        endcase
        // TCP / UDP header, starting at byte l4
        if (idx >= l4 && idx >= 16'd34) begin
          unique case (k)
            16'd0, 16'd1: begin
              tcp_w.src_port <= {tcp_w.src_port[7:0], in.data};
              udp_w.src_port <= {udp_w.src_port[7:0], in.data};
            end
            16'd2, 16'd3: begin
              tcp_w.dst_port <= {tcp_w.dst_port[7:0], in.data};
              udp_w.dst_port <= {udp_w.dst_port[7:0], in.data};
            end
            16'd4, 16'd5: begin
              tcp_w.seq_no <= {tcp_w.seq_no[23:0], in.data};
              udp_w.length <= {udp_w.length[7:0], in.data};
            end
            16'd6, 16'd7: begin
              tcp_w.seq_no   <= {tcp_w.seq_no[23:0], in.data};
              udp_w.checksum <= {udp_w.checksum[7:0], in.data};
            end
            16'd8, 16'd9, 16'd10, 16'd11: tcp_w.ack_no <= {tcp_w.ack_no[23:0], in.data};
            16'd12: begin
              tcp_w.hdr_len  <= in.data[7:4];
              tcp_w.reserved <= in.data[3:0];
              tcp_hl         <= in.data[7:4];
            end
            16'd13:         tcp_w.flags    <= in.data;
            16'd14, 16'd15: tcp_w.window   <= {tcp_w.window[7:0], in.data};
            16'd16, 16'd17: tcp_w.checksum <= {tcp_w.checksum[7:0], in.data};
            16'd18, 16'd19: tcp_w.urgent   <= {tcp_w.urgent[7:0], in.data};
            default:
              if (k >= 16'd20 && k < 16'(20 + TCP_OPT_BYTES) &&
                  k < {10'd0, tcp_hl, 2'b00})
                tcp_w.options[8*(TCP_OPT_BYTES-1-(int'(k)-20)) +: 8] <= in.data;
          endcase
        end
        // publish at the end of the frame
        if (in.eof) begin
          rec_valid  <= 1'b1;
          rec.dl     <= dl_w;
          rec.dl.crc <= {crc_sh[23:0], in.data};
          if (dl_w.len_type == 16'h0800 && ip_w.version == 4'd4) begin
            rec.ip          <= ip_w;
            rec.ip.frame_no <= dl_w.frame_no;
            rec.ip.time_ns  <= dl_w.time_ns;
            if (ip_w.protocol == 8'd6) begin
              rec.tcp          <= tcp_w;
              rec.tcp.frame_no <= dl_w.frame_no;
              rec.tcp.time_ns  <= dl_w.time_ns;
            end else if (ip_w.protocol == 8'd17) begin
              rec.udp          <= udp_w;
              rec.udp.frame_no <= dl_w.frame_no;
              rec.udp.time_ns  <= dl_w.time_ns;
            end
          end
        end
      end
    end
  end

endmodule
