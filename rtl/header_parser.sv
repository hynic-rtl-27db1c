// header_parser: extracts the flow key (5-tuple) and the 16 stateless
// features from the first HDR_BYTES bytes of a frame.
//
// Supported stack: Ethernet II, IPv4 (with options, IHL 5..15), then TCP or
// UDP. Byte 0 of the frame is in the most significant byte of `in_hdr`. A frame
// whose EtherType is not 0x0800, whose IP version is not 4 or whose IHL is
// below 5 is reported with `out_is_ipv4` low and all features zero; the
// pipeline forwards such frames without inference. For TCP packets the UDP
// features are zero and vice versa; for other IP protocols both are zero and
// the 5-tuple ports are zero.
//
// The feature list follows the published design (IP length, protocol, TTL;
// TCP ports, window, data offset and flags; UDP ports and length). The header
// window size, the handling of non-IPv4 frames and the one-cycle registered
// timing are this design's choices.
//
// Timing: fully pipelined, one frame per cycle, outputs registered one cycle
// after `in_valid`.
module header_parser
  import hynic_pkg::*;
(
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   in_valid,
  input  logic [HDR_BYTES*8-1:0] in_hdr,
  output logic                   out_valid,
  output logic                   out_is_ipv4,
  output logic                   out_is_tcp,
  output logic                   out_is_udp,
  output five_tuple_t            out_key,
  output stateless_t             out_sl
);

  logic [7:0]  b [HDR_BYTES];
  logic [6:0]  l4;                 // offset of the transport header
  logic        ipv4, tcp, udp;
  five_tuple_t key_c;
  stateless_t  sl_c;

  always_comb begin
    for (int i = 0; i < int'(HDR_BYTES); i++)
      b[i] = in_hdr[(int'(HDR_BYTES) - 1 - i) * 8 +: 8];

    ipv4  = ({b[12], b[13]} == 16'h0800) && (b[14][7:4] == 4'd4) &&
            (b[14][3:0] >= 4'd5);
    l4    = 7'd14 + {1'b0, b[14][3:0], 2'b00};
    tcp   = ipv4 && (b[23] == 8'd6);
    udp   = ipv4 && (b[23] == 8'd17);

    key_c = '0;
    sl_c  = '0;
    if (ipv4) begin
      key_c.src_ip  = {b[26], b[27], b[28], b[29]};
      key_c.dst_ip  = {b[30], b[31], b[32], b[33]};
      key_c.proto   = b[23];
      sl_c.ip_len   = {b[16], b[17]};
      sl_c.ip_proto = b[23];
      sl_c.ip_ttl   = b[22];
    end
    if (tcp || udp) begin
      key_c.src_port = {b[l4], b[l4 + 7'd1]};
      key_c.dst_port = {b[l4 + 7'd2], b[l4 + 7'd3]};
    end
    if (tcp) begin
      sl_c.tcp_sport = key_c.src_port;
      sl_c.tcp_dport = key_c.dst_port;
      sl_c.tcp_doff  = b[l4 + 7'd12][7:4];
      sl_c.tcp_urg   = b[l4 + 7'd13][5];
      sl_c.tcp_ack   = b[l4 + 7'd13][4];
      sl_c.tcp_psh   = b[l4 + 7'd13][3];
      sl_c.tcp_rst   = b[l4 + 7'd13][2];
      sl_c.tcp_syn   = b[l4 + 7'd13][1];
      sl_c.tcp_fin   = b[l4 + 7'd13][0];
      sl_c.tcp_win   = {b[l4 + 7'd14], b[l4 + 7'd15]};
    end
    if (udp) begin
      sl_c.udp_sport = key_c.src_port;
      sl_c.udp_dport = key_c.dst_port;
      sl_c.udp_len   = {b[l4 + 7'd4], b[l4 + 7'd5]};
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid   <= 1'b0;
      out_is_ipv4 <= 1'b0;
      out_is_tcp  <= 1'b0;
      out_is_udp  <= 1'b0;
      out_key     <= '0;
      out_sl      <= '0;
    end else begin
      out_valid   <= in_valid;
      out_is_ipv4 <= ipv4;
      out_is_tcp  <= tcp;
      out_is_udp  <= udp;
      out_key     <= key_c;
      out_sl      <= sl_c;
    end
  end

endmodule
