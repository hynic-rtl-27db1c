// tb_header_parser: builds random Ethernet/IPv4 frames (TCP, UDP, ICMP, with
// and without IP options) and non-IPv4 frames from chosen field values,
// streams them back to back, one per cycle, and checks that each parsed
// 5-tuple and stateless feature vector equals the chosen fields one cycle
// later.
module tb_header_parser;
  import hynic_pkg::*;

  localparam int N = 600;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic [HDR_BYTES*8-1:0] in_hdr = '0;
  logic                   out_valid, out_is_ipv4, out_is_tcp, out_is_udp;
  five_tuple_t            out_key;
  stateless_t             out_sl;

  int checks = 0, failures = 0;

  header_parser dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected results, indexed by frame number
  logic        e_ip  [N];
  logic        e_tcp [N];
  logic        e_udp [N];
  five_tuple_t e_key [N];
  stateless_t  e_sl  [N];

  task automatic make_frame(int n, output logic [HDR_BYTES*8-1:0] hdr);
    logic [7:0] b [HDR_BYTES];
    int kind, ihl, l4;
    five_tuple_t k;
    stateless_t  s;
    for (int i = 0; i < int'(HDR_BYTES); i++) b[i] = 8'($urandom);
    kind = $urandom_range(0, 9);     // 0..3 TCP, 4..6 UDP, 7 ICMP, 8 ARP, 9 IPv6
    ihl  = ($urandom_range(0, 2) == 0) ? $urandom_range(6, 15) : 5;
    l4   = 14 + 4 * ihl;
    k = '0; s = '0;
    if (kind == 8) begin
      b[12] = 8'h08; b[13] = 8'h06;
    end else if (kind == 9) begin
      b[12] = 8'h86; b[13] = 8'hDD;
    end else begin
      b[12] = 8'h08; b[13] = 8'h00;
      b[14] = {4'd4, 4'(ihl)};
      s.ip_len = 16'($urandom);
      s.ip_ttl = 8'($urandom);
      s.ip_proto = (kind <= 3) ? 8'd6 : (kind <= 6) ? 8'd17 : 8'd1;
      k.src_ip = $urandom; k.dst_ip = $urandom; k.proto = s.ip_proto;
      {b[16], b[17]} = s.ip_len;
      b[22] = s.ip_ttl; b[23] = s.ip_proto;
      {b[26], b[27], b[28], b[29]} = k.src_ip;
      {b[30], b[31], b[32], b[33]} = k.dst_ip;
      if (kind <= 6) begin
        k.src_port = 16'($urandom); k.dst_port = 16'($urandom);
        {b[l4], b[l4+1]}   = k.src_port;
        {b[l4+2], b[l4+3]} = k.dst_port;
      end
      if (kind <= 3) begin
        s.tcp_sport = k.src_port; s.tcp_dport = k.dst_port;
        s.tcp_doff = 4'($urandom); s.tcp_win = 16'($urandom);
        {s.tcp_urg, s.tcp_ack, s.tcp_psh, s.tcp_rst, s.tcp_syn, s.tcp_fin} = 6'($urandom);
        b[l4+12] = {s.tcp_doff, 4'($urandom)};
        b[l4+13] = {2'($urandom), s.tcp_urg, s.tcp_ack, s.tcp_psh, s.tcp_rst, s.tcp_syn, s.tcp_fin};
        {b[l4+14], b[l4+15]} = s.tcp_win;
      end else if (kind <= 6) begin
        s.udp_sport = k.src_port; s.udp_dport = k.dst_port;
        s.udp_len = 16'($urandom);
        {b[l4+4], b[l4+5]} = s.udp_len;
      end
    end
    e_ip[n]  = (kind <= 7);
    e_tcp[n] = (kind <= 3);
    e_udp[n] = (kind >= 4 && kind <= 6);
    e_key[n] = k;
    e_sl[n]  = s;
    for (int i = 0; i < int'(HDR_BYTES); i++) hdr[(int'(HDR_BYTES) - 1 - i) * 8 +: 8] = b[i];
  endtask

  int sent = 0, got = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < N; n++) begin
      logic [HDR_BYTES*8-1:0] h;
      make_frame(n, h);
      @(negedge clk);
      in_valid = 1'b1; in_hdr = h;
      sent++;
      // idle cycle now and then
      if (n % 37 == 36) begin
        @(negedge clk);
        in_valid = 1'b0;
      end
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (3) @(posedge clk);
    checks++;
    if (got != N) begin
      failures++;
      $display("received %0d results for %0d frames", got, N);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // in_valid at edge t must give out_valid at edge t+1
  logic in_valid_q = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid !== in_valid_q) begin
        failures++;
        $display("out_valid timing wrong at %0t", $time);
      end
      if (out_valid) begin
        checks++;
        if (out_is_ipv4 != e_ip[got] || out_is_tcp != e_tcp[got] ||
            out_is_udp != e_udp[got] || out_key != e_key[got] || out_sl != e_sl[got]) begin
          failures++;
          $display("frame %0d: ipv4 %0b tcp %0b udp %0b key %h sl %h, expected %0b %0b %0b %h %h",
                   got, out_is_ipv4, out_is_tcp, out_is_udp, out_key, out_sl,
                   e_ip[got], e_tcp[got], e_udp[got], e_key[got], e_sl[got]);
        end
        got++;
      end
    end
    in_valid_q <= in_valid;
  end

endmodule
