// hynic_pkg: types and constants shared by the hybrid in-network inference
// pipeline.
//
// The pipeline classifies every packet with one decision-tree lookup whose key
// is the concatenation of the packet's stateless features and the flow's
// stateful features. The stateful half is all zeros until the state manager has
// seen the first n packets of the flow and installed its features.
//
// Feature set. 16 stateless features: IP length, protocol and TTL; TCP source
// and destination port, window, data offset and the six flags FIN, SYN, RST,
// PSH, ACK, URG (one feature each); UDP source and destination port and
// length. 18 stateful features: max, min, mean, sum and standard deviation of
// the IP length and of the inter-arrival time (IAT), six TCP flag counts, and
// the maximum and minimum UDP length. The feature names follow the published
// description; the split of "TCP flags" into six one-bit features and of
// "TCP flag counts" into six counters is this design's reading (it is what
// makes the counts 16 and 18). All widths are this design's choice: header
// fields keep their header width, timestamps and IATs are 32-bit ticks, sums
// are wide enough for N_MAX samples.
package hynic_pkg;

  // Largest first-n window supported (the evaluated range is n = 2..20).
  localparam int unsigned N_MAX      = 20;
  localparam int unsigned CNT_W      = $clog2(N_MAX + 1);   // 5

  localparam int unsigned LEN_W      = 16;                  // IP / UDP length
  localparam int unsigned TS_W       = 32;                  // timestamp ticks
  localparam int unsigned IAT_W      = 32;
  localparam int unsigned LEN_SUM_W  = LEN_W + CNT_W;       // 21
  localparam int unsigned LEN_SQ_W   = 2 * LEN_W + CNT_W;   // 37
  localparam int unsigned IAT_SUM_W  = IAT_W + CNT_W;       // 37
  localparam int unsigned IAT_SQ_W   = 2 * IAT_W + CNT_W;   // 69

  localparam int unsigned CLASS_W    = 4;                   // up to 16 classes

  // Header byte window handed to the parser: Ethernet (14) + IPv4 with
  // options (up to 60) + TCP fixed header (20) fits in 96 bytes.
  localparam int unsigned HDR_BYTES  = 96;

  typedef struct packed {
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] src_port;
    logic [15:0] dst_port;
    logic [7:0]  proto;
  } five_tuple_t;                                           // 104 bits

  typedef struct packed {
    logic [LEN_W-1:0] ip_len;
    logic [7:0]       ip_proto;
    logic [7:0]       ip_ttl;
    logic [15:0]      tcp_sport;
    logic [15:0]      tcp_dport;
    logic [15:0]      tcp_win;
    logic [3:0]       tcp_doff;
    logic             tcp_fin;
    logic             tcp_syn;
    logic             tcp_rst;
    logic             tcp_psh;
    logic             tcp_ack;
    logic             tcp_urg;
    logic [15:0]      udp_sport;
    logic [15:0]      udp_dport;
    logic [LEN_W-1:0] udp_len;
  } stateless_t;                                            // 138 bits

  typedef struct packed {
    logic [LEN_W-1:0]     len_max;
    logic [LEN_W-1:0]     len_min;
    logic [LEN_W-1:0]     len_mean;
    logic [LEN_SUM_W-1:0] len_sum;
    logic [LEN_W-1:0]     len_std;
    logic [IAT_W-1:0]     iat_max;
    logic [IAT_W-1:0]     iat_min;
    logic [IAT_W-1:0]     iat_mean;
    logic [IAT_SUM_W-1:0] iat_sum;
    logic [IAT_W-1:0]     iat_std;
    logic [CNT_W-1:0]     fin_cnt;
    logic [CNT_W-1:0]     syn_cnt;
    logic [CNT_W-1:0]     rst_cnt;
    logic [CNT_W-1:0]     psh_cnt;
    logic [CNT_W-1:0]     ack_cnt;
    logic [CNT_W-1:0]     urg_cnt;
    logic [LEN_W-1:0]     udp_len_max;
    logic [LEN_W-1:0]     udp_len_min;
  } stateful_t;                                             // 312 bits

  // Decision-tree key: stateless features in the upper bits, stateful below.
  typedef struct packed {
    stateless_t sl;
    stateful_t  sf;
  } dt_key_t;                                               // 450 bits

  localparam int unsigned FT_KEY_W = $bits(five_tuple_t);
  localparam int unsigned SF_W     = $bits(stateful_t);
  localparam int unsigned DT_KEY_W = $bits(dt_key_t);

  // Per-packet record sent through the mirroring session: the flow key plus
  // the per-packet quantities the state manager accumulates.
  typedef struct packed {
    five_tuple_t      key;
    logic [TS_W-1:0]  ts;
    logic [LEN_W-1:0] ip_len;
    logic             is_tcp;
    logic             is_udp;
    logic [5:0]       tcp_flags;   // {FIN, SYN, RST, PSH, ACK, URG}
    logic [LEN_W-1:0] udp_len;
  } mirror_rec_t;

  // Flow-key hash: fold the 104-bit 5-tuple into 32 bits by XOR of its
  // words, multiply by an odd constant and XOR the two halves of the 64-bit
  // product. Both hash tables use the low index bits of the result.
  function automatic logic [31:0] flow_hash32(five_tuple_t k);
    logic [31:0] f;
    logic [63:0] p;
    f = k.src_ip ^ {k.dst_ip[15:0], k.dst_ip[31:16]} ^
        {k.src_port, k.dst_port} ^ {24'd0, k.proto};
    p = 64'(f) * 64'h0000_0000_9E37_79B1;
    return p[31:0] ^ p[63:32];
  endfunction

endpackage
