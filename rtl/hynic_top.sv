// hynic_top: hybrid stateless/stateful in-network inference pipeline.
//
// Every packet is classified on the fast path, one packet per clock, by a
// single ternary lookup of a decision tree. The lookup key is the packet's 16
// stateless header features followed by the flow's 18 stateful features. A
// flow starts with no state: its stateful half of the key is zero and each of
// its packets is also mirrored to the state manager. After the flow's first n
// packets (cfg_n_threshold) the state manager computes the stateful features
// and installs them into the flow table; from then on the flow's packets find
// their features there, are classified on the full key and are no longer
// mirrored. The predicted class selects forward or drop in the class-aware
// forwarding table.
//
// Pipeline (cycle after in_valid):
//   0 -> 1  header_parser     5-tuple + stateless features
//   1 -> 3  flow_table        exact match on the 5-tuple, stateful features
//   3 -> 4  dt_tcam           decision-tree lookup; miss -> mirror_fifo
//   4 -> 5  fwd_table         class -> forward / drop
// so out_valid follows in_valid by 5 cycles, with one result per cycle and
// no stall: the mirror queue drops records it cannot hold rather than
// back-pressure the pipeline. Frames that are not IPv4 bypass inference: they
// are forwarded with class 0 and never mirrored.
//
// Off the fast path: mirror_fifo -> flow_state_mgr -> flow_table install
// port. The decision-tree and forwarding tables are loaded through their write
// ports (the trained model comes from an offline tool flow); cfg_age_step sets
// the inactivity timeout sweep of both state tables (0 = off).
//
// The stage order, the zero stateful key on a miss, mirroring of stateless
// flows and the install path follow the published architecture; the stage
// latencies, the bypass of non-IPv4 frames and the run-time n and timeout
// inputs are this design's choices.
//
// Only the header descriptor of a packet travels through this pipeline;
// `in_tag` identifies the packet so that the verdict can be applied to its
// payload, which is buffered elsewhere.
module hynic_top
  import hynic_pkg::*;
#(
  parameter int unsigned FT_SETS      = 8192,   // x FT_WAYS = 32768 flows
  parameter int unsigned FT_WAYS      = 4,
  parameter int unsigned DT_ENTRIES   = 1024,
  parameter int unsigned FWD_CLASSES  = 16,
  parameter int unsigned MIRROR_DEPTH = 64,
  parameter int unsigned ST_SETS      = 1024,   // x ST_WAYS = 4096 young flows
  parameter int unsigned ST_WAYS      = 4,
  parameter int unsigned TAG_W        = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // packets
  input  logic                          in_valid,
  input  logic [HDR_BYTES*8-1:0]        in_hdr,
  input  logic [TS_W-1:0]               in_ts,
  input  logic [TAG_W-1:0]              in_tag,
  // verdicts
  output logic                          out_valid,
  output logic [TAG_W-1:0]              out_tag,
  output logic [CLASS_W-1:0]            out_class,
  output logic                          out_drop,
  output logic                          out_stateful,  // flow-table hit
  output logic                          out_dt_hit,
  output logic                          out_mirrored,
  output logic                          out_bypass,    // not IPv4
  // model loading
  input  logic                          dt_wr_en,
  input  logic [$clog2(DT_ENTRIES)-1:0] dt_wr_idx,
  input  logic                          dt_wr_valid,
  input  logic [DT_KEY_W-1:0]           dt_wr_value,
  input  logic [DT_KEY_W-1:0]           dt_wr_mask,
  input  logic [CLASS_W-1:0]            dt_wr_class,
  input  logic                          fwd_wr_en,
  input  logic [CLASS_W-1:0]            fwd_wr_class,
  input  logic                          fwd_wr_drop,
  // configuration
  input  logic [CNT_W-1:0]              cfg_n_threshold,
  input  logic [31:0]                   cfg_age_step,
  // statistics
  output logic [31:0]                   stat_mirror_drops,
  output logic [31:0]                   stat_installed,
  output logic [31:0]                   stat_install_fail,
  output logic [31:0]                   stat_late,
  output logic [31:0]                   stat_state_full,
  output logic [31:0]                   stat_flow_evicted,
  output logic [31:0]                   stat_state_evicted
);

  // per-packet context carried alongside the lookups
  typedef struct packed {
    logic             valid;
    logic             ipv4;
    logic             tcp;
    logic             udp;
    five_tuple_t      key;
    stateless_t       sl;
    logic [TS_W-1:0]  ts;
    logic [TAG_W-1:0] tag;
  } ctx_t;

  // ---------------- stage 0 -> 1: parse ----------------
  ctx_t        c1, c2, c3;
  logic        p_valid, p_ipv4, p_tcp, p_udp;
  five_tuple_t p_key;
  stateless_t  p_sl;
  logic [TS_W-1:0]  ts1;
  logic [TAG_W-1:0] tag1;

  header_parser u_parser (
    .clk, .rst_n,
    .in_valid, .in_hdr,
    .out_valid(p_valid), .out_is_ipv4(p_ipv4), .out_is_tcp(p_tcp),
    .out_is_udp(p_udp), .out_key(p_key), .out_sl(p_sl)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ts1  <= '0;
      tag1 <= '0;
    end else begin
      ts1  <= in_ts;
      tag1 <= in_tag;
    end
  end

  always_comb begin
    c1       = '0;
    c1.valid = p_valid;
    c1.ipv4  = p_ipv4;
    c1.tcp   = p_tcp;
    c1.udp   = p_udp;
    c1.key   = p_key;
    c1.sl    = p_sl;
    c1.ts    = ts1;
    c1.tag   = tag1;
  end

  // ---------------- stage 1 -> 3: flow table ----------------
  logic        ft_res_valid, ft_hit;
  stateful_t   ft_sf;
  logic        ft_inst_valid, ft_inst_ready, ft_inst_done, ft_inst_ok;
  five_tuple_t ft_inst_key;
  stateful_t   ft_inst_sf;
  logic [31:0] ft_install_fail;

  flow_table #(.SETS(FT_SETS), .WAYS(FT_WAYS)) u_flow_table (
    .clk, .rst_n,
    .lk_valid(c1.valid && c1.ipv4), .lk_key(c1.key),
    .lk_res_valid(ft_res_valid), .lk_hit(ft_hit), .lk_sf(ft_sf),
    .inst_valid(ft_inst_valid), .inst_ready(ft_inst_ready),
    .inst_key(ft_inst_key), .inst_sf(ft_inst_sf),
    .inst_done(ft_inst_done), .inst_ok(ft_inst_ok),
    .cfg_age_step, .stat_evicted(stat_flow_evicted),
    .stat_install_fail(ft_install_fail)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c2 <= '0;
      c3 <= '0;
    end else begin
      c2 <= c1;
      c3 <= c2;
    end
  end

  // ---------------- stage 3 -> 4: decision tree, mirroring ----------------
  dt_key_t     dt_key;
  logic        mirror_push;
  mirror_rec_t mrec;

  always_comb begin
    dt_key.sl = c3.sl;
    dt_key.sf = (ft_res_valid && ft_hit) ? ft_sf : '0;   // f_SF = 0 on a miss

    mirror_push    = c3.valid && c3.ipv4 && !(ft_res_valid && ft_hit);
    mrec.key       = c3.key;
    mrec.ts        = c3.ts;
    mrec.ip_len    = c3.sl.ip_len;
    mrec.is_tcp    = c3.tcp;
    mrec.is_udp    = c3.udp;
    mrec.tcp_flags = {c3.sl.tcp_fin, c3.sl.tcp_syn, c3.sl.tcp_rst,
                      c3.sl.tcp_psh, c3.sl.tcp_ack, c3.sl.tcp_urg};
    mrec.udp_len   = c3.sl.udp_len;
  end

  logic                          dt_res_valid, dt_res_hit;
  logic [CLASS_W-1:0]            dt_res_class;
  logic [$clog2(DT_ENTRIES)-1:0] dt_res_idx;

  dt_tcam #(.ENTRIES(DT_ENTRIES), .KEY_W(DT_KEY_W), .CLS_W(CLASS_W)) u_dt (
    .clk, .rst_n,
    .wr_en(dt_wr_en), .wr_idx(dt_wr_idx), .wr_valid(dt_wr_valid),
    .wr_value(dt_wr_value), .wr_mask(dt_wr_mask), .wr_class(dt_wr_class),
    .lk_valid(c3.valid), .lk_key(dt_key),
    .res_valid(dt_res_valid), .res_hit(dt_res_hit), .res_class(dt_res_class),
    .res_idx(dt_res_idx)
  );

  logic             c4_ipv4, c4_stateful, c4_mirrored;
  logic [TAG_W-1:0] c4_tag;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      c4_ipv4     <= 1'b0;
      c4_stateful <= 1'b0;
      c4_mirrored <= 1'b0;
      c4_tag      <= '0;
    end else begin
      c4_ipv4     <= c3.ipv4;
      c4_stateful <= ft_res_valid && ft_hit;
      c4_mirrored <= mirror_push;
      c4_tag      <= c3.tag;
    end
  end

  // ---------------- mirror session and state manager ----------------
  logic        mf_valid, mf_ready;
  mirror_rec_t mf_rec;
  logic [$clog2(MIRROR_DEPTH+1)-1:0] mf_level;

  mirror_fifo #(.WIDTH($bits(mirror_rec_t)), .DEPTH(MIRROR_DEPTH)) u_mirror (
    .clk, .rst_n,
    .push(mirror_push), .push_data(mrec),
    .pop_valid(mf_valid), .pop_ready(mf_ready), .pop_data(mf_rec),
    .level(mf_level), .stat_drops(stat_mirror_drops)
  );

  logic [31:0] sm_install_fail;

  flow_state_mgr #(.SETS(ST_SETS), .WAYS(ST_WAYS)) u_state_mgr (
    .clk, .rst_n, .cfg_n_threshold, .cfg_age_step,
    .rec_valid(mf_valid), .rec_ready(mf_ready), .rec(mf_rec),
    .inst_valid(ft_inst_valid), .inst_ready(ft_inst_ready),
    .inst_key(ft_inst_key), .inst_sf(ft_inst_sf),
    .inst_done(ft_inst_done), .inst_ok(ft_inst_ok),
    .stat_installed, .stat_install_fail(sm_install_fail), .stat_late,
    .stat_state_full, .stat_evicted(stat_state_evicted)
  );

  assign stat_install_fail = sm_install_fail;

  // ---------------- stage 4 -> 5: class-aware forwarding ----------------
  logic               fw_valid, fw_drop;
  logic [CLASS_W-1:0] fw_class;

  fwd_table #(.CLASSES(FWD_CLASSES), .CLS_W(CLASS_W)) u_fwd (
    .clk, .rst_n,
    .wr_en(fwd_wr_en), .wr_class(fwd_wr_class), .wr_drop(fwd_wr_drop),
    .lk_valid(dt_res_valid), .lk_class(dt_res_class),
    .res_valid(fw_valid), .res_class(fw_class), .res_drop(fw_drop)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_tag      <= '0;
      out_stateful <= 1'b0;
      out_dt_hit   <= 1'b0;
      out_mirrored <= 1'b0;
      out_bypass   <= 1'b0;
    end else begin
      out_tag      <= c4_tag;
      out_stateful <= c4_stateful;
      out_dt_hit   <= dt_res_hit && c4_ipv4;
      out_mirrored <= c4_mirrored;
      out_bypass   <= !c4_ipv4;
    end
  end

  assign out_valid = fw_valid;
  assign out_class = out_bypass ? '0 : fw_class;
  assign out_drop  = fw_drop && !out_bypass;

endmodule
