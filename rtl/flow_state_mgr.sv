// flow_state_mgr: builds the per-flow state from mirrored packets and, once a
// flow has shown n packets, computes its stateful feature vector and installs
// it into the flow table.
//
// In the published system this is software on the SmartNIC's processor cores
// (receive mirrored packet, update the flow's counters and aggregates, at the
// n-th packet compute the features and install them through the table
// runtime API). Here the same steps are a hardware engine, so the whole
// system can be simulated; the steps and the feature set are the published
// ones, the engine's structure is this design's.
//
// State store: a WAYS-way set-associative table of SETS sets (default 1024 x
// 4 = 4096 flows in their first n packets) indexed like the flow table. Per
// flow it keeps the packet count, sum / sum of squares / max / min of the IP
// length and of the inter-arrival time, the last timestamp, six TCP flag
// counters and the UDP length extrema. A packet of a flow with no entry and no
// free way in its set is not tracked (counted in `stat_state_full`).
//
// Operation, one mirrored record at a time:
//   IDLE  pop a record and read its set (one cycle)
//   UPD   update or create the entry; when the count reaches cfg_n_threshold
//         mark the entry done and start the two feature_calc units
//   CALC  wait for mean and deviation of length and inter-arrival time
//   INST  offer the feature vector to the flow table (valid/ready)
//   WAIT  wait for the install to finish
// Records of a flow already marked done are packets that left the fast path
// before the install took effect; they are counted (`stat_late`) and ignored.
// A record takes 2 cycles when no install is due; an install adds about
// 110 cycles, during which the mirror queue absorbs new records.
//
// Inactivity timeout: every `cfg_age_step` cycles (0 = off) one set is swept
// between records: entries not touched since the last visit are removed,
// the others have their activity bit cleared. This also frees done entries.
//
// Statistics: IP-length statistics are over the n packets, inter-arrival
// statistics over the n-1 gaps between them (IAT = timestamp difference,
// modulo 2^32). Features with no samples (IAT for n = 1, UDP length for a
// flow without UDP packets) are zero. cfg_n_threshold must be 1..N_MAX.
module flow_state_mgr
  import hynic_pkg::*;
#(
  parameter int unsigned SETS = 1024,
  parameter int unsigned WAYS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [CNT_W-1:0] cfg_n_threshold,
  input  logic [31:0]      cfg_age_step,
  // mirrored records
  input  logic             rec_valid,
  output logic             rec_ready,
  input  mirror_rec_t      rec,
  // install into the flow table
  output logic             inst_valid,
  input  logic             inst_ready,
  output five_tuple_t      inst_key,
  output stateful_t        inst_sf,
  input  logic             inst_done,
  input  logic             inst_ok,
  // statistics
  output logic [31:0]      stat_installed,
  output logic [31:0]      stat_install_fail,
  output logic [31:0]      stat_late,
  output logic [31:0]      stat_state_full,
  output logic [31:0]      stat_evicted
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  typedef struct packed {
    logic [CNT_W-1:0]     cnt;
    logic [LEN_SUM_W-1:0] len_sum;
    logic [LEN_SQ_W-1:0]  len_sq;
    logic [LEN_W-1:0]     len_max;
    logic [LEN_W-1:0]     len_min;
    logic [TS_W-1:0]      last_ts;
    logic [IAT_SUM_W-1:0] iat_sum;
    logic [IAT_SQ_W-1:0]  iat_sq;
    logic [IAT_W-1:0]     iat_max;
    logic [IAT_W-1:0]     iat_min;
    logic [5:0][CNT_W-1:0] flag_cnt;   // [5]=FIN .. [0]=URG
    logic                 udp_seen;
    logic [LEN_W-1:0]     udp_max;
    logic [LEN_W-1:0]     udp_min;
  } flow_state_t;

  five_tuple_t     key_mem [WAYS][SETS];
  flow_state_t     st_mem  [WAYS][SETS];
  logic [WAYS-1:0] vld [SETS];
  logic [WAYS-1:0] act [SETS];
  logic [WAYS-1:0] dne [SETS];

  function automatic logic [IDX_W-1:0] idx_of(five_tuple_t k);
    logic [31:0] h;
    h = flow_hash32(k);
    return h[IDX_W-1:0];
  endfunction

  function automatic flow_state_t first_pkt(mirror_rec_t r);
    flow_state_t s;
    s          = '0;
    s.cnt      = CNT_W'(1);
    s.len_sum  = LEN_SUM_W'(r.ip_len);
    s.len_sq   = LEN_SQ_W'(r.ip_len) * LEN_SQ_W'(r.ip_len);
    s.len_max  = r.ip_len;
    s.len_min  = r.ip_len;
    s.last_ts  = r.ts;
    s.iat_min  = '1;
    for (int f = 0; f < 6; f++) s.flag_cnt[f] = CNT_W'(r.tcp_flags[f]);
    s.udp_seen = r.is_udp;
    s.udp_max  = r.is_udp ? r.udp_len : '0;
    s.udp_min  = r.is_udp ? r.udp_len : '1;
    return s;
  endfunction

  function automatic flow_state_t next_pkt(flow_state_t s, mirror_rec_t r);
    flow_state_t n;
    logic [IAT_W-1:0] iat;
    n         = s;
    iat       = r.ts - s.last_ts;
    n.cnt     = s.cnt + CNT_W'(1);
    n.len_sum = s.len_sum + LEN_SUM_W'(r.ip_len);
    n.len_sq  = s.len_sq + LEN_SQ_W'(r.ip_len) * LEN_SQ_W'(r.ip_len);
    if (r.ip_len > s.len_max) n.len_max = r.ip_len;
    if (r.ip_len < s.len_min) n.len_min = r.ip_len;
    n.last_ts = r.ts;
    n.iat_sum = s.iat_sum + IAT_SUM_W'(iat);
    n.iat_sq  = s.iat_sq + IAT_SQ_W'(iat) * IAT_SQ_W'(iat);
    if (iat > s.iat_max) n.iat_max = iat;
    if (iat < s.iat_min) n.iat_min = iat;
    for (int f = 0; f < 6; f++) n.flag_cnt[f] = s.flag_cnt[f] + CNT_W'(r.tcp_flags[f]);
    if (r.is_udp) begin
      n.udp_seen = 1'b1;
      if (r.udp_len > s.udp_max) n.udp_max = r.udp_len;
      if (r.udp_len < s.udp_min) n.udp_min = r.udp_len;
    end
    return n;
  endfunction

  typedef enum logic [2:0] {M_IDLE, M_UPD, M_CALC, M_INST, M_WAIT} mstate_e;
  mstate_e state;

  // ---------------- ageing tick ----------------
  logic [31:0]      age_cnt;
  logic             age_pend;
  logic [IDX_W-1:0] sw_idx;
  logic             do_age;

  assign do_age = (state == M_IDLE) && age_pend;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      age_cnt  <= '0;
      age_pend <= 1'b0;
    end else if (cfg_age_step == 32'd0) begin
      age_cnt  <= '0;
      age_pend <= 1'b0;
    end else begin
      if (age_cnt >= cfg_age_step - 32'd1) begin
        age_cnt  <= '0;
        age_pend <= 1'b1;
      end else begin
        age_cnt <= age_cnt + 32'd1;
        if (do_age) age_pend <= 1'b0;
      end
    end
  end

  // ---------------- record read ----------------
  assign rec_ready = (state == M_IDLE) && !age_pend;

  mirror_rec_t      r_rec;
  logic [IDX_W-1:0] r_idx;
  five_tuple_t      r_rk [WAYS];
  flow_state_t      r_st [WAYS];

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(WAYS); w++) begin
      r_rk[w] <= key_mem[w][idx_of(rec.key)];
      r_st[w] <= st_mem[w][idx_of(rec.key)];
    end
  end

  // ---------------- update decision ----------------
  logic             u_found, u_free, u_done, u_we, u_fin;
  logic [WAY_W-1:0] u_way;
  flow_state_t      u_st;

  always_comb begin
    u_found = 1'b0;
    u_free  = 1'b0;
    u_way   = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!u_found && vld[r_idx][w] && r_rk[w] == r_rec.key) begin
        u_found = 1'b1;
        u_way   = WAY_W'(w);
      end
    if (!u_found)
      for (int w = 0; w < int'(WAYS); w++)
        if (!u_free && !vld[r_idx][w]) begin
          u_free = 1'b1;
          u_way  = WAY_W'(w);
        end
    u_done = u_found && dne[r_idx][u_way];
    u_st   = u_found ? next_pkt(r_st[u_way], r_rec) : first_pkt(r_rec);
    u_we   = (state == M_UPD) && (u_found || u_free) && !u_done;
    u_fin  = u_we && (u_st.cnt >= cfg_n_threshold);
  end

  always_ff @(posedge clk) begin
    if (u_we) begin
      key_mem[u_way][r_idx] <= r_rec.key;
      st_mem[u_way][r_idx]  <= u_st;
    end
  end

  // ---------------- feature computation ----------------
  flow_state_t      fin_st;
  logic             calc_start;
  logic             len_done, iat_done, len_got, iat_got;
  logic [LEN_W-1:0] len_mean, len_sdev;
  logic [IAT_W-1:0] iat_mean, iat_sdev;
  logic             len_busy, iat_busy;

  assign calc_start = u_fin;

  feature_calc #(
    .SUM_W(LEN_SUM_W), .SQ_W(LEN_SQ_W), .K_W(CNT_W), .OUT_W(LEN_W)
  ) u_len_calc (
    .clk, .rst_n, .start(calc_start),
    .sum(u_st.len_sum), .sumsq(u_st.len_sq), .k(u_st.cnt),
    .busy(len_busy), .done(len_done), .mean(len_mean), .sdev(len_sdev)
  );

  feature_calc #(
    .SUM_W(IAT_SUM_W), .SQ_W(IAT_SQ_W), .K_W(CNT_W), .OUT_W(IAT_W)
  ) u_iat_calc (
    .clk, .rst_n, .start(calc_start),
    .sum(u_st.iat_sum), .sumsq(u_st.iat_sq), .k(u_st.cnt - CNT_W'(1)),
    .busy(iat_busy), .done(iat_done), .mean(iat_mean), .sdev(iat_sdev)
  );

  always_comb begin
    inst_sf             = '0;
    inst_sf.len_max     = fin_st.len_max;
    inst_sf.len_min     = fin_st.len_min;
    inst_sf.len_mean    = len_mean;
    inst_sf.len_sum     = fin_st.len_sum;
    inst_sf.len_std     = len_sdev;
    inst_sf.iat_max     = fin_st.iat_max;
    inst_sf.iat_min     = (fin_st.cnt > CNT_W'(1)) ? fin_st.iat_min : '0;
    inst_sf.iat_mean    = iat_mean;
    inst_sf.iat_sum     = fin_st.iat_sum;
    inst_sf.iat_std     = iat_sdev;
    inst_sf.fin_cnt     = fin_st.flag_cnt[5];
    inst_sf.syn_cnt     = fin_st.flag_cnt[4];
    inst_sf.rst_cnt     = fin_st.flag_cnt[3];
    inst_sf.psh_cnt     = fin_st.flag_cnt[2];
    inst_sf.ack_cnt     = fin_st.flag_cnt[1];
    inst_sf.urg_cnt     = fin_st.flag_cnt[0];
    inst_sf.udp_len_max = fin_st.udp_seen ? fin_st.udp_max : '0;
    inst_sf.udp_len_min = fin_st.udp_seen ? fin_st.udp_min : '0;
  end

  assign inst_valid = (state == M_INST);

  // ---------------- control ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state             <= M_IDLE;
      r_rec             <= '0;
      r_idx             <= '0;
      fin_st            <= '0;
      inst_key          <= '0;
      len_got           <= 1'b0;
      iat_got           <= 1'b0;
      sw_idx            <= '0;
      stat_installed    <= '0;
      stat_install_fail <= '0;
      stat_late         <= '0;
      stat_state_full   <= '0;
      stat_evicted      <= '0;
      for (int s = 0; s < int'(SETS); s++) begin
        vld[s] <= '0;
        act[s] <= '0;
        dne[s] <= '0;
      end
    end else begin
      case (state)
        M_IDLE: begin
          if (do_age) begin
            for (int w = 0; w < int'(WAYS); w++)
              if (vld[sw_idx][w] && !act[sw_idx][w]) begin
                vld[sw_idx][w] <= 1'b0;
                dne[sw_idx][w] <= 1'b0;
              end
            act[sw_idx]  <= '0;
            stat_evicted <= stat_evicted +
                            32'($countones(vld[sw_idx] & ~act[sw_idx]));
            sw_idx       <= sw_idx + IDX_W'(1);
          end else if (rec_valid) begin
            r_rec <= rec;
            r_idx <= idx_of(rec.key);
            state <= M_UPD;
          end
        end
        M_UPD: begin
          if (u_done) begin
            stat_late            <= stat_late + 32'd1;
            act[r_idx][u_way]    <= 1'b1;
            state                <= M_IDLE;
          end else if (u_we) begin
            vld[r_idx][u_way] <= 1'b1;
            act[r_idx][u_way] <= 1'b1;
            dne[r_idx][u_way] <= u_fin;
            if (u_fin) begin
              fin_st   <= u_st;
              inst_key <= r_rec.key;
              len_got  <= 1'b0;
              iat_got  <= 1'b0;
              state    <= M_CALC;
            end else begin
              state <= M_IDLE;
            end
          end else begin
            stat_state_full <= stat_state_full + 32'd1;
            state           <= M_IDLE;
          end
        end
        M_CALC: begin
          if (len_done) len_got <= 1'b1;
          if (iat_done) iat_got <= 1'b1;
          if ((len_got || len_done) && (iat_got || iat_done)) state <= M_INST;
        end
        M_INST: if (inst_ready) state <= M_WAIT;
        M_WAIT: if (inst_done) begin
          if (inst_ok) stat_installed    <= stat_installed + 32'd1;
          else         stat_install_fail <= stat_install_fail + 32'd1;
          state <= M_IDLE;
        end
        default: state <= M_IDLE;
      endcase
    end
  end

  // The calculators are only started from the idle state of both.
  a_calc_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                calc_start |-> !len_busy && !iat_busy);

endmodule
