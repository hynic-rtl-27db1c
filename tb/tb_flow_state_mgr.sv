// tb_flow_state_mgr: feeds mirrored packet records of interleaved flows to
// the state manager (8 sets x 2 ways, n = 5) and plays the flow table's
// install port with random ready delays.
//
// A reference model walks the same records in order: it keeps the raw
// samples of every tracked flow, predicts which flows find no free way
// (state-full), which records arrive after their flow has been completed
// (late), and, at each flow's fifth packet, the full stateful feature vector
// computed directly from the samples (max, min, floor mean, sum and floor
// population deviation of length and inter-arrival time, flag counts, UDP
// length extrema). Every install offered must match a predicted one in key
// and vector. The second install is answered as failed. Finally the ageing
// sweep is enabled: all entries must be evicted, after which a completed
// flow starts over and is installed again.
module tb_flow_state_mgr;
  import hynic_pkg::*;

  localparam int SETS = 8, WAYS = 2, NTH = 5;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic [CNT_W-1:0] cfg_n_threshold = CNT_W'(NTH);
  logic [31:0]      cfg_age_step = '0;
  logic             rec_valid = 1'b0;
  logic             rec_ready;
  mirror_rec_t      rec = '0;
  logic             inst_valid;
  logic             inst_ready = 1'b0;
  five_tuple_t      inst_key;
  stateful_t        inst_sf;
  logic             inst_done = 1'b0;
  logic             inst_ok = 1'b0;
  logic [31:0]      stat_installed, stat_install_fail, stat_late,
                    stat_state_full, stat_evicted;

  int checks = 0, failures = 0;

  flow_state_mgr #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- reference model ----------------
  localparam int NF = 10;
  five_tuple_t fkey [NF];
  int          st   [NF];        // 0 untracked, 1 tracking, 2 done
  int          cnt  [NF];
  logic [15:0] lens [NF][NTH];
  logic [31:0] tss  [NF][NTH];
  logic [5:0]  flg  [NF][NTH];
  logic        udp  [NF][NTH];
  logic [15:0] ulen [NF][NTH];
  int          occ  [SETS];
  int          e_late = 0, e_full = 0;
  stateful_t   expect_q [$];
  five_tuple_t expect_k [$];

  function automatic int set_of(five_tuple_t k);
    logic [31:0] h;
    h = flow_hash32(k);
    return int'(h) & (SETS - 1);
  endfunction

  function automatic logic [127:0] isqrt(logic [127:0] v);
    logic [127:0] lo, hi, mid;
    lo = 0; hi = 128'h1_0000_0000_0;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  function automatic stateful_t features(int f);
    stateful_t s;
    logic [127:0] sum, sq, m, x;
    logic [31:0] iat;
    logic any_udp;
    s = '0;
    // IP length over n packets
    sum = 0; sq = 0; s.len_max = 0; s.len_min = 16'hFFFF;
    for (int i = 0; i < NTH; i++) begin
      x = 128'(lens[f][i]);
      sum += x; sq += x * x;
      if (lens[f][i] > s.len_max) s.len_max = lens[f][i];
      if (lens[f][i] < s.len_min) s.len_min = lens[f][i];
    end
    m = sum / NTH;
    s.len_mean = 16'(m);
    s.len_sum  = LEN_SUM_W'(sum);
    s.len_std  = 16'(isqrt(sq / NTH - m * m));
    // inter-arrival time over n-1 gaps
    sum = 0; sq = 0; s.iat_max = 0; s.iat_min = 32'hFFFF_FFFF;
    for (int i = 1; i < NTH; i++) begin
      iat = tss[f][i] - tss[f][i-1];
      x = 128'(iat);
      sum += x; sq += x * x;
      if (iat > s.iat_max) s.iat_max = iat;
      if (iat < s.iat_min) s.iat_min = iat;
    end
    m = sum / (NTH - 1);
    s.iat_mean = 32'(m);
    s.iat_sum  = IAT_SUM_W'(sum);
    s.iat_std  = 32'(isqrt(sq / (NTH - 1) - m * m));
    // flags {FIN,SYN,RST,PSH,ACK,URG} and UDP length
    any_udp = 1'b0; s.udp_len_max = 0; s.udp_len_min = 16'hFFFF;
    for (int i = 0; i < NTH; i++) begin
      s.fin_cnt += CNT_W'(flg[f][i][5]);
      s.syn_cnt += CNT_W'(flg[f][i][4]);
      s.rst_cnt += CNT_W'(flg[f][i][3]);
      s.psh_cnt += CNT_W'(flg[f][i][2]);
      s.ack_cnt += CNT_W'(flg[f][i][1]);
      s.urg_cnt += CNT_W'(flg[f][i][0]);
      if (udp[f][i]) begin
        any_udp = 1'b1;
        if (ulen[f][i] > s.udp_len_max) s.udp_len_max = ulen[f][i];
        if (ulen[f][i] < s.udp_len_min) s.udp_len_min = ulen[f][i];
      end
    end
    if (!any_udp) begin s.udp_len_max = 0; s.udp_len_min = 0; end
    return s;
  endfunction

  logic [31:0] now_ts = 32'hFFFF_F000;   // wraps during the test

  // build one record of flow f, update the reference and send it
  task automatic send(int f);
    mirror_rec_t r;
    r.key       = fkey[f];
    now_ts      = now_ts + 32'($urandom_range(1, 5000));
    r.ts        = now_ts;
    r.ip_len    = 16'($urandom_range(40, 1500));
    r.is_udp    = (f % 3 == 0);
    r.is_tcp    = !r.is_udp;
    r.tcp_flags = r.is_tcp ? 6'($urandom) : 6'd0;
    r.udp_len   = r.is_udp ? r.ip_len - 16'd20 : 16'd0;
    // reference
    if (st[f] == 2) e_late++;
    else begin
      if (st[f] == 0) begin
        if (occ[set_of(fkey[f])] < WAYS) begin
          occ[set_of(fkey[f])]++;
          st[f] = 1; cnt[f] = 0;
        end
      end
      if (st[f] == 0) e_full++;
      else begin
        lens[f][cnt[f]] = r.ip_len; tss[f][cnt[f]] = r.ts; flg[f][cnt[f]] = r.tcp_flags;
        udp[f][cnt[f]] = r.is_udp; ulen[f][cnt[f]] = r.udp_len;
        cnt[f]++;
        if (cnt[f] == NTH) begin
          st[f] = 2;
          expect_q.push_back(features(f));
          expect_k.push_back(fkey[f]);
        end
      end
    end
    // handshake
    @(negedge clk);
    rec_valid = 1'b1; rec = r;
    @(posedge clk);
    while (!rec_ready) @(posedge clk);
    @(negedge clk);
    rec_valid = 1'b0;
  endtask

  // ---------------- install responder ----------------
  int n_inst = 0, e_fail = 0;
  always @(negedge clk) inst_ready = ($urandom_range(0, 3) == 0);

  always @(posedge clk) begin
    if (rst_n && inst_valid && inst_ready) begin
      checks++;
      if (expect_k.size() == 0) begin
        failures++;
        $display("unexpected install");
      end else begin
        stateful_t e;
        five_tuple_t k;
        e = expect_q.pop_front();
        k = expect_k.pop_front();
        if (inst_key != k || inst_sf != e) begin
          failures++;
          $display("install %0d: key %h sf %h\n  expected key %h sf %h", n_inst, inst_key, inst_sf, k, e);
        end
      end
      n_inst++;
      fork
        begin
          int okv;
          okv = (n_inst != 2);
          if (!okv) e_fail++;
          repeat ($urandom_range(1, 4)) @(posedge clk);
          inst_done <= 1'b1; inst_ok <= 1'(okv);
          @(posedge clk);
          inst_done <= 1'b0;
        end
      join_none
    end
  end

  task automatic check_count(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    int order [$];
    for (int s = 0; s < SETS; s++) occ[s] = 0;
    for (int f = 0; f < NF; f++) begin
      fkey[f] = five_tuple_t'({$urandom, $urandom, 16'($urandom), 16'(f), (f % 3 == 0) ? 8'd17 : 8'd6});
      st[f] = 0; cnt[f] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // every flow sends NTH + 2 records, interleaved at random
    for (int f = 0; f < NF; f++) for (int i = 0; i < NTH + 2; i++) order.push_back(f);
    order.shuffle();
    foreach (order[i]) send(order[i]);
    repeat (400) @(posedge clk);
    begin
      int e_inst;
      e_inst = 0;
      for (int f = 0; f < NF; f++) if (st[f] == 2) e_inst++;
      check_count("installs offered", n_inst, e_inst);
    end
    check_count("expected installs left", expect_k.size(), 0);
    check_count("installed", int'(stat_installed), n_inst - e_fail);
    check_count("install failures", int'(stat_install_fail), e_fail);
    check_count("late records", int'(stat_late), e_late);
    check_count("state-full records", int'(stat_state_full), e_full);
    checks++;
    if (e_late == 0 || n_inst < 3) begin
      failures++;
      $display("scenario too weak: late %0d installs %0d", e_late, n_inst);
    end

    // ageing: every entry is idle, so two sweeps remove them all
    begin
      int occupied;
      occupied = 0;
      for (int s = 0; s < SETS; s++) occupied += occ[s];
      cfg_age_step = 32'd3;
      repeat (4 * SETS * 3 + 20) @(posedge clk);
      cfg_age_step = 32'd0;
      check_count("evicted", int'(stat_evicted), occupied);
      for (int s = 0; s < SETS; s++) occ[s] = 0;
      for (int f = 0; f < NF; f++) st[f] = 0;
    end
    // a completed flow starts over and is installed again
    for (int i = 0; i < NTH; i++) send(1);
    repeat (400) @(posedge clk);
    check_count("re-installs left", expect_k.size(), 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
