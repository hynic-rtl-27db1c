// tb_hynic_top: end-to-end test of the hybrid inference pipeline at its
// default sizes (32768-flow table, 1024-entry decision tree).
//
// A small model is loaded: a catch-all entry (class 0), a stateless rule
// (TTL = 64 -> class 2), a stateful rule (all n = 5 first packets had SYN ->
// class 1) and a more specific rule combining both (class 3). Classes 1 and 3
// are dropped. The test then
//   1. sends packets before any entry is loaded (decision-tree miss),
//   2. sends 12 interleaved TCP/UDP flows of 12 packets, plus non-IPv4
//      frames, at one packet every few cycles; once all are installed, one
//      more packet of each flow must find its state,
//   3. sends a back-to-back burst of 300 single-packet flows, which overruns
//      the mirror queue,
//   4. lets everything idle with the inactivity timeout on, then sends more
//      packets of an old flow, which must be back on the stateless path.
// Every verdict is compared with a reference: the class follows from the
// packet's TTL and, when the pipeline reports the flow's state as present,
// from the SYN count of the flow's first five packets; no packet before a
// flow's sixth may see state; a packet is mirrored exactly when it is IPv4
// and saw no state. Each verdict must come 5 cycles after its packet. Each
// mechanism (stateless path, stateful path, mirroring, install, late
// records, mirror overflow, drop, forward, non-IPv4 bypass, tree miss,
// timeout eviction) is counted and must occur.
module tb_hynic_top;
  import hynic_pkg::*;

  localparam int NTH = 5;

  logic                   clk = 1'b0;
  logic                   rst_n = 1'b0;
  logic                   in_valid = 1'b0;
  logic [HDR_BYTES*8-1:0] in_hdr = '0;
  logic [TS_W-1:0]        in_ts = '0;
  logic [15:0]            in_tag = '0;
  logic                   out_valid, out_drop, out_stateful, out_dt_hit, out_mirrored, out_bypass;
  logic [15:0]            out_tag;
  logic [CLASS_W-1:0]     out_class;
  logic                   dt_wr_en = 1'b0, dt_wr_valid = 1'b0;
  logic [9:0]             dt_wr_idx = '0;
  logic [DT_KEY_W-1:0]    dt_wr_value = '0, dt_wr_mask = '0;
  logic [CLASS_W-1:0]     dt_wr_class = '0;
  logic                   fwd_wr_en = 1'b0, fwd_wr_drop = 1'b0;
  logic [CLASS_W-1:0]     fwd_wr_class = '0;
  logic [CNT_W-1:0]       cfg_n_threshold = CNT_W'(NTH);
  logic [31:0]            cfg_age_step = '0;
  logic [31:0]            stat_mirror_drops, stat_installed, stat_install_fail, stat_late,
                          stat_state_full, stat_flow_evicted, stat_state_evicted;

  int checks = 0, failures = 0;

  hynic_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- flows ----------------
  localparam int NF = 12;
  five_tuple_t fkey [NF];
  int          fsent [NF];
  int          fsyn  [NF];        // SYN packets among the first NTH
  logic [31:0] tsc = 0;

  typedef struct {
    int  flow;                    // -1 single-packet or non-IP
    int  seq;                     // packet number within the flow
    logic ipv4;
    logic [7:0] ttl;
    logic [15:0] tag;
    logic must_state;             // flow's features are installed by now
  } pkt_t;
  pkt_t exp_q [$];

  // mechanism counters
  int n_stateless = 0, n_stateful = 0, n_mirror = 0, n_drop = 0, n_fwd = 0,
      n_bypass = 0, n_dtmiss = 0;

  function automatic logic [HDR_BYTES*8-1:0] frame(five_tuple_t k, logic ipv4, logic [7:0] ttl,
                                                   logic [5:0] flags, logic [15:0] len);
    logic [7:0] b [HDR_BYTES];
    logic [HDR_BYTES*8-1:0] h;
    for (int i = 0; i < int'(HDR_BYTES); i++) b[i] = 8'd0;
    {b[12], b[13]} = ipv4 ? 16'h0800 : 16'h86DD;
    b[14] = 8'h45;
    {b[16], b[17]} = len;
    b[22] = ttl;
    b[23] = k.proto;
    {b[26], b[27], b[28], b[29]} = k.src_ip;
    {b[30], b[31], b[32], b[33]} = k.dst_ip;
    {b[34], b[35]} = k.src_port;
    {b[36], b[37]} = k.dst_port;
    if (k.proto == 8'd6) begin
      b[46] = 8'h50;
      // flags argument is {FIN,SYN,RST,PSH,ACK,URG}
      b[47] = {2'b00, flags[0], flags[1], flags[2], flags[3], flags[4], flags[5]};
      {b[48], b[49]} = 16'd1024;
    end else begin
      {b[38], b[39]} = len - 16'd20;
    end
    for (int i = 0; i < int'(HDR_BYTES); i++) h[(int'(HDR_BYTES) - 1 - i) * 8 +: 8] = b[i];
    return h;
  endfunction

  logic [15:0] tag = 0;

  task automatic send_raw(logic [HDR_BYTES*8-1:0] h, pkt_t p, int gap);
    @(negedge clk);
    in_valid = 1'b1; in_hdr = h; in_ts = tsc; in_tag = tag;
    p.tag = tag;
    tag++;
    exp_q.push_back(p);
    if (gap > 0) begin
      @(negedge clk);
      in_valid = 1'b0;
      repeat (gap - 1) @(negedge clk);
    end
    tsc += 32'($urandom_range(10, 500));
  endtask

  logic must_state = 1'b0;

  task automatic send_flow_pkt(int f, int gap);
    pkt_t p;
    logic [5:0] fl;
    logic [7:0] ttl;
    ttl = (f % 4 == 1) ? 8'h40 : 8'h80;
    // flows 0, 1 and 6: every packet SYN; others: SYN only on the first
    fl = (f == 0 || f == 1 || f == 6 || fsent[f] == 0) ? 6'b010000 : 6'b000010;
    if (fkey[f].proto != 8'd6) fl = '0;
    if (fsent[f] < NTH && fl[4]) fsyn[f]++;
    p.flow = f; p.seq = fsent[f]; p.ipv4 = 1'b1; p.ttl = ttl; p.must_state = must_state;
    fsent[f]++;
    send_raw(frame(fkey[f], 1'b1, ttl, fl, 16'($urandom_range(60, 1500))), p, gap);
  endtask

  // ---------------- verdict checker ----------------
  logic dt_loaded = 1'b0;
  logic [5:0] vpipe = '0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (out_valid != vpipe[4]) begin
        failures++;
        $display("verdict timing wrong at %0t", $time);
      end
    end
    vpipe <= {vpipe[4:0], in_valid};
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      pkt_t p;
      int   ecls;
      logic stf;
      p = exp_q.pop_front();
      stf = out_stateful;
      checks++;
      // state may only be present once the first NTH packets have passed
      if (stf && (p.flow < 0 || p.seq < NTH)) begin
        failures++;
        $display("flow %0d packet %0d saw state too early", p.flow, p.seq);
      end
      if (p.must_state && !stf) begin
        failures++;
        $display("flow %0d packet %0d found no state after its install", p.flow, p.seq);
      end
      if (!p.ipv4) ecls = 0;
      else if (!dt_loaded) ecls = 0;
      else if (stf && fsyn[p.flow] == NTH && p.ttl == 8'h40) ecls = 3;
      else if (stf && fsyn[p.flow] == NTH) ecls = 1;
      else if (p.ttl == 8'h40) ecls = 2;
      else ecls = 0;
      if (int'(out_class) != ecls || out_drop != (ecls == 1 || ecls == 3) ||
          out_bypass != !p.ipv4 || out_mirrored != (p.ipv4 && !stf) || out_tag != p.tag) begin
        failures++;
        $display("flow %0d pkt %0d: class %0d drop %0b bypass %0b mirrored %0b stateful %0b, expected class %0d",
                 p.flow, p.seq, out_class, out_drop, out_bypass, out_mirrored, stf, ecls);
      end
      if (p.ipv4 && dt_loaded && !out_dt_hit) begin
        failures++;
        $display("tree miss with the catch-all entry loaded");
      end
      if (p.ipv4 && !dt_loaded && !out_dt_hit) n_dtmiss++;
      if (p.ipv4) begin
        if (stf) n_stateful++; else n_stateless++;
      end
      if (out_mirrored) n_mirror++;
      if (out_bypass)   n_bypass++;
      if (out_drop) n_drop++; else n_fwd++;
    end
  end

  task automatic dt_write(int idx, dt_key_t v, dt_key_t m, int cls);
    @(negedge clk);
    dt_wr_en = 1'b1; dt_wr_idx = 10'(idx); dt_wr_valid = 1'b1;
    dt_wr_value = v; dt_wr_mask = m; dt_wr_class = CLASS_W'(cls);
    @(negedge clk);
    dt_wr_en = 1'b0;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n <= 0) begin
      failures++;
      $display("mechanism never happened: %s", what);
    end else $display("%-28s %0d", what, n);
  endtask

  initial begin
    dt_key_t v, m;
    for (int f = 0; f < NF; f++) begin
      fkey[f] = five_tuple_t'({32'h0A00_0000 + 32'(f), 32'hC0A8_0001, 16'(1000 + f), 16'd80,
                               (f % 5 == 3) ? 8'd17 : 8'd6});
      fsent[f] = 0; fsyn[f] = 0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (2) @(posedge clk);

    // 1. empty model: tree misses
    for (int i = 0; i < 3; i++) begin
      pkt_t p;
      p.must_state = 1'b0;
      p.flow = -1; p.must_state = 1'b0; p.seq = 0; p.ipv4 = 1'b1; p.ttl = 8'h80;
      send_raw(frame(five_tuple_t'({32'hAC10_0000 + 32'(i), 32'hAC10_00FF, 16'd5, 16'd6, 8'd6}),
                     1'b1, 8'h80, 6'd0, 16'd100), p, 1);
    end
    repeat (10) @(negedge clk);

    // load the model and the forwarding actions
    v = '0; m = '0;
    dt_write(0, v, m, 0);                               // catch-all
    v = '0; m = '0; v.sl.ip_ttl = 8'h40; m.sl.ip_ttl = '1;
    dt_write(1, v, m, 2);                               // stateless rule
    v = '0; m = '0; v.sf.syn_cnt = CNT_W'(NTH); m.sf.syn_cnt = '1;
    dt_write(2, v, m, 1);                               // stateful rule
    v.sl.ip_ttl = 8'h40; m.sl.ip_ttl = '1;
    dt_write(3, v, m, 3);                               // both
    @(negedge clk);
    fwd_wr_en = 1'b1; fwd_wr_class = 4'd1; fwd_wr_drop = 1'b1;
    @(negedge clk);
    fwd_wr_class = 4'd3;
    @(negedge clk);
    fwd_wr_en = 1'b0;
    repeat (6) @(negedge clk);
    dt_loaded = 1'b1;

    // 2. interleaved flows
    for (int r = 0; r < 12 * NF; r++) begin
      int f;
      f = $urandom_range(0, NF - 1);
      while (fsent[f] >= 12) f = (f + 1) % NF;
      send_flow_pkt(f, $urandom_range(1, 12));
      if (r % 29 == 0) begin
        pkt_t p;
        p.flow = -1; p.must_state = 1'b0; p.seq = 0; p.ipv4 = 1'b0; p.ttl = 0;
        send_raw(frame('0, 1'b0, 8'h40, 6'd0, 16'd80), p, 2);
      end
    end
    repeat (2000) @(negedge clk);
    // every flow is installed by now: one more packet each must take the
    // stateful path
    must_state = 1'b1;
    for (int f = 0; f < NF; f++) send_flow_pkt(f, 2);
    must_state = 1'b0;
    repeat (10) @(negedge clk);

    // 3. burst of new single-packet flows, one per cycle
    for (int i = 0; i < 300; i++) begin
      pkt_t p;
      p.flow = -1; p.must_state = 1'b0; p.seq = 0; p.ipv4 = 1'b1; p.ttl = 8'h80;
      send_raw(frame(five_tuple_t'({32'h0B00_0000 + 32'(i), 32'hC0A8_0002, 16'd7, 16'd53, 8'd17}),
                     1'b1, 8'h80, 6'd0, 16'd64), p, 0);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (2000) @(negedge clk);

    // 4. inactivity timeout: two full sweeps of the 8192-set flow table
    cfg_age_step = 32'd1;
    repeat (2 * 8192 + 200) @(negedge clk);
    cfg_age_step = 32'd0;
    checks++;
    if (stat_flow_evicted != stat_installed) begin
      failures++;
      $display("flow-table evictions %0d, installed %0d", stat_flow_evicted, stat_installed);
    end
    fsent[0] = 0;   // flow 0 starts over: its next packets have no state
    fsyn[0]  = 0;
    for (int i = 0; i < 3; i++) send_flow_pkt(0, 3);
    repeat (20) @(negedge clk);

    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d verdicts missing", exp_q.size());
    end
    checks++;
    if (stat_installed != NF || stat_install_fail != 0) begin
      failures++;
      $display("installed %0d (failed %0d), expected %0d", stat_installed, stat_install_fail, NF);
    end
    need("stateless-path packets", n_stateless);
    need("stateful-path packets", n_stateful);
    need("mirrored packets", n_mirror);
    need("installs", int'(stat_installed));
    need("late mirrored records", int'(stat_late));
    need("mirror queue overflow drops", int'(stat_mirror_drops));
    need("dropped packets", n_drop);
    need("forwarded packets", n_fwd);
    need("non-IPv4 bypass", n_bypass);
    need("tree misses", n_dtmiss);
    need("flow-table timeouts", int'(stat_flow_evicted));
    need("state-table timeouts", int'(stat_state_evicted));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
