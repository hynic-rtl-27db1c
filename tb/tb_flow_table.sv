// tb_flow_table: exercises the exact-match flow table with 16 sets x 2 ways,
// so that sets fill up quickly.
//
//  A  installs 40 random flows; a reference model of set occupancy (using the
//     documented index function) predicts which installs succeed and which
//     fail because their set is full; the fail counter must agree.
//  B  streams back-to-back lookups of installed, failed and unknown keys and
//     checks hit and feature vector two cycles after each key.
//  C  re-installs an existing flow with new features while the same key is
//     looked up every cycle: each result must be a miss-free hit with either
//     the old or the new vector, never a mix, and the new vector afterwards.
//  D  turns on the inactivity timeout: flows that keep being looked up must
//     survive, the others must disappear, and the eviction counter must count
//     them.
module tb_flow_table;
  import hynic_pkg::*;

  localparam int SETS = 16, WAYS = 2;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        lk_valid = 1'b0;
  five_tuple_t lk_key = '0;
  logic        lk_res_valid, lk_hit;
  stateful_t   lk_sf;
  logic        inst_valid = 1'b0;
  logic        inst_ready;
  five_tuple_t inst_key = '0;
  stateful_t   inst_sf = '0;
  logic        inst_done, inst_ok;
  logic [31:0] cfg_age_step = '0;
  logic [31:0] stat_evicted, stat_install_fail;

  int checks = 0, failures = 0;

  flow_table #(.SETS(SETS), .WAYS(WAYS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int NK = 40;
  five_tuple_t keys [NK];
  stateful_t   feats [NK];
  logic        present [NK];
  int          occ [SETS];
  int          exp_fail = 0;

  function automatic int set_of(five_tuple_t k);
    logic [31:0] h;
    h = flow_hash32(k);
    return int'(h) & (SETS - 1);
  endfunction

  function automatic stateful_t rand_sf();
    logic [SF_W-1:0] v;
    for (int i = 0; i < int'(SF_W); i += 32) v[i +: 32] = $urandom;
    return stateful_t'(v);
  endfunction

  task automatic install(five_tuple_t k, stateful_t f, output logic ok);
    @(negedge clk);
    inst_valid = 1'b1; inst_key = k; inst_sf = f;
    while (!inst_ready) @(negedge clk);
    @(negedge clk);
    inst_valid = 1'b0;
    while (!inst_done) @(negedge clk);
    ok = inst_ok;
  endtask

  // lookup stream: key issued at a negedge, result checked two edges later
  five_tuple_t pend_key [$];
  int          pend_idx [$];      // index into keys, -1 = unknown key
  int          mode = 0;          // 0 exact check, 1 old-or-new check
  stateful_t   old_sf, new_sf;
  int          c_idx;

  always @(posedge clk) begin
    if (rst_n && lk_res_valid) begin
      int i;
      i = pend_idx.pop_front();
      void'(pend_key.pop_front());
      checks++;
      if (mode == 0) begin
        if (i < 0 ? lk_hit : (lk_hit != present[i] || (present[i] && lk_sf != feats[i]))) begin
          failures++;
          $display("lookup %0d: hit %0b, expected %0b", i, lk_hit, i < 0 ? 0 : present[i]);
        end
      end else if (!lk_hit || (lk_sf != old_sf && lk_sf != new_sf)) begin
        failures++;
        $display("during re-install: hit %0b, vector neither old nor new", lk_hit);
      end
    end
  end

  // lookup-latency check: lk_res_valid exactly two edges after lk_valid
  logic lv1 = 1'b0, lv2 = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      checks++;
      if (lk_res_valid != lv2) begin
        failures++;
        $display("lookup latency wrong at %0t", $time);
      end
    end
    lv1 <= lk_valid;
    lv2 <= lv1;
  end

  task automatic issue(int i);
    five_tuple_t k;
    if (i < 0) begin
      k = five_tuple_t'({$urandom, $urandom, $urandom, 8'd99});
    end else k = keys[i];
    @(negedge clk);
    lk_valid = 1'b1; lk_key = k;
    pend_key.push_back(k); pend_idx.push_back(i);
  endtask

  task automatic idle(int n);
    @(negedge clk);
    lk_valid = 1'b0;
    repeat (n) @(negedge clk);
  endtask

  initial begin
    logic ok;
    for (int s = 0; s < SETS; s++) occ[s] = 0;
    for (int i = 0; i < NK; i++) begin
      keys[i]    = five_tuple_t'({$urandom, $urandom, 16'($urandom), 16'(i), 8'd6});
      feats[i]   = rand_sf();
      present[i] = 1'b0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- A: installs
    for (int i = 0; i < NK; i++) begin
      logic exp_ok;
      exp_ok = occ[set_of(keys[i])] < WAYS;
      install(keys[i], feats[i], ok);
      checks++;
      if (ok != exp_ok) begin
        failures++;
        $display("install %0d: ok %0b, expected %0b", i, ok, exp_ok);
      end
      if (exp_ok) begin
        occ[set_of(keys[i])]++;
        present[i] = 1'b1;
      end else exp_fail++;
    end
    checks++;
    if (int'(stat_install_fail) != exp_fail || exp_fail == 0) begin
      failures++;
      $display("install failures %0d, expected %0d", stat_install_fail, exp_fail);
    end

    // ---- B: back-to-back lookups
    for (int t = 0; t < 300; t++) issue(($urandom_range(0, 9) == 0) ? -1 : $urandom_range(0, NK - 1));
    idle(4);

    // ---- C: overwrite while looking up the same key every cycle
    c_idx = 0;
    while (!present[c_idx]) c_idx++;
    old_sf = feats[c_idx];
    new_sf = rand_sf();
    mode = 1;
    fork
      begin
        for (int t = 0; t < 12; t++) issue(c_idx);
        idle(4);
      end
      begin
        repeat (3) @(negedge clk);
        install(keys[c_idx], new_sf, ok);
        checks++;
        if (!ok) begin
          failures++;
          $display("re-install failed");
        end
      end
    join
    feats[c_idx] = new_sf;
    mode = 0;
    issue(c_idx);
    idle(4);

    // ---- D: inactivity timeout (one set per 4 cycles, 64-cycle sweep)
    begin
      int kept, dropped;
      kept = 0; dropped = 0;
      cfg_age_step = 32'd4;
      // look up the first 8 present flows continuously for 600 cycles
      for (int t = 0; t < 600; t++) begin
        int j, cnt;
        j = -1; cnt = 0;
        for (int i = 0; i < NK && j < 0; i++)
          if (present[i]) begin
            if (cnt == t % 8) j = i;
            cnt++;
          end
        issue(j);
      end
      idle(4);
      cfg_age_step = 32'd0;
      // now only the refreshed flows may remain
      begin
        int cnt;
        cnt = 0;
        for (int i = 0; i < NK; i++)
          if (present[i]) begin
            if (cnt < 8) kept++;
            else begin present[i] = 1'b0; dropped++; end
            cnt++;
          end
      end
      for (int i = 0; i < NK; i++) issue(i);
      idle(4);
      checks++;
      if (int'(stat_evicted) != dropped || dropped == 0) begin
        failures++;
        $display("evicted %0d, expected %0d", stat_evicted, dropped);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
