// tb_dt_tcam: checks the ternary decision-tree table.
//
// Part 1 loads the six leaves of a two-feature example tree (features FA =
// {f0,f1} and FB = {f2,f3}, key bit order f0..f3 from MSB) and compares, for
// all 16 keys, the table's class and entry index with a direct walk of the
// tree. Part 2 fills a 32-entry table over a 16-bit key with random,
// overlapping (value, mask) entries and compares every lookup with a
// reference that picks the matching entry with the most constrained bits,
// lowest index on a tie. Part 3 removes entries and checks misses. The result
// must appear exactly one cycle after the key.
module tb_dt_tcam;

  localparam int unsigned ENTRIES = 32;
  localparam int unsigned KEY_W   = 16;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             wr_en = 1'b0, wr_valid = 1'b0;
  logic [4:0]       wr_idx = '0;
  logic [KEY_W-1:0] wr_value = '0, wr_mask = '0;
  logic [3:0]       wr_class = '0;
  logic             lk_valid = 1'b0;
  logic [KEY_W-1:0] lk_key = '0;
  logic             res_valid, res_hit;
  logic [3:0]       res_class;
  logic [4:0]       res_idx;

  int checks = 0, failures = 0;

  dt_tcam #(.ENTRIES(ENTRIES), .KEY_W(KEY_W), .CLS_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference copy of the table
  logic [KEY_W-1:0] rv [ENTRIES];
  logic [KEY_W-1:0] rm [ENTRIES];
  logic [3:0]       rc [ENTRIES];
  logic             rvalid [ENTRIES];

  task automatic write_entry(int idx, logic v, logic [KEY_W-1:0] val,
                             logic [KEY_W-1:0] msk, logic [3:0] cls);
    @(negedge clk);
    wr_en = 1'b1; wr_idx = 5'(idx); wr_valid = v;
    wr_value = val; wr_mask = msk; wr_class = cls;
    rv[idx] = val; rm[idx] = msk; rc[idx] = cls; rvalid[idx] = v;
    @(negedge clk);
    wr_en = 1'b0;
  endtask

  task automatic lookup(logic [KEY_W-1:0] k, output logic hit,
                        output logic [3:0] cls, output logic [4:0] idx);
    @(negedge clk);
    lk_valid = 1'b1; lk_key = k;
    @(negedge clk);
    lk_valid = 1'b0;
    checks++;
    if (!res_valid) begin
      failures++;
      $display("result not valid one cycle after the key");
    end
    hit = res_hit; cls = res_class; idx = res_idx;
  endtask

  function automatic int ones(logic [KEY_W-1:0] m);
    int n = 0;
    for (int i = 0; i < int'(KEY_W); i++) if (m[i]) n++;
    return n;
  endfunction

  // Example tree: root f0; f0=0 -> f3 (0: leaf1 class 0, 1: leaf2 class 1);
  // f0=1 -> f1; f1=0 -> f3 (0: leaf3 class 1, 1: leaf4 class 0);
  // f1=1 -> f2 (0: leaf5 class 0, 1: leaf6 class 1).
  function automatic void tree_walk(logic [3:0] f, output int leaf, output int cls);
    // f[3] = f0, f[2] = f1, f[1] = f2, f[0] = f3
    if (!f[3]) begin
      if (!f[0]) begin leaf = 1; cls = 0; end
      else       begin leaf = 2; cls = 1; end
    end else if (!f[2]) begin
      if (!f[0]) begin leaf = 3; cls = 1; end
      else       begin leaf = 4; cls = 0; end
    end else begin
      if (!f[1]) begin leaf = 5; cls = 0; end
      else       begin leaf = 6; cls = 1; end
    end
  endfunction

  initial begin
    logic hit;
    logic [3:0] cls;
    logic [4:0] idx;
    int leaf, tcls;
    for (int i = 0; i < int'(ENTRIES); i++) rvalid[i] = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- part 1: example tree in the low 4 key bits, upper bits wildcarded
    write_entry(0, 1'b1, 16'b0000, 16'b1001, 4'd0);
    write_entry(1, 1'b1, 16'b0001, 16'b1001, 4'd1);
    write_entry(2, 1'b1, 16'b1000, 16'b1101, 4'd1);
    write_entry(3, 1'b1, 16'b1001, 16'b1101, 4'd0);
    write_entry(4, 1'b1, 16'b1100, 16'b1110, 4'd0);
    write_entry(5, 1'b1, 16'b1110, 16'b1110, 4'd1);
    for (int k = 0; k < 16; k++) begin
      tree_walk(4'(k), leaf, tcls);
      lookup(16'(k) | 16'h5A50, hit, cls, idx);
      checks++;
      if (!hit || int'(cls) != tcls || int'(idx) != leaf - 1) begin
        failures++;
        $display("tree key %b: hit %0b class %0d idx %0d, expected leaf %0d class %0d",
                 4'(k), hit, cls, idx, leaf, tcls);
      end
    end

    // ---- part 2: random overlapping entries
    for (int e = 0; e < int'(ENTRIES); e++) begin
      logic [KEY_W-1:0] m;
      m = 16'($urandom) & 16'($urandom);          // sparse masks overlap often
      if (e % 5 == 0) m = m & 16'h00F0;
      write_entry(e, 1'b1, 16'($urandom), m, 4'($urandom));
    end
    for (int t = 0; t < 400; t++) begin
      logic [KEY_W-1:0] k;
      int best, bp;
      k = 16'($urandom);
      best = -1; bp = -1;
      for (int e = 0; e < int'(ENTRIES); e++)
        if (rvalid[e] && ((k & rm[e]) == (rv[e] & rm[e])) && ones(rm[e]) > bp) begin
          best = e; bp = ones(rm[e]);
        end
      lookup(k, hit, cls, idx);
      checks++;
      if (best < 0 ? hit : (!hit || int'(idx) != best || cls != rc[best])) begin
        failures++;
        $display("key %h: hit %0b idx %0d class %0d, expected entry %0d", k, hit, idx, cls, best);
      end
    end

    // ---- part 3: remove all entries, every key must miss
    for (int e = 0; e < int'(ENTRIES); e++) write_entry(e, 1'b0, '0, '0, '0);
    for (int t = 0; t < 20; t++) begin
      lookup(16'($urandom), hit, cls, idx);
      checks++;
      if (hit || cls != 4'd0) begin
        failures++;
        $display("hit after removal");
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
