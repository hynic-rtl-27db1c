// tb_dt_full_tree: the decision-tree table at its default size (1024 entries
// over the 450-bit key) holding a full-size model: a random binary tree with
// 1000 leaves, the largest tree the training flow produces.
//
// The tree is grown by splitting random leaves on random key bits not yet
// tested on their path. Each leaf becomes one entry: walking from the leaf
// to the root, every tested bit is constrained (mask 1) to the branch taken
// (value 0 = left, 1 = right) and all other bits are wildcards. Lookups are
// then checked against a direct walk of the tree: for every leaf a key
// steered into that leaf, plus 1000 fully random keys. Each must hit exactly
// the leaf's entry and class, one cycle after the key.
module tb_dt_full_tree;
  import hynic_pkg::*;

  localparam int ENTRIES = 1024;
  localparam int LEAVES  = 1000;
  localparam int NODES   = 2 * LEAVES - 1;

  logic                clk = 1'b0;
  logic                rst_n = 1'b0;
  logic                wr_en = 1'b0, wr_valid = 1'b0;
  logic [9:0]          wr_idx = '0;
  logic [DT_KEY_W-1:0] wr_value = '0, wr_mask = '0;
  logic [3:0]          wr_class = '0;
  logic                lk_valid = 1'b0;
  logic [DT_KEY_W-1:0] lk_key = '0;
  logic                res_valid, res_hit;
  logic [3:0]          res_class;
  logic [9:0]          res_idx;

  int checks = 0, failures = 0;

  dt_tcam dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tree: node n is a leaf when tbit[n] < 0
  int   tbit   [NODES];
  int   tleft  [NODES];
  int   tright [NODES];
  int   tpar   [NODES];
  logic tdir   [NODES];   // branch taken from the parent (1 = right)
  int   tcls   [NODES];
  int   tentry [NODES];
  int   nnodes;

  function automatic logic on_path(int n, int b);
    for (int a = tpar[n]; a >= 0; a = tpar[a]) if (tbit[a] == b) return 1'b1;
    return 1'b0;
  endfunction

  function automatic int walk(logic [DT_KEY_W-1:0] k);
    int n = 0;
    while (tbit[n] >= 0) n = k[tbit[n]] ? tright[n] : tleft[n];
    return n;
  endfunction

  task automatic lookup_check(logic [DT_KEY_W-1:0] k);
    int leaf;
    leaf = walk(k);
    @(negedge clk);
    lk_valid = 1'b1; lk_key = k;
    @(negedge clk);
    lk_valid = 1'b0;
    checks++;
    if (!res_valid || !res_hit || int'(res_idx) != tentry[leaf] || int'(res_class) != tcls[leaf]) begin
      failures++;
      $display("leaf %0d: hit %0b idx %0d class %0d, expected idx %0d class %0d",
               leaf, res_hit, res_idx, res_class, tentry[leaf], tcls[leaf]);
    end
  endtask

  function automatic logic [DT_KEY_W-1:0] rand_key();
    logic [DT_KEY_W-1:0] k;
    for (int i = 0; i < int'(DT_KEY_W); i += 32) k[i +: 32] = $urandom;
    return k;
  endfunction

  initial begin
    int leaves, e;
    int leaf_list [$];
    // ---- grow the tree
    tbit[0] = -1; tpar[0] = -1; tdir[0] = 1'b0; nnodes = 1; leaves = 1;
    leaf_list.push_back(0);
    while (leaves < LEAVES) begin
      int li, n, b;
      li = $urandom_range(0, leaf_list.size() - 1);
      n  = leaf_list[li];
      do b = $urandom_range(0, int'(DT_KEY_W) - 1); while (on_path(n, b) || b == tbit[n]);
      tbit[n] = b;
      tleft[n] = nnodes; tright[n] = nnodes + 1;
      for (int c = 0; c < 2; c++) begin
        tbit[nnodes + c] = -1; tpar[nnodes + c] = n; tdir[nnodes + c] = 1'(c);
      end
      leaf_list.delete(li);
      leaf_list.push_back(nnodes);
      leaf_list.push_back(nnodes + 1);
      nnodes += 2;
      leaves++;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // ---- map every leaf to one entry
    e = 0;
    foreach (leaf_list[i]) begin
      int n;
      logic [DT_KEY_W-1:0] v, m;
      n = leaf_list[i];
      tcls[n] = $urandom_range(0, 6);        // 7 classes
      tentry[n] = e;
      v = '0; m = '0;
      for (int c = n; tpar[c] >= 0; c = tpar[c]) begin
        m[tbit[tpar[c]]] = 1'b1;
        v[tbit[tpar[c]]] = tdir[c];
      end
      @(negedge clk);
      wr_en = 1'b1; wr_idx = 10'(e); wr_valid = 1'b1;
      wr_value = v; wr_mask = m; wr_class = 4'(tcls[n]);
      e++;
    end
    @(negedge clk);
    wr_en = 1'b0;

    // ---- one steered key per leaf
    foreach (leaf_list[i]) begin
      logic [DT_KEY_W-1:0] k;
      int n;
      n = leaf_list[i];
      k = rand_key();
      for (int c = n; tpar[c] >= 0; c = tpar[c]) k[tbit[tpar[c]]] = tdir[c];
      lookup_check(k);
    end
    // ---- random keys
    for (int t = 0; t < 1000; t++) lookup_check(rand_key());

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
