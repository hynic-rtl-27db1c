// dt_tcam: the decision tree as one ternary match-action table.
//
// Every root-to-leaf path of the trained tree is one entry: a (value, mask)
// pair over the binarised feature bits, where a mask bit of 1 constrains the
// key bit to the value bit and a 0 is a wildcard, plus the leaf's class.
// Because binarising a feature of N bits into N one-bit features keeps the
// bit order, the per-feature ternary matches of a path concatenate into one
// (value, mask) pair over the whole key, so a single table and a single
// lookup evaluate the tree. Where entries overlap, the entry with the most
// constrained bits wins (ties: the lowest index). The popcount of the mask is
// computed when the entry is written and kept next to it.
//
// Size: ENTRIES = 1024 entries (room for the 1000-leaf limit used in
// training) over the 450-bit key of hynic_pkg::dt_key_t. Entries are written
// one per cycle through the write port; `wr_valid` = 0 removes an entry.
// Reset empties the table.
//
// Lookup: one key per cycle, result registered one cycle after `lk_valid`. A
// key that matches no entry returns `res_hit` = 0 and class 0.
//
// Entry format, priority rule and table size follow the published design;
// the write port, tie-break and miss behaviour are this design's choices.
module dt_tcam
  import hynic_pkg::*;
#(
  parameter int unsigned ENTRIES = 1024,
  parameter int unsigned KEY_W   = DT_KEY_W,
  parameter int unsigned CLS_W   = CLASS_W
) (
  input  logic                       clk,
  input  logic                       rst_n,
  // entry write
  input  logic                       wr_en,
  input  logic [$clog2(ENTRIES)-1:0] wr_idx,
  input  logic                       wr_valid,
  input  logic [KEY_W-1:0]           wr_value,
  input  logic [KEY_W-1:0]           wr_mask,
  input  logic [CLS_W-1:0]           wr_class,
  // lookup
  input  logic                       lk_valid,
  input  logic [KEY_W-1:0]           lk_key,
  output logic                       res_valid,
  output logic                       res_hit,
  output logic [CLS_W-1:0]           res_class,
  output logic [$clog2(ENTRIES)-1:0] res_idx
);

  localparam int unsigned IDX_W = $clog2(ENTRIES);
  localparam int unsigned PRI_W = $clog2(KEY_W + 1);

  logic [KEY_W-1:0] val_mem  [ENTRIES];
  logic [KEY_W-1:0] msk_mem  [ENTRIES];
  logic [CLS_W-1:0] cls_mem  [ENTRIES];
  logic [PRI_W-1:0] pri_mem  [ENTRIES];
  logic [ENTRIES-1:0] ent_vld;

  always_ff @(posedge clk) begin
    if (wr_en) begin
      val_mem[wr_idx] <= wr_value & wr_mask;
      msk_mem[wr_idx] <= wr_mask;
      cls_mem[wr_idx] <= wr_class;
      pri_mem[wr_idx] <= PRI_W'($countones(wr_mask));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     ent_vld         <= '0;
    else if (wr_en) ent_vld[wr_idx] <= wr_valid;
  end

  logic             hit_c;
  logic [IDX_W-1:0] idx_c;
  logic [PRI_W-1:0] pri_c;

  always_comb begin
    hit_c = 1'b0;
    idx_c = '0;
    pri_c = '0;
    for (int e = 0; e < int'(ENTRIES); e++) begin
      if (ent_vld[e] && (((lk_key ^ val_mem[e]) & msk_mem[e]) == '0) &&
          (!hit_c || pri_mem[e] > pri_c)) begin
        hit_c = 1'b1;
        idx_c = IDX_W'(e);
        pri_c = pri_mem[e];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      res_valid <= 1'b0;
      res_hit   <= 1'b0;
      res_class <= '0;
      res_idx   <= '0;
    end else begin
      res_valid <= lk_valid;
      res_hit   <= lk_valid && hit_c;
      res_class <= (lk_valid && hit_c) ? cls_mem[idx_c] : '0;
      res_idx   <= idx_c;
    end
  end

endmodule
