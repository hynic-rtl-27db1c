// flow_table: exact-match flow state table keyed by the 5-tuple. It holds the
// stateful feature vector of every flow whose first n packets have been seen.
//
// Organisation: a WAYS-way set-associative hash table of SETS sets (default
// 8192 x 4 = 32768 entries, enough for the 32,000 concurrent flows the
// published design provisions). The set index is the low bits of
// hynic_pkg::flow_hash32(key). Keys and features live in memories with two
// synchronous read ports (lookup, install) and one write port (install);
// valid and activity bits are flip-flops so that reset clears the table.
//
// Lookup port: fully pipelined, one lookup per cycle, result two cycles after
// `lk_valid` (cycle 1 reads the set, cycle 2 compares the ways). A hit marks the
// entry active.
//
// Install port (valid/ready): takes a key and feature vector, reads the set,
// and one cycle later writes key, features and valid bit in the same clock
// edge, so a lookup sees either no entry or the complete entry. An existing
// entry of the same key is overwritten; otherwise the first free way is used.
// With the set full the install fails (`inst_ok` low) and the flow stays on the
// stateless path. `inst_done` pulses when the install has finished.
//
// Inactivity timeout: a sweeper visits one set every `cfg_age_step` cycles
// (0 disables it). An entry found inactive is removed; otherwise its activity
// bit is cleared. An entry that sees no lookup hit is therefore removed after
// between one and two full sweeps (SETS * cfg_age_step cycles each).
//
// The published design states an exact-match table, atomic installs and
// inactivity timeouts; the hash organisation, the set-full policy and the
// activity-bit sweeper are this design's choices.
module flow_table
  import hynic_pkg::*;
#(
  parameter int unsigned SETS = 8192,
  parameter int unsigned WAYS = 4
) (
  input  logic        clk,
  input  logic        rst_n,
  // lookup
  input  logic        lk_valid,
  input  five_tuple_t lk_key,
  output logic        lk_res_valid,
  output logic        lk_hit,
  output stateful_t   lk_sf,
  // install
  input  logic        inst_valid,
  output logic        inst_ready,
  input  five_tuple_t inst_key,
  input  stateful_t   inst_sf,
  output logic        inst_done,
  output logic        inst_ok,
  // inactivity timeout
  input  logic [31:0] cfg_age_step,
  output logic [31:0] stat_evicted,
  output logic [31:0] stat_install_fail
);

  localparam int unsigned IDX_W = $clog2(SETS);
  localparam int unsigned WAY_W = (WAYS > 1) ? $clog2(WAYS) : 1;

  five_tuple_t key_mem [WAYS][SETS];
  stateful_t   sf_mem  [WAYS][SETS];
  logic [WAYS-1:0] vld [SETS];
  logic [WAYS-1:0] act [SETS];

  function automatic logic [IDX_W-1:0] idx_of(five_tuple_t k);
    logic [31:0] h;
    h = flow_hash32(k);
    return h[IDX_W-1:0];
  endfunction

  // ---------------- lookup pipeline ----------------
  logic              l1_valid;
  five_tuple_t       l1_key;
  logic [IDX_W-1:0]  l1_idx;
  five_tuple_t       l1_rk  [WAYS];
  stateful_t         l1_rsf [WAYS];
  logic [WAYS-1:0]   l1_rv;
  logic [WAYS-1:0]   l1_match;
  logic              l1_any;
  logic [WAY_W-1:0]  l1_way;

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(WAYS); w++) begin
      l1_rk[w]  <= key_mem[w][idx_of(lk_key)];
      l1_rsf[w] <= sf_mem[w][idx_of(lk_key)];
    end
    l1_key <= lk_key;
    l1_idx <= idx_of(lk_key);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1_valid <= 1'b0;
      l1_rv    <= '0;
    end else begin
      l1_valid <= lk_valid;
      l1_rv    <= vld[idx_of(lk_key)];
    end
  end

  always_comb begin
    l1_any = 1'b0;
    l1_way = '0;
    for (int w = 0; w < int'(WAYS); w++) begin
      l1_match[w] = l1_rv[w] && (l1_rk[w] == l1_key);
      if (l1_match[w] && !l1_any) begin
        l1_any = 1'b1;
        l1_way = WAY_W'(w);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      lk_res_valid <= 1'b0;
      lk_hit       <= 1'b0;
      lk_sf        <= '0;
    end else begin
      lk_res_valid <= l1_valid;
      lk_hit       <= l1_valid && l1_any;
      lk_sf        <= (l1_valid && l1_any) ? l1_rsf[l1_way] : '0;
    end
  end

  // ---------------- install ----------------
  typedef enum logic [0:0] {I_IDLE, I_WRITE} inst_state_e;
  inst_state_e      ist;
  five_tuple_t      i_key;
  stateful_t        i_sf;
  logic [IDX_W-1:0] i_idx;
  five_tuple_t      i_rk [WAYS];
  logic             i_we;
  logic [WAY_W-1:0] i_way;

  assign inst_ready = (ist == I_IDLE);

  always_ff @(posedge clk) begin
    for (int w = 0; w < int'(WAYS); w++)
      i_rk[w] <= key_mem[w][idx_of(inst_key)];
  end

  // Way choice: the way already holding this key, else the first free way.
  always_comb begin
    logic found, free;
    found = 1'b0;
    free  = 1'b0;
    i_way = '0;
    for (int w = 0; w < int'(WAYS); w++)
      if (!found && vld[i_idx][w] && i_rk[w] == i_key) begin
        found = 1'b1;
        i_way = WAY_W'(w);
      end
    if (!found)
      for (int w = 0; w < int'(WAYS); w++)
        if (!free && !vld[i_idx][w]) begin
          free  = 1'b1;
          i_way = WAY_W'(w);
        end
    i_we = (ist == I_WRITE) && (found || free);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ist               <= I_IDLE;
      i_key             <= '0;
      i_sf              <= '0;
      i_idx             <= '0;
      inst_done         <= 1'b0;
      inst_ok           <= 1'b0;
      stat_install_fail <= '0;
    end else begin
      inst_done <= 1'b0;
      case (ist)
        I_IDLE: if (inst_valid) begin
          i_key <= inst_key;
          i_sf  <= inst_sf;
          i_idx <= idx_of(inst_key);
          ist   <= I_WRITE;
        end
        I_WRITE: begin
          inst_done <= 1'b1;
          inst_ok   <= i_we;
          if (!i_we) stat_install_fail <= stat_install_fail + 32'd1;
          ist       <= I_IDLE;
        end
        default: ist <= I_IDLE;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (i_we) begin
      key_mem[i_way][i_idx] <= i_key;
      sf_mem[i_way][i_idx]  <= i_sf;
    end
  end

  // ---------------- valid / activity bits and ageing sweep ----------------
  logic [31:0]      age_cnt;
  logic [IDX_W-1:0] sw_idx;
  logic             sw_tick;

  // A sweep step that collides with an install on the same set waits a cycle.
  assign sw_tick = (cfg_age_step != 32'd0) && (age_cnt >= cfg_age_step - 32'd1) &&
                   !(i_we && i_idx == sw_idx);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < int'(SETS); s++) begin
        vld[s] <= '0;
        act[s] <= '0;
      end
      age_cnt      <= '0;
      sw_idx       <= '0;
      stat_evicted <= '0;
    end else begin
      if (cfg_age_step == 32'd0) begin
        age_cnt <= '0;
      end else if (sw_tick) begin
        age_cnt <= '0;
        sw_idx  <= sw_idx + IDX_W'(1);
        for (int w = 0; w < int'(WAYS); w++)
          if (vld[sw_idx][w] && !act[sw_idx][w]) begin
            vld[sw_idx][w] <= 1'b0;
          end
        act[sw_idx]  <= '0;
        stat_evicted <= stat_evicted + 32'($countones(vld[sw_idx] & ~act[sw_idx]));
      end else if (age_cnt < cfg_age_step - 32'd1) begin
        age_cnt <= age_cnt + 32'd1;
      end
      // a lookup hit marks its entry active (overrides the sweep's clear)
      if (l1_valid && l1_any)
        act[l1_idx][l1_way] <= 1'b1;
      // install writes the complete entry and its valid bit together
      if (i_we) begin
        vld[i_idx][i_way] <= 1'b1;
        act[i_idx][i_way] <= 1'b1;
      end
    end
  end

endmodule
