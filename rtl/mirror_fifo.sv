// mirror_fifo: the mirroring session between the fast path and the state
// manager. Packets that miss the flow table are pushed here and the state
// manager pops them at its own pace.
//
// The fast path never waits for it: a push into a full queue is dropped and
// counted (`stat_drops`) instead of back-pressuring the pipeline, which is how
// the published design keeps forwarding independent of core activity. The
// queue itself, its depth (DEPTH = 64 records) and drop-on-full are this
// design's choices.
//
// Interface: `push` with `push_data` writes when not full; `pop_valid` /
// `pop_ready` is a valid/ready handshake on the head record, which is shown
// combinationally from the storage (first-word fall-through).
module mirror_fifo #(
  parameter int unsigned WIDTH = 8,
  parameter int unsigned DEPTH = 64
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] push_data,
  output logic             pop_valid,
  input  logic             pop_ready,
  output logic [WIDTH-1:0] pop_data,
  output logic [$clog2(DEPTH+1)-1:0] level,
  output logic [31:0]      stat_drops
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wp, rp;
  logic             do_push, do_pop;

  assign pop_valid = (level != '0);
  assign pop_data  = mem[rp];
  assign do_pop    = pop_valid && pop_ready;
  assign do_push   = push && (int'(level) < int'(DEPTH));

  always_ff @(posedge clk) begin
    if (do_push) mem[wp] <= push_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp         <= '0;
      rp         <= '0;
      level      <= '0;
      stat_drops <= '0;
    end else begin
      if (do_push) wp <= (int'(wp) == int'(DEPTH) - 1) ? '0 : wp + AW'(1);
      if (do_pop)  rp <= (int'(rp) == int'(DEPTH) - 1) ? '0 : rp + AW'(1);
      level <= level + ($bits(level))'(do_push) - ($bits(level))'(do_pop);
      if (push && !do_push) stat_drops <= stat_drops + 32'd1;
    end
  end

  // A record is never lost once accepted: the level stays within DEPTH.
  a_level: assert property (@(posedge clk) disable iff (!rst_n)
                            int'(level) <= int'(DEPTH));

endmodule
