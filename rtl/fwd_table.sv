// fwd_table: class-aware forwarding table. It turns the class predicted by
// the decision tree into the packet's fate: forward or drop.
//
// One entry per class (CLASSES = 16, enough for the 7- and 10-class models of
// the evaluation); an entry is a single action bit, 0 = forward, 1 = drop, as
// in the two-row example of the published design (class 0 forward, class 1
// drop). Reset sets every class to forward, so an unprogrammed table passes
// all traffic. Entries are written through `wr_*` one per cycle.
//
// Lookup: one class per cycle, `res_drop` registered one cycle after
// `lk_valid`; `res_class` is the looked-up class delayed alongside.
module fwd_table
  import hynic_pkg::*;
#(
  parameter int unsigned CLASSES = 16,
  parameter int unsigned CLS_W   = CLASS_W
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [CLS_W-1:0] wr_class,
  input  logic             wr_drop,
  input  logic             lk_valid,
  input  logic [CLS_W-1:0] lk_class,
  output logic             res_valid,
  output logic [CLS_W-1:0] res_class,
  output logic             res_drop
);

  logic [CLASSES-1:0] drop_tbl;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      drop_tbl  <= '0;
      res_valid <= 1'b0;
      res_class <= '0;
      res_drop  <= 1'b0;
    end else begin
      if (wr_en && int'(wr_class) < int'(CLASSES))
        drop_tbl[wr_class] <= wr_drop;
      res_valid <= lk_valid;
      res_class <= lk_class;
      // a class outside the table is forwarded
      res_drop  <= lk_valid && (int'(lk_class) < int'(CLASSES)) && drop_tbl[lk_class];
    end
  end

endmodule
