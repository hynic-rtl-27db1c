// tb_fwd_table: programs a random forward/drop action for each of the 16
// classes, looks every class up back to back and checks the action and the
// one-cycle latency; also checks that reset leaves every class forwarding and
// that rewriting an entry takes effect on the next lookup.
module tb_fwd_table;

  logic       clk = 1'b0;
  logic       rst_n = 1'b0;
  logic       wr_en = 1'b0, wr_drop = 1'b0;
  logic [3:0] wr_class = '0;
  logic       lk_valid = 1'b0;
  logic [3:0] lk_class = '0;
  logic       res_valid, res_drop;
  logic [3:0] res_class;

  int checks = 0, failures = 0;
  logic ref_drop [16];

  fwd_table #(.CLASSES(16), .CLS_W(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_class(int c, logic exp);
    @(negedge clk);
    lk_valid = 1'b1; lk_class = 4'(c);
    @(negedge clk);
    lk_valid = 1'b0;
    checks++;
    if (!res_valid || res_class != 4'(c) || res_drop != exp) begin
      failures++;
      $display("class %0d: valid %0b class %0d drop %0b, expected drop %0b",
               c, res_valid, res_class, res_drop, exp);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 16; c++) check_class(c, 1'b0);
    for (int round = 0; round < 4; round++) begin
      for (int c = 0; c < 16; c++) begin
        ref_drop[c] = 1'($urandom);
        @(negedge clk);
        wr_en = 1'b1; wr_class = 4'(c); wr_drop = ref_drop[c];
      end
      @(negedge clk);
      wr_en = 1'b0;
      for (int t = 0; t < 40; t++) begin
        int c;
        c = $urandom_range(0, 15);
        check_class(c, ref_drop[c]);
      end
    end
    // an idle cycle gives no valid result
    @(negedge clk);
    checks++;
    if (res_valid) begin
      failures++;
      $display("result valid without lookup");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
