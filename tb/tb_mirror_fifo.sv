// tb_mirror_fifo: pushes a numbered stream of records into an 8-deep queue
// while a randomly stalling consumer pops. Checks that every accepted record
// comes out once and in order, that pushes into a full queue are dropped and
// counted rather than accepted, and that the level never exceeds the depth.
module tb_mirror_fifo;

  localparam int DEPTH = 8;

  logic        clk = 1'b0;
  logic        rst_n = 1'b0;
  logic        push = 1'b0;
  logic [15:0] push_data = '0;
  logic        pop_valid;
  logic        pop_ready = 1'b0;
  logic [15:0] pop_data;
  logic [3:0]  level;
  logic [31:0] stat_drops;

  int checks = 0, failures = 0;

  mirror_fifo #(.WIDTH(16), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference queue
  logic [15:0] q [$];
  int          ref_drops = 0;
  int          popped = 0;

  always @(posedge clk) begin
    if (rst_n) begin
      // reference: pop first, then push (a full queue does not accept a push
      // even when a pop happens in the same cycle)
      if (pop_valid && pop_ready) begin
        checks++;
        if (q.size() == 0 || pop_data != q[0]) begin
          failures++;
          $display("popped %h, expected %h", pop_data, q.size() ? q[0] : 16'hxxxx);
        end
        popped++;
      end
      checks++;
      if (int'(level) != q.size() || pop_valid != (q.size() != 0)) begin
        failures++;
        $display("level %0d, reference %0d", level, q.size());
      end
      if (push) begin
        if (q.size() < DEPTH) q.push_back(push_data);
        else ref_drops++;
      end
      if (pop_valid && pop_ready && q.size() > 0) void'(q.pop_front());
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      push      = ($urandom_range(0, 99) < ((t / 500) % 2 ? 80 : 30));
      push_data = 16'(t);
      pop_ready = ($urandom_range(0, 99) < ((t / 500) % 2 ? 30 : 80));
    end
    @(negedge clk);
    push = 1'b0; pop_ready = 1'b1;
    repeat (DEPTH + 2) @(posedge clk);
    @(negedge clk);
    checks++;
    if (int'(stat_drops) != ref_drops || ref_drops == 0) begin
      failures++;
      $display("drops %0d, reference %0d", stat_drops, ref_drops);
    end
    checks++;
    if (level != 0 || popped < 500) begin
      failures++;
      $display("queue not drained or too few records (%0d)", popped);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
