// tb_feature_calc: drives the mean / standard-deviation unit in its widest
// use (inter-arrival times: 37-bit sum, 69-bit sum of squares, 32-bit
// results). Each case draws k samples (k = 0..20), forms their sum and sum of
// squares, and compares the unit's outputs with floor(sum/k) and with the
// integer square root of floor(sumsq/k) - mean^2 found by a binary search on
// 128-bit values. Cases include equal samples (deviation 0), single samples,
// k = 0 and samples near the 32-bit limit. The done pulse must come
// SQ_W + ceil(SQ_W/2) + 2 cycles after start.
module tb_feature_calc;

  localparam int SUM_W = 37, SQ_W = 69, K_W = 5, OUT_W = 32;
  localparam int LAT   = SQ_W + (SQ_W + 1) / 2 + 2;

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             start = 1'b0;
  logic [SUM_W-1:0] sum = '0;
  logic [SQ_W-1:0]  sumsq = '0;
  logic [K_W-1:0]   k = '0;
  logic             busy, done;
  logic [OUT_W-1:0] mean, sdev;

  int checks = 0, failures = 0;

  feature_calc #(.SUM_W(SUM_W), .SQ_W(SQ_W), .K_W(K_W), .OUT_W(OUT_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [127:0] isqrt(logic [127:0] v);
    logic [127:0] lo, hi, mid;
    lo = 0; hi = 128'h1_0000_0000_0;          // 2^36 > sqrt(2^69)
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid <= v) lo = mid; else hi = mid;
    end
    return lo;
  endfunction

  task automatic run_case(int kk, int mode);
    logic [127:0] s, q, m, v, e_mean, e_std, x;
    int cyc;
    s = 0; q = 0;
    for (int i = 0; i < kk; i++) begin
      case (mode)
        0: x = 128'($urandom);
        1: x = 128'($urandom_range(0, 1000));
        2: x = 128'd12345;                      // all equal
        default: x = 128'(32'hFFFF_FFFF - $urandom_range(0, 3));
      endcase
      s += x;
      q += x * x;
    end
    if (kk == 0) begin
      e_mean = 0; e_std = 0;
    end else begin
      m = s / 128'(kk);
      v = q / 128'(kk) - m * m;
      e_mean = m;
      e_std  = isqrt(v);
    end
    @(negedge clk);
    start = 1'b1; sum = SUM_W'(s); sumsq = SQ_W'(q); k = K_W'(kk);
    @(negedge clk);
    start = 1'b0;
    cyc = 1;
    while (!done && cyc < 1000) begin
      @(negedge clk);
      cyc++;
    end
    checks++;
    if (cyc != LAT) begin
      failures++;
      $display("k=%0d: done after %0d cycles, expected %0d", kk, cyc, LAT);
    end
    checks++;
    if (128'(mean) != e_mean || 128'(sdev) != e_std) begin
      failures++;
      $display("k=%0d mode %0d: mean %0d sdev %0d, expected %0d %0d",
               kk, mode, mean, sdev, e_mean, e_std);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    run_case(0, 0);
    run_case(1, 0);
    run_case(19, 2);
    run_case(19, 3);
    run_case(20, 3);
    for (int t = 0; t < 150; t++) run_case($urandom_range(1, 20), $urandom_range(0, 3));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
