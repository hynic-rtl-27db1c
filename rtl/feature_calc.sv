// feature_calc: turns the running sums kept for a flow into its mean and
// standard deviation, the two derived statistics of the stateful feature set.
//
//   mean = floor(sum / k)
//   sdev = floor(sqrt(floor(sumsq / k) - mean^2))     (population deviation)
//
// It works bit-serially to stay small: a restoring divider produces both
// quotients in SQ_W cycles (sum and sumsq are divided side by side), then a
// digit-by-digit integer square root runs ceil(SQ_W/2) cycles. The variance
// cannot go negative (mean^2 <= sumsq/k, and mean^2 is an integer), but it is
// clamped at zero anyway. k = 0 yields zeros.
//
// Interface: pulse `start` with the operands while `busy` is low; `done`
// pulses with `mean` and `sdev` valid, and they hold until the next start.
// Latency from start to done: SQ_W + ceil(SQ_W/2) + 2 cycles.
//
// The published design names mean and standard deviation among the stateful
// features; the integer floor arithmetic, the population (not sample)
// deviation and the serial structure are this design's choices.
module feature_calc #(
  parameter int unsigned SUM_W = 21,
  parameter int unsigned SQ_W  = 37,
  parameter int unsigned K_W   = 5,
  parameter int unsigned OUT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [SUM_W-1:0] sum,
  input  logic [SQ_W-1:0]  sumsq,
  input  logic [K_W-1:0]   k,
  output logic             busy,
  output logic             done,
  output logic [OUT_W-1:0] mean,
  output logic [OUT_W-1:0] sdev
);

  localparam int unsigned RT_IT = (SQ_W + 1) / 2;   // square-root iterations
  localparam int unsigned CW    = $clog2(SQ_W + 1);

  typedef enum logic [1:0] {S_IDLE, S_DIV, S_VAR, S_SQRT} state_e;
  state_e state;

  logic [CW-1:0]   it;
  logic [K_W-1:0]  kd;
  logic [SQ_W-1:0] dsum, dsq;        // dividends, shifted out MSB first
  logic [SQ_W-1:0] qsum, qsq;        // quotients, shifted in LSB first
  logic [K_W-1:0]  rsum, rsq;        // partial remainders (< k)
  logic [SQ_W-1:0] num, res, rbit;   // square-root state

  logic [K_W:0]    rsum_n, rsq_n;
  logic [SQ_W-1:0] mean_sq;

  assign rsum_n  = {rsum, dsum[SQ_W-1]};
  assign rsq_n   = {rsq, dsq[SQ_W-1]};
  assign mean_sq = qsum * qsum;
  assign busy    = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      it    <= '0;
      kd    <= '0;
      dsum  <= '0;
      dsq   <= '0;
      qsum  <= '0;
      qsq   <= '0;
      rsum  <= '0;
      rsq   <= '0;
      num   <= '0;
      res   <= '0;
      rbit  <= '0;
      done  <= 1'b0;
      mean  <= '0;
      sdev   <= '0;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE: if (start) begin
          kd    <= k;
          dsum  <= SQ_W'(sum);
          dsq   <= sumsq;
          qsum  <= '0;
          qsq   <= '0;
          rsum  <= '0;
          rsq   <= '0;
          it    <= CW'(SQ_W);
          state <= S_DIV;
        end
        S_DIV: begin
          dsum <= dsum << 1;
          dsq  <= dsq << 1;
          if (rsum_n >= {1'b0, kd}) begin
            rsum <= K_W'(rsum_n - {1'b0, kd});
            qsum <= {qsum[SQ_W-2:0], 1'b1};
          end else begin
            rsum <= K_W'(rsum_n);
            qsum <= {qsum[SQ_W-2:0], 1'b0};
          end
          if (rsq_n >= {1'b0, kd}) begin
            rsq <= K_W'(rsq_n - {1'b0, kd});
            qsq <= {qsq[SQ_W-2:0], 1'b1};
          end else begin
            rsq <= K_W'(rsq_n);
            qsq <= {qsq[SQ_W-2:0], 1'b0};
          end
          it <= it - CW'(1);
          if (it == CW'(1)) state <= S_VAR;
        end
        S_VAR: begin
          if (kd == '0)            num <= '0;
          else if (qsq > mean_sq)  num <= qsq - mean_sq;
          else                     num <= '0;
          if (kd == '0) qsum <= '0;
          res   <= '0;
          rbit  <= SQ_W'(1) << (2 * (RT_IT - 1));
          it    <= CW'(RT_IT);
          state <= S_SQRT;
        end
        S_SQRT: begin
          if (num >= res + rbit) begin
            num <= num - (res + rbit);
            res <= (res >> 1) + rbit;
          end else begin
            res <= res >> 1;
          end
          rbit <= rbit >> 2;
          it   <= it - CW'(1);
          if (it == CW'(1)) begin
            state <= S_IDLE;
            done  <= 1'b1;
            mean  <= OUT_W'(qsum);
            // the last step's result is formed here from the current values
            sdev   <= (num >= res + rbit) ? OUT_W'((res >> 1) + rbit)
                                         : OUT_W'(res >> 1);
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
