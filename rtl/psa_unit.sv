// psa_unit: charge-comparison pulse-shape analysis of one event.
//
// From the `start` clock on, the unit sums the incoming samples over two
// consecutive gates: the fast gate (alpha samples, n = 1..alpha) and the
// slow gate (beta samples, n = alpha+1..alpha+beta). The baseline is the
// sum of the BASE_N (= 2**BASE_LOG2) samples preceding the fast gate,
// latched by the caller and given as base_sum. After the gates it forms
//   If = BASE_N * sum_fast - alpha * base_sum   (= BASE_N * fast integral)
//   Is = BASE_N * sum_slow - beta  * base_sum   (= BASE_N * slow integral)
// i.e. both integrals with the averaged baseline removed from every
// sample, scaled by BASE_N so that no precision is lost to the average.
// The event is a neutron when Is >= delta_t * If, delta_t being an
// unsigned Q4.12 ratio (the document's comparison; the fixed-point format
// is this design's choice).
//
// Timing: `start` marks the first fast-gate sample. The decision (done
// pulse with is_neutron, is_f, is_s) comes exactly alpha + beta + POST
// clocks after start. POST is the fixed time for baseline subtraction and
// comparison: 55 ns, 11 clocks at 200 MHz, so that the document's gates of
// 30 ns and 140 ns give its 225 ns. busy is high from start until the
// clock before done; a new start is accepted on the done clock. alpha and
// beta are read at start and must be at least 1.
module psa_unit
  import neda_pkg::*;
#(
  parameter int unsigned BASE_LOG2 = 5,
  parameter int unsigned POST      = 11,
  parameter int unsigned ALPHA_W   = 6,
  parameter int unsigned BETA_W    = 8
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          start,
  input  sample_t                       sample,
  input  logic [SAMPLE_W+BASE_LOG2-1:0] base_sum,
  input  logic [ALPHA_W-1:0]            alpha,
  input  logic [BETA_W-1:0]             beta,
  input  logic [15:0]                   delta_t,
  output logic                          busy,
  output logic                          done,
  output logic                          is_neutron,
  output logic signed [39:0]            is_f,
  output logic signed [39:0]            is_s
);

  localparam int unsigned CNT_W = BETA_W + 2;
  localparam int unsigned SUM_W = SAMPLE_W + BETA_W + 1;

  typedef enum logic [1:0] {IDLE, INTEG, POSTW} state_e;
  state_e state;

  logic [CNT_W-1:0]   cnt;        // samples taken, or post cycles elapsed
  logic [ALPHA_W-1:0] alpha_q;
  logic [BETA_W-1:0]  beta_q;
  logic [SAMPLE_W+BASE_LOG2-1:0] base_q;
  logic [SUM_W-1:0]   sum_f, sum_s;
  logic [CNT_W-1:0]   gate_len;

  assign gate_len = CNT_W'(alpha_q) + CNT_W'(beta_q);

  // baseline-corrected integrals and the comparison, evaluated while
  // waiting out the POST cycles
  logic signed [39:0] i_f, i_s;
  logic signed [63:0] lhs, rhs;
  always_comb begin
    i_f = $signed({1'b0, 39'(sum_f) << BASE_LOG2}) - $signed({1'b0, 39'(alpha_q) * 39'(base_q)});
    i_s = $signed({1'b0, 39'(sum_s) << BASE_LOG2}) - $signed({1'b0, 39'(beta_q)  * 39'(base_q)});
    lhs = 64'(i_s) <<< 12;
    rhs = 64'(i_f) * $signed({48'b0, delta_t});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= IDLE;
      cnt        <= '0;
      alpha_q    <= '0;
      beta_q     <= '0;
      base_q     <= '0;
      sum_f      <= '0;
      sum_s      <= '0;
      done       <= 1'b0;
      is_neutron <= 1'b0;
      is_f       <= '0;
      is_s       <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        IDLE: ;
        INTEG: begin
          if (cnt < CNT_W'(alpha_q)) sum_f <= sum_f + SUM_W'(sample);
          else                       sum_s <= sum_s + SUM_W'(sample);
          if (cnt == gate_len - 1'b1) begin
            state <= POSTW;
            cnt   <= '0;
          end else begin
            cnt <= cnt + 1'b1;
          end
        end
        POSTW: begin
          if (cnt == CNT_W'(POST - 1)) begin
            state      <= IDLE;
            done       <= 1'b1;
            is_neutron <= lhs >= rhs;
            is_f       <= i_f;
            is_s       <= i_s;
          end
          cnt <= cnt + 1'b1;
        end
        default: state <= IDLE;
      endcase
      if (start && state == IDLE) begin
        state   <= INTEG;
        cnt     <= CNT_W'(1);
        alpha_q <= alpha;
        beta_q  <= beta;
        base_q  <= base_sum;
        sum_f   <= SUM_W'(sample);
        sum_s   <= '0;
        if (alpha == '0) begin
          sum_f <= '0;
          sum_s <= SUM_W'(sample);
        end
      end
    end
  end

  assign busy = (state != IDLE);

endmodule
