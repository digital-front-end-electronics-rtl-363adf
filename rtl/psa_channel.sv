// psa_channel: pulse-shape analysis of one detector channel, with pile-up
// handling.
//
// The raw sample stream passes a PRE_TRIG-sample delay line. A running
// sum over the last BASE_N delayed samples is the baseline. An event
// starts on the clock where a raw sample rises above baseline + thr (the
// previous sample was not above it); the fast gate then begins with the
// delayed sample, i.e. PRE_TRIG samples ahead of the crossing, and the
// baseline is the BASE_N samples just before the fast gate.
//
// Two psa_unit instances do the integration: the main one and a back-up
// one. A start that finds one unit busy goes to the other and marks both
// events as pile-up; both are analysed independently and both may send a
// trigger request. The baseline for an event that starts during another
// one is the baseline latched for the first event, since the running sum
// is then spoiled by the first pulse. A start that finds both units busy
// is counted in `lost` and dropped. A disabled channel starts nothing,
// and no channel starts an event in the first BASE_N + PRE_TRIG + 1
// clocks after reset, while the baseline window fills.
//
// Outputs per event: start (with the unit number) on the crossing clock,
// and done (with the unit number, the neutron decision and the pile-up
// flag) alpha + beta + POST clocks later. The document fixes the gates,
// the 32-sample baseline, the 55 ns fixed term, the back-up unit and the
// threshold of its Fig. 9; the delay line length, the threshold rule and
// the baseline latching are this design's choices.
module psa_channel
  import neda_pkg::*;
#(
  parameter int unsigned BASE_LOG2 = 5,
  parameter int unsigned PRE_TRIG  = 2,
  parameter int unsigned POST      = 11
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        enable,
  input  sample_t     sample,
  input  logic [5:0]  alpha,
  input  logic [7:0]  beta,
  input  logic [13:0] thr,
  input  logic [15:0] delta_t,
  output logic        start,        // event starts (crossing clock)
  output logic        start_unit,   // unit taking it
  output logic        done,         // decision available
  output logic        done_unit,
  output logic        neutron,      // decision: neutron (trigger request)
  output logic        pileup,       // the decided event overlapped another
  output logic [15:0] lost          // starts dropped, both units busy
);

  localparam int unsigned BASE_N = 1 << BASE_LOG2;
  localparam int unsigned BS_W   = SAMPLE_W + BASE_LOG2;

  // ---- delay line feeding the integrators
  sample_t dly [PRE_TRIG];
  sample_t ds;
  always_ff @(posedge clk) begin
    dly[0] <= sample;
    for (int i = 1; i < PRE_TRIG; i++) dly[i] <= dly[i-1];
  end
  assign ds = dly[PRE_TRIG-1];

  // ---- running baseline over the last BASE_N delayed samples
  sample_t        hist [BASE_N];
  logic [BS_W-1:0] base_sum;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < BASE_N; i++) hist[i] <= '0;
      base_sum <= '0;
    end else begin
      hist[0] <= ds;
      for (int i = 1; i < BASE_N; i++) hist[i] <= hist[i-1];
      base_sum <= base_sum + BS_W'(ds) - BS_W'(hist[BASE_N-1]);
    end
  end

  // ---- leading-edge detection
  // no events until the delay line and the baseline window hold real
  // samples, after reset
  localparam int unsigned SETTLE = BASE_N + PRE_TRIG + 1;
  logic [$clog2(SETTLE+1)-1:0] settle_cnt;
  logic                        settled;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                 settle_cnt <= '0;
    else if (settle_cnt != ($clog2(SETTLE+1))'(SETTLE)) settle_cnt <= settle_cnt + 1'b1;
  end
  assign settled = (settle_cnt == ($clog2(SETTLE+1))'(SETTLE));

  logic [1:0]      busy, u_done, u_neut;
  logic [BS_W-1:0] base_hold, base_ref, base_for_start;
  logic            above, above_q, crossing;

  assign base_ref = (|busy) ? base_hold : base_sum;
  assign above    = ({sample, BASE_LOG2'(0)} > base_ref + {thr, BASE_LOG2'(0)});
  assign crossing = enable && settled && above && !above_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) above_q <= 1'b1;   // no event on the first clock after reset
    else        above_q <= above;
  end

  // ---- unit allocation and pile-up flags
  logic [1:0] go, pu;
  always_comb begin
    go = '0;
    if (crossing) begin
      if (!busy[0])      go[0] = 1'b1;
      else if (!busy[1]) go[1] = 1'b1;
    end
  end
  assign base_for_start = (|busy) ? base_hold : base_sum;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      base_hold <= '0;
      pu        <= '0;
      lost      <= '0;
    end else begin
      if (|go && !(|busy)) base_hold <= base_sum;
      for (int u = 0; u < 2; u++) begin
        if (go[u]) pu[u] <= |busy;          // started during another event
        else if (go[1-u] && busy[u]) pu[u] <= 1'b1;
      end
      if (crossing && &busy) lost <= lost + 1'b1;
    end
  end

  for (genvar u = 0; u < 2; u++) begin : g_unit
    logic signed [39:0] f_unused, s_unused;
    psa_unit #(.BASE_LOG2(BASE_LOG2), .POST(POST)) u_psa (
      .clk, .rst_n,
      .start     (go[u]),
      .sample    (ds),
      .base_sum  (base_for_start),
      .alpha, .beta, .delta_t,
      .busy      (busy[u]),
      .done      (u_done[u]),
      .is_neutron(u_neut[u]),
      .is_f      (f_unused),
      .is_s      (s_unused)
    );
  end

  assign start      = |go;
  assign start_unit = go[1];
  assign done       = |u_done;
  assign done_unit  = u_done[1];
  assign neutron    = u_done[1] ? u_neut[1] : u_neut[0];
  assign pileup     = u_done[1] ? pu[1] : pu[0];

endmodule
