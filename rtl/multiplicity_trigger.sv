// multiplicity_trigger: the trigger processor's neutron-multiplicity
// algorithm.
//
// Timestamps of trigger requests enter, in ascending order, an input
// FIFO. A second FIFO, the coincidence-window buffer, holds the
// timestamps of the requests that lie within `window` of each other; a
// counter holds how many it holds (the multiplicity). Each clock the
// oldest input timestamp ts_i is compared with the oldest timestamp in
// the window ts_o:
//   ts_i >= ts_o + window  ->  Dec: ts_o leaves the window (counter - 1)
//   ts_i <  ts_o + window  ->  Inc: ts_i enters the window (counter + 1)
// With no input waiting, ts_o leaves once the current time `now` reaches
// ts_o + window, so the last events of a burst are not held forever.
// trigger is high while multiplicity > threshold.
//
// Every timestamp leaving the window goes to the output FIFO with a
// verdict: validated if, while it was in the window, the multiplicity
// exceeded the threshold. This gives one validation or rejection per
// request, in request order.
//
// One Inc or one Dec per clock. The comparison rule, the counter and the
// threshold comparison follow the document's Fig. 7; the flush by `now`,
// the per-request verdict and the buffer depths are this design's.
module multiplicity_trigger
  import neda_pkg::*;
#(
  parameter int unsigned IN_DEPTH  = 64,
  parameter int unsigned WIN_DEPTH = 64,
  parameter int unsigned OUT_DEPTH = 64,
  parameter int unsigned MULT_W    = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  ts_t               in_ts,
  output logic              in_ready,
  input  ts_t               now,
  input  ts_t               window,
  input  logic [MULT_W-1:0] threshold,
  output logic [MULT_W-1:0] multiplicity,
  output logic              trigger,
  output logic              out_valid,
  output ts_t               out_ts,
  output logic              out_validated,
  input  logic              out_ready
);

  // ---- input FIFO
  logic in_empty, in_full, in_pop;
  ts_t  ts_i;
  logic [$clog2(IN_DEPTH):0] in_level;
  readout_fifo #(.W(TS_W), .DEPTH(IN_DEPTH)) u_in (
    .clk, .rst_n,
    .wr_en(in_valid && !in_full), .wr_data(in_ts),
    .rd_en(in_pop), .rd_data(ts_i),
    .empty(in_empty), .full(in_full), .level(in_level)
  );
  assign in_ready = !in_full;

  // ---- window buffer, entries numbered by a running sequence number
  localparam int unsigned WA = $clog2(WIN_DEPTH);
  ts_t           win [WIN_DEPTH];
  logic [WA-1:0] wwp, wrp;
  logic [31:0]   seq_in, seq_out, valid_upto;
  ts_t           ts_o;
  logic          win_empty, win_full;

  assign ts_o      = win[wrp];
  assign win_empty = (multiplicity == '0);
  assign win_full  = (32'(multiplicity) == WIN_DEPTH);

  // ---- output FIFO
  logic out_full, out_empty, out_push;
  logic [TS_W:0] out_word;
  logic [$clog2(OUT_DEPTH):0] out_level;
  readout_fifo #(.W(TS_W + 1), .DEPTH(OUT_DEPTH)) u_out (
    .clk, .rst_n,
    .wr_en(out_push), .wr_data({(seq_out - valid_upto) >= 32'h8000_0000, ts_o}),
    .rd_en(out_ready && out_valid), .rd_data(out_word),
    .empty(out_empty), .full(out_full), .level(out_level)
  );
  assign out_valid     = !out_empty;
  assign out_ts        = out_word[TS_W-1:0];
  assign out_validated = out_word[TS_W];

  // ---- Inc / Dec decision
  logic inc, dec;
  ts_t  ref_ts;
  assign ref_ts = in_empty ? now : ts_i;
  always_comb begin
    dec = !win_empty && !out_full && (ref_ts >= ts_o + window);
    inc = !dec && !in_empty && !win_full && (win_empty || ts_i < ts_o + window);
  end
  assign in_pop   = inc;
  assign out_push = dec;

  always_ff @(posedge clk) if (inc) win[wwp] <= ts_i;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wwp <= '0; wrp <= '0;
      seq_in <= '0; seq_out <= '0; valid_upto <= '0;
      multiplicity <= '0;
    end else begin
      if (inc) begin
        wwp    <= (wwp == WA'(WIN_DEPTH - 1)) ? '0 : wwp + 1'b1;
        seq_in <= seq_in + 1'b1;
        multiplicity <= multiplicity + 1'b1;
        // everything now in the window, the new entry included, is validated
        if (multiplicity + 1'b1 > threshold) valid_upto <= seq_in + 1'b1;
      end
      if (dec) begin
        wrp     <= (wrp == WA'(WIN_DEPTH - 1)) ? '0 : wrp + 1'b1;
        seq_out <= seq_out + 1'b1;
        multiplicity <= multiplicity - 1'b1;
      end
    end
  end

  assign trigger = multiplicity > threshold;

endmodule
