// data_mgmt: readout ordering and the link to the Virtex-5.
//
// Every clock on which one or more channels commit an event (issue a
// trigger request), the set of those channels is pushed as one bit mask
// into an order FIFO. The drain side takes the oldest mask and serves its
// channels lowest number first, so events leave in the order of their
// trigger requests and coincident requests leave lowest channel first.
//
// For each event it waits until the channel's buffer is completely
// written, sends a header word, then the LEN samples of the waveform, one
// 16-bit link word per clock, and frees the buffer. Between events the
// link carries idle words. At 200 MHz the link moves 400 MB/s, the rate
// of the document's 8 DDR lanes. An event is LEN + 1 link words; with
// events waiting, a new one starts every LEN + 4 clocks (three idle
// clocks to take the next channel and wait for its first read word).
//
// Interface to the channel buffers: rd_addr is common to all channels,
// rd_data[c] returns one clock later, rd_release[c] is a one-clock pulse
// with the last read. Link encoding: see neda_pkg.
module data_mgmt
  import neda_pkg::*;
#(
  parameter int unsigned NC    = N_CH,
  parameter int unsigned LEN   = EVT_LEN,
  parameter int unsigned DEPTH = 48          // order FIFO (NC * buffers)
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic [NC-1:0]          commit,
  input  logic [NC-1:0]          head_valid,
  input  logic [NC-1:0]          head_pileup,
  output logic [$clog2(LEN)-1:0] rd_addr,
  input  sample_t                rd_data [NC],
  output logic [NC-1:0]          rd_release,
  output link_word_t             link_word,
  output logic                   order_overflow
);

  localparam int unsigned AW = $clog2(LEN);
  localparam int unsigned CW = $clog2(NC);
  localparam int unsigned DW = $clog2(DEPTH);

  // ---- order FIFO of commit masks
  logic [NC-1:0] ofifo [DEPTH];
  logic [DW-1:0] wp, rp;
  logic [DW:0]   cnt;
  logic          pop;

  always_ff @(posedge clk) if (|commit && cnt != (DW+1)'(DEPTH)) ofifo[wp] <= commit;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0; order_overflow <= 1'b0;
    end else begin
      if (|commit) begin
        if (cnt != (DW+1)'(DEPTH)) wp <= (wp == DW'(DEPTH - 1)) ? '0 : wp + 1'b1;
        else                       order_overflow <= 1'b1;
      end
      if (pop) rp <= (rp == DW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      cnt <= cnt + (DW+1)'(|commit && cnt != (DW+1)'(DEPTH)) - (DW+1)'(pop);
    end
  end

  // ---- readout engine
  typedef enum logic [1:0] {S_IDLE, S_HDR, S_DATA} state_e;
  state_e        state;
  logic [NC-1:0] cur;        // channels of the mask being served
  logic [CW-1:0] ch;
  logic          primed;     // rd_data already shows word 0 of the head
  logic [AW-1:0] idx;        // index of the sample on rd_data

  logic [CW-1:0] lowest;
  always_comb begin
    lowest = '0;
    for (int c = NC - 1; c >= 0; c--) if (cur[c]) lowest = CW'(c);
  end

  assign pop = (state == S_IDLE) && (cur == '0) && (cnt != 0);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      cur        <= '0;
      ch         <= '0;
      primed     <= 1'b0;
      idx        <= '0;
      rd_addr    <= '0;
      rd_release <= '0;
      link_word  <= LINK_IDLE;
    end else begin
      rd_release <= '0;
      link_word  <= LINK_IDLE;
      unique case (state)
        S_IDLE: begin
          if (pop) cur <= ofifo[rp];
          else if (cur != '0) begin
            ch      <= lowest;
            rd_addr <= '0;
            primed  <= 1'b0;
            state   <= S_HDR;
          end
        end
        S_HDR: begin
          primed <= 1'b1;
          if (primed && head_valid[ch]) begin
            link_word <= link_header(head_pileup[ch], 4'(ch));
            rd_addr   <= AW'(1);
            idx       <= '0;
            state     <= S_DATA;
          end
        end
        S_DATA: begin
          link_word <= link_sample(rd_data[ch]);
          rd_addr   <= rd_addr + 1'b1;
          idx       <= idx + 1'b1;
          if (idx == AW'(LEN - 1)) begin
            rd_release[ch] <= 1'b1;
            cur[ch]        <= 1'b0;
            state          <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
