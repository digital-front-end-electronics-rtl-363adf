// chan_event_buf: the three parallel event buffers of one channel.
//
// Each buffer holds one event window of EVT_LEN samples (1.25 us at
// 200 Msps). The raw samples pass a CAP_PRE-sample delay line, so that a
// window opened on the crossing clock of psa_channel begins CAP_PRE samples
// before the crossing and holds the pre-trigger baseline samples.
//
// On psa start the lowest free buffer is taken for the starting PSA unit
// and filled, one sample per clock; two buffers fill at once during
// pile-up. On the unit's decision the buffer is committed if the event is
// a neutron (commit pulse, which is also the channel's trigger request)
// and freed otherwise. An event that found no free buffer is dropped and
// counted in `overflow`; it raises no trigger request, so that every
// request is matched by a waveform.
//
// Committed buffers are read in commit order. head_valid says that the
// oldest committed buffer is completely written; rd_data returns the word
// at rd_addr of that buffer one clock later; rd_release frees it.
//
// The three-buffer structure and the 250-sample window follow the
// document; the allocation rules and CAP_PRE are this design's choices.
module chan_event_buf
  import neda_pkg::*;
#(
  parameter int unsigned N_BUF   = 3,
  parameter int unsigned LEN     = EVT_LEN,
  parameter int unsigned CAP_PRE = 40
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  sample_t                sample,
  input  logic                   psa_start,
  input  logic                   psa_start_unit,
  input  logic                   psa_done,
  input  logic                   psa_done_unit,
  input  logic                   psa_neutron,
  input  logic                   psa_pileup,
  output logic                   commit,       // trigger request
  output logic                   head_valid,
  output logic                   head_pileup,
  input  logic [$clog2(LEN)-1:0] rd_addr,
  output sample_t                rd_data,
  input  logic                   rd_release,
  output logic [15:0]            overflow
);

  localparam int unsigned AW = $clog2(LEN);
  localparam int unsigned BW = $clog2(N_BUF);

  // ---- capture delay line
  sample_t dly [CAP_PRE];
  always_ff @(posedge clk) begin
    dly[0] <= sample;
    for (int i = 1; i < CAP_PRE; i++) dly[i] <= dly[i-1];
  end

  // ---- buffer state
  logic [N_BUF-1:0] used, writing, full;
  logic [AW-1:0]    wr_cnt [N_BUF];
  logic [1:0]       unit_has;
  logic [BW-1:0]    unit_buf [2];

  // commit queue: buffer ids in commit order
  logic [BW-1:0] q_id [N_BUF];
  logic          q_pu [N_BUF];
  logic [BW:0]   q_cnt;

  logic          free_found;
  logic [BW-1:0] free_id;
  always_comb begin
    free_found = 1'b0;
    free_id    = '0;
    for (int b = N_BUF - 1; b >= 0; b--)
      if (!used[b]) begin
        free_found = 1'b1;
        free_id    = BW'(b);
      end
  end

  logic          du_has;
  logic [BW-1:0] du_buf;
  assign du_has = unit_has[psa_done_unit];
  assign du_buf = unit_buf[psa_done_unit];
  assign commit = psa_done && du_has && psa_neutron;

  // queue slot of a new commit, after this clock's release has shifted it
  logic [BW:0]   push_pos;
  logic [BW-1:0] push_idx;
  assign push_pos = q_cnt - (BW+1)'(rd_release && q_cnt != 0);
  assign push_idx = push_pos[BW-1:0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      used     <= '0;
      writing  <= '0;
      full     <= '0;
      unit_has <= '0;
      q_cnt    <= '0;
      overflow <= '0;
      for (int b = 0; b < N_BUF; b++) begin
        wr_cnt[b] <= '0;
        q_id[b]   <= '0;
        q_pu[b]   <= 1'b0;
      end
      unit_buf[0] <= '0;
      unit_buf[1] <= '0;
    end else begin
      // fill
      for (int b = 0; b < N_BUF; b++)
        if (writing[b]) begin
          wr_cnt[b] <= wr_cnt[b] + 1'b1;
          if (wr_cnt[b] == AW'(LEN - 1)) begin
            writing[b] <= 1'b0;
            full[b]    <= 1'b1;
          end
        end
      // read side: release the head and shift the queue
      if (rd_release && q_cnt != 0) begin
        used[q_id[0]] <= 1'b0;
        full[q_id[0]] <= 1'b0;
        for (int i = 0; i < N_BUF - 1; i++) begin
          q_id[i] <= q_id[i+1];
          q_pu[i] <= q_pu[i+1];
        end
      end
      // decision
      if (psa_done && du_has) begin
        unit_has[psa_done_unit] <= 1'b0;
        if (psa_neutron) begin
          q_id[push_idx] <= du_buf;
          q_pu[push_idx] <= psa_pileup;
        end else begin
          used[du_buf]    <= 1'b0;
          writing[du_buf] <= 1'b0;
          full[du_buf]    <= 1'b0;
        end
      end
      q_cnt <= q_cnt + (BW+1)'(commit) - (BW+1)'(rd_release && q_cnt != 0);
      // allocation
      if (psa_start) begin
        if (free_found) begin
          used[free_id]           <= 1'b1;
          writing[free_id]        <= 1'b1;
          full[free_id]           <= 1'b0;
          wr_cnt[free_id]         <= AW'(1);
          unit_has[psa_start_unit] <= 1'b1;
          unit_buf[psa_start_unit] <= free_id;
        end else begin
          overflow <= overflow + 1'b1;
        end
      end
    end
  end

  // ---- storage: one simple dual-port memory per buffer
  sample_t rd_word [N_BUF];
  for (genvar b = 0; b < N_BUF; b++) begin : g_mem
    sample_t mem [LEN];
    logic          we;
    logic [AW-1:0] wa;
    assign we = (psa_start && free_found && free_id == BW'(b)) || writing[b];
    assign wa = writing[b] ? wr_cnt[b] : '0;
    always_ff @(posedge clk) begin
      if (we) mem[wa] <= dly[CAP_PRE-1];
      rd_word[b] <= mem[rd_addr];
    end
  end

  logic [BW-1:0] head_q;
  always_ff @(posedge clk) head_q <= q_id[0];
  assign rd_data     = rd_word[head_q];
  assign head_valid  = (q_cnt != 0) && full[q_id[0]];
  assign head_pileup = q_pu[0];

endmodule
