// adc_interface: the Virtex-5 ADC interface.
//
// Events arrive from the Virtex-6 on the 16-bit link (header + LEN
// samples, see neda_pkg) in the order of their trigger requests. The GTS
// leaf answers every trigger request, in the same order, with a
// validation or rejection and the request's timestamp (gts_valid pulse
// with gts_accept, gts_ch, gts_ts). Because the answer may come long
// after the waveform, both are queued: link words in a staging FIFO,
// answers in a response FIFO. The output engine takes the oldest event,
// waits for its answer, and either writes it to the readout FIFO with
// the timestamp attached, or discards it.
//
// Readout packet, 36-bit words {sop, eop, 2'b00, data}:
//   word 0  sop, {8'hA5, 3'b0, pileup, ch[3:0], 16'(LEN)}
//   word 1  {16'b0, ts[47:32]}
//   word 2  ts[31:0]
//   then LEN/2 words of two samples {2'b0, s[2k+1], 2'b0, s[2k]}, the
//   last with eop.
// An event arriving when the staging FIFO cannot take all of it keeps
// only its header, marked dropped, so that it still consumes its answer;
// it is counted in n_dropped. An answer whose channel differs from the
// header's counts in n_mismatch (the two streams are out of step).
//
// Timing: the output engine moves one sample per clock, writing one
// word every second clock; it stalls while the readout FIFO is full. The
// document gives the pairing of data with the validation and the
// timestamp; queue sizes and the packet format are this design's.
module adc_interface
  import neda_pkg::*;
#(
  parameter int unsigned LEN         = EVT_LEN,
  parameter int unsigned STAGE_DEPTH = 4096,
  parameter int unsigned RESP_DEPTH  = 64
) (
  input  logic            clk,
  input  logic            rst_n,
  input  link_word_t      link_word,
  input  logic            gts_valid,
  input  logic            gts_accept,
  input  logic [3:0]      gts_ch,
  input  ts_t             gts_ts,
  output logic            ro_we,
  output logic [RO_W-1:0] ro_data,
  input  logic            ro_full,
  output logic [15:0]     n_accepted,
  output logic [15:0]     n_rejected,
  output logic [15:0]     n_dropped,
  output logic [15:0]     n_mismatch
);

  localparam int unsigned SW = $clog2(STAGE_DEPTH);
  localparam int unsigned RW = $clog2(RESP_DEPTH);

  // ---- staging of link words
  logic        in_evt, in_drop;
  logic        st_we, st_re, st_empty, st_full;
  link_word_t  st_wd, st_rd;
  logic [SW:0] st_level;

  always_comb begin
    st_we = 1'b0;
    st_wd = link_word;
    if (link_is_header(link_word)) begin
      st_we = !st_full;
      if ((SW+1)'(STAGE_DEPTH) - st_level < (SW+1)'(LEN + 1)) st_wd[12] = 1'b1; // dropped
    end else if (link_is_sample(link_word)) begin
      st_we = in_evt && !in_drop && !st_full;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_evt  <= 1'b0;
      in_drop <= 1'b0;
    end else if (link_is_header(link_word)) begin
      in_evt  <= 1'b1;
      in_drop <= st_wd[12] || st_full;
    end
  end

  readout_fifo #(.W(LINK_W), .DEPTH(STAGE_DEPTH)) u_stage (
    .clk, .rst_n,
    .wr_en(st_we), .wr_data(st_wd),
    .rd_en(st_re), .rd_data(st_rd),
    .empty(st_empty), .full(st_full), .level(st_level)
  );

  // ---- validation answers
  localparam int unsigned RSP_W = 1 + 4 + TS_W;
  logic             rs_re, rs_empty, rs_full;
  logic [RSP_W-1:0] rs_rd;
  logic [RW:0]      rs_level;

  readout_fifo #(.W(RSP_W), .DEPTH(RESP_DEPTH)) u_resp (
    .clk, .rst_n,
    .wr_en(gts_valid && !rs_full), .wr_data({gts_accept, gts_ch, gts_ts}),
    .rd_en(rs_re), .rd_data(rs_rd),
    .empty(rs_empty), .full(rs_full), .level(rs_level)
  );

  // ---- output engine
  typedef enum logic [2:0] {O_IDLE, O_RESP, O_W0, O_W1, O_W2, O_DATA, O_SKIP} ostate_e;
  ostate_e     os;
  logic [3:0]  ev_ch;
  logic        ev_pu, ev_drop;
  ts_t         ev_ts;
  logic [$clog2(LEN+1)-1:0] n;
  logic [13:0] lo;

  always_comb begin
    st_re = 1'b0;
    rs_re = 1'b0;
    unique case (os)
      O_IDLE: st_re = !st_empty;
      O_RESP: rs_re = !rs_empty;
      O_DATA: st_re = !st_empty && !ro_full;
      O_SKIP: st_re = !st_empty;
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      os <= O_IDLE;
      ev_ch <= '0; ev_pu <= 1'b0; ev_drop <= 1'b0; ev_ts <= '0;
      n <= '0; lo <= '0;
      ro_we <= 1'b0; ro_data <= '0;
      n_accepted <= '0; n_rejected <= '0; n_dropped <= '0; n_mismatch <= '0;
    end else begin
      ro_we <= 1'b0;
      unique case (os)
        O_IDLE: if (!st_empty) begin
          if (link_is_header(st_rd)) begin
            ev_ch   <= st_rd[3:0];
            ev_pu   <= st_rd[13];
            ev_drop <= st_rd[12];
            os      <= O_RESP;
          end
        end
        O_RESP: if (!rs_empty) begin
          ev_ts <= rs_rd[TS_W-1:0];
          n     <= '0;
          if (rs_rd[TS_W +: 4] != ev_ch) n_mismatch <= n_mismatch + 1'b1;
          if (ev_drop) begin
            n_dropped <= n_dropped + 1'b1;
            os <= O_IDLE;
          end else if (rs_rd[RSP_W-1]) begin
            n_accepted <= n_accepted + 1'b1;
            os <= O_W0;
          end else begin
            n_rejected <= n_rejected + 1'b1;
            os <= O_SKIP;
          end
        end
        O_W0: if (!ro_full) begin
          ro_we   <= 1'b1;
          ro_data <= {1'b1, 1'b0, 2'b00, 8'hA5, 3'b0, ev_pu, ev_ch, 16'(LEN)};
          os      <= O_W1;
        end
        O_W1: if (!ro_full) begin
          ro_we   <= 1'b1;
          ro_data <= {4'b0000, 16'b0, ev_ts[47:32]};
          os      <= O_W2;
        end
        O_W2: if (!ro_full) begin
          ro_we   <= 1'b1;
          ro_data <= {4'b0000, ev_ts[31:0]};
          os      <= O_DATA;
        end
        O_DATA: if (!st_empty && !ro_full) begin
          n <= n + 1'b1;
          if (n[0] == 1'b0) lo <= st_rd[13:0];
          if (n[0] == 1'b1 || n == ($clog2(LEN+1))'(LEN - 1)) begin
            ro_we   <= 1'b1;
            ro_data <= {1'b0, n == ($clog2(LEN+1))'(LEN - 1), 2'b00,
                        2'b00, (n[0] ? st_rd[13:0] : 14'd0), 2'b00, (n[0] ? lo : st_rd[13:0])};
          end
          if (n == ($clog2(LEN+1))'(LEN - 1)) os <= O_IDLE;
        end
        O_SKIP: if (!st_empty) begin
          n <= n + 1'b1;
          if (n == ($clog2(LEN+1))'(LEN - 1)) os <= O_IDLE;
        end
        default: os <= O_IDLE;
      endcase
    end
  end

endmodule
