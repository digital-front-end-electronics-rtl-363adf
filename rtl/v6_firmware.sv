// v6_firmware: the pre-processing FPGA of one NUMEXO2 digitizer.
//
// 16 channels, each: adc_deser (7 DDR LVDS lanes to 14-bit samples) ->
// psa_channel (charge comparison with pile-up back-up unit) ->
// chan_event_buf (three 250-sample event buffers). A neutron decision
// commits the event and is the channel's trigger request to the GTS leaf
// (treq, a one-clock pulse). data_mgmt sends the committed waveforms to
// the Virtex-5 over the 16-bit link in trigger order. setup_regs holds
// the configuration, written over SPI; oscilloscope and inspection_lines
// give visibility of internal signals.
//
// Oscilloscope sources (probe select): 0-15 raw samples of channels 0-15,
// 16 link word, 17 trigger-request mask, 18 event-start mask,
// 19 committed-and-complete (head_valid) mask; others read 0.
// Inspection analog sources: 0-15 raw samples, 16 link word (lower 14
// bits); digital: 0-15 trigger requests, 16-31 event starts, 32 clk/2,
// 33 link busy, 34 order overflow.
//
// Single clock: the 200 MHz sample clock. The delay taps of the LVDS
// inputs are FPGA primitives outside this module; their tap value leaves
// on iodelay_tap. The block set follows the document's Virtex-6 diagram;
// the source lists are this design's.
module v6_firmware
  import neda_pkg::*;
#(
  parameter int unsigned NC          = N_CH,
  parameter int unsigned LEN         = EVT_LEN,
  parameter int unsigned SCOPE_DEPTH = 16384
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [NC-1:0][6:0]   lane_rise,
  input  logic [NC-1:0][6:0]   lane_fall,
  input  logic                 sclk,
  input  logic                 cs_n,
  input  logic                 mosi,
  output logic                 miso,
  output logic [NC-1:0]        treq,
  output link_word_t           link_word,
  output logic [4:0]           iodelay_tap,
  output logic [13:0]          dac [2],
  output logic [1:0]           dout
);

  setup_t cfg;
  logic [3:0] scope_arm;

  sample_t       smp [NC];
  logic [NC-1:0] st, st_u, dn, dn_u, neut, pu;
  logic [NC-1:0] head_valid, head_pu, rel;
  logic [15:0]   lost [NC], ovf [NC];
  sample_t       rd_data [NC];
  logic [$clog2(LEN)-1:0] rd_addr;
  logic          order_ovf;

  for (genvar c = 0; c < NC; c++) begin : g_ch
    adc_deser u_deser (
      .clk, .rst_n,
      .lane_rise(lane_rise[c]),
      .lane_fall(lane_fall[c]),
      .edge_swap(cfg.edge_swap),
      .sample_o (smp[c])
    );
    psa_channel u_psa (
      .clk, .rst_n,
      .enable    (cfg.ch_en[c]),
      .sample    (smp[c]),
      .alpha     (cfg.alpha),
      .beta      (cfg.beta),
      .thr       (cfg.thr),
      .delta_t   (cfg.delta_t),
      .start     (st[c]),
      .start_unit(st_u[c]),
      .done      (dn[c]),
      .done_unit (dn_u[c]),
      .neutron   (neut[c]),
      .pileup    (pu[c]),
      .lost      (lost[c])
    );
    chan_event_buf #(.LEN(LEN)) u_buf (
      .clk, .rst_n,
      .sample        (smp[c]),
      .psa_start     (st[c]),
      .psa_start_unit(st_u[c]),
      .psa_done      (dn[c]),
      .psa_done_unit (dn_u[c]),
      .psa_neutron   (neut[c]),
      .psa_pileup    (pu[c]),
      .commit        (treq[c]),
      .head_valid    (head_valid[c]),
      .head_pileup   (head_pu[c]),
      .rd_addr       (rd_addr),
      .rd_data       (rd_data[c]),
      .rd_release    (rel[c]),
      .overflow      (ovf[c])
    );
  end

  data_mgmt #(.NC(NC), .LEN(LEN)) u_dm (
    .clk, .rst_n,
    .commit        (treq),
    .head_valid    (head_valid),
    .head_pileup   (head_pu),
    .rd_addr       (rd_addr),
    .rd_data       (rd_data),
    .rd_release    (rel),
    .link_word     (link_word),
    .order_overflow(order_ovf)
  );

  // ---- configuration
  logic [15:0] scope_rd_data, lost_total;
  logic [3:0]  scope_frozen;
  logic [$clog2(SCOPE_DEPTH)-1:0] scope_oldest [N_PROBES];
  logic [13:0] oldest14 [N_PROBES];

  always_comb begin
    lost_total = '0;
    for (int c = 0; c < NC; c++) lost_total = lost_total + lost[c] + ovf[c];
    for (int p = 0; p < N_PROBES; p++) oldest14[p] = 14'(scope_oldest[p]);
  end

  setup_regs u_setup (
    .clk, .rst_n, .sclk, .cs_n, .mosi, .miso,
    .cfg, .scope_arm,
    .scope_rd_data, .scope_frozen,
    .scope_oldest(oldest14),
    .lost_total
  );
  assign iodelay_tap = cfg.iodelay_tap;

  // ---- oscilloscope
  logic [15:0] ssrc [32];
  always_comb begin
    for (int i = 0; i < 32; i++) ssrc[i] = '0;
    for (int c = 0; c < NC; c++) ssrc[c] = 16'(smp[c]);
    ssrc[16] = link_word;
    ssrc[17] = 16'(treq);
    ssrc[18] = 16'(st);
    ssrc[19] = 16'(head_valid);
  end

  logic [N_PROBES-1:0][$clog2(SCOPE_DEPTH)-1:0] post_w;
  always_comb
    for (int p = 0; p < N_PROBES; p++) post_w[p] = $clog2(SCOPE_DEPTH)'(cfg.probe_post[p]);

  oscilloscope #(.DEPTH(SCOPE_DEPTH)) u_scope (
    .clk, .rst_n,
    .src        (ssrc),
    .ext_trig   (|treq),
    .probe_src  (cfg.probe_src),
    .probe_trig (cfg.probe_trig),
    .probe_level(cfg.probe_level),
    .probe_post (post_w),
    .arm        (scope_arm),
    .rd_probe   (cfg.scope_rd_probe),
    .rd_addr    ($clog2(SCOPE_DEPTH)'(cfg.scope_rd_addr)),
    .rd_data    (scope_rd_data),
    .frozen     (scope_frozen),
    .oldest     (scope_oldest)
  );

  // ---- inspection lines
  logic [13:0] asrc [32];
  logic [63:0] dsrc;
  logic        clk_div2;
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) clk_div2 <= 1'b0;
    else        clk_div2 <= !clk_div2;

  always_comb begin
    for (int i = 0; i < 32; i++) asrc[i] = '0;
    for (int c = 0; c < NC; c++) asrc[c] = smp[c];
    asrc[16] = link_word[13:0];
    dsrc = '0;
    dsrc[NC-1:0]     = treq;
    dsrc[16 +: NC]   = st;
    dsrc[32]         = clk_div2;
    dsrc[33]         = link_word != LINK_IDLE;
    dsrc[34]         = order_ovf;
  end

  inspection_lines #(.N_ASRC(32), .N_DSRC(64), .DAC_W(14)) u_insp (
    .clk, .rst_n,
    .asrc, .dsrc,
    .asel(cfg.insp_analog),
    .dsel(cfg.insp_digital),
    .dac, .dout
  );

endmodule
