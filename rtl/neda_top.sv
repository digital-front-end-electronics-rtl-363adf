// neda_top: the digital part of the NEDA front-end for one NUMEXO2
// digitizer (16 detector channels), beside the GTS trigger processor's
// multiplicity algorithm.
//
// Chain: 16 x 7 DDR LVDS lanes from the FADC mezzanines -> v6_firmware
// (deserializers, pulse-shape analysis, event buffers, readout ordering,
// setup, oscilloscope, inspection lines) -> 16-bit link words, sent on
// 8 DDR lanes (the document's 8 differential lanes at 200 MHz DDR) and
// rebuilt on the Virtex-5 side by an 8-lane adc_deser, 3 clocks in all
// -> adc_interface
// (pairs each event with its GTS validation, adds the timestamp) ->
// readout_fifo (9 Mbit) -> PCIe readout. The Virtex-5 reaches the setup
// registers through spi_master (the SPI link); the top offers its
// register port (cfg_*), where the embedded processor would connect.
//
// The GTS network between the digitizer and the trigger processor is not
// part of this RTL: the trigger requests (treq) leave as ports and the
// GTS answers (gts_*) come back as ports, one answer per request, in
// request order (time order, lowest channel first on a tie). The trigger
// processor's algorithm (multiplicity_trigger) stands beside the chain
// with its own ports (tp_*); a system connects the two through the GTS
// tree. The readout FIFO's read side is where the PCIe end-point would
// connect. One clock, the 200 MHz sample clock, runs everything.
module neda_top
  import neda_pkg::*;
#(
  parameter int unsigned LEN         = EVT_LEN,
  parameter int unsigned SCOPE_DEPTH = 16384,
  parameter int unsigned RO_DEPTH    = 262144
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // FADC lanes
  input  logic [N_CH-1:0][6:0]     lane_rise,
  input  logic [N_CH-1:0][6:0]     lane_fall,
  // register port of the Virtex-5 side: one access per cfg_req, carried
  // over the SPI link to the setup registers (see spi_master)
  input  logic                     cfg_req,
  input  logic                     cfg_rd,
  input  logic [6:0]               cfg_addr,
  input  logic [15:0]              cfg_wdata,
  output logic                     cfg_busy,
  output logic                     cfg_done,
  output logic [15:0]              cfg_rdata,
  // front panel
  output logic [4:0]               iodelay_tap,
  output logic [13:0]              dac [2],
  output logic [1:0]               dout,
  // GTS leaf
  output logic [N_CH-1:0]          treq,
  input  logic                     gts_valid,
  input  logic                     gts_accept,
  input  logic [3:0]               gts_ch,
  input  ts_t                      gts_ts,
  // Virtex-5 link receiver: half-bit realignment (as for the ADC lanes)
  input  logic                     link_edge_swap,
  // readout FIFO, PCIe side
  input  logic                     ro_rd_en,
  output logic [RO_W-1:0]          ro_rd_data,
  output logic                     ro_empty,
  output logic [$clog2(RO_DEPTH):0] ro_level,
  output logic [15:0]              n_accepted,
  output logic [15:0]              n_rejected,
  output logic [15:0]              n_dropped,
  output logic [15:0]              n_mismatch,
  // trigger processor
  input  logic                     tp_in_valid,
  input  ts_t                      tp_in_ts,
  output logic                     tp_in_ready,
  input  ts_t                      tp_now,
  input  ts_t                      tp_window,
  input  logic [7:0]               tp_threshold,
  output logic [7:0]               tp_multiplicity,
  output logic                     tp_trigger,
  output logic                     tp_out_valid,
  output ts_t                      tp_out_ts,
  output logic                     tp_out_validated,
  input  logic                     tp_out_ready
);

  link_word_t      link_word, link_rx_word;
  logic [7:0]      link_rise, link_fall;
  logic            ro_we, ro_full;
  logic            sclk, cs_n, mosi, miso;

  // Virtex-5 SPI master for the setup registers
  spi_master u_spi (
    .clk, .rst_n,
    .req(cfg_req), .rd(cfg_rd), .addr(cfg_addr), .wdata(cfg_wdata),
    .busy(cfg_busy), .done(cfg_done), .rdata(cfg_rdata),
    .sclk, .cs_n, .mosi, .miso
  );
  logic [RO_W-1:0] ro_wd;

  v6_firmware #(.LEN(LEN), .SCOPE_DEPTH(SCOPE_DEPTH)) u_v6 (
    .clk, .rst_n,
    .lane_rise, .lane_fall,
    .sclk, .cs_n, .mosi, .miso,
    .treq, .link_word, .iodelay_tap, .dac, .dout
  );

  // Virtex-6 output stage: each link word leaves on 8 DDR lanes, bit 2k on
  // the rising and bit 2k+1 on the falling edge of lane k (registered, as
  // the DDR output cells take it).
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      link_rise <= '0;
      link_fall <= '0;
    end else begin
      for (int k = 0; k < 8; k++) begin
        link_rise[k] <= link_word[2*k];
        link_fall[k] <= link_word[2*k+1];
      end
    end
  end

  // Virtex-5 input stage: the same DDR deserializer as for the ADC lanes,
  // with 8 lanes, rebuilds the 16-bit words
  adc_deser #(.LANES(8)) u_link_rx (
    .clk, .rst_n,
    .lane_rise(link_rise), .lane_fall(link_fall),
    .edge_swap(link_edge_swap),
    .sample_o(link_rx_word)
  );

  adc_interface #(.LEN(LEN)) u_adcif (
    .clk, .rst_n,
    .link_word(link_rx_word),
    .gts_valid, .gts_accept, .gts_ch, .gts_ts,
    .ro_we, .ro_data(ro_wd), .ro_full,
    .n_accepted, .n_rejected, .n_dropped, .n_mismatch
  );

  readout_fifo #(.W(RO_W), .DEPTH(RO_DEPTH)) u_ro (
    .clk, .rst_n,
    .wr_en(ro_we), .wr_data(ro_wd),
    .rd_en(ro_rd_en), .rd_data(ro_rd_data),
    .empty(ro_empty), .full(ro_full), .level(ro_level)
  );

  multiplicity_trigger u_tp (
    .clk, .rst_n,
    .in_valid(tp_in_valid), .in_ts(tp_in_ts), .in_ready(tp_in_ready),
    .now(tp_now), .window(tp_window), .threshold(tp_threshold),
    .multiplicity(tp_multiplicity), .trigger(tp_trigger),
    .out_valid(tp_out_valid), .out_ts(tp_out_ts),
    .out_validated(tp_out_validated), .out_ready(tp_out_ready)
  );

endmodule
