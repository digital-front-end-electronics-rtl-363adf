// neda_pkg: constants and types shared by the NEDA digitizer firmware.
//
// Sample format: 14-bit unsigned FADC codes at 200 Msps, one sample per
// clock of the 200 MHz processing clock.
//
// Link word (Virtex-6 to Virtex-5, 16 bits per 200 MHz clock, i.e. the
// 8 differential lanes at double data rate). The frame marking is carried
// in the two upper bits, which a 14-bit sample leaves free:
//   16'h0000                          idle
//   {2'b10, pileup, 9'b0, ch[3:0]}     event header
//   {2'b01, sample[13:0]}             waveform sample
// The encoding is this design's choice; the document fixes only the lane
// count, the clock and the 250-sample packet.
//
// Readout word (Virtex-5 to readout FIFO, 36 bits): {sop, eop, 2'b00, data[31:0]}.
//
// setup_t collects the Virtex-6 configuration held by the setup IP; the
// register map itself is listed in setup_regs.
package neda_pkg;

  localparam int unsigned SAMPLE_W = 14;
  localparam int unsigned N_CH     = 16;
  localparam int unsigned LINK_W   = 16;
  localparam int unsigned TS_W     = 48;
  localparam int unsigned EVT_LEN  = 250;
  localparam int unsigned N_PROBES = 4;
  localparam int unsigned RO_W     = 36;

  typedef logic [SAMPLE_W-1:0] sample_t;
  typedef logic [LINK_W-1:0]   link_word_t;
  typedef logic [TS_W-1:0]     ts_t;

  localparam link_word_t LINK_IDLE = '0;

  function automatic link_word_t link_header(input logic pileup, input logic [3:0] ch);
    return {2'b10, pileup, 9'b0, ch};
  endfunction

  function automatic link_word_t link_sample(input sample_t s);
    return {2'b01, s};
  endfunction

  function automatic logic link_is_header(input link_word_t w);
    return w[15:14] == 2'b10;
  endfunction

  function automatic logic link_is_sample(input link_word_t w);
    return w[15:14] == 2'b01;
  endfunction

  // oscilloscope trigger types
  typedef enum logic [1:0] {
    TRIG_EXT  = 2'd0,   // any PSA trigger request
    TRIG_RISE = 2'd1,   // probe value crosses the level upwards
    TRIG_FALL = 2'd2,   // probe value crosses the level downwards
    TRIG_SOFT = 2'd3    // immediately after arming
  } scope_trig_e;

  typedef struct packed {
    logic [5:0]                 alpha;       // fast gate, samples
    logic [7:0]                 beta;        // slow gate, samples
    logic [13:0]                thr;         // leading-edge threshold above baseline
    logic [15:0]                delta_t;     // PSA ratio threshold, Q4.12
    logic [4:0]                 iodelay_tap; // value for the input delay primitives
    logic                       edge_swap;   // deserializer half-bit realignment
    logic [N_CH-1:0]            ch_en;       // channel enables
    logic [N_PROBES-1:0][4:0]   probe_src;   // oscilloscope source per probe
    logic [N_PROBES-1:0][1:0]   probe_trig;  // scope_trig_e per probe
    logic [N_PROBES-1:0][15:0]  probe_level; // level for TRIG_RISE / TRIG_FALL
    logic [N_PROBES-1:0][13:0]  probe_post;  // samples kept after the trigger
    logic [1:0]                 scope_rd_probe;
    logic [13:0]                scope_rd_addr;
    logic [1:0][4:0]            insp_analog; // inspection analog selects
    logic [1:0][5:0]            insp_digital;// inspection digital selects
  } setup_t;

endpackage
