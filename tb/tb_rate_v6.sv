// tb_rate_v6: rate workload on the Virtex-6 firmware at default sizes.
//
// All 16 channels receive detector pulses at random times: 57 kHz per
// channel on average, 7 of 8 of them neutron-like, so about 50 kHz of
// neutron events per channel (the design's target rate) plus gammas. The arrivals per channel
// are exponential with a floor of 300 samples (one event window plus the
// decision time), so no pile-up occurs and every pulse is decided from its
// own baseline. The run is 400 us of beam: about 370 pulses.
//
// The testbench predicts each pulse's neutron/gamma decision with its own
// charge-comparison model (gates of 6 and 28 samples, delta_t 0.25) and
// checks the following. The threshold is raised to 300 over SPI so that no
// noisy pulse tail crosses it a second time.
// Checks:
//  - every predicted neutron either raises a trigger request 47 clocks
//    after its onset, or is counted as lost for lack of a buffer;
//  - the link carries exactly the requested events, in request order, with
//    the 250 samples that start 40 samples before the onset;
//  - while events wait, the link starts a new event every 254 clocks
//    (header + 250 samples + 3 idle; 253 for the second of two coincident
//    requests), the rate the link sustains.
// It reports the link occupancy and the events lost for lack of a buffer:
// 16 x 50 kHz of events needs 16 x 50e3 x 254 = 203.2e6 link clocks per
// second, slightly more than the 200e6 there are, so the backlog grows and
// some events are lost.
module tb_rate_v6;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic [15:0][6:0] lane_rise, lane_fall;
  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  logic [4:0] iodelay_tap;
  logic [13:0] dac [2];
  logic [1:0]  dout;
  logic [15:0] treq;
  link_word_t  link_word;

  v6_firmware dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ waveforms
  localparam int N      = 80000;   // 400 us at 200 Msps
  localparam int T0     = 2000;    // clock at which sample 0 is presented
  localparam int MEAN   = 3500;    // mean spacing, samples: 57 kHz of pulses
  localparam int MINSEP = 300;
  int raw [16][N];
  int n_pulses = 0, n_neut = 0;
  bit is_neut_at [16][N];

  task automatic add_pulse(input int ch, input int o, input bit neut, input int amp);
    for (int i = o; i < N && i < o + 400; i++) begin
      real t, v;
      t = i - o;
      if (neut) v = amp * (0.75 * $exp(-t / 3.0) + 0.25 * $exp(-t / 30.0));
      else      v = amp * (0.99 * $exp(-t / 2.0) + 0.01 * $exp(-t / 30.0));
      raw[ch][i] += int'(v);
    end
  endtask

  function automatic bit decide(input int ch, input int o);
    longint sf = 0, ss = 0, b = 0, ef, es;
    for (int i = o - 34; i <= o - 3; i++) b += raw[ch][i];
    for (int i = o - 2; i < o + 4; i++)  sf += raw[ch][i];
    for (int i = o + 4; i < o + 32; i++) ss += raw[ch][i];
    ef = 32 * sf - 6 * b;
    es = 32 * ss - 28 * b;
    return (es * 4096) >= longint'(16'h0400) * ef;
  endfunction

  // ------------------------------------------------------------ SPI
  task automatic spi(input bit rd, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    logic [23:0] f;
    f = {rd, a, d};
    q = '0;
    cs_n = 0;
    repeat (5) @(negedge clk);
    for (int i = 23; i >= 0; i--) begin
      mosi = f[i];
      repeat (5) @(negedge clk);
      sclk = 1;
      if (i < 16) q[i] = miso;
      repeat (5) @(negedge clk);
      sclk = 0;
    end
    repeat (5) @(negedge clk);
    cs_n = 1;
    repeat (5) @(negedge clk);
  endtask

  // ------------------------------------------------------------ monitors
  int tc = 0;
  always @(posedge clk) tc <= tc + 1;

  int req_ch [$], req_t [$];
  int n_treq = 0, n_coinc = 0, lat_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(treq) > 1) n_coinc++;
    for (int c = 0; c < 16; c++) if (treq[c]) begin
      int o;
      o = tc - T0 - 47;
      if (o < 0 || o >= N || !is_neut_at[c][o]) begin
        lat_bad++;
        if (lat_bad < 5) $display("request from ch %0d at sample %0d not after a predicted neutron", c, o);
      end
      req_ch.push_back(c);
      req_t.push_back(tc);
      n_treq++;
    end
  end

  int lk_ch [$], lk_t [$], lk_busy = 0;
  sample_t lk_s [$][$];
  always @(posedge clk) if (rst_n) begin
    if (link_word != LINK_IDLE) lk_busy++;
    if (link_is_header(link_word)) begin
      sample_t e [$];
      lk_ch.push_back(link_word[3:0]);
      lk_s.push_back(e);
      lk_t.push_back(tc);
    end else if (link_is_sample(link_word)) begin
      lk_s[lk_s.size() - 1].push_back(link_word[13:0]);
    end
  end

  // ------------------------------------------------------------ stimulus
  int idx = 0;
  function automatic logic [6:0] bits_of(input int v, input int par);
    logic [13:0] s;
    s = 14'(v);
    for (int k = 0; k < 7; k++) bits_of[k] = s[2*k + par];
  endfunction
  always @(negedge clk) begin
    for (int c = 0; c < 16; c++) begin
      lane_rise[c] <= bits_of(raw[c][idx < N ? idx : N - 1], 0);
      lane_fall[c] <= bits_of(raw[c][idx < N ? idx : N - 1], 1);
    end
  end

  initial begin
    logic [15:0] q;
    int ons [16][$];
    for (int c = 0; c < 16; c++) for (int i = 0; i < N; i++) raw[c][i] = 1000 + $urandom_range(0, 6);
    // exponential spacing with a floor: mean MEAN samples
    for (int c = 0; c < 16; c++) begin
      int o;
      o = 100 + $urandom_range(0, MEAN);
      while (o < N - 400) begin
        real u;
        bit  nt;
        nt = ($urandom_range(0, 7) != 0);   // 7 of 8 neutron-like: 50 kHz
        add_pulse(c, o, nt, $urandom_range(1500, 9000));
        ons[c].push_back(o);
        n_pulses++;
        u = ($urandom_range(1, 1000000)) / 1000000.0;
        o += MINSEP + int'(-$ln(u) * (MEAN - MINSEP));
      end
    end
    for (int c = 0; c < 16; c++) foreach (ons[c][i])
      if (decide(c, ons[c][i])) begin
        is_neut_at[c][ons[c][i]] = 1;
        n_neut++;
      end

    repeat (3) @(posedge clk);
    rst_n = 1;
    // threshold 300: where a tail (decay 30 samples) crosses it, it falls
    // 10 counts per sample, more than the 0..6 noise, so no tail crosses
    // the threshold twice
    spi(0, 7'h03, 16'd300, q);
    while (tc < T0) @(negedge clk);
    idx = 0;
    fork
      forever begin @(posedge clk); idx++; end
    join_none
    while (idx < N) @(negedge clk);
    repeat (20000) @(negedge clk);

    spi(1, 7'h1D, 0, q);
    $display("pulses %0d, predicted neutrons %0d, trigger requests %0d, lost %0d, coincident clocks %0d",
             n_pulses, n_neut, n_treq, q, n_coinc);
    check(n_pulses > 250, "enough pulses for the rate");
    check(n_neut < n_pulses, "some pulses rejected as gamma");
    check(lat_bad == 0, $sformatf("%0d requests not 47 clocks after a predicted neutron", lat_bad));
    // a buffer is taken at the event start, before the decision, so a lost
    // event may be a neutron or a gamma
    check(n_treq <= n_neut && n_treq + q >= n_neut,
          $sformatf("requests %0d, lost %0d, neutrons %0d", n_treq, q, n_neut));
    check(lk_ch.size() == n_treq, $sformatf("%0d events on the link, %0d requests", lk_ch.size(), n_treq));
    begin
      int n_back = 0, gap_bad = 0;
      foreach (lk_ch[j]) if (j < req_ch.size()) begin
        int o;
        o = req_t[j] - T0 - 47;
        check(lk_ch[j] == req_ch[j], $sformatf("link event %0d from ch %0d, request from ch %0d", j, lk_ch[j], req_ch[j]));
        check(lk_s[j].size() == 250, "250 samples per event");
        for (int k = 0; k < 250 && k < lk_s[j].size(); k++)
          check(lk_s[j][k] == 14'(raw[req_ch[j]][o - 40 + k]), $sformatf("event %0d sample %0d", j, k));
        // backlogged: event j's buffer was full (it is, about 200 clocks
        // after its request) before event j-1 ended. The next event then
        // starts 254 clocks later, or 253 when it was requested on the same
        // clock as the previous one (no new order-FIFO entry to fetch).
        if (j > 0 && req_t[j] + 210 < lk_t[j - 1] + 251) begin
          n_back++;
          if (lk_t[j] - lk_t[j - 1] != (req_t[j] == req_t[j - 1] ? 253 : 254)) begin
            gap_bad++;
            if (gap_bad < 5) $display("gap %0d at event %0d: req %0d prev hdr %0d ch %0d->%0d reqprev %0d", lk_t[j] - lk_t[j - 1], j, req_t[j], lk_t[j-1], lk_ch[j-1], lk_ch[j], req_t[j-1]);
          end
        end
      end
      $display("link occupancy %0d %% over the run, %0d events sent back to back",
               lk_busy * 100 / (N + 20000), n_back);
      check(n_back > 0, "events queued for the link");
      check(gap_bad == 0, $sformatf("%0d back-to-back events not 254 clocks apart", gap_bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
