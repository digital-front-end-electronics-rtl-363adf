// tb_v6_firmware: the Virtex-6 firmware alone, 16 channels at default
// sizes. Synthetic neutron-like and gamma-like pulses are encoded onto the
// LVDS lanes; the testbench works out which events must raise a trigger
// request (its own model of the charge comparison) and checks the trigger
// requests and every event on the link to the Virtex-5: order (time, then
// lowest channel), header, pile-up flag and the 250 waveform samples. It
// also checks gamma rejection, a buffer overflow, the lost-event counter,
// an oscilloscope freeze and its read-back over SPI, and the inspection
// output.
module tb_v6_firmware;
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
    repeat (60000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ waveforms
  localparam int N = 14000;
  int raw [16][N];
  typedef struct { int ch; int onset; bit neut; int amp; int base_from; bit ovf; } ev_t;
  ev_t evs [$];

  task automatic add_pulse(input int ch, input int o, input bit neut, input int amp);
    for (int i = o; i < N; i++) begin
      real t, v;
      t = i - o;
      if (neut) v = amp * (0.75 * $exp(-t / 3.0) + 0.25 * $exp(-t / 30.0));
      else      v = amp * (0.99 * $exp(-t / 2.0) + 0.01 * $exp(-t / 30.0));
      raw[ch][i] += int'(v);
    end
  endtask

  function automatic bit decide(input int ch, input int o, input int bo);
    longint sf = 0, ss = 0, b = 0, ef, es;
    for (int i = bo - 34; i <= bo - 3; i++) b += raw[ch][i];
    for (int i = o - 2; i < o + 4; i++)  sf += raw[ch][i];
    for (int i = o + 4; i < o + 32; i++) ss += raw[ch][i];
    ef = 32 * sf - 6 * b;
    es = 32 * ss - 28 * b;
    return (es * 4096) >= longint'(16'h0800) * ef;
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

  // ------------------------------------------------------------ GTS stand-in
  int tc = 0;
  always @(posedge clk) tc <= tc + 1;

  int   req_ch [$], req_t [$];
  int   n_coinc = 0, n_treq = 0, trig_seen = 0, insp_ok = 0, insp_bad = 0;
  int   treq_lat_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(treq) > 1) n_coinc++;
    for (int c = 0; c < 16; c++) if (treq[c]) begin
      req_ch.push_back(c);
      req_t.push_back(tc);
      n_treq++;
    end
  end

  // link capture: each event as (channel, pile-up, samples)
  int lk_ch [$], lk_pu [$], lk_n [$], lk_cnt = -1, lk_t [$];
  sample_t lk_s [$][$];
  always @(posedge clk) if (rst_n) begin
    if (link_is_header(link_word)) begin
      sample_t e [$];
      lk_ch.push_back(link_word[3:0]);
      lk_pu.push_back(link_word[13]);
      lk_s.push_back(e);
      lk_t.push_back(tc);
    end else if (link_is_sample(link_word)) begin
      lk_s[lk_s.size() - 1].push_back(link_word[13:0]);
    end
  end

  // inspection: analog output 0 shows channel 0's samples (3 clocks late)
  int insp_hit [8];
  always @(posedge clk) if (rst_n && idx > 10 && idx < N)
    for (int d = 0; d < 8; d++) if (dac[0] == 14'(raw[0][idx - d])) insp_hit[d]++;

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

  // expected packets
  typedef struct { int ch; int onset; int t; bit pu; } rq_t;
  rq_t exp_rq [$];

  initial begin
    logic [15:0] q;
    for (int c = 0; c < 16; c++) for (int i = 0; i < N; i++) raw[c][i] = 1000 + $urandom_range(0, 6);
    // isolated neutron: alone in its window, so rejected by the multiplicity rule
    evs.push_back('{0, 3000, 1, 5000, 3000, 0});
    // gamma: no trigger request
    evs.push_back('{5, 3500, 0, 5000, 3500, 0});
    // three coincident neutrons: validated
    evs.push_back('{9, 4000, 1, 4000, 4000, 0});
    evs.push_back('{3, 4000, 1, 3000, 4000, 0});
    evs.push_back('{12, 4000, 1, 6000, 4000, 0});
    // pile-up on channel 7: a gamma then a neutron 100 ns later
    evs.push_back('{7, 5000, 0, 4000, 5000, 0});
    evs.push_back('{7, 5020, 1, 3000, 5000, 0});
    evs.push_back('{8, 5010, 1, 3000, 5010, 0});
    // burst on three channels within the window
    evs.push_back('{1, 6000, 1, 3000, 6000, 0});
    evs.push_back('{2, 6030, 1, 3000, 6030, 0});
    evs.push_back('{4, 6060, 1, 3000, 6060, 0});
    // four neutrons 50 clocks apart on channel 10: the fourth finds no buffer
    evs.push_back('{10, 7000, 1, 3000, 7000, 0});
    evs.push_back('{10, 7050, 1, 3000, 7050, 0});
    evs.push_back('{10, 7100, 1, 3000, 7100, 0});
    evs.push_back('{10, 7150, 1, 3000, 7150, 1});
    // random neutrons and gammas
    for (int e = 0; e < 40; e++)
      evs.push_back('{$urandom_range(0, 15), 8000 + 120 * e, $urandom_range(0, 1), $urandom_range(1500, 9000), 8000 + 120 * e, 0});
    foreach (evs[i]) add_pulse(evs[i].ch, evs[i].onset, evs[i].neut, evs[i].amp);

    repeat (3) @(posedge clk);
    rst_n = 1;
    // configuration: delta_t = 0.5; probe 0 on channel 0, PSA trigger, 100 after
    spi(0, 7'h04, 16'h0800, q);
    spi(0, 7'h10, 16'd100, q);
    spi(0, 7'h07, 16'h0001, q);
    spi(1, 7'h02, 0, q);
    check(q == 28, "beta gate reads back 28 samples");
    check(iodelay_tap == 0, "delay tap reset value");
    spi(0, 7'h05, 16'h0007, q);
    check(iodelay_tap == 7, "delay tap written");
    spi(0, 7'h05, 16'h0000, q);
    while (tc < 2000) @(negedge clk);
    idx = 0;
    fork
      forever begin @(posedge clk); idx++; end
    join_none
    // expected trigger requests, in time order, lowest channel first
    begin
      ev_t s [$];
      s = evs;
      s.sort() with (item.onset * 16 + item.ch);
      foreach (s[i]) begin
        bit pu;
        pu = 0;
        foreach (evs[j]) if (evs[j].ch == s[i].ch && evs[j].onset != s[i].onset &&
                             evs[j].onset > s[i].onset - 45 && evs[j].onset < s[i].onset + 45) pu = 1;
        if (!s[i].ovf && decide(s[i].ch, s[i].onset, s[i].base_from))
          exp_rq.push_back('{s[i].ch, s[i].onset, 0, pu});
      end
    end
    while (idx < N) @(negedge clk);
    repeat (3000) @(negedge clk);

    // ---- check trigger requests and read-out
    check(n_treq == exp_rq.size(), $sformatf("%0d trigger requests, expected %0d", n_treq, exp_rq.size()));
    check(req_t.size() == exp_rq.size(), "request count");
    foreach (exp_rq[j]) if (j < req_t.size()) begin
      check(req_ch[j] == exp_rq[j].ch, $sformatf("request %0d from ch %0d, expected %0d", j, req_ch[j], exp_rq[j].ch));
      check(req_t[j] - 2000 == exp_rq[j].onset + 47, $sformatf("request %0d latency", j));
    end
    begin
      int n_pu = 0;
      check(lk_ch.size() == exp_rq.size(), $sformatf("%0d events on the link, expected %0d", lk_ch.size(), exp_rq.size()));
      foreach (exp_rq[j]) if (j < lk_ch.size()) begin
        check(lk_ch[j] == exp_rq[j].ch, $sformatf("link event %0d from ch %0d, expected %0d", j, lk_ch[j], exp_rq[j].ch));
        check(lk_pu[j] == exp_rq[j].pu, $sformatf("pile-up flag of link event %0d", j));
        if (lk_pu[j]) n_pu++;
        check(lk_s[j].size() == 250, "250 samples per event");
        for (int k = 0; k < 250 && k < lk_s[j].size(); k++)
          check(lk_s[j][k] == 14'(raw[exp_rq[j].ch][exp_rq[j].onset - 40 + k]), $sformatf("event %0d sample %0d", j, k));
        if (j > 0) check(lk_t[j] - lk_t[j-1] >= 251, "events do not overlap on the link");
      end
      check(n_pu > 0, "pile-up happened");
      check(n_coinc > 0, "coincident requests happened");
      check(evs.size() - 1 > exp_rq.size(), "some events rejected as gamma");
    end
    spi(0, 7'h14, 16'h0000, q);
    spi(1, 7'h17, 0, q);
    begin
      logic [15:0] oldest;
      oldest = q;
      // the word before the oldest (the newest) must come from channel 0's input
      spi(0, 7'h14, 16'(14'(oldest - 1)), q);
      spi(1, 7'h15, 0, q);
      check(q >= 1000 && q < 12000, $sformatf("oscilloscope newest sample %0d", q));
    end
    spi(1, 7'h1D, 0, q);
    check(q == 1, $sformatf("one event lost to buffer overflow (%0d)", q));
    spi(1, 7'h16, 0, q);
    check(q[0] == 1, "oscilloscope probe 0 frozen");
    // one fixed delay must match every sample
    foreach (insp_hit[d]) if (insp_hit[d] == N - 11) insp_ok++;
    check(insp_ok == 1, "inspection output follows channel 0");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
