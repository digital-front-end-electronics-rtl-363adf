// tb_neda_top: end-to-end run of the whole design at its default sizes.
//
// Synthetic detector pulses (neutron-like and gamma-like shapes on a noisy
// baseline) are encoded onto the 16 channels' LVDS lanes. The GTS network
// is stood in for by this testbench: each trigger request gets the current
// clock count as timestamp (coincident requests lowest channel first),
// goes into the design's trigger-processor ports, and the processor's
// per-request verdict is returned as the GTS answer. At the end the
// readout FIFO is emptied and every packet is compared with the waveform
// and timestamp expected from the testbench's own model of the PSA
// decision and of the multiplicity rule.
//
// Mechanisms that must each happen at least once: gamma rejection in the
// PSA, pile-up on the back-up unit, coincident trigger requests, buffer
// overflow, GTS validation and GTS rejection, the multiplicity trigger,
// an oscilloscope freeze read back over SPI, and the inspection output.
// Register accesses go through the top's register port, so every one
// crosses the SPI link (spi_master to setup_regs); the link words cross the
// 8 DDR lanes to the Virtex-5 receiver.
module tb_neda_top;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic [15:0][6:0] lane_rise, lane_fall;
  logic        cfg_req = 0, cfg_rd = 0, cfg_busy, cfg_done;
  logic [6:0]  cfg_addr = 0;
  logic [15:0] cfg_wdata = 0, cfg_rdata;
  logic [4:0] iodelay_tap;
  logic [13:0] dac [2];
  logic [1:0]  dout;
  logic [15:0] treq;
  logic        gts_valid = 0, gts_accept = 0, link_edge_swap = 0;
  logic [3:0]  gts_ch = 0;
  ts_t         gts_ts = 0;
  logic        ro_rd_en = 0, ro_empty;
  logic [35:0] ro_rd_data;
  logic [18:0] ro_level;
  logic [15:0] n_accepted, n_rejected, n_dropped, n_mismatch;
  logic        tp_in_valid = 0, tp_in_ready, tp_trigger, tp_out_valid, tp_out_validated;
  ts_t         tp_in_ts = 0, tp_now, tp_window = 200, tp_out_ts;
  logic [7:0]  tp_threshold = 2, tp_multiplicity;
  logic        tp_out_ready;

  neda_top dut (.*);

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

  // ------------------------------------------------------------ register access
  // through the top's register port and the SPI link to the setup registers
  task automatic spi(input bit rd, input logic [6:0] a, input logic [15:0] d, output logic [15:0] q);
    @(negedge clk);
    cfg_req = 1; cfg_rd = rd; cfg_addr = a; cfg_wdata = d;
    @(negedge clk);
    cfg_req = 0;
    while (!cfg_done) @(negedge clk);
    q = cfg_rdata;
    repeat (5) @(negedge clk);
  endtask

  // ------------------------------------------------------------ GTS stand-in
  int tc = 0;
  always @(posedge clk) tc <= tc + 1;
  assign tp_now = ts_t'(tc);

  int   req_ch [$], req_t [$], ans_ch [$];
  int   n_coinc = 0, n_treq = 0, trig_seen = 0, insp_ok = 0, insp_bad = 0;
  int   treq_lat_bad = 0;
  always @(posedge clk) if (rst_n) begin
    if ($countones(treq) > 1) n_coinc++;
    for (int c = 0; c < 16; c++) if (treq[c]) begin
      req_ch.push_back(c);
      req_t.push_back(tc);
      ans_ch.push_back(c);
      n_treq++;
    end
    if (tp_trigger) trig_seen++;
  end

  // requests into the trigger processor, one per clock
  initial begin
    forever begin
      @(negedge clk);
      tp_in_valid = 0;
      if (req_t.size() > 0 && tp_in_ready) begin
        tp_in_valid = 1;
        tp_in_ts    = ts_t'(req_t.pop_front());
        void'(req_ch.pop_front());
      end
    end
  end
  // verdicts back to the digitizer as GTS answers
  always @(negedge clk) begin
    gts_valid <= 0;
    if (tp_out_valid) begin
      gts_valid  <= 1;
      gts_accept <= tp_out_validated;
      gts_ts     <= tp_out_ts;
      gts_ch     <= 4'(ans_ch.pop_front());
    end
  end
  assign tp_out_ready = 1'b1;

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
    begin
      int n_pk = 0, n_pu = 0, n_val = 0;
      // validated requests: more than 2 requests inside 200 clocks
      bit val [$];
      foreach (exp_rq[j]) val.push_back(0);
      foreach (exp_rq[j]) begin
        int m;
        m = 0;
        for (int k = 0; k <= j; k++) if (exp_rq[j].onset < exp_rq[k].onset + 200) m++;
        if (m > 2) for (int k = 0; k <= j; k++) if (exp_rq[j].onset < exp_rq[k].onset + 200) val[k] = 1;
      end
      foreach (exp_rq[j]) if (val[j]) n_val++;
      foreach (exp_rq[j]) begin
        logic [35:0] w;
        if (!val[j]) continue;
        check(!ro_empty, $sformatf("packet for ch %0d at %0d present", exp_rq[j].ch, exp_rq[j].onset));
        if (ro_empty) break;
        @(negedge clk);
        w = ro_rd_data;
        check(w[35] && w[31:24] == 8'hA5 && w[19:16] == 4'(exp_rq[j].ch),
              $sformatf("header of packet %0d: ch %0d expected %0d", n_pk, w[19:16], exp_rq[j].ch));
        check(w[20] == exp_rq[j].pu, $sformatf("pile-up flag of packet %0d", n_pk));
        if (w[20]) n_pu++;
        ro_rd_en = 1; @(negedge clk);
        w = ro_rd_data; ro_rd_en = 1; @(negedge clk);
        begin
          logic [47:0] ts;
          ts[47:32] = w[15:0];
          w = ro_rd_data;
          ts[31:0] = w[31:0];
          // request leaves 47 clocks after the onset (2 deserializer + 45 PSA)
          check(int'(ts) - 2000 == exp_rq[j].onset + 47,
                $sformatf("timestamp of packet %0d: %0d for onset %0d", n_pk, int'(ts) - 2000, exp_rq[j].onset));
        end
        ro_rd_en = 1; @(negedge clk);
        for (int k = 0; k < 125; k++) begin
          w = ro_rd_data;
          check(w[13:0] == 14'(raw[exp_rq[j].ch][exp_rq[j].onset - 40 + 2 * k]) &&
                w[29:16] == 14'(raw[exp_rq[j].ch][exp_rq[j].onset - 39 + 2 * k]) &&
                w[34] == (k == 124), $sformatf("packet %0d word %0d", n_pk, k));
          ro_rd_en = 1; @(negedge clk);
        end
        ro_rd_en = 0;
        n_pk++;
      end
      check(ro_empty, "no extra packets");
      check(n_accepted == n_val && n_rejected == exp_rq.size() - n_val,
            $sformatf("GTS accepted %0d rejected %0d, expected %0d %0d", n_accepted, n_rejected, n_val, exp_rq.size() - n_val));
      check(n_mismatch == 0 && n_dropped == 0, "answers in step with events");
      // mechanisms
      check(n_pk > 0, "GTS validation happened");
      check(n_rejected > 0, "GTS rejection happened");
      check(n_pu > 0, "pile-up happened");
      check(n_coinc > 0, "coincident requests happened");
      check(trig_seen > 0, "multiplicity trigger happened");
      begin
        int n_gam = 0;
        foreach (evs[i]) if (!evs[i].ovf) n_gam++;
        n_gam -= exp_rq.size();
        check(n_gam > 0, "gamma rejection in the PSA happened");
        $display("mechanisms: packets %0d, rejected %0d, gammas %0d, pile-up %0d, coincident clocks %0d, trigger clocks %0d",
                 n_pk, n_rejected, n_gam, n_pu, n_coinc, trig_seen);
      end
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
