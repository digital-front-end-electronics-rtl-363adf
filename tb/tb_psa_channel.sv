// tb_psa_channel: one channel fed with synthetic scintillator pulses on a
// noisy baseline: a fast-decaying "gamma" shape and a "neutron" shape with
// a slow tail. Checks, against integrals computed here from the waveform:
// start on the crossing sample, decision 45 clocks later (30 ns + 140 ns
// gates + 55 ns), the neutron/gamma decision, pile-up on the back-up unit
// with the first event's baseline, a lost third event, and no events on a
// disabled channel.
module tb_psa_channel;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic        enable;
  sample_t     sample;
  logic [5:0]  alpha = 6;
  logic [7:0]  beta = 28;
  logic [13:0] thr = 100;
  logic [15:0] delta_t = 16'h0800;   // 0.5
  logic        start, start_unit, done, done_unit, neutron, pileup;
  logic [15:0] lost;

  psa_channel dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  localparam int N = 6000;
  int raw [N];

  // events: onset, kind (0 gamma, 1 neutron), amplitude
  typedef struct { int onset; bit neut; int amp; bit pu; int base_from; bit lost; } ev_t;
  ev_t evs [$];

  task automatic add_pulse(input int o, input bit neut, input int amp);
    for (int i = o; i < N; i++) begin
      real t, v;
      t = i - o;
      if (neut) v = amp * (0.75 * $exp(-t / 3.0) + 0.25 * $exp(-t / 30.0));
      else      v = amp * (0.99 * $exp(-t / 2.0) + 0.01 * $exp(-t / 30.0));
      raw[i] += int'(v);
    end
  endtask

  function automatic longint bsum(input int o);
    longint s = 0;
    for (int i = o - 34; i <= o - 3; i++) s += raw[i];
    return s;
  endfunction

  function automatic bit decide(input int o, input longint b);
    longint sf = 0, ss = 0, ef, es;
    for (int i = o - 2; i < o + 4; i++)  sf += raw[i];
    for (int i = o + 4; i < o + 32; i++) ss += raw[i];
    ef = 32 * sf - 6 * b;
    es = 32 * ss - 28 * b;
    return (es * 4096) >= longint'(delta_t) * ef;
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int starts [$], units [$];
  int n_start = 0, n_done = 0, n_pu = 0, n_neut = 0, n_gam = 0;
  int k;

  initial begin
    for (int i = 0; i < N; i++) raw[i] = 1000 + $urandom_range(0, 6);
    // isolated events
    evs.push_back('{200,  0, 3000, 0, 200, 0});
    evs.push_back('{500,  1, 3000, 0, 500, 0});
    evs.push_back('{800,  1, 8000, 0, 800, 0});
    evs.push_back('{1100, 0, 8000, 0, 1100, 0});
    // pile-up: second pulse 20 samples (100 ns) after a gamma
    evs.push_back('{1500, 0, 4000, 1, 1500, 0});
    evs.push_back('{1520, 1, 3000, 1, 1500, 0});
    // three pulses inside 225 ns: the third is lost
    evs.push_back('{2000, 0, 4000, 1, 2000, 0});
    evs.push_back('{2020, 0, 4000, 1, 2000, 0});
    evs.push_back('{2035, 0, 4000, 0, 2000, 1});
    // random isolated events
    for (int e = 0; e < 20; e++)
      evs.push_back('{2400 + 150 * e, $urandom_range(0, 1), $urandom_range(500, 9000), 0, 2400 + 150 * e, 0});
    // pulse on a disabled channel (index 5700)
    foreach (evs[i]) add_pulse(evs[i].onset, evs[i].neut, evs[i].amp);
    add_pulse(5700, 1, 4000);

    enable = 1; sample = 1000;
    repeat (3) @(posedge clk);
    rst_n = 1;
    k = 0;
    for (int i = 0; i < N; i++) begin
      @(negedge clk);
      sample = sample_t'(raw[i]);
      enable = (i < 5600);
      #1;
      if (start) begin
        n_start++;
        starts.push_back(i);
        units.push_back(start_unit);
      end
      if (done) begin
        // match with the oldest start still pending
        int s_i;
        s_i = starts.pop_front();
        void'(units.pop_front());
        n_done++;
        while (k < evs.size() && evs[k].lost) k++;
        check(k < evs.size(), "more decisions than events");
        if (k < evs.size()) begin
          check(s_i == evs[k].onset, $sformatf("start at %0d, expected %0d", s_i, evs[k].onset));
          check(i - s_i == 45, $sformatf("decision latency %0d", i - s_i));
          check(neutron == decide(evs[k].onset, bsum(evs[k].base_from)),
                $sformatf("decision of event at %0d", evs[k].onset));
          if (!evs[k].pu) check(neutron == evs[k].neut, $sformatf("shape class of event at %0d", evs[k].onset));
          check(pileup == evs[k].pu, $sformatf("pile-up flag of event at %0d", evs[k].onset));
          if (pileup) n_pu++;
          if (neutron) n_neut++; else n_gam++;
          k++;
        end
      end
    end
    check(n_start == evs.size() - 1, $sformatf("%0d starts", n_start));
    check(n_done == evs.size() - 1, $sformatf("%0d decisions", n_done));
    check(lost == 1, $sformatf("lost = %0d", lost));
    check(n_pu == 4 && n_neut > 0 && n_gam > 0, "pile-up, neutron and gamma all seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
