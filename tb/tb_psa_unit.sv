// tb_psa_unit: random events through one charge-comparison unit.
// For each event the testbench picks gates, a baseline sum, a ratio
// threshold and random samples, computes both baseline-corrected
// integrals and the decision itself, and checks the unit's results and
// that the decision comes exactly alpha + beta + 11 clocks after start.
module tb_psa_unit;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic        start;
  sample_t     sample;
  logic [18:0] base_sum;
  logic [5:0]  alpha;
  logic [7:0]  beta;
  logic [15:0] delta_t;
  logic        busy, done, is_neutron;
  logic signed [39:0] is_f, is_s;

  psa_unit dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint sf, ss, ef, es;
  int     a, b, lat, n_neut;
  sample_t wave [300];

  initial begin
    start = 0; sample = 0; base_sum = 0; alpha = 6; beta = 28; delta_t = 16'h0400;
    n_neut = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int ev = 0; ev < 300; ev++) begin
      // document's gates for the first events, random afterwards
      a = (ev < 100) ? 6  : 1 + $urandom_range(0, 40);
      b = (ev < 100) ? 28 : 1 + $urandom_range(0, 200);
      base_sum = 19'($urandom_range(0, 32 * 2000));
      delta_t  = 16'($urandom_range(0, 12000));
      // exponential-like tail of random length so both decisions occur
      for (int i = 0; i < a + b; i++) begin
        int amp = (i < a) ? 4000 : $urandom_range(0, 3000) >> ((i - a) / 16);
        wave[i] = sample_t'(base_sum / 32 + amp + $urandom_range(0, 20));
      end
      sf = 0; ss = 0;
      for (int i = 0; i < a; i++)     sf += wave[i];
      for (int i = a; i < a + b; i++) ss += wave[i];
      ef = 32 * sf - longint'(a) * base_sum;
      es = 32 * ss - longint'(b) * base_sum;
      @(negedge clk);
      alpha = 6'(a); beta = 8'(b);
      start = 1;
      sample = wave[0];
      lat = 0;
      @(negedge clk);
      start = 0;
      base_sum = 19'($urandom);   // must have been latched
      alpha = 6'($urandom); beta = 8'($urandom);
      for (int i = 1; i < a + b; i++) begin
        sample = wave[i];
        lat++;
        check(!done, "done too early");
        @(negedge clk);
      end
      sample = sample_t'($urandom);
      lat++;
      while (!done && lat < 400) begin
        @(negedge clk);
        lat++;
      end
      check(lat == a + b + 11, $sformatf("latency %0d, expected %0d", lat, a + b + 11));
      check(is_f == ef, $sformatf("fast integral %0d expected %0d", is_f, ef));
      check(is_s == es, $sformatf("slow integral %0d expected %0d", is_s, es));
      check(is_neutron == ((es * 4096) >= longint'(delta_t) * ef),
            $sformatf("decision ev %0d", ev));
      check(!busy, "busy with done");
      if (is_neutron) n_neut++;
    end
    check(n_neut > 20 && n_neut < 280, $sformatf("both decisions seen (%0d neutrons)", n_neut));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
