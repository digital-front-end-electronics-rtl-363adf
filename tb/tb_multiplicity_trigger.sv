// tb_multiplicity_trigger: timestamps of random single requests and
// bursts are fed in time order, each when the time counter `now` reaches
// it. The expected verdict of every request is worked out here directly:
// request k is validated if some request j >= k arrives while k is still
// within the window (ts_j < ts_k + window) and at that moment more than
// `threshold` requests lie within the window ending at ts_j. Checks the
// output order, the verdicts and the multiplicity and trigger outputs.
module tb_multiplicity_trigger;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic       in_valid = 0, in_ready, trigger, out_valid, out_validated, out_ready = 1;
  ts_t        in_ts = 0, now = 0, window = 100, out_ts;
  logic [7:0] threshold = 2, multiplicity;

  multiplicity_trigger dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint ts [$];
  bit     exp_v [$];
  int     n_out = 0, n_val = 0, trig_cycles = 0, max_mult = 0;

  always @(posedge clk) begin
    now <= now + 1;
    if (rst_n && trigger) trig_cycles++;
    if (rst_n && int'(multiplicity) > max_mult) max_mult = multiplicity;
    if (rst_n) check(trigger == (multiplicity > threshold), "trigger = multiplicity > threshold");
  end

  initial begin
    longint t;
    int m;
    t = 50;
    // bursts of 1..5 requests spread over 0..150 clocks, 400 clocks apart
    for (int b = 0; b < 300; b++) begin
      int n;
      n = $urandom_range(1, 5);
      for (int i = 0; i < n; i++) begin
        t += $urandom_range(0, 40);
        ts.push_back(t);
      end
      t += 400;
    end
    foreach (ts[k]) exp_v.push_back(0);
    foreach (ts[j]) begin
      m = 0;
      for (int k = 0; k <= j; k++) if (ts[j] < ts[k] + window) m++;
      if (m > threshold)
        for (int k = 0; k <= j; k++) if (ts[j] < ts[k] + window) exp_v[k] = 1;
    end

    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (ts[k]) begin
      while (now < ts[k]) @(negedge clk);
      in_valid = 1; in_ts = ts[k];
      @(negedge clk);
      while (!in_ready) @(negedge clk);
      in_valid = 0;
    end
  end

  initial begin
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (out_valid && out_ready) begin
        check(n_out < ts.size(), "extra output");
        check(out_ts == ts[n_out], $sformatf("output %0d ts %0d expected %0d", n_out, out_ts, ts[n_out]));
        check(out_validated == exp_v[n_out], $sformatf("verdict of request %0d (ts %0d)", n_out, ts[n_out]));
        if (out_validated) n_val++;
        n_out++;
        if (n_out == ts.size()) begin
          check(n_val > 10 && n_val < n_out - 10, $sformatf("%0d of %0d validated", n_val, n_out));
          check(trig_cycles > 0 && max_mult >= 4, "trigger seen");
          check(multiplicity == 0, "window empty at the end");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
