// tb_chan_event_buf: drives the PSA start/decision pulses of one channel
// by hand over a ramp-valued sample stream, so that every stored word
// tells which input clock it came from. Checks the 250-sample window
// beginning 40 samples before the start, commit on neutron only, freeing
// on gamma, two windows filling at once in pile-up, read order, and the
// overflow when all three buffers are taken.
module tb_chan_event_buf;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  sample_t sample;
  logic psa_start = 0, psa_start_unit = 0, psa_done = 0, psa_done_unit = 0;
  logic psa_neutron = 0, psa_pileup = 0;
  logic commit, head_valid, head_pileup, rd_release = 0;
  logic [7:0] rd_addr = 0;
  sample_t rd_data;
  logic [15:0] overflow;

  chan_event_buf dut (.*);

  int checks = 0, failures = 0, n_commit = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int t = 0;
  always @(posedge clk) begin
    t <= t + 1;
    if (commit) n_commit++;
  end
  assign sample = sample_t'(t);

  // one clock pulse on the start or decision inputs
  task automatic start_ev(input bit u, output int at);
    @(negedge clk);
    psa_start = 1; psa_start_unit = u;
    at = t;
    @(negedge clk);
    psa_start = 0;
  endtask
  task automatic decide(input bit u, input bit neut, input bit pu, input bit exp_commit = 1);
    @(negedge clk);
    psa_done = 1; psa_done_unit = u; psa_neutron = neut; psa_pileup = pu;
    #1 check(commit == (neut && exp_commit), "commit follows the decision");
    @(negedge clk);
    psa_done = 0;
  endtask
  // read the head event and compare it with the ramp from `at` - 40
  task automatic read_head(input int at, input bit pu);
    int wait_n = 0;
    while (!head_valid && wait_n < 400) begin @(negedge clk); wait_n++; end
    check(head_valid, "head becomes valid");
    check(head_pileup == pu, "pile-up flag of head");
    for (int k = 0; k < 250; k++) begin
      @(negedge clk);
      rd_addr = 8'(k);
      @(negedge clk);
      check(rd_data == sample_t'(at - 40 + k),
            $sformatf("word %0d: %0d expected %0d", k, rd_data, sample_t'(at - 40 + k)));
    end
    rd_release = 1;
    @(negedge clk);
    rd_release = 0;
  endtask

  int a0, a1, a2, a3, a4;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (60) @(negedge clk);
    // neutron, read back
    start_ev(0, a0);
    repeat (43) @(negedge clk);
    decide(0, 1, 0);
    check(!head_valid, "head not valid before the window is written");
    read_head(a0, 0);
    // gamma: nothing committed
    start_ev(0, a1);
    repeat (43) @(negedge clk);
    decide(0, 0, 0);
    repeat (300) @(negedge clk);
    check(!head_valid, "gamma leaves no event");
    // pile-up: two overlapping windows, both neutrons
    start_ev(0, a1);
    repeat (18) @(negedge clk);
    start_ev(1, a2);
    repeat (23) @(negedge clk);
    decide(0, 1, 1);
    repeat (18) @(negedge clk);
    decide(1, 1, 1);
    // third neutron fills the last buffer, fourth overflows
    start_ev(0, a3);
    repeat (43) @(negedge clk);
    decide(0, 1, 0);
    start_ev(1, a4);
    check(overflow == 1, "overflow counted");
    repeat (43) @(negedge clk);
    decide(1, 1, 0, 0);   // no buffer: no trigger request
    read_head(a1, 1);
    read_head(a2, 1);
    read_head(a3, 0);
    repeat (10) @(negedge clk);
    check(!head_valid, "all events read");
    check(n_commit == 4, $sformatf("%0d commits", n_commit));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
