// tb_adc_interface: events on the link (header + 250 samples) and GTS
// answers, sometimes before and sometimes long after the waveform, with
// random acceptance and random back-pressure from the readout FIFO. The
// expected readout packets (header, 48-bit timestamp, samples two per
// word, sop/eop) are built here from what was sent. A second phase sends
// six events before any answer into a 1024-word staging FIFO, so that two
// must be dropped and still consume their answers.
module tb_adc_interface;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  link_word_t link_word = 0;
  logic       gts_valid = 0, gts_accept = 0, ro_we, ro_full = 0;
  logic [3:0] gts_ch = 0;
  ts_t        gts_ts = 0;
  logic [35:0] ro_data;
  logic [15:0] n_accepted, n_rejected, n_dropped, n_mismatch;

  adc_interface #(.STAGE_DEPTH(1024)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [35:0] exp_q [$];
  int n_acc = 0, n_rej = 0, n_stall = 0;

  // readout side
  always @(posedge clk) begin
    if (rst_n && ro_we) begin
      check(exp_q.size() > 0, "unexpected readout word");
      if (exp_q.size() > 0) begin
        logic [35:0] e;
        e = exp_q.pop_front();
        check(ro_data == e, $sformatf("readout word %h expected %h", ro_data, e));
      end
    end
  end
  always @(negedge clk) begin
    ro_full <= ($urandom_range(0, 9) == 0);
    if (ro_full) n_stall++;
  end

  // the answers are sent by a separate process
  logic [52:0] ans_q [$];
  bit hold = 0;
  initial begin
    forever begin
      @(negedge clk);
      gts_valid = 0;
      if (!hold && ans_q.size() > 0 && $urandom_range(0, 3) == 0) begin
        logic [52:0] a;
        a = ans_q.pop_front();
        {gts_accept, gts_ch, gts_ts} = a;
        gts_valid = 1;
      end
    end
  end

  task automatic send_event(input int ch, input bit pu, input bit acc, input bit expect_out);
    sample_t s [250];
    ts_t ts;
    ts = {$urandom, $urandom};
    for (int k = 0; k < 250; k++) s[k] = sample_t'($urandom);
    if (expect_out && acc) begin
      exp_q.push_back({4'b1000, 8'hA5, 3'b0, pu, 4'(ch), 16'd250});
      exp_q.push_back({4'b0000, 16'b0, ts[47:32]});
      exp_q.push_back({4'b0000, ts[31:0]});
      for (int k = 0; k < 125; k++)
        exp_q.push_back({1'b0, k == 124, 2'b00, 2'b00, s[2*k+1], 2'b00, s[2*k]});
      n_acc++;
    end else if (expect_out) n_rej++;
    ans_q.push_back({acc, 4'(ch), ts});
    @(negedge clk);
    link_word = link_header(pu, 4'(ch));
    for (int k = 0; k < 250; k++) begin
      @(negedge clk);
      link_word = link_sample(s[k]);
    end
    @(negedge clk);
    link_word = LINK_IDLE;
    repeat ($urandom_range(0, 300)) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int e = 0; e < 60; e++)
      send_event($urandom_range(0, 15), $urandom_range(0, 1), $urandom_range(0, 2) != 0, 1);
    repeat (3000) @(negedge clk);
    check(exp_q.size() == 0, "all packets out");
    check(n_accepted == n_acc && n_rejected == n_rej, "accept/reject counts");
    // phase 2: answers withheld until six events are in
    hold = 1;
    for (int e = 0; e < 6; e++) send_event(e, 0, 1, e < 4);
    hold = 0;
    repeat (5000) @(negedge clk);
    check(exp_q.size() == 0, "phase 2 packets out");
    check(n_dropped == 2, $sformatf("%0d dropped", n_dropped));
    check(n_mismatch == 0, "answers in step");
    check(n_stall > 100, "back-pressure applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
