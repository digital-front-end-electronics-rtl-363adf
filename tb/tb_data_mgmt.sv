// tb_data_mgmt: 16 modelled channel buffers commit events at random
// clocks, often several on the same clock. Each modelled buffer turns
// valid some time after its commit and returns words that encode channel,
// event and address, one clock after rd_addr. Checks that the link
// carries the events in commit order, lowest channel first on a tie, each
// as a header and 250 consecutive samples, that every buffer is released
// once, and that an event takes 251 link words.
module tb_data_mgmt;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic [15:0] commit = 0, head_valid, head_pileup, rd_release;
  logic [7:0]  rd_addr;
  sample_t     rd_data [16];
  link_word_t  link_word;
  logic        order_overflow;

  data_mgmt dut (.*);

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

  // channel models: queue of (event id, ready time, pile-up)
  int q_ev [16][$], q_rdy [16][$];
  bit q_pu [16][$];
  int expect_ch [$], expect_ev [$];
  bit expect_pu [$];
  int t = 0, ev_id = 0, n_coinc = 0;

  always_comb
    for (int c = 0; c < 16; c++) begin
      head_valid[c]  = q_ev[c].size() > 0 && q_rdy[c][0] <= t;
      head_pileup[c] = q_pu[c].size() > 0 && q_pu[c][0];
    end

  always @(posedge clk) begin
    t <= t + 1;
    for (int c = 0; c < 16; c++) begin
      rd_data[c] <= q_ev[c].size() > 0 ? sample_t'({q_ev[c][0][5:0], rd_addr}) : '0;
      if (rst_n && rd_release[c]) begin
        check(q_ev[c].size() > 0, $sformatf("release of empty channel %0d at %0d", c, t));
        void'(q_ev[c].pop_front()); void'(q_rdy[c].pop_front()); void'(q_pu[c].pop_front());
      end
    end
  end

  // commit generator: at most 3 outstanding events per channel
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 1500; n++) begin
      @(negedge clk);
      commit = '0;
      if ($urandom_range(0, 99) < 3) begin
        int k;
        k = 0;
        for (int c = 0; c < 16; c++)
          if (q_ev[c].size() < 3 && $urandom_range(0, 99) < 20) begin
            bit pu;
            pu = $urandom_range(0, 1);
            commit[c] = 1;
            q_ev[c].push_back(ev_id); q_rdy[c].push_back(t + 165); q_pu[c].push_back(pu);
            expect_ch.push_back(c); expect_ev.push_back(ev_id); expect_pu.push_back(pu);
            ev_id++;
            k++;
          end
        if (k > 1) n_coinc++;
      end
    end
    @(negedge clk);
    commit = '0;
  end

  // link checker
  int n_ev = 0, pos = -1, cur_ch, cur_ev, hdr_t, idle_t = 0;
  initial begin
    @(posedge rst_n);
    forever begin
      @(posedge clk);
      #1;
      if (link_is_header(link_word)) begin
        check(pos == -1 || pos == 250, "header inside an event");
        check(expect_ch.size() > 0, "unexpected event");
        cur_ch = expect_ch.pop_front(); cur_ev = expect_ev.pop_front();
        check(link_word[3:0] == 4'(cur_ch), $sformatf("event %0d from ch %0d, expected ch %0d", n_ev, link_word[3:0], cur_ch));
        check(link_word[13] == expect_pu.pop_front(), "pile-up bit");
        pos = 0;
        hdr_t = t;
      end else if (link_is_sample(link_word)) begin
        check(pos >= 0 && pos < 250, "sample outside an event");
        check(link_word[13:0] == 14'({6'(cur_ev), 8'(pos)}), $sformatf("sample %0d of event %0d", pos, cur_ev));
        pos++;
        if (pos == 250) begin
          n_ev++;
          check(t - hdr_t == 250, "event occupies 251 consecutive words");
        end
      end else begin
        check(pos == -1 || pos == 250, "idle inside an event");
        if (n_ev == ev_id && ev_id > 0 && t > 20000) idle_t++;
        if (idle_t > 1000) begin
          check(n_ev == ev_id, $sformatf("%0d of %0d events read", n_ev, ev_id));
          check(n_coinc > 5, $sformatf("%0d coincident commits", n_coinc));
          check(!order_overflow, "order overflow");
          $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
          $finish;
        end
      end
    end
  end
endmodule
