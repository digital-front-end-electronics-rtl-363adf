// tb_adc_deser: drives the 7 DDR lanes as the ADC would, for random
// samples, in both capture alignments, and checks that every sample comes
// back two clocks after the clock carrying its rising-edge bits.
module tb_adc_deser;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic [6:0]  lane_rise, lane_fall;
  logic        edge_swap;
  logic [13:0] sample_o;

  adc_deser dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] sent [$];
  logic [13:0] cur, prev;

  function automatic logic [6:0] even_bits(input logic [13:0] s);
    for (int k = 0; k < 7; k++) even_bits[k] = s[2*k];
  endfunction
  function automatic logic [6:0] odd_bits(input logic [13:0] s);
    for (int k = 0; k < 7; k++) odd_bits[k] = s[2*k+1];
  endfunction

  initial begin
    lane_rise = 0; lane_fall = 0; edge_swap = 0; prev = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int mode = 0; mode < 2; mode++) begin
      edge_swap = mode[0];
      for (int t = 0; t < 2000; t++) begin
        @(negedge clk);
        cur = 14'($urandom);
        if (!edge_swap) begin
          lane_rise = even_bits(cur);
          lane_fall = odd_bits(cur);
        end else begin
          // half a bit late: this clock's rise holds the previous sample's
          // odd bits, its fall the current sample's even bits
          lane_rise = odd_bits(prev);
          lane_fall = even_bits(cur);
        end
        prev = cur;
        sent.push_back(cur);
        // expected output now: normal mode, sample sent two clocks ago;
        // swapped mode, its rising-edge bits left one clock ago, so the
        // sample three clocks ago
        if (t >= 4) begin
          logic [13:0] exp;
          exp = edge_swap ? sent[sent.size() - 4] : sent[sent.size() - 3];
          checks++;
          if (sample_o !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL: mode %0d t %0d got %h expected %h", mode, t, sample_o, exp);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
