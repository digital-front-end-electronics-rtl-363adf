// tb_oscilloscope: four probes at full buffer size (16k words) on ramp
// sources of different slopes. Probe 0 triggers on an external pulse,
// probe 1 on a rising level crossing, probe 2 on a falling one, probe 3
// by software after re-arming. For each frozen buffer the testbench reads
// all 16384 words from the oldest on and checks that they are consecutive
// source samples, that the trigger sample sits post + 1 words from the end
// and meets its trigger condition, and that nothing moves once frozen.
module tb_oscilloscope;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  localparam int D = 16384;
  logic [15:0] src [32];
  logic        ext_trig = 0;
  logic [3:0][4:0]  probe_src;
  logic [3:0][1:0]  probe_trig;
  logic [3:0][15:0] probe_level;
  logic [3:0][13:0] probe_post;
  logic [3:0]  arm = 0;
  logic [1:0]  rd_probe = 0;
  logic [13:0] rd_addr = 0;
  logic [15:0] rd_data;
  logic [3:0]  frozen;
  logic [13:0] oldest [4];

  oscilloscope dut (.*);

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

  int tc = 0;
  always @(posedge clk) tc <= tc + 1;
  always_comb for (int i = 0; i < 32; i++) src[i] = 16'(tc * (i + 1));

  task automatic verify(input int p, input int slope, input int post, input int kind, input int tval);
    logic [15:0] prev, v, trig_v, before_v;
    rd_probe = 2'(p);
    for (int k = 0; k < D; k++) begin
      @(negedge clk);
      rd_addr = 14'(oldest[p] + k);
      @(negedge clk);
      v = rd_data;
      if (k > 0) check(v == 16'(prev + slope), $sformatf("probe %0d word %0d not consecutive", p, k));
      if (k == D - 2 - post) before_v = v;
      if (k == D - 1 - post) trig_v = v;
      prev = v;
    end
    case (kind)
      0: check(trig_v == 16'(tval), $sformatf("probe %0d trigger sample %0d expected %0d", p, trig_v, 16'(tval)));
      1: check(trig_v >= 16'(tval) && before_v < 16'(tval), $sformatf("probe %0d rising crossing", p));
      2: check(trig_v < 16'(tval) && before_v >= 16'(tval), $sformatf("probe %0d falling crossing", p));
      default: ;
    endcase
  endtask

  int tx;
  initial begin
    probe_src   = '{5'd3, 5'd2, 5'd0, 5'd1};       // slopes 4, 3, 1, 2 (probe 3..0)
    probe_trig  = '{2'(TRIG_SOFT), 2'(TRIG_FALL), 2'(TRIG_RISE), 2'(TRIG_EXT)};
    probe_level = '{16'd0, 16'd30000, 16'd17001, 16'd0};
    probe_post  = '{14'd10, 14'd2000, 14'd0, 14'd100};
    repeat (3) @(posedge clk);
    rst_n = 1;
    // probe 3 is software-triggered: it froze right after reset
    repeat (20) @(negedge clk);
    check(frozen[3], "soft trigger freezes");
    repeat (20000) @(negedge clk);
    tx = tc;
    ext_trig = 1;
    @(negedge clk);
    ext_trig = 0;
    repeat (4000) @(negedge clk);
    check(frozen == 4'b1111, $sformatf("all frozen %b", frozen));
    verify(0, 2, 100, 0, tx * 2);
    verify(1, 1, 0, 1, 17001);
    verify(2, 3, 2000, 2, 30000);
    // re-arm probe 3 and let it refill completely before the soft trigger
    probe_trig[3] = 2'(TRIG_EXT);
    arm = 4'b1000;
    @(negedge clk);
    arm = 0;
    check(!frozen[3], "re-armed");
    repeat (D + 10) @(negedge clk);
    tx = tc;
    ext_trig = 1;
    @(negedge clk);
    ext_trig = 0;
    repeat (20) @(negedge clk);
    check(frozen[3], "probe 3 frozen again");
    verify(3, 4, 10, 0, tx * 4);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
