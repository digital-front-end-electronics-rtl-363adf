// tb_setup_regs: an SPI master (mode 0, sclk = clk/10) reads the reset
// values, writes every writable register with random data, reads all of
// them back, checks that the configuration outputs follow, that read-only
// registers return their inputs, that the ID cannot be overwritten and
// that the scope re-arm register gives one-clock pulses.
module tb_setup_regs;
  import neda_pkg::*;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic sclk = 0, cs_n = 1, mosi = 0, miso;
  setup_t cfg;
  logic [3:0]  scope_arm, scope_frozen = 4'hA;
  logic [15:0] scope_rd_data = 16'h1234, lost_total = 16'd77;
  logic [13:0] scope_oldest [N_PROBES];

  setup_regs dut (.*);

  int checks = 0, failures = 0, n_arm = 0;
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

  always @(posedge clk) if (rst_n && scope_arm != 0) n_arm++;

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
    repeat (10) @(negedge clk);
  endtask

  logic [15:0] q, wv [32];
  int writable [$] = '{1,2,3,4,5,6,8,9,10,11,12,13,14,15,16,17,18,19,20,27,28};
  logic [15:0] mask [32];

  initial begin
    for (int p = 0; p < 4; p++) scope_oldest[p] = 14'(100 * p + 5);
    for (int i = 0; i < 32; i++) mask[i] = 16'hFFFF;
    mask[1] = 16'h003F; mask[2] = 16'h00FF; mask[3] = 16'h3FFF; mask[5] = 16'h011F;
    for (int i = 8; i < 12; i++) mask[i] = 16'h031F;
    for (int i = 16; i < 20; i++) mask[i] = 16'h3FFF;
    mask[27] = 16'h1F1F; mask[28] = 16'h3F3F;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (5) @(negedge clk);
    spi(1, 7'h00, 0, q); check(q == 16'h4E44, $sformatf("ID %h", q));
    spi(1, 7'h01, 0, q); check(q == 6,  "alpha reset value 6 (30 ns)");
    spi(1, 7'h02, 0, q); check(q == 28, "beta reset value 28 (140 ns)");
    spi(1, 7'h06, 0, q); check(q == 16'hFFFF, "all channels enabled");
    foreach (writable[i]) begin
      wv[writable[i]] = 16'($urandom) & mask[writable[i]];
      spi(0, 7'(writable[i]), wv[writable[i]], q);
    end
    foreach (writable[i]) begin
      spi(1, 7'(writable[i]), 0, q);
      check(q == wv[writable[i]], $sformatf("reg %0h read %h wrote %h", writable[i], q, wv[writable[i]]));
    end
    check(cfg.alpha == wv[1][5:0] && cfg.beta == wv[2][7:0] && cfg.thr == wv[3][13:0], "PSA outputs");
    check(cfg.delta_t == wv[4] && cfg.iodelay_tap == wv[5][4:0] && cfg.edge_swap == wv[5][8], "delta, delay tap");
    check(cfg.ch_en == wv[6], "channel enables");
    check(cfg.probe_level[2] == wv[14] && cfg.probe_post[3] == wv[19][13:0], "probe level/post");
    check(cfg.probe_src[1] == wv[9][4:0] && cfg.probe_trig[1] == wv[9][9:8], "probe source/trigger");
    check(cfg.insp_analog[1] == wv[27][12:8] && cfg.insp_digital[0] == wv[28][5:0], "inspection selects");
    spi(0, 7'h00, 16'hFFFF, q);
    spi(1, 7'h00, 0, q); check(q == 16'h4E44, "ID read only");
    spi(1, 7'h15, 0, q); check(q == 16'h1234, "scope data");
    spi(1, 7'h16, 0, q); check(q == 16'h000A, "frozen flags");
    spi(1, 7'h19, 0, q); check(q == 16'd205, "oldest of probe 2");
    spi(1, 7'h1D, 0, q); check(q == 16'd77, "lost events");
    check(n_arm == 0, "no arm pulse yet");
    spi(0, 7'h07, 16'h0005, q);
    check(n_arm == 1, $sformatf("one arm pulse (%0d)", n_arm));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
