// tb_readout_fifo: the 9 Mbit readout FIFO at its full size (262144 x 36).
// Random pushes and pops compared with a queue, then a fill to full
// (the full flag must rise at exactly 262144 words) and a drain in order.
module tb_readout_fifo;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  localparam int D = 262144;
  logic        wr_en = 0, rd_en = 0, empty, full;
  logic [35:0] wr_data = 0, rd_data;
  logic [18:0] level;

  readout_fifo dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [35:0] q [$];
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(empty && !full && level == 0, "empty after reset");
    for (int n = 0; n < 20000; n++) begin
      wr_en = $urandom_range(0, 1) && !full;
      rd_en = $urandom_range(0, 1) && !empty;
      wr_data = {$urandom, 4'($urandom)};
      if (rd_en) check(rd_data == q.pop_front(), "random phase data");
      if (wr_en) q.push_back(wr_data);
      @(negedge clk);
      check(level == q.size(), "level");
    end
    rd_en = 0;
    while (!full) begin
      wr_en = 1;
      wr_data = {$urandom, 4'($urandom)};
      q.push_back(wr_data);
      @(negedge clk);
    end
    wr_en = 0;
    check(q.size() == D && level == D, $sformatf("full at %0d words", q.size()));
    while (!empty) begin
      rd_en = 1;
      check(rd_data == q.pop_front(), "drain data");
      @(negedge clk);
    end
    rd_en = 0;
    check(q.size() == 0, "drained all");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
