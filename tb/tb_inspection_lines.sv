// tb_inspection_lines: random sources and selects; each output must show
// its selected source one clock later.
module tb_inspection_lines;
  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic [13:0] asrc [32];
  logic [63:0] dsrc;
  logic [1:0][4:0] asel;
  logic [1:0][5:0] dsel;
  logic [13:0] dac [2];
  logic [1:0]  dout;

  inspection_lines dut (.*);

  int checks = 0, failures = 0;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [13:0] ea [2];
  logic [1:0]  ed;
  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int i = 0; i < 32; i++) asrc[i] = 14'($urandom);
      dsrc = {$urandom, $urandom};
      asel = 10'($urandom); dsel = 12'($urandom);
      for (int i = 0; i < 2; i++) begin
        ea[i] = asrc[asel[i]];
        ed[i] = dsrc[dsel[i]];
      end
      @(negedge clk);
      for (int i = 0; i < 2; i++) begin
        checks += 2;
        if (dac[i] != ea[i]) begin failures++; $display("FAIL: analog %0d", i); end
        if (dout[i] != ed[i]) begin failures++; $display("FAIL: digital %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
