// tb_spi_master: random register accesses through the SPI master into a
// behavioural mode-0 slave written here. The slave samples mosi on every
// rising sclk edge, and on a read frame shifts a random 16-bit word out on
// miso after the falling edges of bits 8..23. It changes miso three
// clocks after the falling edge, as setup_regs does.
// Checks, for each access:
//  - the slave received exactly {rd, addr, wdata} in 24 bits;
//  - a read returns the slave's word in rdata;
//  - cs_n stayed low for the whole frame;
//  - every sclk half period lasted HALF clocks;
//  - done came (24 * 2 + 1) * HALF + 1 clocks after req, with busy high
//    in between.
module tb_spi_master;

  localparam int unsigned HALF = 8;

  logic clk = 0, rst_n = 0;
  always #2.5 clk = !clk;

  logic        req = 0, rd = 0;
  logic [6:0]  addr = 0;
  logic [15:0] wdata = 0;
  logic        busy, done;
  logic [15:0] rdata;
  logic        sclk, cs_n, mosi, miso;

  spi_master dut (.*);   // default HALF = 8, as below

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 30) $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ slave model
  logic [23:0] got;
  int          nbits = 0;
  logic [15:0] resp;
  logic        sclk_q = 0, cs_q = 1;
  int          edge_t = 0, half_bad = 0, tc = 0, miso_t = -1;
  logic [15:0] miso_sh;
  logic        fr_rd = 0;
  always @(posedge clk) begin
    tc <= tc + 1;
    sclk_q <= sclk;
    cs_q   <= cs_n;
    if (!cs_n && cs_q) begin
      nbits = 0;
      edge_t = tc;
    end
    if (!cs_n && sclk != sclk_q) begin
      if (nbits > 0 && tc - edge_t != HALF) half_bad++;
      edge_t = tc;
      if (sclk) begin
        got = {got[22:0], mosi};
        nbits++;
        if (nbits == 1) fr_rd = mosi;
        if (nbits == 8) miso_sh = resp;
      end else if (nbits >= 8 && nbits < 24) begin
        miso_t = tc + 3;    // next read bit, three clocks after the edge
      end
    end
    if (tc == miso_t) begin
      miso <= fr_rd ? miso_sh[15] : 1'b0;
      miso_sh = {miso_sh[14:0], 1'b0};
    end
  end

  // ------------------------------------------------------------ stimulus
  int cs_low_bad = 0;
  initial begin
    miso = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    check(!busy && cs_n && !sclk, "idle after reset");
    for (int n = 0; n < 300; n++) begin
      int t0, t1;
      bit r;
      logic [6:0] a;
      logic [15:0] d;
      r = $urandom_range(0, 1);
      a = 7'($urandom);
      d = 16'($urandom);
      resp = 16'($urandom);
      half_bad = 0;
      @(negedge clk);
      req = 1; rd = r; addr = a; wdata = d;
      @(negedge clk);
      req = 0; rd = $urandom_range(0, 1); addr = '1; wdata = '1;   // ignored
      t0 = tc;
      if (n % 7 == 0) begin
        // a request while busy is ignored
        req = 1;
        @(negedge clk);
        req = 0;
      end
      while (!done) begin
        if (!busy || cs_n) cs_low_bad++;
        if (tc > t0 + 2000) break;
        @(negedge clk);
      end
      t1 = tc;
      check(t1 - t0 == (24 * 2 + 1) * HALF, $sformatf("access %0d took %0d clocks", n, t1 - t0 + 1));
      check(nbits == 24, $sformatf("access %0d: %0d bits", n, nbits));
      check(got == {r, a, d}, $sformatf("access %0d: frame %h, expected %h", n, got, {r, a, d}));
      if (r) check(rdata == resp, $sformatf("access %0d: read %h, expected %h", n, rdata, resp));
      check(half_bad == 0, $sformatf("access %0d: %0d short or long sclk half periods", n, half_bad));
      @(negedge clk);
      check(cs_n && !busy, "frame closed");
      repeat ($urandom_range(0, 5)) @(negedge clk);
    end
    check(cs_low_bad == 0, "busy high and cs_n low for the whole access");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
