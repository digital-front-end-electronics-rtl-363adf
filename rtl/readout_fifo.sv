// readout_fifo: synchronous first-word-fall-through FIFO.
//
// Its default size is the readout buffer between the ADC interface and
// the PCIe readout: 9 Mbit, as 262144 words of 36 bits, which absorbs the
// latencies of the trigger validation and of the PCIe link. The same
// module, at smaller sizes, serves as the staging and response queues of
// adc_interface.
//
// rd_data shows the oldest word whenever empty is low; rd_en pops it.
// A write when full and a read when empty are ignored (and flagged by the
// assertions). level counts the stored words. Simultaneous read and write
// are allowed in every state except a write when full.
//
// The document gives the 9 Mb size and the FIFO's place in the chain; the
// word width and the organisation are this design's.
module readout_fifo #(
  parameter int unsigned W     = 36,
  parameter int unsigned DEPTH = 262144
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   wr_en,
  input  logic [W-1:0]           wr_data,
  input  logic                   rd_en,
  output logic [W-1:0]           rd_data,
  output logic                   empty,
  output logic                   full,
  output logic [$clog2(DEPTH):0] level
);

  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic          do_wr, do_rd;

  assign empty = (level == '0);
  assign full  = (level == (AW+1)'(DEPTH));
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;
  assign rd_data = mem[rp];

  always_ff @(posedge clk) if (do_wr) mem[wp] <= wr_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      level <= '0;
    end else begin
      if (do_wr) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (do_rd) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      level <= level + (AW+1)'(do_wr) - (AW+1)'(do_rd);
    end
  end

  a_no_overflow:  assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full))
    else $error("readout_fifo: write while full");
  a_no_underflow: assert property (@(posedge clk) disable iff (!rst_n) !(rd_en && empty))
    else $error("readout_fifo: read while empty");

endmodule
