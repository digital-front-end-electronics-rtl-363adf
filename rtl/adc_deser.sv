// adc_deser: rebuilds the 14-bit samples of one FADC channel from its
// 7 double-data-rate LVDS lanes.
//
// The ADC sends each 14-bit sample over 7 LVDS pairs, every pair carrying
// a duplet of one even and one odd data bit, one on each clock edge. The
// input delay taps and DDR capture cells in front of this block are FPGA
// primitives; what reaches this block, once per 200 MHz sample clock, is
// the bit captured on the rising edge (lane_rise) and the bit captured on
// the falling edge (lane_fall) of every lane.
//
// Lane k carries sample bit 2k on the rising edge and bit 2k+1 on the
// falling edge (this pairing is an assumption). When the capture point
// sits half a bit late, the falling-edge bits of one clock and the
// rising-edge bits of the next clock belong to the same sample; edge_swap
// selects that pairing instead. This is the delay adjustment the setup
// registers control together with the delay tap value.
//
// Timing: sample_o is valid two clocks after the lanes carrying its
// rising-edge bits, in both pairings. One sample per clock, no gaps.
// The document's deserializer delivers even and odd samples of two
// channels on four half-rate outputs; here the processing runs at the
// full sample rate, so the same data leaves as one full-rate stream.
// With LANES = 8 the same block serves as the Virtex-5 receiver of the
// 8-lane DDR link that carries the 16-bit link words from the Virtex-6.
module adc_deser
  import neda_pkg::*;
#(
  parameter int unsigned LANES = SAMPLE_W / 2
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [LANES-1:0] lane_rise,
  input  logic [LANES-1:0] lane_fall,
  input  logic             edge_swap,
  output logic [2*LANES-1:0] sample_o
);

  logic [LANES-1:0] rise_q, fall_q, fall_qq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rise_q  <= '0;
      fall_q  <= '0;
      fall_qq <= '0;
    end else begin
      rise_q  <= lane_rise;
      fall_q  <= lane_fall;
      fall_qq <= fall_q;
    end
  end

  // interleave: even bits from `ev`, odd bits from `od`
  function automatic logic [2*LANES-1:0] interleave(input logic [LANES-1:0] ev,
                                                     input logic [LANES-1:0] od);
    logic [2*LANES-1:0] r;
    for (int k = 0; k < LANES; k++) begin
      r[2*k]   = ev[k];
      r[2*k+1] = od[k];
    end
    return r;
  endfunction

  // normal: rise and fall bits of the same clock. swapped: the previous
  // clock's falling-edge bits are the even half, this clock's rising-edge
  // bits the odd half.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sample_o <= '0;
    else        sample_o <= edge_swap ? interleave(fall_qq, rise_q)
                                      : interleave(rise_q, fall_q);
  end

endmodule
