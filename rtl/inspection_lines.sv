// inspection_lines: front-panel inspection outputs.
//
// Two analog outputs, each driving a 200 Msps DAC, and two digital
// outputs, each chosen by a select register from a set of internal
// signals. Analog sources (asrc) are 14-bit words such as the raw samples
// of every channel and the frame sent to the Virtex-5; digital sources
// (dsrc) are single bits such as trigger requests, a clock and control
// lines. The outputs are registered: they follow their source one clock
// later.
//
// The document gives the output counts and the kinds of signals offered;
// the source lists (see v6_firmware) and the select widths are this
// design's.
module inspection_lines #(
  parameter int unsigned N_ASRC = 32,
  parameter int unsigned N_DSRC = 64,
  parameter int unsigned DAC_W  = 14
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DAC_W-1:0] asrc [N_ASRC],
  input  logic [N_DSRC-1:0] dsrc,
  input  logic [1:0][$clog2(N_ASRC)-1:0] asel,
  input  logic [1:0][$clog2(N_DSRC)-1:0] dsel,
  output logic [DAC_W-1:0] dac   [2],
  output logic [1:0]       dout
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dac[0] <= '0;
      dac[1] <= '0;
      dout   <= '0;
    end else begin
      for (int i = 0; i < 2; i++) begin
        dac[i]  <= asrc[asel[i]];
        dout[i] <= dsrc[dsel[i]];
      end
    end
  end

endmodule
